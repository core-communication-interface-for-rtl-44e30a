// tb_prog_mem: checks the power-up program and the write port of the program memory.
//
// The power-up contents must be the example program encoded by hand here: LOAD A,8 = 0x1008,
// LOAD B,7 = 0x1407, ADD A,B = 0x2100, ADD T,A = 0x2800, SUB T,B = 0x3900, SUB A,T = 0x3200,
// then the end code 0xF000. Then random writes, with and without the write enable, are
// checked against a shadow copy through the asynchronous read port.
module tb_prog_mem;
  import ccif_pkg::*;
  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  instr_t     wdata = '0, rdata;
  instr_t     shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  prog_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  initial begin
    shadow = '{16'h1008, 16'h1407, 16'h2100, 16'h2800, 16'h3900, 16'h3200, 16'hF000,
               16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000,
               16'hF000, 16'hF000};
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i);
      #1 check(rdata === shadow[i], $sformatf("power-up word %0d = %h, expected %h", i, rdata, shadow[i]));
    end
    @(posedge clk);
    for (int k = 0; k < 500; k++) begin
      we    <= ($urandom_range(0, 2) != 0);
      waddr <= 4'($urandom);
      wdata <= 16'($urandom);
      raddr <= 4'($urandom);
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1 check(rdata === shadow[raddr], $sformatf("read %0d = %h, expected %h", raddr, rdata, shadow[raddr]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
