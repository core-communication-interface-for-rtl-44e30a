// tb_receive_module: checks address filtering and word assembly of receive_module.
//
// The line is driven with packets (start bit, 8-bit address, 32-bit data, most significant
// bit first) separated by random idle gaps. About half are addressed to the module
// (address 0x01), the rest to other addresses, including ones that differ in a single bit
// (0x81 among them).
// Checked: exactly one one-cycle 'disp' per packet for this address, in the cycle after the
// last data bit (40 cycles after the start bit was sampled), with the packet's data; no
// 'disp' for other addresses; 'addr_match' after the address byte, for matching packets only.
module tb_receive_module;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        line = 1'b1;
  logic        disp, addr_match;
  logic [31:0] data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  receive_module #(.MY_ADDR(8'h01)) dut (.clk, .rst, .line, .disp, .data, .addr_match);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  int matched = 0, skipped = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 80; p++) begin
      logic [7:0]  a;
      logic [31:0] d;
      logic [40:0] bits;
      bit mine;
      int r;
      r = $urandom_range(0, 3);
      a = (r < 2) ? 8'h01 : (r == 2) ? (8'h01 ^ (8'h1 << $urandom_range(0, 7))) : (p % 2 == 0) ? 8'h81 : 8'($urandom);
      mine = (a == 8'h01);
      d = $urandom;
      bits = {1'b0, a, d};
      for (int b = 40; b >= 0; b--) begin
        line <= bits[b];
        @(posedge clk);
        #1;
        if (b == 0) begin
          check(disp === mine, $sformatf("disp after packet to %h", a));
          if (mine) check(data === d, $sformatf("data %h expected %h", data, d));
        end else check(disp === 1'b0, "disp during a packet");
        if (b == 32) check(addr_match === mine, "addr_match after address byte");
        else check(addr_match === 1'b0, "stray addr_match");
      end
      line <= 1'b1;
      @(posedge clk);
      #1;
      check(disp === 1'b0, "disp longer than one cycle");
      if (mine) matched++;
      else skipped++;
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk);
        #1 check(disp === 1'b0, "disp longer than one cycle / in idle");
      end
    end
    check(matched > 0 && skipped > 0, "both matching and skipped packets seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
