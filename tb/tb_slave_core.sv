// tb_slave_core: two slave cores (adder at 0x01, subtractor at 0x02) on one data line.
//
// The testbench plays master and arbiter. It sends operand packets to one slave or the
// other, plus packets to an unused address that both must ignore, then grants the requesting
// slave the line for 41 cycles and decodes what it sends. Checked: only the addressed slave
// answers; the answer is {0x00, a+b} or {0x00, a-b}; the request appears in the second cycle
// after the last bit of the second operand; dataout rests at 1 when not granted.
module tb_slave_core;
  import ccif_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic tb_drive = 1'b1;
  logic line;
  logic [1:0] request, grant = 2'b00, dataout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  assign line = tb_drive & (grant[0] ? dataout[0] : 1'b1) & (grant[1] ? dataout[1] : 1'b1);

  slave_core #(.OP(OP_ADD), .MY_ADDR(8'h01)) s1 (.clk, .rst, .line, .request(request[0]),
                                                .grant(grant[0]), .dataout(dataout[0]));
  slave_core #(.OP(OP_SUB), .MY_ADDR(8'h02)) s2 (.clk, .rst, .line, .request(request[1]),
                                                .grant(grant[1]), .dataout(dataout[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  task automatic send_pkt(input logic [7:0] a, input logic [31:0] d);
    logic [40:0] bits;
    bits = {1'b0, a, d};
    for (int b = 40; b >= 0; b--) begin
      tb_drive <= bits[b];
      @(posedge clk);
    end
    tb_drive <= 1'b1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      int who;
      logic [31:0] a, b, exp;
      logic [40:0] got;
      who = $urandom_range(0, 1);
      a = $urandom; b = $urandom;
      exp = (who == 0) ? a + b : a - b;
      send_pkt(8'h01 + 8'(who), a);
      if (k % 4 == 0) send_pkt(8'h03, $urandom);  // nobody's address
      #1 check(request == 2'b00, "request after one operand");
      send_pkt(8'h01 + 8'(who), b);
      #1 check(request == 2'b00, "request in the cycle after the last bit");
      @(posedge clk);
      #1 check(request[who] === 1'b1 && request[1-who] === 1'b0,
               $sformatf("request %b, expected from slave %0d only", request, who + 1));
      check(dataout == 2'b11, "dataout not at rest before grant");
      repeat ($urandom_range(0, 3)) @(posedge clk);
      grant[who] <= 1'b1;
      for (int c = 40; c >= 0; c--) begin
        @(posedge clk);
        got[c] = line;
      end
      grant[who] <= 1'b0;
      check(got == {1'b0, 8'h00, exp},
            $sformatf("slave %0d answered %h, expected %h", who + 1, got, {1'b0, 8'h00, exp}));
      repeat (2) @(posedge clk);
      #1 check(request == 2'b00, "request after the answer went out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
