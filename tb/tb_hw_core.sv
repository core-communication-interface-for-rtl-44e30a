// tb_hw_core: checks the adder and subtractor hw-cores.
//
// Two instances, one per operation, get random operand pairs as single-cycle rx_disp pulses.
// Checked: no result is offered after the first operand; after the second, tx_disp rises in
// the next cycle with {master address 0x00, a+b or a-b modulo 2^32}; the offer is held until
// grantC, a word arriving meanwhile is ignored, and afterwards the core takes a new pair.
module tb_hw_core;
  import ccif_pkg::*;
  logic  clk = 1'b0;
  logic  rst = 1'b1;
  logic  rx_disp = 1'b0;
  data_t rx_data = '0;
  logic  grantC = 1'b0;
  logic  tx_disp_add, tx_disp_sub;
  word_t tx_word_add, tx_word_sub;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hw_core #(.OP(OP_ADD)) dut_add (.clk, .rst, .rx_disp, .rx_data, .tx_disp(tx_disp_add),
                                  .tx_word(tx_word_add), .tx_grantC(grantC));
  hw_core #(.OP(OP_SUB)) dut_sub (.clk, .rst, .rx_disp, .rx_data, .tx_disp(tx_disp_sub),
                                  .tx_word(tx_word_sub), .tx_grantC(grantC));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  task automatic give(input data_t d);
    rx_disp <= 1'b1; rx_data <= d;
    @(posedge clk);
    rx_disp <= 1'b0; rx_data <= $urandom;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int k = 0; k < 200; k++) begin
      data_t a, b;
      logic [39:0] ea, es;
      a = (k == 0) ? 32'd7 : $urandom;
      b = (k == 0) ? 32'd8 : $urandom;
      ea = {8'h00, a + b};
      es = {8'h00, a - b};
      give(a);
      repeat ($urandom_range(0, 3)) begin
        #1 check(!tx_disp_add && !tx_disp_sub, "result offered after one operand");
        @(posedge clk);
      end
      give(b);
      #1;
      check(tx_disp_add && tx_disp_sub, "no result offer after second operand");
      check(tx_word_add == ea, $sformatf("add %h+%h gave %h", a, b, tx_word_add));
      check(tx_word_sub == es, $sformatf("sub %h-%h gave %h", a, b, tx_word_sub));
      if (k == 0) check(tx_word_sub[31:0] == 32'hFFFF_FFFF, "7-8 wraps to -1");
      // a stray word while the result waits must be ignored
      if (k % 3 == 1) give($urandom);
      repeat ($urandom_range(0, 5)) begin
        @(posedge clk);
        #1 check(tx_disp_add && tx_word_add == ea && tx_word_sub == es, "offer not held");
      end
      grantC <= 1'b1;
      @(posedge clk);
      grantC <= 1'b0;
      #1 check(!tx_disp_add && !tx_disp_sub, "offer not withdrawn after grantC");
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
