// tb_send_module: checks the request/grant handshake and the serial output of send_module.
//
// A core model offers random 40-bit words, sometimes holding 'disp' high across two words.
// An arbiter model grants the line a random number of cycles after the request. Checked:
// request only while a word is offered and not yet granted; start bit (0) in the first
// granted cycle; then the 40 bits of the word offered at grant time, most significant first
// (word_in is scrambled afterwards, so the word must have been stored); grantC exactly one
// cycle long, 41 cycles after the grant; dataout at 1 whenever the module is not sending.
module tb_send_module;
  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        disp = 1'b0;
  logic [39:0] word_in = '0;
  logic        request, grant = 1'b0, dataout, grantC;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  send_module dut (.clk, .rst, .disp, .word_in, .request, .grant, .dataout, .grantC);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  int words_sent = 0;
  int held = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int w = 0; w < 60; w++) begin
      logic [39:0] wd;
      bit hold_next;
      wd = 40'({$urandom, $urandom});
      disp <= 1'b1;
      word_in <= wd;
      @(posedge clk);
      // wait a random time with request high and no grant; the line must rest
      repeat ($urandom_range(0, 6)) begin
        #1 check(request === 1'b1, "request not raised");
        check(dataout === 1'b1, "line not at rest while waiting");
        check(grantC === 1'b0, "grantC while waiting");
        @(posedge clk);
      end
      #1 check(request === 1'b1, "request not raised before grant");
      grant <= 1'b1;
      #4 check(dataout === 1'b0, "no start bit in first granted cycle");
      @(posedge clk);
      word_in <= ~wd;  // the stored word must be used
      for (int b = 39; b >= 0; b--) begin
        #1 check(dataout === wd[b], $sformatf("word %0d bit %0d", w, b));
        check(grantC === 1'b0, "early grantC");
        check(request === 1'b0, "request while sending");
        if (b == 0) grant <= 1'b0;
        @(posedge clk);
      end
      #1 check(grantC === 1'b1, "grantC not 41 cycles after grant");
      check(dataout === 1'b1, "line not at rest after packet");
      check(request === 1'b0, "request in grantC cycle");
      hold_next = ($urandom_range(0, 1) == 1);
      if (hold_next) held++;
      disp <= hold_next;
      words_sent++;
      @(posedge clk);
      #1 check(grantC === 1'b0, "grantC longer than one cycle");
      if (!hold_next) begin
        repeat ($urandom_range(1, 4)) begin
          #1 check(request === 1'b0 && dataout === 1'b1, "activity with no word offered");
          @(posedge clk);
        end
      end
    end
    check(held > 0, "disp never held across two words");
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
