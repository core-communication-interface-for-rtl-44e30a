// tb_master_core: runs programs on the master core against a reference model.
//
// The program memory is an array here, read asynchronously. A send-module model takes each
// offered word after a random wait and answers with a one-cycle grantC; a slave model adds
// or subtracts the two operands sent to address 0x01 or 0x02 and returns the answer as an
// rx_disp pulse after a random wait. Stray rx_disp pulses while no answer is due must be
// ignored. Checked: the words sent ({slave address, operand}), the results shown and their
// order, 'done' at the end code, and a second run of a random program after 'start'.
module tb_master_core;
  import ccif_pkg::*;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  logic [3:0] pm_addr;
  instr_t     pm_data;
  logic       tx_disp, tx_grantC = 1'b0, rx_disp = 1'b0, result_valid, done;
  word_t      tx_word;
  data_t      rx_data = '0, result;
  instr_t     prog [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign pm_data = prog[pm_addr];

  master_core dut (.clk, .rst, .start, .pm_addr, .pm_data, .tx_disp, .tx_word, .tx_grantC,
                   .rx_disp, .rx_data, .result, .result_valid, .done);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  // reference model: expected sent words and results
  logic [39:0] exp_words[$];
  data_t       exp_res[$];
  function automatic data_t rd(logic [1:0] r, data_t a, data_t b, data_t t);
    case (r) 0: return a; 1: return b; 2: return t; default: return 0; endcase
  endfunction
  task automatic model();
    data_t a = 0, b = 0, t = 0, x, y;
    exp_words.delete(); exp_res.delete();
    for (int pc = 0; pc < 16; pc++) begin
      instr_t i;
      i = prog[pc];
      if (i[15:12] == 4'hF) break;
      if (i[15:12] == 4'h1) begin
        case (i[11:10]) 0: a = 32'(i[9:0]); 1: b = 32'(i[9:0]); 2: t = 32'(i[9:0]); default: ; endcase
      end else if (i[15:12] == 4'h2 || i[15:12] == 4'h3) begin
        x = rd(i[11:10], a, b, t);
        y = rd(i[9:8], a, b, t);
        exp_words.push_back({(i[15:12] == 4'h2) ? 8'h01 : 8'h02, x});
        exp_words.push_back({(i[15:12] == 4'h2) ? 8'h01 : 8'h02, y});
        t = (i[15:12] == 4'h2) ? x + y : x - y;
        exp_res.push_back(t);
      end
    end
  endtask

  // send + slave models
  logic [39:0] got_words[$];
  data_t       got_res[$];
  int          stray = 0;
  initial begin
    forever begin
      @(posedge clk);
      if (tx_disp && !rst) begin
        logic [39:0] w1, w2;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        w1 = tx_word; got_words.push_back(w1);
        tx_grantC <= 1'b1; @(posedge clk); tx_grantC <= 1'b0;
        // stray answer while the second operand is pending
        if ($urandom_range(0, 1) == 1) begin
          rx_disp <= 1'b1; rx_data <= $urandom; @(posedge clk); rx_disp <= 1'b0; stray++;
        end
        @(posedge clk);
        while (!tx_disp) @(posedge clk);
        repeat ($urandom_range(0, 4)) @(posedge clk);
        w2 = tx_word; got_words.push_back(w2);
        tx_grantC <= 1'b1; @(posedge clk); tx_grantC <= 1'b0;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        rx_data <= (w1[39:32] == 8'h01) ? w1[31:0] + w2[31:0] : w1[31:0] - w2[31:0];
        rx_disp <= 1'b1; @(posedge clk); rx_disp <= 1'b0;
      end
    end
  end
  always @(posedge clk) if (result_valid && !rst) got_res.push_back(result);

  task automatic compare(input string tag);
    check(got_words.size() == exp_words.size(), $sformatf("%s: %0d words sent, expected %0d", tag, got_words.size(), exp_words.size()));
    foreach (exp_words[k]) if (k < got_words.size())
      check(got_words[k] == exp_words[k], $sformatf("%s word %0d = %h expected %h", tag, k, got_words[k], exp_words[k]));
    check(got_res.size() == exp_res.size(), $sformatf("%s: %0d results, expected %0d", tag, got_res.size(), exp_res.size()));
    foreach (exp_res[k]) if (k < got_res.size())
      check(got_res[k] == exp_res[k], $sformatf("%s result %0d = %h expected %h", tag, k, got_res[k], exp_res[k]));
  endtask

  initial begin
    prog = '{16'h1008, 16'h1407, 16'h2100, 16'h2800, 16'h3900, 16'h3200, 16'hF000,
             16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000,
             16'hF000, 16'hF000};
    model();
    check(exp_res.size() == 4 && exp_res[0] == 15 && exp_res[1] == 23 && exp_res[2] == 16
          && exp_res[3] == 32'hFFFF_FFF8, "reference model");
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    wait (done === 1'b1);
    repeat (5) @(posedge clk);
    check(done === 1'b1, "done not held");
    compare("example");
    for (int run = 0; run < 20; run++) begin
      for (int k = 0; k < 16; k++) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 3) prog[k] = {4'h1, 2'($urandom_range(0, 3)), 10'($urandom)};
        else if (r < 6) prog[k] = {4'h2, 2'($urandom), 2'($urandom), 8'($urandom)};
        else if (r < 9) prog[k] = {4'h3, 2'($urandom), 2'($urandom), 8'($urandom)};
        else prog[k] = (run % 2 == 0) ? 16'hF000 : 16'h5000;
      end
      model();
      got_words.delete(); got_res.delete();
      start <= 1'b1; @(posedge clk); start <= 1'b0; @(posedge clk);
      wait (done === 1'b1);
      repeat (10) @(posedge clk);
      compare($sformatf("run %0d", run));
    end
    check(stray > 0, "no stray answers injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
