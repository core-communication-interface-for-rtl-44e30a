// tb_ccif_top: end-to-end test of the case-study system at its default sizes.
//
// Phase 1 runs the power-up program (A=8, B=7, T=A+B, T=T+A, T=T-B, T=A-T) and checks each
// result shown to the outside world. A bus monitor decodes every packet on the data line on
// its own (start bit, 8-bit address, 32-bit data) and checks the packet sequence and that
// every grant lasts 41 cycles. Phase 2 rewrites the program memory with a random program and
// restarts it while a core on the spare socket keeps sending packets to an unused address,
// so the arbiter has to share the line. Expected results come from a reference model of the
// program written here. Mechanisms counted: grants to each requester, packets skipped by
// address mismatch, contention (two requesters waiting at once), a master request held
// across two operands, program end, restart and program rewrite.
module tb_ccif_top;
  import ccif_pkg::*;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  logic       pm_we = 1'b0;
  logic [3:0] pm_waddr = '0;
  instr_t     pm_wdata = '0;
  logic       s3_request, s3_grant, s3_dataout, line;
  data_t      result;
  logic       result_valid, done;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ccif_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- spare-socket core (tb model): sends packets to address 0x55
  logic        s3_want = 1'b0;
  logic [39:0] s3_word = {8'h55, 32'h0};
  logic [39:0] s3_sh;
  int          s3_cnt = 0;
  logic        s3_busy = 1'b0;
  int          s3_sent = 0;

  assign s3_request = s3_want && !s3_busy;
  assign s3_dataout = !s3_busy ? !(s3_want && s3_grant) : s3_sh[39];

  always_ff @(posedge clk) begin
    if (!s3_busy && s3_want && s3_grant) begin
      s3_busy <= 1'b1;
      s3_sh   <= s3_word;
      s3_cnt  <= 0;
    end else if (s3_busy) begin
      s3_sh  <= {s3_sh[38:0], 1'b1};
      s3_cnt <= s3_cnt + 1;
      if (s3_cnt == 39) begin
        s3_busy <= 1'b0;
        s3_sent <= s3_sent + 1;
        s3_word <= {8'h55, s3_word[31:0] + 32'd1};
      end
    end
  end

  // ---------------- bus monitor
  typedef struct {logic [7:0] addr; logic [31:0] data;} pkt_t;
  pkt_t        pkts[$];
  logic        mon_busy = 1'b0;
  int          mon_cnt = 0;
  logic [39:0] mon_sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      mon_busy <= 1'b0;
    end else if (!mon_busy) begin
      if (!line) begin
        mon_busy <= 1'b1;
        mon_cnt  <= 0;
      end
    end else begin
      mon_sh  <= {mon_sh[38:0], line};
      mon_cnt <= mon_cnt + 1;
      if (mon_cnt == 39) begin
        mon_busy <= 1'b0;
        pkts.push_back('{addr: mon_sh[38:31], data: {mon_sh[30:0], line}});
      end
    end
  end

  // grant length and mechanism counters
  logic [3:0] g;
  assign g = dut.u_ctrl.grant;
  int glen = 0;
  int grants[4] = '{0, 0, 0, 0};
  int bad_glen = 0, contention = 0, skips = 0, held_disp = 0;
  logic prev_m_grantC = 1'b0;

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (g != 0) glen <= glen + 1;
      else begin
        if (glen != 0 && glen != 41) bad_glen <= bad_glen + 1;
        glen <= 0;
      end
      for (int i = 0; i < 4; i++)
        if (g[i] && glen == 0) grants[i] <= grants[i] + 1;
      if ($countones(dut.u_ctrl.request) >= 2) contention <= contention + 1;
      if (dut.u_slave1.u_rx.state == 2'd3 && $past(dut.u_slave1.u_rx.state) == 2'd1) skips <= skips + 1;
      // master still requests right after its first operand went out
      if (prev_m_grantC && dut.u_ctrl.tx_disp) held_disp <= held_disp + 1;
      prev_m_grantC <= dut.u_ctrl.tx_grantC;
    end
  end

  // ---------------- reference model of the master program
  data_t exp_q[$];

  function automatic data_t rd(logic [1:0] r, data_t a, data_t b, data_t t);
    case (r) 0: return a; 1: return b; 2: return t; default: return 0; endcase
  endfunction

  task automatic model(input instr_t prog[16]);
    data_t a = 0, b = 0, t = 0;
    exp_q.delete();
    for (int pc = 0; pc < 16; pc++) begin
      instr_t i;
      i = prog[pc];
      case (i[15:12])
        4'h1: case (i[11:10]) 0: a = 32'(i[9:0]); 1: b = 32'(i[9:0]); 2: t = 32'(i[9:0]); default: ; endcase
        4'h2: begin t = rd(i[11:10], a, b, t) + rd(i[9:8], a, b, t); exp_q.push_back(t); end
        4'h3: begin t = rd(i[11:10], a, b, t) - rd(i[9:8], a, b, t); exp_q.push_back(t); end
        4'hF: break;
        default: ;
      endcase
    end
  endtask

  data_t got_q[$];
  always @(posedge clk) if (result_valid && !rst) got_q.push_back(result);

  instr_t prog[16];
  int     n_runs_done = 0;

  initial begin
    // ---------- phase 1: power-up program
    prog = '{16'h1008, 16'h1407, 16'h2100, 16'h2800, 16'h3900, 16'h3200,
             16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000, 16'hF000,
             16'hF000, 16'hF000, 16'hF000, 16'hF000};
    model(prog);
    check(exp_q.size() == 4 && exp_q[0] == 15 && exp_q[1] == 23 && exp_q[2] == 16
          && exp_q[3] == 32'hFFFF_FFF8, "reference model of the example program");
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done === 1'b1 && !rst);
    @(posedge clk);
    n_runs_done++;
    check(got_q.size() == exp_q.size(), $sformatf("phase 1: %0d results, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[k]) if (k < got_q.size())
      check(got_q[k] == exp_q[k], $sformatf("phase 1 result %0d: got %0d expected %0d", k, got_q[k], exp_q[k]));
    // packet sequence: per operation two operands to the slave, then the result to the master
    check(pkts.size() == 12, $sformatf("phase 1: %0d packets on the bus, expected 12", pkts.size()));
    if (pkts.size() >= 12) begin
      check(pkts[0].addr == 8'h01 && pkts[0].data == 8,  "pkt 0 = A to slave1");
      check(pkts[1].addr == 8'h01 && pkts[1].data == 7,  "pkt 1 = B to slave1");
      check(pkts[2].addr == 8'h00 && pkts[2].data == 15, "pkt 2 = 15 to master");
      check(pkts[6].addr == 8'h02 && pkts[6].data == 23, "pkt 6 = T to slave2");
      check(pkts[7].addr == 8'h02 && pkts[7].data == 7,  "pkt 7 = B to slave2");
      check(pkts[11].addr == 8'h00 && pkts[11].data == 32'hFFFF_FFF8, "pkt 11 = -8 to master");
    end

    // ---------- phase 2: rewrite the program, restart it with spare-socket traffic
    for (int k = 0; k < 16; k++) begin
      int r;
      r = $urandom_range(0, 9);
      if (k == 15) prog[k] = 16'hF000;
      else if (r < 3) prog[k] = {4'h1, 2'($urandom_range(0, 2)), 10'($urandom)};
      else if (r < 6) prog[k] = {4'h2, 2'($urandom_range(0, 3)), 2'($urandom_range(0, 3)), 8'h00};
      else if (r < 9) prog[k] = {4'h3, 2'($urandom_range(0, 3)), 2'($urandom_range(0, 3)), 8'h00};
      else prog[k] = 16'h7000;  // unknown code, skipped
    end
    prog[0] = 16'h1000 | 16'($urandom_range(1, 1023));
    prog[1] = 16'h1400 | 16'($urandom_range(1, 1023));
    prog[2] = 16'h2100;
    model(prog);
    for (int k = 0; k < 16; k++) begin
      pm_we <= 1'b1; pm_waddr <= 4'(k); pm_wdata <= prog[k];
      @(posedge clk);
    end
    pm_we <= 1'b0;
    got_q.delete();
    s3_want <= 1'b1;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    wait (done === 1'b1);
    @(posedge clk);
    n_runs_done++;
    s3_want <= 1'b0;
    repeat (100) @(posedge clk);
    check(got_q.size() == exp_q.size(), $sformatf("phase 2: %0d results, expected %0d", got_q.size(), exp_q.size()));
    foreach (exp_q[k]) if (k < got_q.size())
      check(got_q[k] == exp_q[k], $sformatf("phase 2 result %0d: got %h expected %h", k, got_q[k], exp_q[k]));

    // ---------- mechanisms
    check(bad_glen == 0, $sformatf("%0d grants not 41 cycles long", bad_glen));
    for (int i = 0; i < 4; i++)
      check(grants[i] > 0, $sformatf("requester %0d never granted", i));
    check(s3_sent > 0, "spare socket sent nothing");
    check(contention > 0, "no contention for the line");
    check(skips > 0, "no packet skipped by address mismatch");
    check(held_disp > 0, "master never held its request across two operands");
    check(n_runs_done == 2, "program end / restart");
    $display("mechanisms: grants m=%0d s1=%0d s2=%0d s3=%0d contention=%0d skips=%0d held=%0d runs=%0d",
             grants[0], grants[1], grants[2], grants[3], contention, skips, held_disp, n_runs_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
