// tb_arbiter: checks the serial round-robin arbiter against a cycle model written here.
//
// Four requesters raise requests at random and hold them until their grant ends. The model
// keeps its own scan pointer: one request line looked at per cycle, a grant of 41 cycles,
// then the next line. Every cycle the grant vector must equal the model's. Also checked:
// with all four requesting, grants come in the order 0,1,2,3,0 with one scan cycle between
// packets, and each grant lasts exactly 41 cycles.
module tb_arbiter;
  localparam int N = 4;
  localparam int P = 41;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [N-1:0] request = '0;
  logic [N-1:0] grant;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  arbiter #(.N_REQ(N), .PACKET_CYCLES(P)) dut (.clk, .rst, .request, .grant);

  // reference model
  int  m_ptr = 0, m_cnt = 0;
  bit  m_gr = 0;
  logic [N-1:0] m_grant;
  always_comb begin
    m_grant = '0;
    if (m_gr) m_grant[m_ptr] = 1'b1;
  end
  always @(posedge clk) begin
    if (rst) begin
      m_ptr <= 0; m_gr <= 0; m_cnt <= 0;
    end else if (!m_gr) begin
      if (request[m_ptr]) begin m_gr <= 1; m_cnt <= 0; end
      else m_ptr <= (m_ptr + 1) % N;
    end else if (m_cnt == P - 1) begin
      m_gr <= 0; m_ptr <= (m_ptr + 1) % N;
    end else m_cnt <= m_cnt + 1;
  end

  bit random_mode = 1;
  int order[$];
  int glen = 0, bad_len = 0;
  logic [N-1:0] prev_grant = '0;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (grant !== m_grant) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0t grant=%b model=%b", $time, grant, m_grant);
      end
      if (grant != 0) begin
        if (glen == 0) for (int i = 0; i < N; i++) if (grant[i]) order.push_back(i);
        glen <= glen + 1;
      end else begin
        if (glen != 0 && glen != P) bad_len <= bad_len + 1;
        glen <= 0;
      end
      prev_grant <= grant;
      // requesters: raise at random, drop when the grant ends
      for (int i = 0; i < N; i++) begin
        if (grant[i]) request[i] <= 1'b1;
        else if (prev_grant[i]) request[i] <= 1'b0;
        else if (!request[i] && (!random_mode || $urandom_range(0, 99) < 3)) request[i] <= 1'b1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (3000) @(posedge clk);
    // all four requesting all the time
    random_mode = 0;
    wait (grant == 0);
    @(posedge clk);
    order.delete();
    repeat (4 * (P + 1) * 3) @(posedge clk);
    checks++;
    if (order.size() < 8) begin failures++; $display("FAIL: only %0d grants", order.size()); end
    for (int k = 1; k < order.size(); k++) begin
      checks++;
      if (order[k] != (order[k-1] + 1) % N) begin
        failures++; $display("FAIL: grant order %0d after %0d", order[k], order[k-1]);
      end
    end
    checks++;
    if (bad_len != 0) begin failures++; $display("FAIL: %0d grants of wrong length", bad_len); end
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
