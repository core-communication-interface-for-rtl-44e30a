// tb_controller: the controller with behavioural slave cores in its sockets.
//
// Socket 0 holds an adder model at 0x01, socket 1 a subtractor model at 0x02, socket 2 a
// dummy core. The power-up program must give 15, 23, 16 and -8 on 'result', then 'done'.
// A bus monitor decodes every packet independently and checks the sequence of packets
// (two operands to the slave, answer to the master, per operation) and that each grant
// lasts 41 cycles. Each operation costs three packets of 41 cycles plus arbitration; the
// time between results is checked to lie within the bound worked out here.
module tb_controller;
  import ccif_pkg::*;
  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       start = 1'b0;
  logic [2:0] sock_request, sock_grant, sock_dataout;
  logic       line, result_valid, done;
  data_t      result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller dut (.clk, .rst, .start, .pm_we(1'b0), .pm_waddr(4'h0), .pm_wdata(16'h0),
                  .sock_request, .sock_grant, .sock_dataout, .line,
                  .result, .result_valid, .done);

  tb_socket_model #(.ADDR(8'h01), .SUB(1'b0)) m1 (.clk, .rst, .line, .request(sock_request[0]),
                                                 .grant(sock_grant[0]), .dataout(sock_dataout[0]));
  tb_socket_model #(.ADDR(8'h02), .SUB(1'b1)) m2 (.clk, .rst, .line, .request(sock_request[1]),
                                                 .grant(sock_grant[1]), .dataout(sock_dataout[1]));
  tb_socket_model #(.ACTIVE(1'b0)) m3 (.clk, .rst, .line, .request(sock_request[2]),
                                       .grant(sock_grant[2]), .dataout(sock_dataout[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: t=%0t %s", $time, what); end
  endtask

  // packet monitor
  logic [39:0] pkts[$];
  initial begin
    forever begin
      logic [39:0] p;
      @(posedge clk);
      if (!rst && line === 1'b0) begin
        for (int b = 39; b >= 0; b--) begin
          @(posedge clk);
          p[b] = line;
        end
        pkts.push_back(p);
      end
    end
  end

  int glen = 0, bad_glen = 0, cyc = 0, last_res = 0, worst_gap = 0;
  data_t got[$];
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (sock_grant != 0 || dut.grant[0]) glen <= glen + 1;
      else begin
        if (glen != 0 && glen != 41) bad_glen <= bad_glen + 1;
        glen <= 0;
      end
      if (result_valid) begin
        got.push_back(result);
        if (last_res != 0 && cyc - last_res > worst_gap) worst_gap <= cyc - last_res;
        last_res <= cyc;
      end
    end
  end

  initial begin
    logic [39:0] exp_p[12];
    exp_p = '{{8'h01, 32'd8}, {8'h01, 32'd7}, {8'h00, 32'd15},
              {8'h01, 32'd15}, {8'h01, 32'd8}, {8'h00, 32'd23},
              {8'h02, 32'd23}, {8'h02, 32'd7}, {8'h00, 32'd16},
              {8'h02, 32'd8}, {8'h02, 32'd16}, {8'h00, 32'hFFFF_FFF8}};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    wait (done === 1'b1);
    repeat (5) @(posedge clk);
    check(got.size() == 4, $sformatf("%0d results, expected 4", got.size()));
    if (got.size() == 4)
      check(got[0] == 15 && got[1] == 23 && got[2] == 16 && got[3] == 32'hFFFF_FFF8,
            $sformatf("results %0d %0d %0d %h", got[0], got[1], got[2], got[3]));
    check(pkts.size() == 12, $sformatf("%0d packets, expected 12", pkts.size()));
    foreach (exp_p[k]) if (k < pkts.size())
      check(pkts[k] == exp_p[k], $sformatf("packet %0d = %h, expected %h", k, pkts[k], exp_p[k]));
    check(bad_glen == 0, "grant not 41 cycles long");
    // 3 packets of 41 cycles, at most 4 scan cycles before each, 1 cycle fetch, a few cycles
    // of handshake in send/receive and in the socket model
    check(worst_gap >= 3 * 41 && worst_gap <= 3 * (41 + 4) + 12,
          $sformatf("cycles between results %0d outside [123, 147]", worst_gap));
    $display("cycles between results: %0d", worst_gap);
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
