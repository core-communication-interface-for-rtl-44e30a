// tb_comm_bus: checks the data-line resolution of the communication bus.
//
// For every grant pattern with at most one bit set, and random dataout values, the line must
// carry the granted socket's dataout, or rest at 1 when no socket is granted.
module tb_comm_bus;
  localparam int N = 4;
  logic [N-1:0] grant, dataout;
  logic         line;
  int checks = 0, failures = 0;

  comm_bus #(.N_PORTS(N)) dut (.grant, .dataout, .line);

  initial begin
    for (int rep = 0; rep < 64; rep++) begin
      for (int g = -1; g < N; g++) begin
        logic exp;
        grant   = (g < 0) ? '0 : N'(1) << g;
        dataout = N'($urandom);
        exp     = (g < 0) ? 1'b1 : dataout[g];
        #1;
        checks++;
        if (line !== exp) begin
          failures++;
          $display("FAIL: grant=%b dataout=%b line=%b expected %b", grant, dataout, line, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
