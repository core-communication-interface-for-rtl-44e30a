// tb_socket_model: behavioural model of a slave core on one bus socket, for testbenches.
//
// It follows the bus protocol as documented: it reads the data line, collects packets
// (start bit 0, 8-bit address, 32-bit data, most significant bit first) addressed to ADDR,
// and after two of them raises request; when granted it drives a start bit and the 40-bit
// answer {0x00, a+b} (SUB=0) or {0x00, a-b} (SUB=1), then drops request. With ACTIVE=0 it
// behaves as a dummy core: request held at 0 and dataout at 1.
module tb_socket_model #(
  parameter logic [7:0] ADDR   = 8'h01,
  parameter bit         SUB    = 1'b0,
  parameter bit         ACTIVE = 1'b1
) (
  input  logic clk,
  input  logic rst,
  input  logic line,
  output logic request,
  input  logic grant,
  output logic dataout
);
  logic [31:0] ops[$];
  int          answers = 0;

  initial begin
    request = 1'b0;
    dataout = 1'b1;
    if (ACTIVE) begin
      fork
        forever begin : rx
          logic [39:0] p;
          @(posedge clk);
          if (!rst && line === 1'b0) begin
            for (int b = 39; b >= 0; b--) begin
              @(posedge clk);
              p[b] = line;
            end
            if (p[39:32] == ADDR) ops.push_back(p[31:0]);
          end
        end
        forever begin : tx
          logic [31:0] a, b;
          logic [39:0] w;
          wait (ops.size() >= 2);
          a = ops.pop_front();
          b = ops.pop_front();
          w = {8'h00, SUB ? a - b : a + b};
          @(negedge clk);
          request = 1'b1;
          while (grant !== 1'b1) @(negedge clk);
          dataout = 1'b0;
          for (int k = 39; k >= 0; k--) begin
            @(negedge clk);
            dataout = w[k];
          end
          @(negedge clk);
          dataout = 1'b1;
          request = 1'b0;
          answers++;
        end
      join
    end
  end
endmodule
