// ccif_top: the case-study system built on the core communication interface.
//
// The controller (bus, arbiter, master core) with three bus sockets. Socket 0 holds slave 1,
// a core that adds its two operands; socket 1 holds slave 2, which subtracts. Socket 2 is
// brought out as ports, so that a further core, or a dummy core that holds request at 0 and
// dataout at 1, can be attached outside. The master core runs its program, sends each
// operation's operands over the serial bus to the slave core that does it, collects the
// answer and shows it on 'result'. Clock and reset are global. Slave addresses 1 and 2 and
// the spare socket's address 3 are this design's choices.
module ccif_top
  import ccif_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic                        pm_we,
  input  logic [$clog2(PM_DEPTH)-1:0] pm_waddr,
  input  instr_t                      pm_wdata,
  // spare socket (socket 2)
  input  logic                        s3_request,
  output logic                        s3_grant,
  input  logic                        s3_dataout,
  output logic                        line,
  // outside world
  output data_t                       result,
  output logic                        result_valid,
  output logic                        done
);

  localparam int unsigned N_SOCKETS = 3;

  logic [N_SOCKETS-1:0] sock_request, sock_grant, sock_dataout;

  controller #(.N_SOCKETS(N_SOCKETS), .PM_DEPTH(PM_DEPTH)) u_ctrl (
    .clk, .rst, .start,
    .pm_we, .pm_waddr, .pm_wdata,
    .sock_request, .sock_grant, .sock_dataout, .line,
    .result, .result_valid, .done
  );

  slave_core #(.OP(OP_ADD), .MY_ADDR(SLAVE1_ADDR)) u_slave1 (
    .clk, .rst, .line,
    .request(sock_request[0]), .grant(sock_grant[0]), .dataout(sock_dataout[0])
  );

  slave_core #(.OP(OP_SUB), .MY_ADDR(SLAVE2_ADDR)) u_slave2 (
    .clk, .rst, .line,
    .request(sock_request[1]), .grant(sock_grant[1]), .dataout(sock_dataout[1])
  );

  assign sock_request[2] = s3_request;
  assign sock_dataout[2] = s3_dataout;
  assign s3_grant        = sock_grant[2];

endmodule
