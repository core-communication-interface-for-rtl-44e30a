// controller: the fixed module loaded into the FPGA first.
//
// It holds the communication bus, the arbiter and the master core, with the master core's own
// send and receive modules. Requester 0 of the arbiter is the master core; requesters 1 to
// N_SOCKETS are the bus sockets into which slave cores are loaded at run time. Each socket
// brings out request, grant and dataout, and all sockets read the same data line. The master
// core is the only part that talks to the world outside the chip ('result', 'done'), so
// slave cores reach the outside only through it. The three-part structure and the three
// sockets follow the description; the numbering of the requesters and the program memory
// write port are this design's choices.
module controller
  import ccif_pkg::*;
#(
  parameter int unsigned N_SOCKETS = 3,
  parameter int unsigned PM_DEPTH  = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  // program memory write port (stands in for the reconfiguration tools)
  input  logic                        pm_we,
  input  logic [$clog2(PM_DEPTH)-1:0] pm_waddr,
  input  instr_t                      pm_wdata,
  // bus sockets
  input  logic [N_SOCKETS-1:0]        sock_request,
  output logic [N_SOCKETS-1:0]        sock_grant,
  input  logic [N_SOCKETS-1:0]        sock_dataout,
  output logic                        line,
  // outside world
  output data_t                       result,
  output logic                        result_valid,
  output logic                        done
);

  localparam int unsigned N_REQ = N_SOCKETS + 1;

  logic [N_REQ-1:0] request, grant, dataout;

  logic                        m_req, m_dataout;
  logic [$clog2(PM_DEPTH)-1:0] pm_addr;
  instr_t                      pm_data;
  logic                        tx_disp, tx_grantC, rx_disp, rx_match;
  word_t                       tx_word;
  data_t                       rx_data;

  assign request    = {sock_request, m_req};
  assign dataout    = {sock_dataout, m_dataout};
  assign sock_grant = grant[N_REQ-1:1];

  arbiter #(.N_REQ(N_REQ), .PACKET_CYCLES(PACKET_CYCLES)) u_arb (
    .clk, .rst, .request, .grant
  );

  comm_bus #(.N_PORTS(N_REQ)) u_bus (
    .grant, .dataout, .line
  );

  prog_mem #(.DEPTH(PM_DEPTH)) u_pm (
    .clk, .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata),
    .raddr(pm_addr), .rdata(pm_data)
  );

  master_core #(.DEPTH(PM_DEPTH)) u_master (
    .clk, .rst, .start,
    .pm_addr, .pm_data,
    .tx_disp, .tx_word, .tx_grantC,
    .rx_disp, .rx_data,
    .result, .result_valid, .done
  );

  send_module u_tx (
    .clk, .rst,
    .disp(tx_disp), .word_in(tx_word),
    .request(m_req), .grant(grant[0]), .dataout(m_dataout),
    .grantC(tx_grantC)
  );

  receive_module #(.MY_ADDR(MASTER_ADDR)) u_rx (
    .clk, .rst, .line,
    .disp(rx_disp), .data(rx_data), .addr_match(rx_match)
  );

endmodule
