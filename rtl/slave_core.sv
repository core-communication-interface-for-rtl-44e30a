// slave_core: one run-time loadable slave IP core of the case study.
//
// A slave core is its user function (hw_core) plus a send module and a receive module. Its
// only connections are those of one bus socket: clock, reset, request, grant, the shared data
// line it reads, and the dataout it drives while granted. The receive module takes packets
// addressed to MY_ADDR; the hw-core's result goes back through the send module to the master
// core. The structure follows the description of slave cores; OP and MY_ADDR as parameters
// are this design's choices.
//
// Timing: from the end of the second operand's packet, the result is offered to the send
// module two cycles later and goes out once the arbiter grants this socket.
module slave_core
  import ccif_pkg::*;
#(
  parameter alu_op_e OP      = OP_ADD,
  parameter addr_t   MY_ADDR = SLAVE1_ADDR
) (
  input  logic clk,
  input  logic rst,
  input  logic line,     // shared data line (datain)
  output logic request,
  input  logic grant,
  output logic dataout
);

  logic  rx_disp;
  data_t rx_data;
  logic  tx_disp;
  word_t tx_word;
  logic  tx_grantC;
  logic  rx_match;

  receive_module #(.MY_ADDR(MY_ADDR)) u_rx (
    .clk, .rst, .line,
    .disp(rx_disp), .data(rx_data), .addr_match(rx_match)
  );

  hw_core #(.OP(OP), .DEST_ADDR(MASTER_ADDR)) u_core (
    .clk, .rst,
    .rx_disp, .rx_data,
    .tx_disp, .tx_word, .tx_grantC
  );

  send_module u_tx (
    .clk, .rst,
    .disp(tx_disp), .word_in(tx_word),
    .request, .grant, .dataout,
    .grantC(tx_grantC)
  );

endmodule
