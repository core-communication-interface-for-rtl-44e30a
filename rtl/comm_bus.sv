// comm_bus: the shared 1-bit serial data line of the communication bus.
//
// On the FPGA each core reaches the line through its own layer of tristate buffers, and only
// the core holding the grant enables its driver; unused sockets hold dummy cores so that the
// line never floats. This module gives the same behaviour as plain logic: the line carries the
// dataOut of the granted socket, and rests at logic 1 when nobody is granted. The request and
// grant lines are point-to-point wires between each socket and the arbiter and do not pass
// through here. The idle level of 1 follows the description of the line at rest; modelling the
// buffers as a multiplexer is this design's choice, since tristate nets do not exist inside
// current FPGA fabrics. Purely combinational.
module comm_bus #(
  parameter int unsigned N_PORTS = 4
) (
  input  logic [N_PORTS-1:0] grant,    // from the arbiter, one-hot or zero
  input  logic [N_PORTS-1:0] dataout,  // each core's serial output
  output logic               line      // the data line every receive module reads
);

  always_comb begin
    line = 1'b1;
    for (int i = 0; i < int'(N_PORTS); i++)
      if (grant[i]) line = dataout[i];
  end

endmodule
