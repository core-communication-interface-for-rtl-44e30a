// prog_mem: the master core's program memory, a small distributed (LUT) RAM.
//
// DEPTH instructions of INSTR_BITS bits. Reads are asynchronous, as in a LUT RAM: 'rdata'
// follows 'raddr' in the same cycle. The contents start, at configuration, from the INIT
// parameter (there is no reset: a reset does not erase the program) and can be rewritten
// one word per clock through the write port, which stands in for the reconfiguration tools
// that set the program on the device. The default program is the example of the case
// study: A=8, B=7, T=A+B, T=T+A, then two subtractions, then the end code.
// The depth of 16 (one LUT RAM's depth), the write port and the program beyond T=T+A are this
// design's choices.
module prog_mem
  import ccif_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter instr_t      INIT [DEPTH] = '{
    mk_load(REG_A, 10'd8),
    mk_load(REG_B, 10'd7),
    mk_op(OPC_ADD, REG_A, REG_B),   // T = A + B = 15
    mk_op(OPC_ADD, REG_T, REG_A),   // T = T + A = 23
    mk_op(OPC_SUB, REG_T, REG_B),   // T = T - B = 16
    mk_op(OPC_SUB, REG_A, REG_T),   // T = A - T = -8
    mk_end(), mk_end(), mk_end(), mk_end(), mk_end(),
    mk_end(), mk_end(), mk_end(), mk_end(), mk_end()
  }
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  instr_t                   wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output instr_t                   rdata
);

  instr_t mem [DEPTH];

  // Power-up contents, as set by the configuration bitstream.
  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
