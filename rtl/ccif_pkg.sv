// ccif_pkg: shared constants and types of the serial core communication interface.
//
// A packet on the 1-bit data line is one start bit (logic 0) followed by a 40-bit word,
// most significant bit first: an 8-bit destination core address, then a 32-bit data word.
// The line rests at logic 1. The packet layout and widths follow the interface description;
// the core addresses, the instruction encoding of the master core's program memory and the
// register codes are choices of this design.
package ccif_pkg;

  localparam int unsigned ADDR_BITS = 8;
  localparam int unsigned DATA_BITS = 32;
  localparam int unsigned WORD_BITS = ADDR_BITS + DATA_BITS;  // 40
  // Cycles a granted core owns the line: start bit plus the 40-bit word.
  localparam int unsigned PACKET_CYCLES = WORD_BITS + 1;     // 41

  typedef logic [ADDR_BITS-1:0] addr_t;
  typedef logic [DATA_BITS-1:0] data_t;

  typedef struct packed {
    addr_t addr;
    data_t data;
  } word_t;  // 40 bits, addr in the upper byte

  // Core addresses used by the case-study system (this design's choice).
  localparam addr_t MASTER_ADDR = 8'h00;
  localparam addr_t SLAVE1_ADDR = 8'h01;  // adder
  localparam addr_t SLAVE2_ADDR = 8'h02;  // subtractor
  localparam addr_t SLAVE3_ADDR = 8'h03;  // third (spare) socket

  // hw-core operation.
  typedef enum logic [0:0] {OP_ADD = 1'b0, OP_SUB = 1'b1} alu_op_e;

  // Master core program memory: 16-bit instructions.
  //   [15:12] opcode
  //   LOAD : [11:10] destination register, [9:0] unsigned immediate
  //   ADD/SUB : [11:10] first operand, [9:8] second operand; the result goes to T
  //   END  : stop
  localparam int unsigned INSTR_BITS = 16;
  typedef logic [INSTR_BITS-1:0] instr_t;

  typedef enum logic [3:0] {
    OPC_LOAD = 4'h1,
    OPC_ADD  = 4'h2,
    OPC_SUB  = 4'h3,
    OPC_END  = 4'hF
  } opcode_e;

  // Register codes. Code 3 reads as zero and cannot be loaded.
  typedef enum logic [1:0] {REG_A = 2'd0, REG_B = 2'd1, REG_T = 2'd2, REG_Z = 2'd3} reg_e;

  function automatic instr_t mk_load(reg_e rd, logic [9:0] imm);
    return {OPC_LOAD, rd, imm};
  endfunction

  function automatic instr_t mk_op(opcode_e opc, reg_e rs1, reg_e rs2);
    return {opc, rs1, rs2, 8'h00};
  endfunction

  function automatic instr_t mk_end();
    return {OPC_END, 12'h000};
  endfunction

endpackage
