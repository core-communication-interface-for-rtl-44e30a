// master_core: the controller's program-driven core of the case study.
//
// It holds three 32-bit registers, A, B and the target T, and runs the instructions of its
// program memory from address 0 after reset. A LOAD writes an immediate into a register. An
// ADD or SUB is not computed here: it is turned into the address of the slave core that does
// that operation (SLAVE1 adds, SLAVE2 subtracts). The master sends the first operand to that
// core in a 40-bit packet {address, value}, then the second operand, keeping 'tx_disp' high
// across both, then waits for the slave's answer, writes it into T and shows it on 'result'
// with a one-cycle 'result_valid' pulse (the board drives an 8-digit display from it). The
// end code stops it ('done'); a 'start' pulse then clears the registers, as a reset does,
// and runs the program again from address 0.
// This follows the case study. The instruction encoding (ccif_pkg), the register code that
// reads as zero, the restart input and stopping at the last memory word are this design's
// choices. An answer that arrives while no operation is outstanding is ignored.
//
// Timing: one cycle per LOAD; an operation takes two bus packets and the slave's answer.
module master_core
  import ccif_pkg::*;
#(
  parameter int unsigned DEPTH      = 16,
  parameter addr_t       ADD_ADDR   = SLAVE1_ADDR,
  parameter addr_t       SUB_ADDR   = SLAVE2_ADDR
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  // program memory read port (asynchronous)
  output logic [$clog2(DEPTH)-1:0] pm_addr,
  input  instr_t                   pm_data,
  // to the send module
  output logic                     tx_disp,
  output word_t                    tx_word,
  input  logic                     tx_grantC,
  // from the receive module
  input  logic                     rx_disp,
  input  data_t                    rx_data,
  // to the outside world
  output data_t                    result,
  output logic                     result_valid,
  output logic                     done
);

  localparam int unsigned PCW = $clog2(DEPTH);

  typedef enum logic [2:0] {FETCH, SEND1, SEND2, WAIT_RES, HALT} state_e;

  state_e         state;
  logic [PCW-1:0] pc;
  data_t          reg_a, reg_b, reg_t;
  data_t          op2;
  word_t          word_q;
  logic           last;

  opcode_e    opc;
  logic [1:0] f_r1, f_r2;
  logic [9:0] f_imm;

  assign opc   = opcode_e'(pm_data[15:12]);
  assign f_r1  = pm_data[11:10];
  assign f_r2  = pm_data[9:8];
  assign f_imm = pm_data[9:0];
  assign last  = (32'(pc) == DEPTH - 1);

  function automatic data_t rd(logic [1:0] r, data_t a, data_t b, data_t t);
    case (r)
      2'd0:    return a;
      2'd1:    return b;
      2'd2:    return t;
      default: return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= FETCH;
      pc           <= '0;
      reg_a        <= '0;
      reg_b        <= '0;
      reg_t        <= '0;
      op2          <= '0;
      word_q       <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      case (state)
        FETCH: begin
          case (opc)
            OPC_LOAD: begin
              case (f_r1)
                2'd0: reg_a <= data_t'(f_imm);
                2'd1: reg_b <= data_t'(f_imm);
                2'd2: reg_t <= data_t'(f_imm);
                default: ;
              endcase
              pc <= pc + 1'b1;
              if (last) state <= HALT;
            end
            OPC_ADD, OPC_SUB: begin
              word_q <= '{addr: (opc == OPC_SUB) ? SUB_ADDR : ADD_ADDR,
                          data: rd(f_r1, reg_a, reg_b, reg_t)};
              op2    <= rd(f_r2, reg_a, reg_b, reg_t);
              state  <= SEND1;
            end
            OPC_END: state <= HALT;
            default: begin  // unknown code: skipped
              pc <= pc + 1'b1;
              if (last) state <= HALT;
            end
          endcase
        end
        SEND1: if (tx_grantC) begin
          word_q.data <= op2;
          state       <= SEND2;
        end
        SEND2: if (tx_grantC) state <= WAIT_RES;
        WAIT_RES: if (rx_disp) begin
          reg_t        <= rx_data;
          result       <= rx_data;
          result_valid <= 1'b1;
          pc           <= pc + 1'b1;
          state        <= last ? HALT : FETCH;
        end
        HALT: if (start) begin
          pc    <= '0;
          reg_a <= '0;
          reg_b <= '0;
          reg_t <= '0;
          state <= FETCH;
        end
        default: state <= HALT;
      endcase
    end
  end

  assign pm_addr = pc;
  assign tx_disp = (state == SEND1) || (state == SEND2);
  assign tx_word = word_q;
  assign done    = (state == HALT);

endmodule
