// hw_core: the user function of a case-study slave core.
//
// It waits for two 32-bit words from its receive module, combines them (OP_ADD: first +
// second; OP_SUB: first - second, both modulo 2^32) and hands the result to its send module,
// addressed to the master core. It holds 'tx_disp' until the send module's grantC pulse and
// then waits for two new words. Words arriving while a result is being sent are dropped; the
// master core never sends them then. The two operations and the receive-two/compute/send
// cycle follow the case study; the operand order, the wrap-around arithmetic and dropping
// early words are this design's choices.
//
// Timing: the result is offered (tx_disp high) in the cycle after the second word's
// rx_disp pulse.
module hw_core
  import ccif_pkg::*;
#(
  parameter alu_op_e OP        = OP_ADD,
  parameter addr_t   DEST_ADDR = MASTER_ADDR
) (
  input  logic  clk,
  input  logic  rst,
  // from the receive module
  input  logic  rx_disp,
  input  data_t rx_data,
  // to the send module
  output logic  tx_disp,
  output word_t tx_word,
  input  logic  tx_grantC
);

  typedef enum logic [1:0] {WAIT_A, WAIT_B, SEND} state_e;

  state_e state;
  data_t  opa;
  data_t  res;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= WAIT_A;
      opa   <= '0;
      res   <= '0;
    end else begin
      case (state)
        WAIT_A: if (rx_disp) begin
          opa   <= rx_data;
          state <= WAIT_B;
        end
        WAIT_B: if (rx_disp) begin
          res   <= (OP == OP_SUB) ? opa - rx_data : opa + rx_data;
          state <= SEND;
        end
        SEND:    if (tx_grantC) state <= WAIT_A;
        default: state <= WAIT_A;
      endcase
    end
  end

  assign tx_disp = (state == SEND);
  assign tx_word = '{addr: DEST_ADDR, data: res};

endmodule
