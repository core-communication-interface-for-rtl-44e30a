// send_module: serialises one 40-bit word from a core onto the shared data line.
//
// The core raises 'disp' with a word on 'word_in'. The module raises 'request' and waits for
// 'grant'. In the first granted cycle it drives the start bit (0) and stores word_in; in the
// next 40 cycles it shifts the word out, most significant bit first. In the cycle after the
// last bit it pulses 'grantC' for one cycle to tell the core a new word can be given. Outside
// its own transmission 'dataout' rests at 1. There is no buffering and no time-out, as in the
// first version of the interface. That handshake follows the interface description. Driving
// the start bit combinationally from 'grant', and the one-cycle gap after grantC in which no
// new request is raised, are this design's choices; the gap lets a core that holds 'disp'
// high change word_in in response to grantC before the next request.
//
// Timing: grant seen in cycle g -> start bit in g, word bits in g+1..g+40, grantC in g+41.
module send_module
  import ccif_pkg::*;
#(
  parameter int unsigned WORD_W = WORD_BITS  // 40
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              disp,      // core has a word to send (level)
  input  logic [WORD_W-1:0] word_in,
  output logic              request,
  input  logic              grant,
  output logic              dataout,
  output logic              grantC     // one-cycle pulse: word sent, ready for the next
);

  localparam int unsigned CW = $clog2(WORD_W + 1);

  typedef enum logic [1:0] {IDLE, SEND, DONE} state_e;

  state_e            state;
  logic [WORD_W-1:0] shreg;
  logic [CW-1:0]     cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      shreg <= '0;
      cnt   <= '0;
    end else begin
      case (state)
        IDLE: if (disp && grant) begin
          shreg <= word_in;
          cnt   <= '0;
          state <= SEND;
        end
        SEND: begin
          shreg <= {shreg[WORD_W-2:0], 1'b1};
          if (32'(cnt) == WORD_W - 1) state <= DONE;
          else cnt <= cnt + 1'b1;
        end
        DONE:    state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    request = (state == IDLE) && disp;
    grantC  = (state == DONE);
    unique case (state)
      IDLE:    dataout = !(disp && grant);  // start bit when the grant arrives
      SEND:    dataout = shreg[WORD_W-1];
      default: dataout = 1'b1;
    endcase
  end

endmodule
