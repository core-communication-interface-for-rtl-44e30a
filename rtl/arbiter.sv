// arbiter: grants the shared serial data line to one requesting core at a time.
//
// The arbiter scans the request lines one after another, one line per clock cycle. When the
// line it is looking at is active, it raises that core's grant for PACKET_CYCLES cycles (the
// start bit plus the 40-bit word), then moves its pointer on to the next line, so a core that
// keeps requesting cannot lock out the others. The serial scan and the per-packet grant follow
// the interface description; the one-cycle-per-line scan rate, the grant window of 41 cycles
// (start bit included) and the synchronous active-high reset are this design's choices.
//
// Timing: a request seen at the scan pointer in cycle t gives grant from cycle t+1 to
// t+PACKET_CYCLES; in cycle t+PACKET_CYCLES+1 the next line is looked at.
module arbiter #(
  parameter int unsigned N_REQ         = 4,   // master core plus three sockets
  parameter int unsigned PACKET_CYCLES = 41
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [N_REQ-1:0] request,
  output logic [N_REQ-1:0] grant
);

  localparam int unsigned PW = (N_REQ > 1) ? $clog2(N_REQ) : 1;
  localparam int unsigned CW = $clog2(PACKET_CYCLES + 1);

  typedef enum logic {SCAN, GRANT} state_e;

  state_e        state;
  logic [PW-1:0] ptr;
  logic [CW-1:0] cnt;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (32'(p) == N_REQ - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= SCAN;
      ptr   <= '0;
      cnt   <= '0;
    end else begin
      case (state)
        SCAN: begin
          if (request[ptr]) begin
            state <= GRANT;
            cnt   <= '0;
          end else begin
            ptr <= next_ptr(ptr);
          end
        end
        GRANT: begin
          if (32'(cnt) == PACKET_CYCLES - 1) begin
            state <= SCAN;
            ptr   <= next_ptr(ptr);
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= SCAN;
      endcase
    end
  end

  always_comb begin
    grant = '0;
    if (state == GRANT) grant[ptr] = 1'b1;
  end

  // At most one core may own the line.
  assert property (@(posedge clk) disable iff (rst) $onehot0(grant));

endmodule
