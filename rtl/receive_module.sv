// receive_module: watches the shared data line and picks out the packets sent to its core.
//
// At rest the line is 1. A 0 is taken as a start bit. The next 8 bits are the destination
// address, which is compared with MY_ADDR. On a match the following 32 bits are gathered and
// handed to the core on 'data' with a one-cycle 'disp' pulse. On a mismatch the module lets
// the 32 data bits go by and then looks for a start bit again. This follows the interface
// description. The most-significant-bit-first order and MY_ADDR as a parameter are this
// design's choices.
//
// Timing: start bit in cycle s, address in s+1..s+8, data in s+9..s+40, 'disp' and 'data'
// valid in cycle s+41. 'data' holds its value until the next accepted packet.
module receive_module
  import ccif_pkg::*;
#(
  parameter int unsigned     ADDR_W  = ADDR_BITS,  // 8
  parameter int unsigned     DATA_W  = DATA_BITS,  // 32
  parameter logic [ADDR_W-1:0] MY_ADDR = 8'h01
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              line,
  output logic              disp,
  output logic [DATA_W-1:0] data,
  output logic              addr_match  // pulses when a packet's address matched MY_ADDR
);

  localparam int unsigned CW = $clog2(DATA_W + 1);

  typedef enum logic [1:0] {IDLE, ADDR, DATA, SKIP} state_e;

  state_e            state;
  logic [CW-1:0]     cnt;
  logic [ADDR_W-2:0] abuf;  // address bits gathered so far
  logic [DATA_W-2:0] dbuf;  // data bits gathered so far
  logic [ADDR_W-1:0] addr_now;

  assign addr_now = {abuf, line};

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      cnt        <= '0;
      abuf       <= '0;
      dbuf       <= '0;
      data       <= '0;
      disp       <= 1'b0;
      addr_match <= 1'b0;
    end else begin
      disp       <= 1'b0;
      addr_match <= 1'b0;
      case (state)
        IDLE: if (!line) begin
          state <= ADDR;
          cnt   <= '0;
        end
        ADDR: begin
          abuf <= addr_now[ADDR_W-2:0];
          if (32'(cnt) == ADDR_W - 1) begin
            cnt <= '0;
            if (addr_now == MY_ADDR) begin
              state      <= DATA;
              addr_match <= 1'b1;
            end else begin
              state <= SKIP;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        DATA: begin
          dbuf <= {dbuf[DATA_W-3:0], line};
          if (32'(cnt) == DATA_W - 1) begin
            data  <= {dbuf, line};
            disp  <= 1'b1;
            state <= IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        SKIP: begin
          if (32'(cnt) == DATA_W - 1) state <= IDLE;
          else cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
