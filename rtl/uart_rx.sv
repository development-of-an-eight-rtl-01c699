// uart_rx: 8-N-1 serial receiver for the radar command port.
//
// The line is passed through a two-flop synchroniser. A falling edge starts a
// frame; the start bit is re-checked half a bit later, then the eight data
// bits (LSB first) are sampled in the middle of each bit and the stop bit is
// checked. A good frame produces `data` with a one-cycle `valid` strobe one
// clock after the middle of the stop bit; a frame with a low stop bit is
// dropped. There is no buffering: the consumer must take the byte on `valid`.
//
// The 115.2 kbaud 8-N-1 format is the board's. Running from the 55.58 MHz
// logic clock with CLKS_PER_BIT = 482 (0.1 % rate error) is this design's
// choice; the original derived the UART clocks from a 100 MHz oscillator.
module uart_rx #(
  parameter int CLKS_PER_BIT = 482
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, BITS, STOP} state_t;
  state_t        state;
  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= IDLE;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        IDLE: if (!sync[1]) begin
          state <= START;
          cnt   <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        START: if (cnt == 0) begin
          if (!sync[1]) begin
            state <= BITS;
            cnt   <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end else begin
            state <= IDLE;              // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        BITS: if (cnt == 0) begin
          shreg <= {sync[1], shreg[7:1]};
          cnt   <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= STOP;
          bitn  <= bitn + 1'b1;
        end else cnt <= cnt - 1'b1;
        STOP: if (cnt == 0) begin
          state <= IDLE;
          if (sync[1]) begin
            data  <= shreg;
            valid <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
