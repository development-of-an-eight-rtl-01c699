// debug_leds: boot-time LED sweep, then debug status display.
//
// After reset a single lit LED sweeps from one end of the row to the other
// and back, one position every STEP_CYCLES clocks, BOOT_SWEEPS times (the
// "scanner" pattern); after that the LEDs show the `debug` inputs directly.
// `boot_done` marks the hand-over.
//
// The sweep-then-debug behaviour is the board's; the LED count, step time
// (50 ms at 55.58 MHz) and number of sweeps are this design's choices.
module debug_leds #(
  parameter int NUM_LEDS    = 8,
  parameter int STEP_CYCLES = 2779150,
  parameter int BOOT_SWEEPS = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_LEDS-1:0] debug,
  output logic [NUM_LEDS-1:0] leds,
  output logic                boot_done
);
  localparam int SW = $clog2(STEP_CYCLES + 1);
  localparam int PW = $clog2(NUM_LEDS);
  localparam int BW = $clog2(BOOT_SWEEPS + 1);

  logic [SW-1:0] step_cnt;
  logic [PW-1:0] pos;
  logic          dir_down;
  logic [BW-1:0] sweeps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_cnt  <= '0;
      pos       <= '0;
      dir_down  <= 1'b0;
      sweeps    <= '0;
      boot_done <= 1'b0;
    end else if (!boot_done) begin
      if (step_cnt != SW'(STEP_CYCLES - 1)) begin
        step_cnt <= step_cnt + 1'b1;
      end else begin
        step_cnt <= '0;
        if (!dir_down) begin
          if (pos == PW'(NUM_LEDS - 1)) begin
            dir_down <= 1'b1;
            pos      <= pos - 1'b1;
          end else pos <= pos + 1'b1;
        end else begin
          if (pos == 0) begin
            dir_down <= 1'b0;
            if (sweeps == BW'(BOOT_SWEEPS - 1)) boot_done <= 1'b1;
            else begin
              sweeps <= sweeps + 1'b1;
              pos    <= pos + 1'b1;
            end
          end else pos <= pos - 1'b1;
        end
      end
    end
  end

  assign leds = boot_done ? debug : (NUM_LEDS'(1) << pos);
endmodule
