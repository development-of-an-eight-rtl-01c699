// accessory: house-keeping logic on the local oscillator clock.
//
// From the CLK_HZ (100 MHz) local oscillator it makes one-clock enables at
// 50 MHz, 1 MHz and 1 kHz, a one-pulse-per-second strobe, and debounced
// copies of the push-buttons (the tick rates are parameters so that a
// test can scale them down). A button output follows its input only after
// the input has stayed at the new level for DEBOUNCE_MS milliseconds; the
// raw inputs pass a two-flop synchroniser first.
//
// The list of functions is the board's. Producing the divided clocks as
// clock enables instead of clocks, the button count and the debounce time
// are this design's choices.
module accessory #(
  parameter int CLK_HZ      = 100_000_000,
  parameter int FAST_HZ     = 50_000_000,   // rate of tick_50m
  parameter int MID_HZ      = 1_000_000,    // rate of tick_1m
  parameter int SLOW_HZ     = 1_000,        // rate of tick_1k
  parameter int DEBOUNCE_MS = 10,
  parameter int NUM_BUTTONS = 2
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_BUTTONS-1:0] buttons,
  output logic [NUM_BUTTONS-1:0] buttons_db,
  output logic                   pps,
  output logic                   tick_50m,
  output logic                   tick_1m,
  output logic                   tick_1k
);
  localparam int DIV_50M = CLK_HZ / FAST_HZ;
  localparam int DIV_1M  = CLK_HZ / MID_HZ;
  localparam int DIV_1K  = CLK_HZ / SLOW_HZ;
  localparam int DB_CYC  = (CLK_HZ / 1000) * DEBOUNCE_MS;
  localparam int CW      = $clog2(CLK_HZ + 1);
  localparam int DW      = $clog2(DB_CYC + 1);

  logic [CW-1:0] c50, c1m, c1k, c1s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c50, c1m, c1k, c1s}               <= '0;
      {tick_50m, tick_1m, tick_1k, pps}  <= '0;
    end else begin
      tick_50m <= (c50 == CW'(DIV_50M - 1));
      tick_1m  <= (c1m == CW'(DIV_1M - 1));
      tick_1k  <= (c1k == CW'(DIV_1K - 1));
      pps      <= (c1s == CW'(CLK_HZ - 1));
      c50 <= (c50 == CW'(DIV_50M - 1)) ? '0 : c50 + 1'b1;
      c1m <= (c1m == CW'(DIV_1M - 1))  ? '0 : c1m + 1'b1;
      c1k <= (c1k == CW'(DIV_1K - 1))  ? '0 : c1k + 1'b1;
      c1s <= (c1s == CW'(CLK_HZ - 1))  ? '0 : c1s + 1'b1;
    end
  end

  logic [NUM_BUTTONS-1:0] s1, s2;
  logic [DW-1:0]          db_cnt [NUM_BUTTONS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1         <= '0;
      s2         <= '0;
      buttons_db <= '0;
      for (int i = 0; i < NUM_BUTTONS; i++) db_cnt[i] <= '0;
    end else begin
      s1 <= buttons;
      s2 <= s1;
      for (int i = 0; i < NUM_BUTTONS; i++) begin
        if (s2[i] == buttons_db[i]) begin
          db_cnt[i] <= '0;
        end else if (db_cnt[i] == DW'(DB_CYC - 1)) begin
          db_cnt[i]     <= '0;
          buttons_db[i] <= s2[i];
        end else begin
          db_cnt[i] <= db_cnt[i] + 1'b1;
        end
      end
    end
  end
endmodule
