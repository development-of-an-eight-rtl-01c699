// io_update_delay: the software-programmed PRF-to-IO_Update delay.
//
// A PRF trigger loads a down-counter with the programmed delay; the IO update
// request rises exactly `delay` clocks after the trigger (a delay of 0 acts
// as 1). A new PRF trigger restarts a running delay. A forced update (the
// force register) raises the request on the next clock. The request,
// `prf_delay`, is held high for STRETCH clocks so that the edge detector in
// the 4x faster Sync_Clk domain cannot miss it.
//
// The programmable 16-bit delay counted in half sample-clock periods and the
// forced update are the board's; the restart rule and the stretch length are
// this design's choices. The DDS pattern load (about 10.4 us) must finish
// before the delay ends, which software guarantees by its choice of delay.
module io_update_delay #(
  parameter int DELAY_W = 16,
  parameter int STRETCH = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prf_trig,
  input  logic [DELAY_W-1:0] delay,
  input  logic               force_update,
  output logic               prf_delay
);
  localparam int HW = $clog2(STRETCH + 1);

  logic [DELAY_W-1:0] cnt;
  logic               running;
  logic               fire;
  logic [HW-1:0]      hold;

  assign fire = force_update || (running && !prf_trig && cnt == DELAY_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
    end else if (prf_trig) begin
      cnt     <= (delay == 0) ? DELAY_W'(1) : delay;
      running <= 1'b1;
    end else if (running) begin
      if (cnt == DELAY_W'(1)) running <= 1'b0;
      else                    cnt     <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold      <= '0;
      prf_delay <= 1'b0;
    end else if (fire) begin
      hold      <= HW'(STRETCH - 1);
      prf_delay <= 1'b1;
    end else if (hold != 0) begin
      hold      <= hold - 1'b1;
      prf_delay <= 1'b1;
    end else begin
      prf_delay <= 1'b0;
    end
  end
endmodule
