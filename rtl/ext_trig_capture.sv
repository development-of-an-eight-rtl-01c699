// ext_trig_capture: brings the external PRF trigger and EPRI reset into the
// half-rate logic clock.
//
// The external inputs are pulses of at least one sample-clock period (9 ns),
// synchronous to the sample clock. Such a pulse can fall between two edges of
// the half-rate logic clock, so each input is first stretched to two sample
// clocks in the sample-clock domain; the logic clock then registers the
// stretched level and emits a one-clock pulse on its rising edge. Because
// the logic clock is derived from the sample clock, no synchroniser is
// needed. Latency: two to three logic clocks. Bit 0 is PRF, bit 1 is EPRI.
//
// The input timing is the board's; the stretch-and-edge-detect circuit is
// this design's.
module ext_trig_capture #(
  parameter int N = 2
) (
  input  logic         sample_clk,
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] trig_in,
  output logic [N-1:0] trig_out
);
  logic [N-1:0] prev, stretched, q1, q2;

  always_ff @(posedge sample_clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      stretched <= '0;
    end else begin
      prev      <= trig_in;
      stretched <= trig_in | prev;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1       <= '0;
      q2       <= '0;
      trig_out <= '0;
    end else begin
      q1       <= stretched;
      q2       <= q1;
      trig_out <= q1 & ~q2;
    end
  end
endmodule
