// io_update_edge: re-times the IO update request to the DDS Sync_Clk.
//
// IO_Update must reach all eight DDS chips edge-aligned to the Sync_Clk that
// DDS #1 returns (222.3 MHz, a quarter of the DDS system clock). The request
// from the 55.58 MHz logic clock passes a two-flop synchroniser in the
// Sync_Clk domain; its rising edge becomes a one-Sync_Clk-period pulse driven
// from eight output flops, one per length-matched IO_Update line. Latency is
// three to four Sync_Clk periods from the request.
//
// The re-timing by edge detection on Sync_Clk is the board's; the
// synchroniser depth and pulse width are this design's choices.
module io_update_edge #(
  parameter int NUM_DDS = 8
) (
  input  logic               sync_clk,
  input  logic               rst_n,
  input  logic               prf_delay,
  output logic [NUM_DDS-1:0] io_update
);
  logic [2:0] sync;

  always_ff @(posedge sync_clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= '0;
      io_update <= '0;
    end else begin
      sync      <= {sync[1:0], prf_delay};
      io_update <= {NUM_DDS{sync[1] && !sync[2]}};
    end
  end
endmodule
