// clk_div2: divides the 111.167 MHz sample clock by two.
//
// The 55.58 MHz result is the FPGA logic clock and is also sent out, through
// the LVDS fan-out buffer, as both Ref_Clk and Sync_In of every DDS (their
// PLLs multiply it by 16 to 889.3 MHz). A single toggle flop, cleared by
// reset, makes the output phase repeatable after reset.
//
// The divide-by-two and its uses are the board's clocking scheme.
module clk_div2 (
  input  logic sample_clk,
  input  logic rst_n,
  output logic clk_half
);
  always_ff @(posedge sample_clk or negedge rst_n) begin
    if (!rst_n) clk_half <= 1'b0;
    else        clk_half <= ~clk_half;
  end
endmodule
