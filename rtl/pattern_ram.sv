// pattern_ram: the dual-port serial pattern RAM.
//
// Holds the pre-compiled serial bit streams that load the per-waveform DDS
// registers (phase offset, ramp limits, ramp step, RAM profile) on every PRF.
// The write side is 8 bits wide and fed by software through a byte address
// counter: `ptr_reset` sets the counter to 0 and each `wr` stores `wdata` and
// increments it. Byte 2k is bits 7:0 and byte 2k+1 bits 15:8 of word k. The
// read side is 16 bits wide, addressed by word, with one clock of latency.
// The counter wraps at the end of the RAM.
//
// 2^ADDR_W words of 16 bits (16K x 16 by default, from the 14-bit waveform
// start address) and the 8-in/16-out organisation are the board's; the byte
// order and the read latency are this design's choices. The RAM is built as
// two byte-wide arrays so each maps onto an ordinary simple dual-port RAM.
module pattern_ram #(
  parameter int ADDR_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ptr_reset,
  input  logic              wr,
  input  logic [7:0]        wdata,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [15:0]       rd_data,
  output logic [ADDR_W:0]   wr_ptr
);
  localparam int DEPTH = 1 << ADDR_W;

  logic [7:0] mem_lo [DEPTH];
  logic [7:0] mem_hi [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         wr_ptr <= '0;
    else if (ptr_reset) wr_ptr <= '0;
    else if (wr)        wr_ptr <= wr_ptr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr && !ptr_reset && !wr_ptr[0]) mem_lo[wr_ptr[ADDR_W:1]] <= wdata;
    if (wr && !ptr_reset &&  wr_ptr[0]) mem_hi[wr_ptr[ADDR_W:1]] <= wdata;
  end

  always_ff @(posedge clk) begin
    rd_data <= {mem_hi[rd_addr], mem_lo[rd_addr]};
  end
endmodule
