// byte_bang_serializer: turns one register write into an 8-bit SPI transfer.
//
// Used in byte-bang (bypass) mode, where software programs the DDS chips'
// static registers and amplitude RAM one byte at a time. A `send` strobe while
// idle latches `data`; the byte then leaves MSB first, two clocks per bit:
// SDIO changes with SCLK low, and SCLK is high for the second clock, so the
// DDS samples each bit on the SCLK rising edge. A transfer lasts 16 clocks
// (27.8 MHz SCLK at the 55.58 MHz logic clock), `busy` covers all of it.
// Chip selects are not driven here: every DDS whose manual CS_N bit is low
// receives the byte.
//
// The byte-serialising function is the board's; bit order, SCLK phase and
// the two-clock bit time are this design's choices.
module byte_bang_serializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       send,
  input  logic [7:0] data,
  output logic       sclk,
  output logic       sdio,
  output logic       busy
);
  logic [7:0] shreg;
  logic [3:0] step;   // 0..15: bit = 7 - step[3:1], SCLK = step[0]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      step  <= '0;
      busy  <= 1'b0;
      sclk  <= 1'b0;
      sdio  <= 1'b0;
    end else if (!busy) begin
      sclk <= 1'b0;
      if (send) begin
        busy  <= 1'b1;
        shreg <= {data[6:0], 1'b0};
        sdio  <= data[7];
        step  <= 4'd1;
      end
    end else begin
      // a byte sent while the previous one is still shifting would be lost
      a_no_overrun: assert (!send) else $error("byte_bang_serializer: send while busy");
      step <= step + 1'b1;
      if (step[0]) begin
        sclk <= 1'b1;
      end else begin
        sclk  <= 1'b0;
        sdio  <= shreg[7];
        shreg <= {shreg[6:0], 1'b0};
      end
      if (step == 4'd0) begin   // wrapped: 16 clocks done
        busy <= 1'b0;
        sclk <= 1'b0;
        sdio <= 1'b0;
      end
    end
  end
endmodule
