// timing_gen: internal PRF / EPRI timing generator.
//
// While enabled, a down-counter issues a one-clock PRF trigger every
// (prf_count + 1) clocks and a second counter groups the PRFs into EPRIs of
// (epri_count + 1) PRFs. The EPRI reset pulse comes EPRI_LEAD clocks before
// the first PRF of each group, so the playlist is already back at waveform 1
// when that PRF arrives. While disabled the generator is held so that the
// first pulse after enabling is an EPRI reset (next clock), followed by the
// first PRF EPRI_LEAD clocks later. Both outputs are registered.
//
// The counter widths, the "setting = count - 1" encoding, the 3-clock EPRI
// lead and starting with an EPRI reset are the board's. prf_count must be at
// least EPRI_LEAD for the lead to fit inside a PRF period.
module timing_gen #(
  parameter int PRF_W     = 24,
  parameter int EPRI_W    = 16,
  parameter int EPRI_LEAD = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [PRF_W-1:0]  prf_count,
  input  logic [EPRI_W-1:0] epri_count,
  output logic              prf_trig,
  output logic              epri_reset
);
  logic [PRF_W-1:0]  cnt;
  logic [EPRI_W-1:0] prf_num;   // PRFs already issued in this EPRI

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= PRF_W'(EPRI_LEAD);
      prf_num    <= '0;
      prf_trig   <= 1'b0;
      epri_reset <= 1'b0;
    end else if (!enable) begin
      cnt        <= PRF_W'(EPRI_LEAD);
      prf_num    <= '0;
      prf_trig   <= 1'b0;
      epri_reset <= 1'b0;
    end else begin
      prf_trig   <= (cnt == 0);
      epri_reset <= (cnt == PRF_W'(EPRI_LEAD)) && (prf_num == 0);
      if (cnt == 0) begin
        cnt     <= prf_count;
        prf_num <= (prf_num == epri_count) ? '0 : prf_num + 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end
endmodule
