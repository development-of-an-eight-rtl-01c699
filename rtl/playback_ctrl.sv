// playback_ctrl: per-waveform playlist state machine.
//
// The playlist is waveform 1, 2, 3, ... with each waveform repeated for its
// number of presums. An EPRI reset returns the machine to waveform 1 (and
// aborts any pattern in flight). On every PRF trigger that arrives while no
// pattern is playing:
//   * if `play_en` is set, the pattern of the current waveform is played: the
//     RAM word address runs, one word per clock, from the waveform's start
//     address up to the next entry's start address minus one (an entry whose
//     successor does not start later plays nothing);
//   * the presum counter advances; after (presums + 1) PRFs the machine moves
//     to the next waveform and stays on the last one once it gets there;
//   * with 0/pi enabled for the waveform, the phase flag alternates 0, pi, 0,
//     ... on successive PRFs, restarting at 0 for each waveform.
// `word_valid` and `phase_pi` are delayed one clock so that they line up with
// the pattern RAM's registered output. `play_start` pulses when a pattern
// starts and `wf_advance` when the machine moves to the next waveform.
//
// The address range rule, the EPRI/PRF roles and the per-waveform presum and
// 0/pi settings are the board's. The presum encoding (field = presums - 1),
// the 0/pi alternation order and ignoring a PRF during playback are this
// design's choices.
module playback_ctrl #(
  parameter int NUM_WF = wfg_pkg::NUM_WF,
  parameter int ADDR_W = wfg_pkg::PAT_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              prf_trig,
  input  logic              epri_reset,
  input  logic              play_en,
  input  wfg_pkg::wf_cfg_t  wf_cfg [NUM_WF+1],
  output logic [ADDR_W-1:0] rd_addr,
  output logic              word_valid,
  output logic              phase_pi,
  output logic [$clog2(NUM_WF)-1:0] cur_wf,
  output logic              play_start,
  output logic              wf_advance
);
  logic              playing;
  logic [ADDR_W-1:0] end_addr;
  logic [11:0]       presum_cnt;
  logic              phase;        // phase for the next PRF
  logic              play_phase;   // phase of the pattern now playing
  logic [ADDR_W-1:0] start_cur, start_next;
  logic [$clog2(NUM_WF+1)-1:0] idx_cur, idx_next;

  assign idx_cur    = {1'b0, cur_wf};
  assign idx_next   = idx_cur + 1'b1;
  assign start_cur  = wf_cfg[idx_cur].start_addr[ADDR_W-1:0];
  assign start_next = wf_cfg[idx_next].start_addr[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      playing    <= 1'b0;
      rd_addr    <= '0;
      end_addr   <= '0;
      presum_cnt <= '0;
      phase      <= 1'b0;
      play_phase <= 1'b0;
      cur_wf     <= '0;
      play_start <= 1'b0;
      wf_advance <= 1'b0;
    end else begin
      play_start <= 1'b0;
      wf_advance <= 1'b0;
      if (epri_reset) begin
        playing    <= 1'b0;
        presum_cnt <= '0;
        phase      <= 1'b0;
        cur_wf     <= '0;
      end else if (playing) begin
        if (rd_addr == end_addr) playing <= 1'b0;
        else                     rd_addr <= rd_addr + 1'b1;
      end else if (prf_trig) begin
        if (play_en && start_next > start_cur) begin
          playing    <= 1'b1;
          play_start <= 1'b1;
          rd_addr    <= start_cur;
          end_addr   <= start_next - 1'b1;
          play_phase <= phase;
        end
        if (presum_cnt == wf_cfg[idx_cur].presums) begin
          presum_cnt <= '0;
          phase      <= 1'b0;
          if (32'(cur_wf) < NUM_WF - 1) begin
            cur_wf     <= cur_wf + 1'b1;
            wf_advance <= 1'b1;
          end
        end else begin
          presum_cnt <= presum_cnt + 1'b1;
          phase      <= phase ^ wf_cfg[idx_cur].zero_pi_en;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_valid <= 1'b0;
      phase_pi   <= 1'b0;
    end else begin
      word_valid <= playing && !epri_reset;
      phase_pi   <= play_phase;
    end
  end
endmodule
