// tb_playback_ctrl: self-checking test of the playlist state machine.
// A tb reference model of the playlist (waveform index, presum counter, 0/pi
// phase) predicts, for every PRF, which pattern RAM words must be played and
// with which phase. The test plays 16 waveforms with varied presums, start
// addresses (including empty patterns), 0/pi on and off; runs past the last
// waveform (must stay on it); issues an EPRI reset in the middle of a list;
// and disables playback (the list must still advance, with no words). The
// words of one pattern must come one per clock.
`timescale 1ns/1ps
module tb_playback_ctrl;
  import wfg_pkg::*;
  localparam int NW = 16;
  logic clk = 0, rst_n = 0, prf_trig = 0, epri_reset = 0, play_en = 1;
  wf_cfg_t wf_cfg [NW+1];
  logic [13:0] rd_addr, addr_d;
  logic word_valid, phase_pi, play_start, wf_advance;
  logic [3:0] cur_wf;
  int checks = 0, failures = 0;
  int words [$];
  logic phases [$];
  int n_adv = 0, n_pi = 0;

  playback_ctrl #(.NUM_WF(NW), .ADDR_W(14)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    addr_d <= rd_addr;
    if (word_valid) begin
      words.push_back(int'(addr_d));
      phases.push_back(phase_pi);
    end
    if (wf_advance) n_adv <= n_adv + 1;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  int m_wf = 0, m_cnt = 0;
  logic m_ph = 0;

  task automatic pulse_epri();
    @(posedge clk) epri_reset <= 1;
    @(posedge clk) epri_reset <= 0;
    m_wf = 0; m_cnt = 0; m_ph = 0;
    repeat (3) @(posedge clk);
  endtask

  task automatic do_prf();
    int s, e, adv0;
    s = int'(wf_cfg[m_wf].start_addr);
    e = int'(wf_cfg[m_wf + 1].start_addr);
    words.delete(); phases.delete(); adv0 = n_adv;
    @(posedge clk) prf_trig <= 1;
    @(posedge clk) prf_trig <= 0;
    repeat (e - s + 6 > 6 ? e - s + 6 : 6) @(posedge clk);
    check($sformatf("cur_wf %0d exp %0d", cur_wf, m_wf), 32'(cur_wf) == ((m_cnt == int'(wf_cfg[m_wf].presums)) ? ((m_wf < NW - 1) ? m_wf + 1 : m_wf) : m_wf));
    if (play_en && e > s) begin
      check($sformatf("wf%0d words %0d exp %0d", m_wf + 1, words.size(), e - s), words.size() == e - s);
      for (int i = 0; i < words.size(); i++) begin
        check("word address", words[i] == s + i);
        check("phase", phases[i] == m_ph);
      end
      if (m_ph) n_pi++;
    end else begin
      check("no words", words.size() == 0);
    end
    // advance the model
    if (m_cnt == int'(wf_cfg[m_wf].presums)) begin
      m_cnt = 0; m_ph = 0;
      if (m_wf < NW - 1) begin
        m_wf++;
        check("advance strobe", n_adv == adv0 + 1);
      end
    end else begin
      m_cnt++;
      m_ph = m_ph ^ wf_cfg[m_wf].zero_pi_en;
    end
  endtask

  initial begin
    int addr;
    addr = 0;
    for (int w = 0; w <= NW; w++) begin
      wf_cfg[w].start_addr = 14'(addr);
      wf_cfg[w].presums    = 12'($urandom % 4);
      wf_cfg[w].zero_pi_en = 1'($urandom);
      addr += (w % 5 == 3) ? 0 : 3 + ($urandom % 20);   // some empty patterns
    end
    wf_cfg[1].zero_pi_en = 1; wf_cfg[1].presums = 3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    pulse_epri();
    for (int n = 0; n < 45; n++) do_prf();
    check("reached last waveform", cur_wf == 4'(NW - 1));
    pulse_epri();
    check("EPRI resets to waveform 1", cur_wf == 0);
    for (int n = 0; n < 5; n++) do_prf();
    // EPRI during a list
    pulse_epri();
    check("EPRI mid-list", cur_wf == 0);
    play_en = 0;
    for (int n = 0; n < 6; n++) do_prf();
    play_en = 1;
    for (int n = 0; n < 6; n++) do_prf();
    check($sformatf("pi-phase patterns seen (%0d)", n_pi), n_pi > 0);
    check($sformatf("waveform advances seen (%0d)", n_adv), n_adv > NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
