// tb_dds_8ch_wfg_burst: the radar's operating case run through the whole chip.
//
// Playlist: one noise waveform with 1 presum, then three beam directions
// (nadir, left, right) with 8 presums each and 0/pi enabled, i.e. an EPRI of
// 25 PRFs. The PRF is 12.5 kHz from the internal generator (setting 4445 at
// the 55.58 MHz logic clock, an 80 us PRI). Every PRF reloads every chip with
// a full per-pulse set: phase offset word (zero- and pi-phase versions on the
// two CS_N lines), digital ramp limits, ramp step sizes and a profile
// register, all different per chip and per waveform: 264 SPI bits, 533 pattern
// words, about 9.6 us of loading. The IO Update Time is 600 clocks (10.8 us).
//
// Two EPRIs (50 PRFs) are run. For every PRF each chip must accept exactly the
// five frames of its waveform, hold the expected values at IO_Update, finish
// its transfer before IO_Update, and all eight IO_Update lines must fire
// once, IOU_TIME (+0.5..1.5) clocks after the PRF. The PRI is checked too.
// The serial link runs at 8 logic clocks per bit to keep the download short.
`timescale 1ns/1ps
module tb_dds_8ch_wfg_burst;
  import wfg_pkg::*;

  localparam int CPB = 8;
  localparam realtime T_SAMPLE = 8.9955;
  localparam realtime T_LOGIC  = 2 * T_SAMPLE;
  localparam realtime T_SYNC   = T_LOGIC / 4;

  localparam int NWF      = 4;
  localparam int PRF_SET  = 4445;   // 12.5 kHz
  localparam int EPRI_SET = 24;     // 1 + 8 + 8 + 8 PRFs
  localparam int IOU_TIME = 600;

  logic sample_clk = 0, sync_clk = 0, osc_clk = 0, rst_n = 1;
  logic uart_rxd = 1, uart_txd;
  logic ext_prf_trig = 0, ext_epri_reset = 0, prf_trig_out, epri_reset_out;
  logic ref_clk, sync_in;
  logic [7:0] dds_cs_n, dds_sclk, dds_sdio, dds_io_update;
  logic dds_sdio_oe, dds_master_reset, dds_io_reset, clk_sel_internal;
  logic [15:0] temp_value = 16'h0;
  logic [1:0] buttons = 0, buttons_db;
  logic pps;
  logic [2:0] osc_ticks;
  logic [7:0] leds;

  dds_8ch_wfg #(.CLKS_PER_BIT(CPB), .LED_STEP_CYCLES(4)) dut (.*);

  always #(T_SAMPLE / 2) sample_clk = ~sample_clk;
  initial begin #0.7; forever #(T_SYNC / 2) sync_clk = ~sync_clk; end
  always #5 osc_clk = ~osc_clk;

  for (genvar c = 0; c < 8; c++) begin : g_dds
    dds_spi_model m (.cs_n(dds_cs_n[c]), .sclk(dds_sclk[c]), .sdio(dds_sdio[c]),
                     .io_update(dds_io_update[c]), .master_reset(dds_master_reset));
  end

  int checks = 0, failures = 0;
  int n_load = 0, n_pi = 0, n_pri = 0;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  int          m_writes [8], m_iou [8], m_aborts [8], m_upd_x [8];
  logic [63:0] m_act [8][32];
  for (genvar c = 0; c < 8; c++) begin : g_peek
    always_comb begin
      m_writes[c] = g_dds[c].m.writes;
      m_iou[c]    = g_dds[c].m.io_updates;
      m_aborts[c] = g_dds[c].m.aborts;
      m_upd_x[c]  = g_dds[c].m.upd_in_xfer;
      for (int r = 0; r < 32; r++) m_act[c][r] = g_dds[c].m.act_reg[r];
    end
  end

  int      n_prf = 0, n_epri = 0, n_iou = 0;
  realtime t_prf, t_epri, t_iou, t_cs_up;
  logic    iou_all;
  always @(negedge ref_clk) if (!dds_master_reset) begin
    if (prf_trig_out)   begin n_prf++;  t_prf  = $realtime; end
    if (epri_reset_out) begin n_epri++; t_epri = $realtime; end
  end
  always @(posedge dds_io_update[0]) begin
    t_iou = $realtime;
    #0.1 iou_all = &dds_io_update;
    n_iou++;
  end
  always @(posedge dds_cs_n[0]) t_cs_up = $realtime;

  // ---------------------------------------------------------------- serial
  logic [7:0] rxq [$];
  initial begin
    wait (!rst_n);
    wait (rst_n);
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      repeat (CPB / 2) @(posedge ref_clk);
      if (uart_txd) continue;
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge ref_clk);
        b[i] = uart_txd;
      end
      repeat (CPB) @(posedge ref_clk);
      rxq.push_back(b);
    end
  end

  task automatic send_byte(input logic [7:0] b);
    @(posedge ref_clk) uart_rxd <= 1'b0;
    repeat (CPB) @(posedge ref_clk);
    for (int i = 0; i < 8; i++) begin
      uart_rxd <= b[i];
      repeat (CPB) @(posedge ref_clk);
    end
    uart_rxd <= 1'b1;
    repeat (CPB) @(posedge ref_clk);
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    send_byte(CMD_WRITE); send_byte(a); send_byte(d);
    for (int i = 0; i < 30 * CPB && rxq.size() == 0; i++) @(posedge ref_clk);
    check($sformatf("echo of write %h", a), rxq.size() == 1 && rxq[0] == d);
    rxq.delete();
  endtask

  // ------------------------------------------------------ pattern compiler
  // frame list per waveform: POW (zero CS), POW (pi CS), DRL, DRS, profile 0
  localparam int NFR = 5;
  localparam logic [7:0] FR_ADDR [NFR] = '{8'h08, 8'h08, 8'h0B, 8'h0C, 8'h0E};
  localparam int         FR_BITS [NFR] = '{16, 16, 64, 64, 64};
  logic [15:0] pat [$];
  logic [63:0] val [NWF][NFR][8];
  int          wf_start [NWF+1];

  function automatic logic [15:0] pat_word(input logic cs_pi_n, input logic cs_zero_n,
                                           input logic sclk, input logic [7:0] sdio);
    logic [15:0] w;
    w = '0;
    w[PAT_CS_PI]   = cs_pi_n;
    w[PAT_CS_ZERO] = cs_zero_n;
    w[PAT_SCLK]    = sclk;
    w[PAT_SDIO_LSB +: 8] = sdio;
    return w;
  endfunction

  task automatic compile_patterns();
    pat.delete();
    for (int w = 0; w < NWF; w++) begin
      wf_start[w] = pat.size();
      for (int f = 0; f < NFR; f++) begin
        logic cs_pi_n, cs_zero_n;
        cs_zero_n = (f == 1);
        cs_pi_n   = (f == 0);
        for (int c = 0; c < 8; c++) begin
          val[w][f][c] = {$urandom, $urandom};
          if (FR_BITS[f] < 64) val[w][f][c] &= (64'd1 << FR_BITS[f]) - 1;
        end
        // the pi frame carries the zero-phase word + 180 degrees
        if (f == 1) for (int c = 0; c < 8; c++) val[w][1][c] = val[w][0][c] ^ 64'h8000;
        for (int b = 0; b < 8 + FR_BITS[f]; b++) begin
          logic [7:0] s;
          for (int c = 0; c < 8; c++)
            s[c] = (b < 8) ? FR_ADDR[f][7 - b] : val[w][f][c][FR_BITS[f] - 1 - (b - 8)];
          pat.push_back(pat_word(cs_pi_n, cs_zero_n, 1'b0, s));
          pat.push_back(pat_word(cs_pi_n, cs_zero_n, 1'b1, s));
        end
        pat.push_back(pat_word(1'b1, 1'b1, 1'b0, 8'h00));
      end
    end
    wf_start[NWF] = pat.size();
  endtask

  // ------------------------------------------------------------------- main
  initial begin
    int seq_wf [$];
    logic seq_pi [$];
    int presums [NWF] = '{1, 8, 8, 8};
    logic zpi [NWF] = '{1'b0, 1'b1, 1'b1, 1'b1};
    for (int w = 0; w < NWF; w++)
      for (int p = 0; p < presums[w]; p++) begin
        seq_wf.push_back(w);
        seq_pi.push_back(zpi[w] && p[0]);
      end

    #1 rst_n = 0;
    repeat (5) @(posedge sample_clk);
    rst_n = 1;
    repeat (4) @(posedge ref_clk);

    compile_patterns();
    check($sformatf("load per waveform %0d words", wf_start[1]), wf_start[1] == 533);
    wr(A_PAT_RST, 8'h00);
    send_byte(CMD_STREAM); send_byte(A_PAT_WR);
    send_byte(8'((2 * pat.size()) >> 8)); send_byte(8'(2 * pat.size()));
    foreach (pat[k]) begin
      send_byte(pat[k][7:0]);
      send_byte(pat[k][15:8]);
    end
    repeat (4) @(posedge ref_clk);
    check("pattern RAM filled", dut.pat_wr_ptr == 2 * pat.size());
    for (int w = 0; w <= NWF; w++) begin
      logic [11:0] ps;
      ps = (w < NWF) ? 12'(presums[w] - 1) : 12'd0;
      wr(8'(A_WF_BASE + 4 * w),     ps[11:4]);
      wr(8'(A_WF_BASE + 4 * w + 1), {ps[3:0], 4'h0});
      wr(8'(A_WF_BASE + 4 * w + 2), {1'b0, (w < NWF) ? zpi[w] : 1'b0, 6'(wf_start[w] >> 8)});
      wr(8'(A_WF_BASE + 4 * w + 3), 8'(wf_start[w]));
    end
    wr(A_PRF_U, 8'(PRF_SET >> 16)); wr(A_PRF_M, 8'(PRF_SET >> 8)); wr(A_PRF_L, 8'(PRF_SET));
    wr(A_EPRI_U, 8'(EPRI_SET >> 8)); wr(A_EPRI_L, 8'(EPRI_SET));
    wr(A_IOUPD_U, 8'(IOU_TIME >> 8)); wr(A_IOUPD_L, 8'(IOU_TIME));
    wr(A_DDS_CFG, 8'h00);

    fork
      wr(A_WG_CFG, 8'h05);   // internal timing, external clock, generator on
      for (int i = 0; i < 2 * seq_wf.size(); i++) begin
        int      p0, u0, w0 [8], i0 [8], w, k;
        logic    pi, got;
        realtime tp, tp_prev;
        k  = i % seq_wf.size();
        w  = seq_wf[k];
        pi = seq_pi[k];
        p0 = n_prf;
        tp_prev = t_prf;
        while (n_prf == p0) @(posedge ref_clk);
        tp = t_prf;
        if (i > 0) begin
          check($sformatf("PRI %0.1f clocks", (tp - tp_prev) / T_LOGIC),
                (tp - tp_prev) > (PRF_SET + 0.5) * T_LOGIC && (tp - tp_prev) < (PRF_SET + 1.5) * T_LOGIC);
          n_pri++;
        end
        if (k == 0)
          check("EPRI reset 3 clocks ahead", (tp - t_epri) > 2.9 * T_LOGIC && (tp - t_epri) < 3.1 * T_LOGIC);
        u0 = n_iou;
        for (int c = 0; c < 8; c++) begin w0[c] = m_writes[c]; i0[c] = m_iou[c]; end
        got = 0;
        for (int t = 0; t < PRF_SET && !got; t++) begin
          @(posedge ref_clk);
          got = (n_iou != u0);
        end
        check("IO_Update after PRF", got);
        if (!got) continue;
        @(posedge ref_clk);
        begin
          real d, load_us;
          d = (t_iou - tp) / T_LOGIC - IOU_TIME;
          load_us = (t_cs_up - tp) / 1000.0;
          check($sformatf("PRF to IO_Update = IOU_TIME + %0.2f", d), d > 0.4 && d < 1.7);
          check($sformatf("load of %0.2f us done before IO_Update", load_us), t_cs_up < t_iou && load_us < 10.4);
        end
        check("all eight IO_Update lines", iou_all);
        for (int c = 0; c < 8; c++) begin
          check($sformatf("dds%0d one IO_Update", c), m_iou[c] == i0[c] + 1);
          check($sformatf("dds%0d clean transfers", c), m_aborts[c] == 0 && m_upd_x[c] == 0);
          check($sformatf("dds%0d four frames accepted, got %0d", c, m_writes[c] - w0[c]), m_writes[c] == w0[c] + 4);
          check($sformatf("dds%0d wf%0d pi=%0d POW", c, w + 1, pi), m_act[c][8] == val[w][pi ? 1 : 0][c]);
          check($sformatf("dds%0d wf%0d ramp limits", c, w + 1), m_act[c][5'h0B] == val[w][2][c]);
          check($sformatf("dds%0d wf%0d ramp steps", c, w + 1), m_act[c][5'h0C] == val[w][3][c]);
          check($sformatf("dds%0d wf%0d profile", c, w + 1), m_act[c][5'h0E] == val[w][4][c]);
        end
        n_load++;
        if (pi) n_pi++;
      end
    join

    check("50 PRFs loaded", n_load == 50);
    check("pi phase used", n_pi == 2 * 3 * 4);
    check("PRI checked", n_pri == 49);
    check("two EPRIs", n_epri >= 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60.0e6);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
