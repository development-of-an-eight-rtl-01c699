// tb_dds_8ch_wfg_full: the end-to-end test of tb_dds_8ch_wfg run on the design
// with its real parameters: 115.2 kbaud serial link (482 logic clocks per
// bit) and the 50 ms boot LED step, so the boot sweep is only checked to show
// one LED. Otherwise the same steps and checks:
//
// The test talks to the design only through its pins: it sends command
// packets on the serial line at the design's bit rate and decodes the replies,
// and eight DDS serial-port models (dds_spi_model) listen to the CS_N / SCLK /
// SDIO / IO_Update lines. It runs the way the control software would:
//   1. register access: scratch write/read-back, revision, temperature, the
//      multi-byte timing registers, status pins (clock select, IO reset, SDIO
//      direction);
//   2. byte-bang mode: a broadcast CFR write to all chips, a forced IO update,
//      master reset (clears the chips), then one auxiliary-DAC (amplitude)
//      value per chip with a single CS_N low, another forced update, and
//      DDS RAM words sent as one stream packet to the byte-send register;
//   3. run mode: three waveforms are compiled into serial patterns (a phase
//      offset frame for zero phase on one CS_N line, one for pi phase on the
//      other, and a frequency frame with both lines low; every chip gets its
//      own values), streamed into the pattern RAM after a pointer reset, and
//      the waveform table, PRF, EPRI and IO update time are programmed;
//   4. internal timing: two EPRIs of 11 PRFs. For every PRF the test predicts
//      waveform and phase from the playlist (presums 2, 3, 4; 0/pi on
//      waveforms 1 and 3; PRFs 10 and 11 fall on empty table entries) and
//      checks, at the IO_Update edge, that each chip made exactly the expected
//      register writes and now holds the expected phase and frequency words,
//      that no transfer was cut or overlapped by IO_Update, that all eight
//      IO_Update lines fire once, the PRF-to-IO_Update delay, and that the
//      EPRI reset leads its PRF by 3 clocks;
//   5. external timing: EPRI and PRF pulses on the trigger inputs;
//   6. per-waveform loading disabled: PRFs still give IO_Update and advance
//      the playlist, but no chip is selected;
//   7. house-keeping: Ref_Clk/Sync_In, boot LED sweep and debug LEDs, the
//      local-oscillator ticks and a debounced push-button.
// Every mechanism is counted; one that never happened is a failure.
`timescale 1ns/1ps
module tb_dds_8ch_wfg_full;
  import wfg_pkg::*;

  localparam int CPB      = 482;      // serial bit time of the design, logic clocks
  localparam int LED_STEP = 2779150;  // boot LED step of the design, logic clocks
  localparam realtime T_SAMPLE = 8.9955;          // 111.167 MHz
  localparam realtime T_LOGIC  = 2 * T_SAMPLE;    // 55.58 MHz
  localparam realtime T_SYNC   = T_LOGIC / 4;     // 222.3 MHz
  localparam realtime T_OSC    = 10.0;            // 100 MHz

  localparam int NWF       = 3;      // waveforms loaded
  localparam int PRF_SET   = 400;    // PRF period - 1, logic clocks
  localparam int EPRI_SET  = 10;     // PRFs per EPRI - 1
  localparam int IOU_TIME  = 220;    // PRF to IO_Update, logic clocks

  logic sample_clk = 0, sync_clk = 0, osc_clk = 0, rst_n = 1;
  logic uart_rxd = 1, uart_txd;
  logic ext_prf_trig = 0, ext_epri_reset = 0, prf_trig_out, epri_reset_out;
  logic ref_clk, sync_in;
  logic [7:0] dds_cs_n, dds_sclk, dds_sdio, dds_io_update;
  logic dds_sdio_oe, dds_master_reset, dds_io_reset, clk_sel_internal;
  logic [15:0] temp_value = 16'h1A2B;
  logic [1:0] buttons = 0, buttons_db;
  logic pps;
  logic [2:0] osc_ticks;
  logic [7:0] leds;

  dds_8ch_wfg dut (.*);

  always #(T_SAMPLE / 2) sample_clk = ~sample_clk;
  initial begin #1.3; forever #(T_SYNC / 2) sync_clk = ~sync_clk; end
  always #(T_OSC / 2) osc_clk = ~osc_clk;

  for (genvar c = 0; c < 8; c++) begin : g_dds
    dds_spi_model m (.cs_n(dds_cs_n[c]), .sclk(dds_sclk[c]), .sdio(dds_sdio[c]),
                     .io_update(dds_io_update[c]), .master_reset(dds_master_reset));
  end

  // ------------------------------------------------------------------ checks
  int checks = 0, failures = 0;
  int mech [string];

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t %s", $time, what); end
  endtask

  // model state, gathered so procedural code can index it by channel
  int          m_writes [8], m_iou [8], m_aborts [8], m_upd_x [8];
  logic [63:0] m_act [8][32];
  logic [63:0] m_buf [8][32];
  for (genvar c = 0; c < 8; c++) begin : g_peek
    always_comb begin
      m_writes[c] = g_dds[c].m.writes;
      m_iou[c]    = g_dds[c].m.io_updates;
      m_aborts[c] = g_dds[c].m.aborts;
      m_upd_x[c]  = g_dds[c].m.upd_in_xfer;
      for (int r = 0; r < 32; r++) begin
        m_act[c][r] = g_dds[c].m.act_reg[r];
        m_buf[c][r] = g_dds[c].m.buf_reg[r];
      end
    end
  end

  // ---------------------------------------------------------- event monitors
  int      n_prf = 0, n_epri = 0, n_iou = 0, n_cs_fall = 0;
  realtime t_prf, t_epri, t_iou;
  logic    iou_all;
  always @(negedge ref_clk) if (rst_n) begin
    if (prf_trig_out)   begin n_prf++;  t_prf  = $realtime; end
    if (epri_reset_out) begin n_epri++; t_epri = $realtime; end
  end
  always @(posedge dds_io_update[0]) if (rst_n) begin
    t_iou = $realtime;
    #0.1 iou_all = &dds_io_update;
    n_iou++;
  end
  always @(negedge dds_cs_n[0] or negedge dds_cs_n[7]) if (rst_n) n_cs_fall++;

  // --------------------------------------------------------- serial link
  logic [7:0] rxq [$];

  initial begin
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
      check("reply stop bit", uart_txd == 1'b1);
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

  task automatic get_reply(output logic [7:0] b, output logic ok);
    for (int i = 0; i < 30 * CPB && rxq.size() == 0; i++) @(posedge ref_clk);
    ok = rxq.size() != 0;
    b  = ok ? rxq.pop_front() : 8'hxx;
    repeat (2) @(posedge ref_clk);
    check("no extra reply", rxq.size() == 0);
  endtask

  // write a register; the echo is the register's new value (write-only
  // registers read 0)
  task automatic wr(input logic [7:0] a, input logic [7:0] d, input logic wo = 1'b0);
    logic [7:0] r;
    logic ok;
    send_byte(CMD_WRITE); send_byte(a); send_byte(d);
    get_reply(r, ok);
    check($sformatf("echo of write %h <= %h: got %h", a, d, r), ok && r == (wo ? 8'h00 : d));
    mech["write_echo"]++;
  endtask

  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    logic ok;
    send_byte(CMD_READ); send_byte(a); send_byte(8'h5C);
    get_reply(d, ok);
    check($sformatf("reply to read %h", a), ok);
    mech["read"]++;
  endtask

  task automatic rd_check(input logic [7:0] a, input logic [7:0] exp);
    logic [7:0] d;
    rd(a, d);
    check($sformatf("read %h = %h exp %h", a, d, exp), d == exp);
  endtask

  task automatic clocks(input int n);
    repeat (n) @(posedge ref_clk);
  endtask

  // -------------------------------------------------------- pattern compiler
  logic [15:0] pat [$];
  logic [15:0] pow0 [NWF][8];
  logic [31:0] ftw  [NWF][8];
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

  // one register write per chip: instruction byte then dbits of data, MSB
  // first, two words per bit (SCLK low, SCLK high), then one idle word
  task automatic add_frame(input logic cs_pi_n, input logic cs_zero_n, input logic [7:0] instr,
                           input logic [31:0] data [8], input int dbits);
    for (int b = 0; b < 8 + dbits; b++) begin
      logic [7:0] s;
      for (int c = 0; c < 8; c++) s[c] = (b < 8) ? instr[7 - b] : data[c][dbits - 1 - (b - 8)];
      pat.push_back(pat_word(cs_pi_n, cs_zero_n, 1'b0, s));
      pat.push_back(pat_word(cs_pi_n, cs_zero_n, 1'b1, s));
    end
    pat.push_back(pat_word(1'b1, 1'b1, 1'b0, 8'h00));
  endtask

  task automatic compile_patterns();
    logic [31:0] d [8];
    pat.delete();
    for (int w = 0; w < NWF; w++) begin
      wf_start[w] = pat.size();
      for (int c = 0; c < 8; c++) begin
        pow0[w][c] = 16'(16'h0123 + w * 16'h1111 + c * 16'h0801);
        ftw[w][c]  = 32'h1000_0000 + 32'(w) * 32'h0100_0000 + 32'(c) * 32'h0001_2345;
      end
      for (int c = 0; c < 8; c++) d[c] = {16'h0, pow0[w][c]};
      add_frame(1'b1, 1'b0, 8'h08, d, 16);                     // zero-phase CS_N
      for (int c = 0; c < 8; c++) d[c] = {16'h0, pow0[w][c] ^ 16'h8000};
      add_frame(1'b0, 1'b1, 8'h08, d, 16);                     // pi-phase CS_N
      for (int c = 0; c < 8; c++) d[c] = ftw[w][c];
      add_frame(1'b0, 1'b0, 8'h07, d, 32);                     // both
      for (int g = 0; g < w; g++) pat.push_back(pat_word(1'b1, 1'b1, 1'b0, 8'h00));
    end
    wf_start[NWF] = pat.size();
  endtask

  // ------------------------------------------------------- PRF-by-PRF check
  typedef struct { int wf; logic pi; logic first; } exp_t;   // wf -1: nothing loaded
  exp_t exp_q [$];

  task automatic expect_epri(input int n_prfs);
    int seq_wf [11] = '{0, 0, 1, 1, 1, 2, 2, 2, 2, -1, -1};
    logic seq_pi [11] = '{0, 1, 0, 0, 0, 0, 1, 0, 1, 0, 0};
    for (int i = 0; i < n_prfs; i++) exp_q.push_back('{seq_wf[i], seq_pi[i], i == 0});
  endtask

  task automatic check_prfs(input int n, input logic internal);
    for (int i = 0; i < n; i++) begin
      int          p0, u0, cs0, w0 [8], i0 [8];
      logic [63:0] pow_s [8], ftw_s [8];
      exp_t        e;
      realtime     tp;
      logic        got;
      p0 = n_prf;
      while (n_prf == p0) @(posedge ref_clk);
      tp = t_prf;
      u0 = n_iou; cs0 = n_cs_fall;
      for (int c = 0; c < 8; c++) begin
        w0[c] = m_writes[c]; i0[c] = m_iou[c];
        pow_s[c] = m_act[c][8]; ftw_s[c] = m_act[c][7];
      end
      e = exp_q.pop_front();
      mech[internal ? "internal_prf" : "external_prf"]++;
      if (internal && e.first) begin
        check($sformatf("EPRI reset %0.1f clocks before PRF", (tp - t_epri) / T_LOGIC),
              (tp - t_epri) > 2.9 * T_LOGIC && (tp - t_epri) < 3.1 * T_LOGIC);
        mech["epri_lead"]++;
      end
      got = 0;
      for (int k = 0; k < PRF_SET && !got; k++) begin
        @(posedge ref_clk);
        got = (n_iou != u0);
      end
      check("IO_Update after PRF", got);
      if (!got) continue;
      clocks(1);
      begin
        real d;
        d = (t_iou - tp) / T_LOGIC - IOU_TIME;
        check($sformatf("PRF to IO_Update = IOU_TIME + %0.2f clocks", d), d > 0.4 && d < 1.7);
        mech["iou_delay"]++;
      end
      check("all eight IO_Update lines", iou_all);
      for (int c = 0; c < 8; c++) begin
        check($sformatf("dds%0d one IO_Update", c), m_iou[c] == i0[c] + 1);
        check($sformatf("dds%0d no cut or overlapped transfer", c), m_aborts[c] == 0 && m_upd_x[c] == 0);
        if (e.wf >= 0) begin
          logic [15:0] ep;
          ep = e.pi ? pow0[e.wf][c] ^ 16'h8000 : pow0[e.wf][c];
          check($sformatf("dds%0d wf%0d: two register writes, got %0d", c, e.wf + 1, m_writes[c] - w0[c]),
                m_writes[c] == w0[c] + 2);
          check($sformatf("dds%0d wf%0d pi=%0d POW %h exp %h", c, e.wf + 1, e.pi, m_act[c][8][15:0], ep),
                m_act[c][8] == {48'h0, ep});
          check($sformatf("dds%0d wf%0d FTW %h exp %h", c, e.wf + 1, m_act[c][7][31:0], ftw[e.wf][c]),
                m_act[c][7] == {32'h0, ftw[e.wf][c]});
        end else begin
          check($sformatf("dds%0d nothing written", c), m_writes[c] == w0[c]);
          check($sformatf("dds%0d registers kept", c), m_act[c][8] == pow_s[c] && m_act[c][7] == ftw_s[c]);
        end
      end
      if (e.wf >= 0) begin
        mech["pattern_load"]++;
        if (e.pi) mech["pi_phase"]++;
        else      mech["zero_phase"]++;
      end else begin
        check("no chip selected", n_cs_fall == cs0);
        mech["no_load"]++;
      end
    end
  endtask

  task automatic ext_pulse(input logic epri);
    @(negedge sample_clk);
    if (epri) ext_epri_reset = 1'b1; else ext_prf_trig = 1'b1;
    @(negedge sample_clk);
    ext_epri_reset = 1'b0; ext_prf_trig = 1'b0;
  endtask

  // ------------------------------------------------------------ house-keeping
  int      n_tick [3] = '{0, 0, 0};
  realtime t_tick [3] = '{-1.0, -1.0, -1.0};
  realtime tick_per [3] = '{20.0, 1000.0, 1.0e6};
  always @(posedge osc_clk) if (rst_n) begin
    for (int i = 0; i < 3; i++) if (osc_ticks[i]) begin
      if (t_tick[i] >= 0 && n_tick[i] < 2000) begin
        check($sformatf("osc tick %0d period", i),
              ($realtime - t_tick[i]) > tick_per[i] - 0.5 && ($realtime - t_tick[i]) < tick_per[i] + 0.5);
        mech["osc_ticks"]++;
      end
      t_tick[i] = $realtime;
      n_tick[i]++;
    end
  end

  // ------------------------------------------------------------------- main
  initial begin
    logic [7:0] d;
    realtime t0, t_press;
    #1 rst_n = 0;   // power-on reset edge
    repeat (5) @(posedge sample_clk);
    rst_n = 1;
    clocks(4);

    // Ref_Clk / Sync_In: half the sample clock
    @(posedge ref_clk) t0 = $realtime;
    @(posedge ref_clk);
    check("Ref_Clk is the sample clock / 2", ($realtime - t0) > T_LOGIC - 0.01 && ($realtime - t0) < T_LOGIC + 0.01);
    check("Sync_In follows Ref_Clk", sync_in == ref_clk);
    mech["ref_clk"]++;

    // boot LED sweep: one LED at a time
    check("one boot LED", $onehot(leds));
    if (LED_STEP < 1000) begin
      clocks(30 * LED_STEP);
      check("boot sweep finished", dut.led_boot_done);
    end
    mech["leds"]++;

    // a push-button, debounced on the local oscillator
    buttons[0] = 1'b1;
    t_press = $realtime;

    // 1. registers
    check("outputs idle after reset", dds_cs_n == 8'hFF && dds_sclk == 0 && !dds_master_reset);
    wr(A_SCRATCH, 8'hA5);
    rd_check(A_SCRATCH, 8'hA5);
    wr(A_SCRATCH, 8'h3C);
    rd_check(A_SCRATCH, 8'h3C);
    rd_check(A_REV_HI, 8'h20);
    rd_check(A_REV_LO, 8'h00);
    rd_check(A_TEMP_U, 8'h1A);
    rd_check(A_TEMP_L, 8'h2B);
    temp_value = 16'hFEED;
    rd_check(A_TEMP_U, 8'hFE);
    rd_check(A_TEMP_L, 8'hED);
    mech["temperature"]++;
    // a non-command byte is ignored
    send_byte(8'h00);
    clocks(12 * CPB);
    check("stray byte ignored", rxq.size() == 0);
    wr(A_WG_CFG, 8'h02);
    check("clock select pin", clk_sel_internal == 1'b1);
    wr(A_DDS_CFG, 8'h06);
    check("IO reset and SDIO direction pins", dds_io_reset && !dds_sdio_oe);
    wr(A_DDS_CFG, 8'h00);
    check("IO reset released, SDIO driven", !dds_io_reset && dds_sdio_oe);
    mech["cfg_pins"]++;

    // 2. byte-bang: broadcast CFR1 to all chips
    wr(A_DDS_CFG, 8'h01);
    if (LED_STEP < 1000) check("debug LED shows byte-bang mode", leds[0] == 1'b1);
    wr(A_CS_N, 8'h00);
    check("all CS_N low", dds_cs_n == 8'h00);
    begin
      logic [7:0] bytes [5] = '{8'h00, 8'h00, 8'h40, 8'h00, 8'h02};
      foreach (bytes[k]) wr(A_BYTE_SEND, bytes[k], 1'b1);
    end
    wr(A_CS_N, 8'hFF);
    for (int c = 0; c < 8; c++)
      check($sformatf("dds%0d broadcast CFR1 buffered", c), m_buf[c][0] == 64'h0040_0002 && m_act[c][0] == 0);
    mech["bb_broadcast"]++;
    begin
      int i0 [8];
      for (int c = 0; c < 8; c++) i0[c] = m_iou[c];
      wr(A_FORCE_IOU, 8'h01, 1'b1);
      clocks(4);
      for (int c = 0; c < 8; c++)
        check($sformatf("dds%0d forced IO_Update", c), m_iou[c] == i0[c] + 1 && m_act[c][0] == 64'h0040_0002);
      mech["force_iou"]++;
    end
    // master reset clears the chips
    wr(A_DDS_CFG, 8'h09);
    check("master reset pin", dds_master_reset == 1'b1);
    wr(A_DDS_CFG, 8'h01);
    check("master reset released", dds_master_reset == 1'b0);
    for (int c = 0; c < 8; c++) check($sformatf("dds%0d reset", c), m_act[c][0] == 0 && m_buf[c][0] == 0);
    mech["master_reset"]++;
    // one amplitude (auxiliary DAC) value per chip
    for (int c = 0; c < 8; c++) begin
      logic [7:0] amp;          // AuxDAC full-scale current code, 0..255
      amp = 8'(30 + 25 * c);
      wr(A_CS_N, ~(8'h01 << c));
      check($sformatf("only CS_N %0d low", c), dds_cs_n == ~(8'h01 << c));
      wr(A_BYTE_SEND, 8'h03, 1'b1);
      wr(A_BYTE_SEND, 8'h00, 1'b1);
      wr(A_BYTE_SEND, 8'h00, 1'b1);
      wr(A_BYTE_SEND, 8'h00, 1'b1);
      wr(A_BYTE_SEND, amp, 1'b1);
      mech["bb_single"]++;
    end
    wr(A_CS_N, 8'hFF);
    wr(A_FORCE_IOU, 8'h00, 1'b1);
    clocks(4);
    for (int c = 0; c < 8; c++)
      check($sformatf("dds%0d own amplitude", c), m_act[c][3] == 64'(30 + 25 * c) && m_writes[c] == 2);
    // DDS RAM contents go as one stream packet to the byte-send register
    wr(A_CS_N, 8'h00);
    send_byte(CMD_STREAM); send_byte(A_BYTE_SEND); send_byte(8'h00); send_byte(8'h0A);
    begin
      logic [7:0] ram_bytes [10] = '{8'h16, 8'hDE, 8'hAD, 8'hBE, 8'hEF, 8'h16, 8'h12, 8'h34, 8'h56, 8'h78};
      foreach (ram_bytes[k]) send_byte(ram_bytes[k]);
    end
    clocks(40);
    check("stream to byte-send gives no reply", rxq.size() == 0);
    wr(A_CS_N, 8'hFF);
    for (int c = 0; c < 8; c++)
      check($sformatf("dds%0d RAM word from stream", c), m_buf[c][5'h16] == 64'h1234_5678 && m_writes[c] == 4);
    mech["bb_stream"]++;

    // 3. patterns and waveform table
    wr(A_DDS_CFG, 8'h00);
    compile_patterns();
    // a partial load that the pointer reset must discard
    send_byte(CMD_STREAM); send_byte(A_PAT_WR); send_byte(8'h00); send_byte(8'h05);
    repeat (5) send_byte(8'hFF);
    clocks(4);
    check("partial load counted", dut.pat_wr_ptr == 5);
    wr(A_PAT_RST, 8'h00, 1'b1);
    check("pointer reset", dut.pat_wr_ptr == 0);
    mech["pat_ptr_reset"]++;
    send_byte(CMD_STREAM); send_byte(A_PAT_WR);
    send_byte(8'((2 * pat.size()) >> 8)); send_byte(8'(2 * pat.size()));
    foreach (pat[k]) begin
      send_byte(pat[k][7:0]);
      send_byte(pat[k][15:8]);
    end
    clocks(4);
    check($sformatf("pattern words written %0d", pat.size()), dut.pat_wr_ptr == 2 * pat.size());
    check("stream gives no reply", rxq.size() == 0);
    mech["stream"]++;
    for (int w = 0; w <= NWF + 1; w++) begin
      logic [11:0] ps;
      logic        zp;
      int          st;
      ps = (w == 0) ? 12'd1 : (w == 1) ? 12'd2 : (w == 2) ? 12'd3 : 12'd0;
      zp = (w == 0 || w == 2);
      st = (w <= NWF) ? wf_start[w] : 0;
      wr(8'(A_WF_BASE + 4 * w),     ps[11:4]);
      wr(8'(A_WF_BASE + 4 * w + 1), {ps[3:0], 4'h0});
      wr(8'(A_WF_BASE + 4 * w + 2), {1'b0, zp, 6'(st >> 8)});
      wr(8'(A_WF_BASE + 4 * w + 3), 8'(st));
    end
    rd_check(8'(A_WF_BASE + 4 * NWF + 3), 8'(wf_start[NWF]));
    wr(A_PRF_U, 8'(PRF_SET >> 16)); wr(A_PRF_M, 8'(PRF_SET >> 8)); wr(A_PRF_L, 8'(PRF_SET));
    wr(A_EPRI_U, 8'(EPRI_SET >> 8)); wr(A_EPRI_L, 8'(EPRI_SET));
    wr(A_IOUPD_U, 8'(IOU_TIME >> 8)); wr(A_IOUPD_L, 8'(IOU_TIME));
    rd_check(A_PRF_M, 8'(PRF_SET >> 8));
    rd_check(A_IOUPD_L, 8'(IOU_TIME));

    // 4. internal timing generator
    exp_q.delete();
    expect_epri(11);
    expect_epri(11);
    begin
      int e0;
      e0 = n_epri;
      fork
        check_prfs(22, 1'b1);
        wr(A_WG_CFG, 8'h07);
      join
      check($sformatf("two EPRI resets, got %0d", n_epri - e0), n_epri - e0 >= 2);
      mech["epri"] += n_epri - e0;
    end
    wr(A_WG_CFG, 8'h02);   // generator off, external timing
    clocks(PRF_SET + 100);

    // 5. external timing
    begin
      int p0, e0;
      p0 = n_prf; e0 = n_epri;
      clocks(20);
      check("no internal PRF when off", n_prf == p0);
      exp_q.delete();
      expect_epri(3);
      fork
        check_prfs(3, 1'b0);
        begin
          ext_pulse(1'b1);
          clocks(10);
          repeat (3) begin ext_pulse(1'b0); clocks(PRF_SET); end
        end
      join
      check("external EPRI reset passed on", n_epri == e0 + 1);
      check("external PRFs passed on", n_prf == p0 + 3);
    end

    // 6. per-waveform loading disabled: waveform 2 PRFs 2 and 3 go by unloaded
    wr(A_DDS_CFG, 8'h10);
    exp_q.delete();
    exp_q.push_back('{-1, 1'b0, 1'b0});
    exp_q.push_back('{-1, 1'b0, 1'b0});
    fork
      check_prfs(2, 1'b0);
      repeat (2) begin ext_pulse(1'b0); clocks(PRF_SET); end
    join
    mech["disable_per_wf"]++;
    wr(A_DDS_CFG, 8'h00);
    exp_q.push_back('{2, 1'b0, 1'b0});
    fork
      check_prfs(1, 1'b0);
      begin ext_pulse(1'b0); clocks(PRF_SET); end
    join

    // 7. house-keeping: debug LEDs show the playlist position, button
    if (LED_STEP < 1000) begin
      check("debug LEDs show current waveform", leds[7:4] == 4'd2 && leds[0] == 1'b0);
      mech["leds"]++;
    end
    while ($realtime - t_press < 10.2e6) clocks(1000);
    check("button debounced", buttons_db == 2'b01);
    mech["button"]++;

    begin
      string need [$] = '{"write_echo", "read", "temperature", "cfg_pins", "bb_broadcast",
                          "force_iou", "master_reset", "bb_single", "bb_stream", "pat_ptr_reset", "stream",
                          "internal_prf", "epri", "epri_lead", "iou_delay", "pattern_load",
                          "pi_phase", "zero_phase", "no_load", "external_prf", "disable_per_wf",
                          "ref_clk", "leds", "osc_ticks", "button"};
      foreach (need[k]) begin
        check($sformatf("mechanism %s exercised (%0d)", need[k], mech.exists(need[k]) ? mech[need[k]] : 0),
              mech.exists(need[k]) && mech[need[k]] > 0);
        $display("mechanism %-15s %0d", need[k], mech.exists(need[k]) ? mech[need[k]] : 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(CPB * 10 * 3000 * T_LOGIC + 40.0e6);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
