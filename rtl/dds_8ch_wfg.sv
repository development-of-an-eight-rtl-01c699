// dds_8ch_wfg: FPGA logic of the eight-channel DDS waveform generator.
//
// Eight DDS chips (one per antenna element) are loaded over their SPI ports
// and triggered together by IO_Update. Beam steering needs each chip to start
// every pulse with its own start frequency and phase, so the per-pulse
// registers are rewritten between the PRF trigger and the IO_Update.
//
// Data path:
//   * A 115.2 kbaud serial link (uart_rx / uart_tx) carries command packets
//     to cmd_processor, which reads and writes the registers in reg_file.
//   * Byte-bang mode: software writes bytes that byte_bang_serializer shifts
//     out to every chip whose manual CS_N bit is low (static setup, amplitude
//     RAM of the DDS).
//   * Run mode: software first fills pattern_ram with pre-compiled bit
//     streams (bit 0-7 SDIO of DDS 1-8, bit 8 SCLK, bits 9/10 CS_N for zero
//     and pi phase). On every PRF trigger playback_ctrl plays the current
//     waveform's slice of the RAM, one word per logic clock (27.8 MHz SCLK),
//     and steps through the playlist by presum counts; EPRI reset returns it
//     to waveform 1.
//   * dds_port_mux selects between the two sources per chip.
//   * io_update_delay delays the PRF by the programmed IO Update Time (or
//     takes a forced update) and io_update_edge re-times it to the DDS
//     Sync_Clk to make the eight IO_Update pulses.
//   * timing_gen makes PRF/EPRI internally; ext_trig_capture takes external
//     ones; the wavegen configuration register chooses.
//   * clk_div2 halves the 111.167 MHz sample clock: the 55.58 MHz result
//     clocks all logic here and leaves as Ref_Clk and Sync_In.
//   * accessory (local oscillator domain) and debug_leds are house-keeping.
//
// Clocks: sample_clk (111.167 MHz), its half clk (internal), sync_clk
// (222.3 MHz from DDS #1), osc_clk (100 MHz local oscillator). rst_n is an
// asynchronous active-low reset for all domains.
//
// The structure follows the board's FPGA architecture. Running the UART from
// the logic clock rather than the local oscillator, and the debug LED
// assignment, are this design's choices.
module dds_8ch_wfg
  import wfg_pkg::*;
#(
  parameter int CLKS_PER_BIT    = 482,
  parameter int LED_STEP_CYCLES = 2779150,
  parameter int OSC_HZ          = 100_000_000
) (
  input  logic                sample_clk,
  input  logic                sync_clk,
  input  logic                osc_clk,
  input  logic                rst_n,
  // serial port
  input  logic                uart_rxd,
  output logic                uart_txd,
  // external timing
  input  logic                ext_prf_trig,
  input  logic                ext_epri_reset,
  output logic                prf_trig_out,
  output logic                epri_reset_out,
  // DDS clocking and control
  output logic                ref_clk,
  output logic                sync_in,
  output logic [NUM_DDS-1:0]  dds_cs_n,
  output logic [NUM_DDS-1:0]  dds_sclk,
  output logic [NUM_DDS-1:0]  dds_sdio,
  output logic                dds_sdio_oe,
  output logic [NUM_DDS-1:0]  dds_io_update,
  output logic                dds_master_reset,
  output logic                dds_io_reset,
  // board
  output logic                clk_sel_internal,
  input  logic [15:0]         temp_value,
  input  logic [1:0]          buttons,
  output logic [1:0]          buttons_db,
  output logic                pps,
  output logic [2:0]          osc_ticks,
  output logic [7:0]          leds
);
  logic clk;

  clk_div2 u_div (.sample_clk, .rst_n, .clk_half(clk));
  assign ref_clk = clk;
  assign sync_in = clk;

  // ---------------- serial command port and registers ----------------
  logic [7:0] rx_data, tx_data, bus_addr, bus_wdata, bus_rdata;
  logic       rx_valid, tx_start, tx_busy, bus_we;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_data), .valid(rx_valid));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .start(tx_start), .busy(tx_busy), .txd(uart_txd));

  cmd_processor u_cmd (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_start, .tx_busy,
    .bus_addr, .bus_wdata, .bus_we, .bus_rdata);

  wfg_cfg_t   cfg;
  wf_cfg_t    wf_cfg [WF_SLOTS];
  logic       force_io_update, bb_send, pat_ptr_reset, pat_wr;
  logic [7:0] pat_wdata;

  reg_file u_regs (
    .clk, .rst_n, .bus_addr, .bus_wdata, .bus_we, .bus_rdata, .temp_value,
    .cfg, .wf_cfg, .force_io_update, .bb_send, .pat_ptr_reset, .pat_wr, .pat_wdata);

  assign dds_master_reset = cfg.dds.master_reset;
  assign dds_io_reset     = cfg.dds.io_reset;
  assign clk_sel_internal = cfg.wg.int_clock;

  // ---------------- PRF / EPRI ----------------
  logic       int_prf, int_epri, prf_trig, epri_reset;
  logic [1:0] ext_trig;

  timing_gen u_tgen (
    .clk, .rst_n, .enable(cfg.wg.tg_enable), .prf_count(cfg.prf_count),
    .epri_count(cfg.epri_count), .prf_trig(int_prf), .epri_reset(int_epri));

  ext_trig_capture u_ext (
    .sample_clk, .clk, .rst_n, .trig_in({ext_epri_reset, ext_prf_trig}), .trig_out(ext_trig));

  assign prf_trig       = cfg.wg.int_timing ? int_prf  : ext_trig[0];
  assign epri_reset     = cfg.wg.int_timing ? int_epri : ext_trig[1];
  assign prf_trig_out   = prf_trig;
  assign epri_reset_out = epri_reset;

  // ---------------- per-waveform pattern playback ----------------
  logic [PAT_ADDR_W-1:0] rd_addr;
  logic [15:0]           pat_word;
  logic [PAT_ADDR_W:0]   pat_wr_ptr;
  logic                  word_valid, phase_pi, play_start, wf_advance;
  logic [3:0]            cur_wf;

  pattern_ram #(.ADDR_W(PAT_ADDR_W)) u_ram (
    .clk, .rst_n, .ptr_reset(pat_ptr_reset), .wr(pat_wr), .wdata(pat_wdata),
    .rd_addr, .rd_data(pat_word), .wr_ptr(pat_wr_ptr));

  playback_ctrl u_play (
    .clk, .rst_n, .prf_trig, .epri_reset,
    .play_en(!cfg.dds.byte_bang && !cfg.dds.disable_per_wf), .wf_cfg,
    .rd_addr, .word_valid, .phase_pi, .cur_wf, .play_start, .wf_advance);

  // ---------------- byte-bang path and pin mux ----------------
  logic sclk_bb, sdio_bb, bb_busy;

  byte_bang_serializer u_bb (
    .clk, .rst_n, .send(bb_send), .data(cfg.byte_send_data),
    .sclk(sclk_bb), .sdio(sdio_bb), .busy(bb_busy));

  dds_port_mux u_mux (
    .clk, .rst_n, .byte_bang(cfg.dds.byte_bang), .sdio_input(cfg.dds.sdio_input),
    .cs_n_manual(cfg.cs_n), .sclk_bb, .sdio_bb, .pat_word, .pat_valid(word_valid),
    .phase_pi, .cs_n(dds_cs_n), .sclk(dds_sclk), .sdio(dds_sdio), .sdio_oe(dds_sdio_oe));

  // ---------------- IO_Update ----------------
  logic prf_delay;

  io_update_delay u_dly (
    .clk, .rst_n, .prf_trig, .delay(cfg.io_update_time),
    .force_update(force_io_update), .prf_delay);

  io_update_edge u_edge (.sync_clk, .rst_n, .prf_delay, .io_update(dds_io_update));

  // ---------------- house-keeping ----------------
  logic led_boot_done;

  debug_leds #(.STEP_CYCLES(LED_STEP_CYCLES)) u_leds (
    .clk, .rst_n,
    .debug({cur_wf, pat_wr_ptr[0], bb_busy, cfg.wg.tg_enable, cfg.dds.byte_bang}),
    .leds, .boot_done(led_boot_done));

  accessory #(.CLK_HZ(OSC_HZ)) u_acc (
    .clk(osc_clk), .rst_n, .buttons, .buttons_db, .pps,
    .tick_50m(osc_ticks[0]), .tick_1m(osc_ticks[1]), .tick_1k(osc_ticks[2]));

  // play_start / wf_advance / led_boot_done are observation points for
  // simulation; they drive no pin. Only bit 0 of the pattern write pointer
  // reaches a pin (debug LED 3). Lint reports these as unused signals.
endmodule
