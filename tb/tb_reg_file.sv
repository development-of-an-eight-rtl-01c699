// tb_reg_file: self-checking test of the register map.
// Writes every read/write register with random data and reads it back,
// checks the decoded settings (PRF, EPRI, IO update time, configuration
// bits, CS_N) against the bytes written, fills all 17 waveform entries and
// checks presums / 0-pi enable / start address decoding, checks read-only
// registers (revision, temperature) and the four write strobes.
`timescale 1ns/1ps
module tb_reg_file;
  import wfg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] bus_addr = 0, bus_wdata = 0, bus_rdata, pat_wdata;
  logic bus_we = 0;
  logic [15:0] temp_value = 16'hBEEF;
  wfg_cfg_t cfg;
  wf_cfg_t  wf_cfg [WF_SLOTS];
  logic force_io_update, bb_send, pat_ptr_reset, pat_wr;
  int checks = 0, failures = 0;
  int n_force = 0, n_bb = 0, n_prst = 0, n_pwr = 0;

  reg_file #(.REV_MAJOR(3'd5), .REV_MIDDLE(5'd17), .REV_MINOR(8'h42)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_force <= n_force + int'(force_io_update);
    n_bb    <= n_bb + int'(bb_send);
    n_prst  <= n_prst + int'(pat_ptr_reset);
    n_pwr   <= n_pwr + int'(pat_wr);
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(posedge clk) begin bus_addr <= a; bus_wdata <= d; bus_we <= 1; end
    @(posedge clk) bus_we <= 0;
    @(posedge clk);
  endtask
  // Reads every address once (combinational read port) into rdv[].
  logic [7:0] rdv [256];
  task automatic snap();
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      bus_addr = 8'(a);
      #0.01;
      rdv[a] = bus_rdata;
    end
  endtask

  initial begin
    logic [7:0] v [256];
    logic [7:0] wfb [4*WF_SLOTS];
    repeat (3) @(posedge clk);
    rst_n = 1;
    snap();
    check("CS_N reset high", cfg.cs_n == 8'hFF && rdv[A_CS_N] == 8'hFF);
    check("config reset 0", cfg.dds == '0 && cfg.wg == '0);
    foreach (v[i]) v[i] = 8'($urandom);
    wr(A_SCRATCH, v[A_SCRATCH]);
    wr(A_WG_CFG, v[A_WG_CFG]);
    wr(A_PRF_U, v[A_PRF_U]); wr(A_PRF_M, v[A_PRF_M]); wr(A_PRF_L, v[A_PRF_L]);
    wr(A_EPRI_U, v[A_EPRI_U]); wr(A_EPRI_L, v[A_EPRI_L]);
    wr(A_IOUPD_U, v[A_IOUPD_U]); wr(A_IOUPD_L, v[A_IOUPD_L]);
    wr(A_DDS_CFG, v[A_DDS_CFG]); wr(A_CS_N, v[A_CS_N]);
    snap();
    check("scratch", rdv[A_SCRATCH] == v[A_SCRATCH]);
    check("wg cfg read", rdv[A_WG_CFG] == {5'd0, v[A_WG_CFG][2:0]});
    check("wg cfg bits", cfg.wg.int_timing == v[A_WG_CFG][2] && cfg.wg.int_clock == v[A_WG_CFG][1] &&
                         cfg.wg.tg_enable == v[A_WG_CFG][0]);
    check("prf count", cfg.prf_count == {v[A_PRF_U], v[A_PRF_M], v[A_PRF_L]});
    check("prf read", rdv[A_PRF_U] == v[A_PRF_U] && rdv[A_PRF_M] == v[A_PRF_M] && rdv[A_PRF_L] == v[A_PRF_L]);
    check("epri count", cfg.epri_count == {v[A_EPRI_U], v[A_EPRI_L]});
    check("epri read", rdv[A_EPRI_U] == v[A_EPRI_U] && rdv[A_EPRI_L] == v[A_EPRI_L]);
    check("io update time", cfg.io_update_time == {v[A_IOUPD_U], v[A_IOUPD_L]});
    check("io update read", rdv[A_IOUPD_U] == v[A_IOUPD_U] && rdv[A_IOUPD_L] == v[A_IOUPD_L]);
    check("dds cfg read", rdv[A_DDS_CFG] == {3'd0, v[A_DDS_CFG][4:0]});
    check("dds cfg bits", cfg.dds.byte_bang == v[A_DDS_CFG][0] && cfg.dds.sdio_input == v[A_DDS_CFG][1] &&
          cfg.dds.io_reset == v[A_DDS_CFG][2] && cfg.dds.master_reset == v[A_DDS_CFG][3] &&
          cfg.dds.disable_per_wf == v[A_DDS_CFG][4]);
    check("cs_n", cfg.cs_n == v[A_CS_N] && rdv[A_CS_N] == v[A_CS_N]);
    check("revision", rdv[A_REV_HI] == {3'd5, 5'd17} && rdv[A_REV_LO] == 8'h42);
    check("temperature", rdv[A_TEMP_U] == 8'hBE && rdv[A_TEMP_L] == 8'hEF);
    for (int i = 0; i < 4 * WF_SLOTS; i++) begin
      wfb[i] = 8'($urandom);
      wr(8'(A_WF_BASE + i), wfb[i]);
    end
    snap();
    for (int w = 0; w < WF_SLOTS; w++) begin
      check($sformatf("wf%0d presums", w + 1), wf_cfg[w].presums == {wfb[4*w], wfb[4*w+1][7:4]});
      check($sformatf("wf%0d 0/pi", w + 1), wf_cfg[w].zero_pi_en == wfb[4*w+2][6]);
      check($sformatf("wf%0d start", w + 1), wf_cfg[w].start_addr == {wfb[4*w+2][5:0], wfb[4*w+3]});
      for (int b = 0; b < 4; b++) check("wf byte read", rdv[8'(A_WF_BASE + 4*w + b)] == wfb[4*w+b]);
    end
    snap();
    check("above 0x93 unmapped", rdv[8'h94] == 8'h00);
    wr(8'h94, 8'h77);
    check("write above 0x93 ignored", wf_cfg[WF_SLOTS-1].start_addr == {wfb[4*WF_SLOTS-2][5:0], wfb[4*WF_SLOTS-1]});
    wr(A_FORCE_IOU, 8'h00);
    wr(A_BYTE_SEND, 8'h9C);
    check("byte send data", cfg.byte_send_data == 8'h9C);
    wr(A_PAT_RST, 8'h00);
    wr(A_PAT_WR, 8'h3D);
    check("pattern data", pat_wdata == 8'h3D);
    wr(A_PAT_WR, 8'h4E);
    repeat (2) @(posedge clk);
    $display("strobes %0d %0d %0d %0d %b", n_force, n_bb, n_prst, n_pwr, (n_force == 1 && n_bb == 1 && n_prst == 1 && n_pwr == 2));
    check("strobes", n_force == 1 && n_bb == 1 && n_prst == 1 && n_pwr == 2);
    snap();
    check("write-only read 0", rdv[A_BYTE_SEND] == 0 && rdv[A_PAT_WR] == 0 && rdv[A_FORCE_IOU] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
