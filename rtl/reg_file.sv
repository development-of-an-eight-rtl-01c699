// reg_file: memory-mapped registers of the waveform generator.
//
// Sits on the 8-bit local bus driven by cmd_processor. Readable/writable
// registers hold the timing generator settings (24-bit PRF count, 16-bit EPRI
// count), the 16-bit PRF-to-IO_Update delay, the wavegen and DDS
// configuration bits, the byte-bang CS_N values and the 17 four-byte waveform
// entries at 0x50-0x93 (12-bit presum field, 0/pi enable, 14-bit pattern
// start address). Writes to 0x3E, 0x43, 0x4B and 0x4C are decoded into
// one-cycle strobes (force IO update, byte-bang send, pattern pointer reset,
// pattern byte write), registered one clock after bus_we together with the
// written byte. Reads are combinational; write-only and unmapped addresses
// read 0.
//
// Addresses and bit fields are the board's register map. Reset values (all
// zero, CS_N all high) and the revision code parameters are this design's.
module reg_file
  import wfg_pkg::*;
#(
  parameter logic [2:0] REV_MAJOR  = 3'd1,
  parameter logic [4:0] REV_MIDDLE = 5'd0,
  parameter logic [7:0] REV_MINOR  = 8'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] bus_addr,
  input  logic [7:0] bus_wdata,
  input  logic       bus_we,
  output logic [7:0] bus_rdata,
  input  logic [15:0] temp_value,
  output wfg_cfg_t   cfg,
  output wf_cfg_t    wf_cfg [WF_SLOTS],
  output logic       force_io_update,
  output logic       bb_send,
  output logic       pat_ptr_reset,
  output logic       pat_wr,
  output logic [7:0] pat_wdata
);
  localparam int WF_BYTES = 4 * WF_SLOTS;
  localparam int OW       = $clog2(WF_BYTES);

  logic [7:0] scratch;
  logic [7:0] wf_bytes [WF_BYTES];
  logic [7:0] wf_off;

  assign wf_off = bus_addr - A_WF_BASE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scratch         <= '0;
      cfg             <= '0;
      cfg.cs_n        <= 8'hFF;
      force_io_update <= 1'b0;
      bb_send         <= 1'b0;
      pat_ptr_reset   <= 1'b0;
      pat_wr          <= 1'b0;
      pat_wdata       <= '0;
      for (int i = 0; i < WF_BYTES; i++) wf_bytes[i] <= '0;
    end else begin
      force_io_update <= 1'b0;
      bb_send         <= 1'b0;
      pat_ptr_reset   <= 1'b0;
      pat_wr          <= 1'b0;
      if (bus_we) begin
        case (bus_addr)
          A_SCRATCH:   scratch                  <= bus_wdata;
          A_WG_CFG:    cfg.wg                   <= bus_wdata[2:0];
          A_PRF_U:     cfg.prf_count[23:16]     <= bus_wdata;
          A_PRF_M:     cfg.prf_count[15:8]      <= bus_wdata;
          A_PRF_L:     cfg.prf_count[7:0]       <= bus_wdata;
          A_EPRI_U:    cfg.epri_count[15:8]     <= bus_wdata;
          A_EPRI_L:    cfg.epri_count[7:0]      <= bus_wdata;
          A_IOUPD_U:   cfg.io_update_time[15:8] <= bus_wdata;
          A_IOUPD_L:   cfg.io_update_time[7:0]  <= bus_wdata;
          A_FORCE_IOU: force_io_update          <= 1'b1;
          A_DDS_CFG:   cfg.dds                  <= bus_wdata[4:0];
          A_CS_N:      cfg.cs_n                 <= bus_wdata;
          A_BYTE_SEND: begin
            cfg.byte_send_data <= bus_wdata;
            bb_send            <= 1'b1;
          end
          A_PAT_RST:   pat_ptr_reset            <= 1'b1;
          A_PAT_WR: begin
            pat_wdata <= bus_wdata;
            pat_wr    <= 1'b1;
          end
          default:
            if (bus_addr >= A_WF_BASE && int'(wf_off) < WF_BYTES)
              wf_bytes[wf_off[OW-1:0]] <= bus_wdata;
        endcase
      end
    end
  end

  // Waveform entries: byte 0 = presums[11:4]; byte 1[7:4] = presums[3:0];
  // byte 2[6] = 0/pi enable, byte 2[5:0] = start[13:8]; byte 3 = start[7:0].
  always_comb begin
    for (int w = 0; w < WF_SLOTS; w++) begin
      wf_cfg[w].presums    = {wf_bytes[4*w], wf_bytes[4*w+1][7:4]};
      wf_cfg[w].zero_pi_en = wf_bytes[4*w+2][6];
      wf_cfg[w].start_addr = {wf_bytes[4*w+2][5:0], wf_bytes[4*w+3]};
    end
  end

  always_comb begin
    case (bus_addr)
      A_SCRATCH: bus_rdata = scratch;
      A_REV_HI:  bus_rdata = {REV_MAJOR, REV_MIDDLE};
      A_REV_LO:  bus_rdata = REV_MINOR;
      A_WG_CFG:  bus_rdata = {5'd0, cfg.wg};
      A_PRF_U:   bus_rdata = cfg.prf_count[23:16];
      A_PRF_M:   bus_rdata = cfg.prf_count[15:8];
      A_PRF_L:   bus_rdata = cfg.prf_count[7:0];
      A_EPRI_U:  bus_rdata = cfg.epri_count[15:8];
      A_EPRI_L:  bus_rdata = cfg.epri_count[7:0];
      A_IOUPD_U: bus_rdata = cfg.io_update_time[15:8];
      A_IOUPD_L: bus_rdata = cfg.io_update_time[7:0];
      A_TEMP_U:  bus_rdata = temp_value[15:8];
      A_TEMP_L:  bus_rdata = temp_value[7:0];
      A_DDS_CFG: bus_rdata = {3'd0, cfg.dds};
      A_CS_N:    bus_rdata = cfg.cs_n;
      default:
        if (bus_addr >= A_WF_BASE && int'(wf_off) < WF_BYTES) bus_rdata = wf_bytes[wf_off[OW-1:0]];
        else                                                  bus_rdata = 8'h00;
    endcase
  end
endmodule
