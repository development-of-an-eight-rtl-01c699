// wfg_pkg: constants and types shared by the eight-channel waveform
// generator FPGA logic.
//
// Holds the serial command bytes, the register map addresses, the layout of
// the serial pattern RAM word and the decoded register structures that the
// register file hands to the playback, timing and DDS interface blocks.
// Addresses, field widths and bit positions follow the board's register map;
// the struct packing order is this design's own.
package wfg_pkg;

  // Board dimensions
  localparam int NUM_DDS    = 8;   // DDS channels
  localparam int NUM_WF     = 16;  // playable waveforms
  localparam int WF_SLOTS   = 17;  // waveform entries; entry 17 only ends waveform 16
  localparam int PAT_ADDR_W = 14;  // serial pattern RAM word address width

  // Serial packet command bytes
  localparam logic [7:0] CMD_WRITE  = 8'h77;  // 'w'
  localparam logic [7:0] CMD_READ   = 8'h72;  // 'r'
  localparam logic [7:0] CMD_STREAM = 8'h73;  // 's'

  // Register map
  localparam logic [7:0] A_SCRATCH   = 8'h31;
  localparam logic [7:0] A_REV_HI    = 8'h32;
  localparam logic [7:0] A_REV_LO    = 8'h33;
  localparam logic [7:0] A_WG_CFG    = 8'h34;
  localparam logic [7:0] A_PRF_U     = 8'h35;
  localparam logic [7:0] A_PRF_M     = 8'h36;
  localparam logic [7:0] A_PRF_L     = 8'h37;
  localparam logic [7:0] A_EPRI_U    = 8'h38;
  localparam logic [7:0] A_EPRI_L    = 8'h39;
  localparam logic [7:0] A_IOUPD_U   = 8'h3A;
  localparam logic [7:0] A_IOUPD_L   = 8'h3B;
  localparam logic [7:0] A_TEMP_U    = 8'h3C;
  localparam logic [7:0] A_TEMP_L    = 8'h3D;
  localparam logic [7:0] A_FORCE_IOU = 8'h3E;
  localparam logic [7:0] A_DDS_CFG   = 8'h40;
  localparam logic [7:0] A_CS_N      = 8'h41;
  localparam logic [7:0] A_BYTE_SEND = 8'h43;
  localparam logic [7:0] A_PAT_RST   = 8'h4B;
  localparam logic [7:0] A_PAT_WR    = 8'h4C;
  localparam logic [7:0] A_WF_BASE   = 8'h50;  // 4 bytes per entry, up to 0x93

  // Serial pattern RAM word: bit positions
  localparam int PAT_SDIO_LSB = 0;   // D0..D7 -> SDIO of DDS #1..#8
  localparam int PAT_SCLK     = 8;   // D8     -> SCLK of all DDS
  localparam int PAT_CS_ZERO  = 9;   // D9     -> CS_N, zero-phase version
  localparam int PAT_CS_PI    = 10;  // D10    -> CS_N, pi-phase version

  // One waveform configuration entry (32-bit register group)
  typedef struct packed {
    logic [11:0]           presums;     // number of presums - 1
    logic                  zero_pi_en;  // alternate 0 / pi phase on successive PRFs
    logic [PAT_ADDR_W-1:0] start_addr;  // first pattern RAM word of this waveform
  } wf_cfg_t;

  // 0x34 wavegen configuration
  typedef struct packed {
    logic int_timing;    // bit 2: 1 = internal timing generator
    logic int_clock;     // bit 1: 1 = local oscillator
    logic tg_enable;     // bit 0: internal timing generator enable
  } wg_cfg_t;

  // 0x40 DDS configuration
  typedef struct packed {
    logic disable_per_wf;  // bit 4
    logic master_reset;    // bit 3
    logic io_reset;        // bit 2
    logic sdio_input;      // bit 1: 1 = SDIO drivers off
    logic byte_bang;       // bit 0: 1 = byte-bang, 0 = run (pattern playback)
  } dds_cfg_t;

  // Everything the register file decodes, apart from the waveform entries
  typedef struct packed {
    wg_cfg_t      wg;
    logic [23:0]  prf_count;
    logic [15:0]  epri_count;
    logic [15:0]  io_update_time;
    dds_cfg_t     dds;
    logic [7:0]   cs_n;
    logic [7:0]   byte_send_data;
  } wfg_cfg_t;

endpackage
