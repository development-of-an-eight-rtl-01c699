// dds_port_mux: drives the CS_N, SCLK and SDIO pins of the eight DDS chips.
//
// Two sources share the pins, chosen by the byte-bang mode bit:
//   byte-bang: CS_N of DDS n comes from bit n-1 of the manual CS_N register,
//              SCLK and SDIO of every chip from the byte serializer;
//   run:       the pins are decoded from the 16-bit pattern RAM word: D0..D7
//              are the SDIO lines of DDS #1..#8, D8 is SCLK for all chips, and
//              D9/D10 are two versions of the common CS_N line, for zero and
//              for pi phase. The phase encode selects one of them, so the chips
//              accept only the phase offset word written for that phase.
//              Between patterns the pins idle with CS_N high, SCLK and SDIO low.
// `sdio_oe` is the SDIO output enable (low when the SDIO-as-input bit is set).
// All outputs are registered: pins change one clock after their inputs.
//
// The two sources, the RAM line assignment and the CS_N phase mux are the
// board's; which of D9/D10 carries the pi version, the idle levels and the
// output register are this design's choices.
module dds_port_mux #(
  parameter int NUM_DDS = wfg_pkg::NUM_DDS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               byte_bang,
  input  logic               sdio_input,
  input  logic [NUM_DDS-1:0] cs_n_manual,
  input  logic               sclk_bb,
  input  logic               sdio_bb,
  input  logic [15:0]        pat_word,
  input  logic               pat_valid,
  input  logic               phase_pi,
  output logic [NUM_DDS-1:0] cs_n,
  output logic [NUM_DDS-1:0] sclk,
  output logic [NUM_DDS-1:0] sdio,
  output logic               sdio_oe
);
  logic               ram_cs_n;
  logic               ram_sclk;
  logic [NUM_DDS-1:0] ram_sdio;

  always_comb begin
    if (pat_valid) begin
      ram_cs_n = phase_pi ? pat_word[wfg_pkg::PAT_CS_PI] : pat_word[wfg_pkg::PAT_CS_ZERO];
      ram_sclk = pat_word[wfg_pkg::PAT_SCLK];
      ram_sdio = pat_word[wfg_pkg::PAT_SDIO_LSB +: NUM_DDS];
    end else begin
      ram_cs_n = 1'b1;
      ram_sclk = 1'b0;
      ram_sdio = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_n    <= '1;
      sclk    <= '0;
      sdio    <= '0;
      sdio_oe <= 1'b0;
    end else begin
      sdio_oe <= !sdio_input;
      if (byte_bang) begin
        cs_n <= cs_n_manual;
        sclk <= {NUM_DDS{sclk_bb}};
        sdio <= {NUM_DDS{sdio_bb}};
      end else begin
        cs_n <= {NUM_DDS{ram_cs_n}};
        sclk <= {NUM_DDS{ram_sclk}};
        sdio <= ram_sdio;
      end
    end
  end
endmodule
