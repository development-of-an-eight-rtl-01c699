// dds_spi_model: behavioural model of the serial port of one AD9910-style DDS,
// as far as the waveform generator tests need it.
//
// While CS_N is low, SDIO is sampled on every SCLK rising edge. The first
// byte of a transfer is the instruction (bit 7 read/write, bits 4:0 the
// register address); the register's data (2, 4 or 8 bytes, MSB first) follow,
// then the next instruction, and so on. A completed register write goes to a
// buffer; the IO_Update rising edge copies all buffers to the active
// registers. MASTER_RESET clears both. The model counts:
//   writes      completed register writes
//   aborts      transfers that ended (CS_N high) in the middle of a register
//   io_updates  IO_Update rising edges
//   upd_in_xfer IO_Update edges seen while CS_N was low
module dds_spi_model (
  input logic cs_n,
  input logic sclk,
  input logic sdio,
  input logic io_update,
  input logic master_reset
);
  logic [63:0] buf_reg [32];
  logic [63:0] act_reg [32];
  logic [31:0] wr_mask;        // buffered registers written since last update
  int          writes = 0, aborts = 0, io_updates = 0, upd_in_xfer = 0;
  int          last_addr = -1;

  logic [7:0]  instr;
  logic [63:0] shreg;
  int          nbits = 0;      // bits of the current instruction + data
  int          need  = 8;      // bits the current register write needs

  function automatic int reg_bytes(input logic [4:0] a);
    case (a)
      5'h08:                          return 2;   // phase offset word
      5'h0B, 5'h0C:                   return 8;   // digital ramp limit / step
      5'h0E, 5'h0F, 5'h10, 5'h11,
      5'h12, 5'h13, 5'h14, 5'h15:     return 8;   // single tone / RAM profiles
      default:                        return 4;
    endcase
  endfunction

  task automatic clear_all();
    for (int i = 0; i < 32; i++) begin buf_reg[i] = '0; act_reg[i] = '0; end
    wr_mask = '0;
  endtask

  initial clear_all();

  always @(posedge master_reset) clear_all();

  always @(negedge cs_n) begin
    nbits = 0;
    need  = 8;
  end

  always @(posedge cs_n) if (nbits != 0) aborts++;

  always @(posedge sclk) if (!cs_n && !master_reset) begin
    shreg = {shreg[62:0], sdio};
    nbits++;
    if (nbits == 8 && need == 8) begin
      instr = shreg[7:0];
      need  = 8 + 8 * reg_bytes(instr[4:0]);
    end else if (nbits == need) begin
      if (!instr[7]) begin
        buf_reg[instr[4:0]] = shreg & ((need - 8 == 64) ? '1 : ((64'd1 << (need - 8)) - 1));
        wr_mask[instr[4:0]] = 1'b1;
        last_addr = int'(instr[4:0]);
        writes++;
      end
      nbits = 0;
      need  = 8;
    end
  end

  always @(posedge io_update) begin
    io_updates++;
    if (!cs_n) upd_in_xfer++;
    for (int i = 0; i < 32; i++) act_reg[i] = buf_reg[i];
    wr_mask = '0;
  end
endmodule
