// cmd_processor: serial packet protocol engine for the register bus.
//
// Bytes from the UART are parsed as packets:
//   'w' (0x77) addr data            write one register, reply with its value
//   'r' (0x72) addr don't-care      reply with the register's value
//   's' (0x73) addr cnt_hi cnt_lo   then cnt data bytes, all written to addr
// A single-byte write or read produces exactly one reply byte, taken from
// the addressed register one clock after the write so that a write echoes
// the value the register now holds. Stream writes send no reply; a count of
// 0 means 65,536 bytes. Any other first byte is ignored.
//
// Bus timing: bus_addr/bus_wdata are valid with the one-cycle bus_we strobe;
// bus_rdata is read combinationally for the current bus_addr.
//
// The packet format and the echo behaviour are the board's protocol; the
// zero-count meaning and the handling of unknown command bytes are this
// design's choices.
module cmd_processor
  import wfg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic [7:0] tx_data,
  output logic       tx_start,
  input  logic       tx_busy,
  output logic [7:0] bus_addr,
  output logic [7:0] bus_wdata,
  output logic       bus_we,
  input  logic [7:0] bus_rdata
);
  typedef enum logic [2:0] {S_CMD, S_ADDR, S_DATA, S_CNT_HI, S_CNT_LO, S_STREAM, S_REPLY} state_t;
  state_t      state;
  logic [7:0]  cmd;
  logic [7:0]  cnt_hi;
  logic [16:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_CMD;
      cmd       <= '0;
      cnt_hi    <= '0;
      remaining <= '0;
      bus_addr  <= '0;
      bus_wdata <= '0;
      bus_we    <= 1'b0;
      tx_data   <= '0;
      tx_start  <= 1'b0;
    end else begin
      bus_we   <= 1'b0;
      tx_start <= 1'b0;
      unique case (state)
        S_CMD: if (rx_valid && (rx_data == CMD_WRITE || rx_data == CMD_READ ||
                                rx_data == CMD_STREAM)) begin
          cmd   <= rx_data;
          state <= S_ADDR;
        end
        S_ADDR: if (rx_valid) begin
          bus_addr <= rx_data;
          state    <= (cmd == CMD_STREAM) ? S_CNT_HI : S_DATA;
        end
        S_DATA: if (rx_valid) begin
          if (cmd == CMD_WRITE) begin
            bus_wdata <= rx_data;
            bus_we    <= 1'b1;
          end
          state <= S_REPLY;
        end
        S_REPLY: if (!bus_we && !tx_busy) begin
          tx_data  <= bus_rdata;
          tx_start <= 1'b1;
          state    <= S_CMD;
        end
        S_CNT_HI: if (rx_valid) begin
          cnt_hi <= rx_data;
          state  <= S_CNT_LO;
        end
        S_CNT_LO: if (rx_valid) begin
          remaining <= ({cnt_hi, rx_data} == 16'd0) ? 17'h10000 : {1'b0, cnt_hi, rx_data};
          state     <= S_STREAM;
        end
        S_STREAM: if (rx_valid) begin
          bus_wdata <= rx_data;
          bus_we    <= 1'b1;
          remaining <= remaining - 1'b1;
          if (remaining == 17'd1) state <= S_CMD;
        end
        default: state <= S_CMD;
      endcase
    end
  end
endmodule
