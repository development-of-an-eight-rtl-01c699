// uart_tx: 8-N-1 serial transmitter for the reply byte of the command port.
//
// A `start` strobe while idle latches `data` and sends a start bit, eight data
// bits LSB first and a stop bit, each CLKS_PER_BIT clocks long. `busy` is high
// from the clock after `start` until the end of the stop bit; a `start` while
// busy is ignored. `txd` idles high.
//
// The 115.2 kbaud 8-N-1 format is the board's; the clocking (55.58 MHz logic
// clock, CLKS_PER_BIT = 482) is this design's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 482
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       busy,
  output logic       txd
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bitn;   // bit now on the line: 0 = start, 1..8 = data, 9 = stop
  logic [7:0]    shreg;  // data bits not yet sent, next one in bit 0

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      txd   <= 1'b1;
      cnt   <= '0;
      bitn  <= '0;
      shreg <= '0;
    end else if (!busy) begin
      txd <= 1'b1;
      if (start) begin
        busy  <= 1'b1;
        shreg <= data;
        txd   <= 1'b0;
        cnt   <= CW'(CLKS_PER_BIT - 1);
        bitn  <= '0;
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bitn == 4'd9) begin
      busy <= 1'b0;
      txd  <= 1'b1;
    end else begin
      bitn <= bitn + 1'b1;
      cnt  <= CW'(CLKS_PER_BIT - 1);
      if (bitn == 4'd8) begin
        txd <= 1'b1;
      end else begin
        txd   <= shreg[0];
        shreg <= {1'b0, shreg[7:1]};
      end
    end
  end
endmodule
