// tb_uart_tx: self-checking test of the serial transmitter.
// Sends 30 random bytes and decodes txd in the middle of every bit time
// independently of the DUT: start bit low, 8 data bits LSB first, stop bit
// high. Also checks the frame length (busy for 10 bit times) and that a start
// strobe while busy is ignored.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] data = 0;
  logic busy, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .start, .busy, .txd);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check("idle high", txd == 1'b1 && !busy);
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b, got;
      int busy_cycles;
      b = 8'($urandom); busy_cycles = 0;
      @(posedge clk) begin data <= b; start <= 1'b1; end
      @(posedge clk) begin start <= 1'b0; data <= ~b; end
      // txd went low at this edge; sample mid-bit
      repeat (CPB / 2 - 1) @(posedge clk);
      check("start bit low", txd == 1'b0);
      if (n == 5) begin start <= 1'b1; @(posedge clk); start <= 1'b0; end
      for (int i = 0; i < 8; i++) begin
        repeat ((n == 5 && i == 0) ? CPB - 1 : CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      check("stop bit high", txd == 1'b1);
      check($sformatf("byte %h got %h", b, got), got == b);
      while (busy) begin @(posedge clk); busy_cycles++; end
      check($sformatf("frame ends on time (%0d)", busy_cycles), busy_cycles >= CPB / 2 - 1 && busy_cycles <= CPB / 2 + 2);
      check("idle after frame", txd == 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
