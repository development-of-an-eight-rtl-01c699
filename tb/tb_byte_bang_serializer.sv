// tb_byte_bang_serializer: self-checking test of the byte-bang SPI shifter.
// For 50 random bytes a tb-side SPI receiver samples SDIO on every SCLK
// rising edge; the test checks the byte (MSB first), that exactly 8 edges
// occur, that `busy` lasts 16 clocks and that SCLK idles low afterwards.
`timescale 1ns/1ps
module tb_byte_bang_serializer;
  logic clk = 0, rst_n = 0, send = 0;
  logic [7:0] data = 0;
  logic sclk, sdio, busy;
  logic sclk_d = 0;
  logic [7:0] rx;
  int nedges = 0;
  int checks = 0, failures = 0;

  byte_bang_serializer dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    sclk_d <= sclk;
    if (sclk && !sclk_d) begin
      rx     <= {rx[6:0], sdio};
      nedges <= nedges + 1;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      logic [7:0] b;
      int e0, nbusy;
      b = 8'($urandom); e0 = nedges; nbusy = 0;
      @(posedge clk) begin send <= 1; data <= b; end
      @(posedge clk) begin send <= 0; data <= ~b; end
      @(negedge clk);
      while (busy) begin nbusy++; @(negedge clk); end
      repeat (2) @(posedge clk);
      check($sformatf("byte %h got %h", b, rx), rx == b);
      check($sformatf("8 edges (%0d)", nedges - e0), nedges - e0 == 8);
      check($sformatf("16 busy clocks (%0d)", nbusy), nbusy == 16);
      check("sclk idles low", sclk == 1'b0);
      repeat (n % 3) @(posedge clk);
    end
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
