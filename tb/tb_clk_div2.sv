// tb_clk_div2: self-checking test of the sample-clock divider.
// Checks that the output is low right after reset, toggles on every rising
// edge of the 111.167 MHz sample clock (period 2 sample clocks, 50 % duty)
// and measures its period in time (17.99 ns for 55.583 MHz).
`timescale 1ns/1ps
module tb_clk_div2;
  logic sample_clk = 0, rst_n = 0, clk_half;
  int checks = 0, failures = 0;
  realtime t_last = -1.0;

  clk_div2 dut (.*);
  always #4.4978 sample_clk = ~sample_clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic prev;
    repeat (2) @(posedge sample_clk);
    check("low in reset", clk_half == 1'b0);
    @(negedge sample_clk) rst_n = 1;
    prev = clk_half;
    for (int n = 0; n < 200; n++) begin
      @(negedge sample_clk);
      check("toggles every sample clock", clk_half == !prev);
      prev = clk_half;
    end
    for (int n = 0; n < 20; n++) begin
      @(posedge clk_half);
      if (t_last >= 0) check($sformatf("period %f", $realtime - t_last), ($realtime - t_last) > 17.98 && ($realtime - t_last) < 18.0);
      t_last = $realtime;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
