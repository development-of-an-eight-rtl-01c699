// tb_accessory: self-checking test of the house-keeping block, scaled down.
// With a 20 kHz "oscillator" the tick rates are set to 10 kHz, 1 kHz and
// 100 Hz, so the dividers are 2, 20 and 200 and the second strobe comes
// every 20000 clocks; the debounce time of 1 ms is 20 clocks.  The test
// checks every tick period, that bounces shorter than the debounce time are
// ignored, and that a stable change appears after synchroniser + debounce.
`timescale 1ns/1ps
module tb_accessory;
  localparam int CLK_HZ = 20_000, DB = 20;
  logic clk = 0, rst_n = 0;
  logic [1:0] buttons = 0, buttons_db;
  logic pps, tick_50m, tick_1m, tick_1k;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint last [4] = '{-1, -1, -1, -1};
  int     seen [4] = '{0, 0, 0, 0};
  int     per  [4] = '{2, 20, 200, 20000};

  accessory #(.CLK_HZ(CLK_HZ), .FAST_HZ(10_000), .MID_HZ(1_000), .SLOW_HZ(100),
              .DEBOUNCE_MS(1), .NUM_BUTTONS(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    logic [3:0] t;
    cyc <= cyc + 1;
    t = {pps, tick_1k, tick_1m, tick_50m};
    for (int i = 0; i < 4; i++) if (t[i]) begin
      if (last[i] >= 0) check($sformatf("tick %0d period %0d", i, cyc - last[i]), cyc - last[i] == per[i]);
      last[i] = cyc;
      seen[i]++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // button 0: bounces, then settles high
    for (int b = 0; b < 6; b++) begin
      buttons[0] = 1; repeat (3 + $urandom % (DB - 6)) @(negedge clk);
      buttons[0] = 0; repeat (2 + $urandom % 5) @(negedge clk);
      check("bounce ignored", buttons_db == 2'b00);
    end
    buttons[0] = 1;
    for (int c = 1; c <= DB + 4; c++) begin
      @(negedge clk);
      if (c < DB + 1) check($sformatf("not yet at %0d", c), buttons_db[0] == 1'b0);
      if (c >= DB + 2) check($sformatf("debounced at %0d", c), buttons_db[0] == 1'b1);
    end
    // button 1 independently, release of button 0 at the same time
    buttons = 2'b10;
    repeat (DB + 4) @(negedge clk);
    check("both updated", buttons_db == 2'b10);
    // short glitch low on button 1
    buttons[1] = 0; repeat (DB - 4) @(negedge clk); buttons[1] = 1;
    repeat (DB + 4) @(negedge clk);
    check("glitch ignored", buttons_db == 2'b10);
    // run for three seconds of scaled time
    repeat (3 * CLK_HZ + 10) @(negedge clk);
    check("pps seen", seen[3] >= 3);
    check("1k seen", seen[2] >= 300);
    check("1m seen", seen[1] >= 3000);
    check("50m seen", seen[0] >= 30000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
