// tb_debug_leds: self-checking test of the boot LED sweep.
// With a 3-clock step and 2 sweeps it checks that exactly one LED is lit
// during boot, that it moves one position per step 0..7..0 twice (28 steps),
// and that afterwards the LEDs follow the debug inputs.
`timescale 1ns/1ps
module tb_debug_leds;
  localparam int STEP = 3;
  logic clk = 0, rst_n = 0;
  logic [7:0] debug = 0, leds;
  logic boot_done;
  int checks = 0, failures = 0;

  debug_leds #(.NUM_LEDS(8), .STEP_CYCLES(STEP), .BOOT_SWEEPS(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_pos [$];
    for (int s = 0; s < 2; s++) begin
      for (int p = 0; p < 7; p++) exp_pos.push_back(p);
      for (int p = 7; p > 0; p--) exp_pos.push_back(p);
    end
    exp_pos.push_back(0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    debug = 8'h5A;
    foreach (exp_pos[k]) begin
      for (int c = 0; c < STEP; c++) begin
        check($sformatf("step %0d leds %b exp pos %0d", k, leds, exp_pos[k]),
              (k == exp_pos.size() - 1) ? 1'b1 : (leds == 8'(1 << exp_pos[k]) && !boot_done));
        @(negedge clk);
      end
    end
    check("boot done", boot_done);
    for (int n = 0; n < 20; n++) begin
      debug = 8'($urandom);
      @(negedge clk);
      check("debug shown", leds == debug);
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
