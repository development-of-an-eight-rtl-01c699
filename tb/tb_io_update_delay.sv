// tb_io_update_delay: self-checking test of the PRF-to-IO_Update delay.
// For random delays (and the 10.4 us minimum of the board, 578 clocks) it
// checks that the request rises exactly `delay` clocks after the clock edge
// that samples the PRF (t0 below is taken half a clock before that edge), stays
// high for 2 clocks and happens once; that a forced update raises it on the
// next clock; and that a second PRF during a delay restarts it.
`timescale 1ns/1ps
module tb_io_update_delay;
  logic clk = 0, rst_n = 0, prf_trig = 0, force_update = 0;
  logic [15:0] delay = 0;
  logic prf_delay;
  int checks = 0, failures = 0;
  longint cyc = 0;

  io_update_delay dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // pulse `trig` (0 = prf, 1 = force) then measure rise time and width
  task automatic measure(input bit is_force, input int d, input int restart_in);
    int restart_at;
    longint t0, t_rise;
    int width, rises;
    delay = 16'(d);
    restart_at = restart_in;
    @(negedge clk);
    if (is_force) force_update = 1; else prf_trig = 1;
    t0 = cyc;
    @(negedge clk);
    force_update = 0; prf_trig = 0;
    t_rise = -1; width = 0; rises = 0;
    for (int i = 0; i < d + 2 * restart_in + 20; i++) begin
      if (restart_at > 0 && cyc - t0 == restart_at) begin
        prf_trig = 1; t0 = cyc; restart_at = -1;
        @(negedge clk);
        prf_trig = 0;
        check("no request before restart", t_rise < 0);
      end
      if (prf_delay) begin
        if (t_rise < 0) begin t_rise = cyc; rises++; end
        width++;
      end
      @(negedge clk);
    end
    if (is_force) check($sformatf("force: rise after %0d", t_rise - t0), t_rise - t0 == 1);
    else check($sformatf("delay %0d: rise after %0d", d, t_rise - t0), t_rise - t0 == ((d == 0) ? 2 : d + 1));
    check($sformatf("width %0d", width), width == 2);
    check("one request", rises == 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check("idle low", !prf_delay);
    measure(0, 578, 0);
    measure(0, 0, 0);
    measure(0, 1, 0);
    measure(0, 2, 0);
    for (int n = 0; n < 20; n++) measure(0, 3 + ($urandom % 300), 0);
    measure(1, 100, 0);
    measure(0, 50, 20);
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
