// tb_ext_trig_capture: self-checking test of the external trigger capture.
// External PRF and EPRI pulses one sample clock (9 ns) wide, at random
// sample-clock phases, must each give exactly one one-clock pulse in the
// half-rate logic clock, 2 to 3 logic clocks later; the two inputs are
// independent. Wide input pulses (up to 40 sample clocks) must also give
// a single output pulse.
`timescale 1ns/1ps
module tb_ext_trig_capture;
  logic sample_clk = 0, clk = 0, rst_n = 0;
  logic [1:0] trig_in = 0, trig_out;
  int checks = 0, failures = 0;
  int cnt [2] = '{0, 0};
  longint ccyc = 0;
  longint t_out [2];

  ext_trig_capture #(.N(2)) dut (.*);
  always #4.5 sample_clk = ~sample_clk;
  always @(posedge sample_clk) clk <= ~clk;   // same divider as the design
  always @(posedge clk) begin
    ccyc <= ccyc + 1;
    if (rst_n) for (int i = 0; i < 2; i++) if (trig_out[i]) begin cnt[i]++; t_out[i] = ccyc; end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4) @(posedge sample_clk);
    rst_n = 1;
    repeat (4) @(posedge sample_clk);
    for (int n = 0; n < 60; n++) begin
      int which, c0 [2];
      longint t_in;
      which = (n % 3 == 2) ? 3 : 1 + (n % 2);
      c0[0] = cnt[0]; c0[1] = cnt[1];
      repeat (1 + $urandom % 7) @(posedge sample_clk);
      trig_in <= 2'(which);
      t_in = ccyc;
      // narrow pulses first, then pulses up to 40 sample clocks wide
      repeat ((n < 20) ? 1 : 1 + $urandom % 40) @(posedge sample_clk);
      trig_in <= 0;
      repeat (12) @(posedge sample_clk);
      for (int i = 0; i < 2; i++) begin
        check($sformatf("input %0d pulse count", i), cnt[i] == c0[i] + ((which >> i) & 1));
        if ((which >> i) & 1)
          check($sformatf("latency %0d", t_out[i] - t_in), t_out[i] - t_in >= 1 && t_out[i] - t_in <= 4);
      end
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
