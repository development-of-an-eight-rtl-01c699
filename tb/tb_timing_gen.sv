// tb_timing_gen: self-checking test of the internal PRF / EPRI generator.
// For several PRF / EPRI settings it measures, clock by clock, the PRF
// period (must be prf_count + 1), the EPRI period in PRFs (epri_count + 1),
// the EPRI-to-PRF lead (3 clocks) and that the first pulse after enabling is
// an EPRI reset, and that nothing comes out while disabled.
`timescale 1ns/1ps
module tb_timing_gen;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [23:0] prf_count = 0;
  logic [15:0] epri_count = 0;
  logic prf_trig, epri_reset;
  int checks = 0, failures = 0;
  longint cyc = 0;

  timing_gen dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input int pc, input int ec, input int nprf);
    longint last_prf, last_epri;
    int prfs_since_epri, nprf_seen, nepri;
    logic first;
    prf_count = 24'(pc); epri_count = 16'(ec);
    enable = 0;
    repeat (5) @(negedge clk);
    check("quiet while disabled", !prf_trig && !epri_reset);
    enable = 1;
    first = 1; last_prf = -1; last_epri = -1; prfs_since_epri = 0; nprf_seen = 0; nepri = 0;
    while (nprf_seen < nprf) begin
      @(negedge clk);
      if (epri_reset) begin
        if (first) check("first pulse is EPRI", 1'b1);
        if (nepri > 0) check($sformatf("EPRI every %0d PRFs (got %0d)", ec + 1, prfs_since_epri), prfs_since_epri == ec + 1);
        first = 0; last_epri = cyc; prfs_since_epri = 0; nepri++;
      end
      if (prf_trig) begin
        if (first) check("first pulse is EPRI", 1'b0);
        first = 0;
        if (prfs_since_epri == 0) check($sformatf("EPRI lead %0d", cyc - last_epri), cyc - last_epri == 3);
        if (last_prf >= 0) check($sformatf("PRF period %0d exp %0d", cyc - last_prf, pc + 1), cyc - last_prf == pc + 1);
        last_prf = cyc; prfs_since_epri++; nprf_seen++;
      end
    end
    check("several EPRIs", nepri >= 2);
    enable = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(9, 2, 12);
    run(20, 0, 5);
    run(4, 6, 22);
    run(4445, 24, 30);   // 12.5 kHz PRF at 55.583 MHz, 25 PRFs per EPRI
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
