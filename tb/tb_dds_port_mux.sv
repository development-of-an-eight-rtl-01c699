// tb_dds_port_mux: self-checking test of the DDS pin multiplexer.
// Drives random inputs for 2000 clocks and compares every output with a
// reference computed in the tb from the previous clock's inputs: byte-bang
// mode takes CS_N from the manual register and SCLK/SDIO from the
// serializer; run mode decodes D0-D7 (SDIO), D8 (SCLK) and D9/D10 (CS_N for
// zero/pi phase) and idles the pins when no word is valid.
`timescale 1ns/1ps
module tb_dds_port_mux;
  logic clk = 0, rst_n = 0;
  logic byte_bang = 0, sdio_input = 0, sclk_bb = 0, sdio_bb = 0, pat_valid = 0, phase_pi = 0;
  logic [7:0] cs_n_manual = 0, cs_n, sclk, sdio;
  logic [15:0] pat_word = 0;
  logic sdio_oe;
  int checks = 0, failures = 0, n_bb = 0, n_pi = 0, n_zero = 0, n_idle = 0;

  dds_port_mux #(.NUM_DDS(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [7:0] e_cs, e_sclk, e_sdio;
    logic e_oe;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset: CS_N high", cs_n == 8'hFF && sclk == 0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      byte_bang   = 1'($urandom % 3 == 0);
      sdio_input  = 1'($urandom % 8 == 0);
      cs_n_manual = 8'($urandom);
      sclk_bb     = 1'($urandom);
      sdio_bb     = 1'($urandom);
      pat_word    = 16'($urandom);
      pat_valid   = 1'($urandom % 4 != 0);
      phase_pi    = 1'($urandom);
      if (byte_bang) begin
        e_cs = cs_n_manual; e_sclk = {8{sclk_bb}}; e_sdio = {8{sdio_bb}}; n_bb++;
      end else if (pat_valid) begin
        e_cs   = {8{phase_pi ? pat_word[10] : pat_word[9]}};
        e_sclk = {8{pat_word[8]}};
        e_sdio = pat_word[7:0];
        if (phase_pi) n_pi++; else n_zero++;
      end else begin
        e_cs = 8'hFF; e_sclk = 0; e_sdio = 0; n_idle++;
      end
      e_oe = !sdio_input;
      @(negedge clk);
      check($sformatf("cs_n %h exp %h", cs_n, e_cs), cs_n == e_cs);
      check("sclk", sclk == e_sclk);
      check("sdio", sdio == e_sdio);
      check("sdio_oe", sdio_oe == e_oe);
    end
    check("all modes exercised", n_bb > 0 && n_pi > 0 && n_zero > 0 && n_idle > 0);
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
