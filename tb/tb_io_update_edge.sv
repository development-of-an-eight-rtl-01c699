// tb_io_update_edge: self-checking test of the Sync_Clk re-timer.
// The request is driven from a 55.58 MHz clock (2-clock pulses, as made by
// io_update_delay) while the block runs on a 222.3 MHz Sync_Clk, with a
// random phase between the two. Each request must produce exactly one
// IO_Update pulse, one Sync_Clk wide, on all eight lines at once, within
// 2 to 5 Sync_Clk periods of the request's rising edge.
`timescale 1ns/1ps
module tb_io_update_edge;
  logic sync_clk = 0, clk = 0, rst_n = 0, prf_delay = 0;
  logic [7:0] io_update;
  int checks = 0, failures = 0, pulses = 0, width = 0;
  longint scyc = 0, t_pulse = 0;

  io_update_edge #(.NUM_DDS(8)) dut (.*);
  always #2.249 sync_clk = ~sync_clk;
  always #8.996 clk = ~clk;

  always @(posedge sync_clk) scyc <= scyc + 1;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge sync_clk) if (rst_n) begin
    if (io_update != 8'h00 && io_update != 8'hFF) check("all lines equal", 1'b0);
    if (io_update == 8'hFF) begin
      if (width == 0) begin pulses++; t_pulse = scyc; end
      width++;
    end else if (width != 0) begin
      check($sformatf("pulse width %0d", width), width == 1);
      width = 0;
    end
  end

  initial begin
    longint t_req;
    int p0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      repeat (3 + $urandom % 5) @(posedge clk);
      p0 = pulses;
      #($urandom % 3);
      prf_delay = 1;
      t_req = scyc;
      repeat (2) @(posedge clk);
      prf_delay = 0;
      repeat (4) @(posedge clk);
      check("one pulse per request", pulses == p0 + 1);
      check($sformatf("latency %0d", t_pulse - t_req), t_pulse - t_req >= 2 && t_pulse - t_req <= 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
