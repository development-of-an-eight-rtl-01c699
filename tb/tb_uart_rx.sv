// tb_uart_rx: self-checking test of the serial receiver.
// Sends 40 random bytes with a tb-side bit-banged 8-N-1 frame (plus one
// frame with a bad stop bit, which must be dropped) and checks the received
// byte, that exactly one `valid` comes per good frame, and that it arrives
// 9.5 bit times (+ synchroniser delay) after the start edge.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0, nvalid = 0;
  longint t_start, cyc = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (valid) nvalid <= nvalid + 1;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    @(posedge clk) rxd <= 1'b0; t_start = cyc;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd <= b[i];
      repeat (CPB) @(posedge clk);
    end
    rxd <= stop;
    repeat (CPB) @(posedge clk);
    rxd <= 1'b1;
    repeat (CPB) @(posedge clk);
  endtask

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int n0;
      longint tv;
      b = 8'($urandom); n0 = nvalid; tv = -1;
      fork
        send(b, 1'b1);
        begin
          @(posedge clk iff valid);
          tv = cyc;
          check($sformatf("byte %0d data %h exp %h", n, data, b), data == b);
        end
      join
      check("one valid per frame", nvalid == n0 + 1);
      // middle of stop bit is 9.5 bit times after the start edge; +2 sync, +1 out
      check($sformatf("latency %0d", tv - t_start),
            (tv - t_start) >= 9 * CPB + CPB / 2 && (tv - t_start) <= 9 * CPB + CPB / 2 + 4);
    end
    begin
      int n0;
      n0 = nvalid;
      send(8'hA5, 1'b0);
      repeat (2 * CPB) @(posedge clk);
      check("framing error dropped", nvalid == n0);
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
