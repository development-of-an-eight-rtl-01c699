// tb_pattern_ram: self-checking test of the 8-in / 16-out pattern RAM.
// Fills a region through the byte write port, then reads every word back
// and compares it with {odd byte, even byte}; checks the one-clock read
// latency, the write pointer, and that a pointer reset restarts writing at
// word 0 without disturbing the other words. Runs at the full 16K-word size
// and writes the last word too.
`timescale 1ns/1ps
module tb_pattern_ram;
  localparam int AW = 14;
  logic clk = 0, rst_n = 0, ptr_reset = 0, wr = 0;
  logic [7:0] wdata = 0;
  logic [AW-1:0] rd_addr = 0;
  logic [15:0] rd_data;
  logic [AW:0] wr_ptr;
  logic [7:0] model [2 ** (AW + 1)];
  int checks = 0, failures = 0;

  pattern_ram #(.ADDR_W(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic put(input logic [7:0] b);
    @(posedge clk) begin wr <= 1; wdata <= b; end
    @(posedge clk) wr <= 0;
  endtask
  task automatic rstptr();
    @(posedge clk) ptr_reset <= 1;
    @(posedge clk) ptr_reset <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    rstptr();
    @(negedge clk);
    check("pointer at 0", wr_ptr == 0);
    for (int i = 0; i < 600; i++) begin
      model[i] = 8'($urandom);
      put(model[i]);
    end
    @(negedge clk);
    check("pointer advanced", wr_ptr == 600);
    for (int k = 0; k < 300; k++) begin
      @(posedge clk) rd_addr <= AW'(k);
      @(posedge clk);
      #1 check($sformatf("word %0d = %h exp %h", k, rd_data, {model[2*k+1], model[2*k]}),
               rd_data == {model[2*k+1], model[2*k]});
    end
    // read latency: data for a new address appears after one clock
    @(posedge clk) rd_addr <= 14'd5;
    @(posedge clk) rd_addr <= 14'd9;
    #1 check("latency 1 (a)", rd_data == {model[11], model[10]});
    @(posedge clk);
    #1 check("latency 1 (b)", rd_data == {model[19], model[18]});
    // pointer reset overwrites word 0 only
    rstptr();
    model[0] = 8'hC3; model[1] = 8'h3C;
    put(model[0]); put(model[1]);
    for (int k = 0; k < 3; k++) begin
      @(posedge clk) rd_addr <= AW'(k);
      @(posedge clk);
      #1 check($sformatf("after reset word %0d", k), rd_data == {model[2*k+1], model[2*k]});
    end
    // fill the rest, up to the last word of the RAM
    for (int i = 2; i < 2 ** (AW + 1); i++) begin
      @(posedge clk) begin wr <= 1; wdata <= 8'(i ^ (i >> 8)); end
    end
    @(posedge clk) wr <= 0;
    @(posedge clk) rd_addr <= '1;
    @(posedge clk);
    #1 check("last word", rd_data == {8'((2**(AW+1)-1) ^ ((2**(AW+1)-1) >> 8)), 8'((2**(AW+1)-2) ^ ((2**(AW+1)-2) >> 8))});
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
