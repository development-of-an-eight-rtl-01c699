// tb_cmd_processor: self-checking test of the serial packet protocol.
// A tb-side 256-byte register array answers the bus. The test sends write
// packets (checks the bus write and the echoed reply, which must be the new
// value), read packets (reply = stored value, no bus write), stream packets
// of random length (every byte written to the one address, in order, no
// reply) and stray bytes that are not commands (ignored).
`timescale 1ns/1ps
module tb_cmd_processor;
  import wfg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0, tx_data, bus_addr, bus_wdata, bus_rdata;
  logic rx_valid = 0, tx_start, tx_busy = 0, bus_we;
  logic [7:0] regs [256];
  int checks = 0, failures = 0;
  int nwrites = 0, nreplies = 0;
  logic [7:0] last_reply;
  logic [7:0] wlog_addr [$];
  logic [7:0] wlog_data [$];

  cmd_processor dut (.*);
  always #5 clk = ~clk;
  assign bus_rdata = regs[bus_addr];

  always @(posedge clk) if (rst_n) begin
    if (bus_we) begin
      regs[bus_addr] <= bus_wdata;
      wlog_addr.push_back(bus_addr);
      wlog_data.push_back(bus_wdata);
      nwrites <= nwrites + 1;
    end
    if (tx_start) begin
      nreplies   <= nreplies + 1;
      last_reply <= tx_data;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input logic [7:0] b);
    @(posedge clk) begin rx_data <= b; rx_valid <= 1'b1; end
    @(posedge clk) rx_valid <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 256; i++) regs[i] = 8'(i * 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      logic [7:0] a, d;
      int r0;
      a = 8'($urandom); d = 8'($urandom); r0 = nreplies;
      wlog_addr.delete(); wlog_data.delete();
      put(CMD_WRITE); put(a); put(d);
      repeat (3) @(posedge clk);
      check("one write", wlog_addr.size() == 1);
      check("write addr/data", wlog_addr.size() == 1 && wlog_addr[0] == a && wlog_data[0] == d);
      check("one echo", nreplies == r0 + 1);
      check($sformatf("echo %h exp %h", last_reply, d), last_reply == d);
    end
    for (int n = 0; n < 10; n++) begin
      logic [7:0] a;
      int r0, w0;
      a = 8'($urandom); r0 = nreplies; w0 = nwrites;
      put(CMD_READ); put(a); put(8'hEE);
      repeat (3) @(posedge clk);
      check("read makes no write", nwrites == w0);
      check($sformatf("read reply %h exp %h", last_reply, regs[a]), nreplies == r0 + 1 && last_reply == regs[a]);
    end
    for (int n = 0; n < 5; n++) begin
      logic [7:0] a;
      logic [7:0] exp [$];
      int len, r0;
      a = 8'($urandom); len = 1 + ($urandom % 40); r0 = nreplies;
      wlog_addr.delete(); wlog_data.delete(); exp.delete();
      put(CMD_STREAM); put(a); put(8'(len >> 8)); put(8'(len));
      for (int i = 0; i < len; i++) begin
        logic [7:0] d;
        d = 8'($urandom);
        exp.push_back(d);
        put(d);
      end
      check($sformatf("stream length %0d exp %0d", wlog_addr.size(), len), wlog_addr.size() == len);
      for (int i = 0; i < len && i < wlog_addr.size(); i++)
        check("stream byte", wlog_addr[i] == a && wlog_data[i] == exp[i]);
      check("stream sends no reply", nreplies == r0);
      // after the stream the next command is parsed normally
    end
    begin
      int w0, r0;
      w0 = nwrites; r0 = nreplies;
      put(8'h00); put(8'h31); put(8'h55);   // not a command: ignored
      check("junk ignored", nwrites == w0 && nreplies == r0);
      put(CMD_WRITE); put(8'h31); put(8'h5A);
      repeat (3) @(posedge clk);
      check("resync after junk", regs[8'h31] == 8'h5A && nreplies == r0 + 1);
    end
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
