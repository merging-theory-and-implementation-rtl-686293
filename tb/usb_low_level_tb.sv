// usb_low_level_tb: self-checking test of the PDIUSB12 bus cycle generator.
//
// Issues random command writes, data writes and data reads. A bus monitor
// checks that every WR_N/RD_N strobe lies inside a CS_N window, lasts
// STROBE_CYCLES clocks, carries the requested A0 and (for writes) data, and
// that ALE stays low and DMACK_N high. A read returns a random byte driven
// by the testbench during the strobe, which must come back on rdata. The
// time from request to done must be 3 + STROBE_CYCLES + RECOVERY_CYCLES
// clocks (setup, strobe, hold, recovery and the done register).
module usb_low_level_tb;
  import usb_pkg::*;
  localparam int STROBE = 4, RECOVERY = 8;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic req_valid = 0, ready, done;
  bus_xfer_t req = '0;
  logic [7:0] rdata, bus_din = '0, bus_dout;
  logic bus_doe, a0, cs_n, wr_n, rd_n, ale, dmack_n;
  int checks = 0, failures = 0;

  usb_low_level #(.STROBE_CYCLES(STROBE), .RECOVERY_CYCLES(RECOVERY)) dut (.*);

  // ---- bus monitor ----
  int   strobe_len = 0;
  logic in_strobe = 0, was_read = 0;
  logic [7:0] seen_data; logic seen_a0;
  always @(posedge clk) if (!rst) begin
    if (ale !== 1'b0 || dmack_n !== 1'b1) begin failures++; $display("FAIL ale/dmack"); end
    if ((!wr_n || !rd_n) && cs_n) begin failures++; $display("FAIL strobe outside CS_N"); end
    if (!wr_n || !rd_n) begin
      strobe_len++;
      in_strobe = 1; was_read = !rd_n;
      seen_a0 = a0; seen_data = bus_dout;
      if (!wr_n && !bus_doe) begin failures++; $display("FAIL write without drive"); end
    end else if (in_strobe) begin
      checks++;
      if (strobe_len != STROBE) begin failures++; $display("FAIL strobe %0d clocks", strobe_len); end
      in_strobe = 0; strobe_len = 0;
    end
  end

  task automatic xfer(input logic cmd, input logic rd, input logic [7:0] b);
    int t;
    logic [7:0] ret;
    ret = 8'($urandom);
    bus_din = ret;
    @(negedge clk);
    while (!ready) @(negedge clk);
    req = '{cmd: cmd, read: rd, data: b};
    req_valid = 1;
    @(negedge clk);
    req_valid = 0;
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    checks++;
    if (t != 3 + STROBE + RECOVERY) begin failures++; $display("FAIL latency %0d", t); end
    checks++;
    if (seen_a0 !== cmd) begin failures++; $display("FAIL a0"); end
    if (rd) begin
      checks++;
      if (rdata !== ret) begin failures++; $display("FAIL read %h expected %h", rdata, ret); end
      if (!was_read) begin failures++; $display("FAIL no read strobe"); end
    end else begin
      checks++;
      if (seen_data !== b || was_read) begin failures++; $display("FAIL write data %h expected %h", seen_data, b); end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      logic c, r;
      c = 1'($urandom); r = c ? 1'b0 : 1'($urandom);
      xfer(c, r, 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
