// sample_buffer_tb: self-checking test of the sample & buffer module.
//
// Plays the USB side: sends OUT reports (command 0x01, N samples, little-
// endian 32-bit samples, padding) byte by byte, and pulls IN reports when
// tx_avail is high. The user system is a small model in the testbench: its
// output is x + 3 * (number of sample clock edges since reset), so each
// result shows both which input it belongs to and that the sample clock
// advanced exactly once per sample. Checks every returned sample, the
// report headers, the sample clock period (SETTLE + HIGH + LOW + 1 clocks
// while the input FIFO is not empty), backpressure (reports held back while
// the output side is not read, rx_room falling) and the reset command
// (sample_reset pulse clearing the user system).
module sample_buffer_tb;
  import usb_pkg::*;
  localparam int SETTLE = 2, HIGH = 2, LOW = 2;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0]  rx_data = 0, tx_data;
  logic        rx_valid = 0, rx_last = 0, rx_room, tx_avail, tx_start = 0, tx_next = 0;
  logic [31:0] sample_out, sample_in;
  logic        sample_clk, sample_reset;
  int checks = 0, failures = 0;

  sample_buffer #(.IN_DEPTH(64), .OUT_DEPTH(64), .SETTLE_CYCLES(SETTLE),
                  .CLK_HIGH_CYCLES(HIGH), .CLK_LOW_CYCLES(LOW)) dut (.*);

  // ---- user system model ----
  int unsigned edges = 0;
  always @(posedge sample_clk or posedge sample_reset)
    if (sample_reset) edges <= 0; else edges <= edges + 1;
  assign sample_in = sample_out + 32'(3 * edges);

  // ---- sample clock period monitor ----
  int last_rise = -1, cyc = 0, periods = 0, resets_seen = 0;
  int min_period = 1000;
  always @(posedge clk) cyc++;
  always @(posedge sample_clk) begin
    if (last_rise >= 0 && cyc - last_rise < min_period) min_period = cyc - last_rise;
    last_rise = cyc; periods++;
  end
  always @(posedge sample_reset) if (!rst) resets_seen++;

  logic [31:0] sent_q [$];
  int          sent_edge_base = 0;

  task automatic send_report(input logic [7:0] cmd, input int n, input logic [31:0] s [15]);
    logic [7:0] b [64];
    for (int i = 0; i < 64; i++) b[i] = 8'($urandom);
    b[0] = cmd; b[1] = 8'(n);
    for (int k = 0; k < n; k++) for (int j = 0; j < 4; j++) b[2 + 4*k + j] = s[k][8*j +: 8];
    @(negedge clk);
    while (!rx_room) @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      rx_data = b[i]; rx_valid = 1; rx_last = (i == 63);
      @(negedge clk);
      rx_valid = 0; rx_last = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
  endtask

  int got = 0;
  task automatic read_report();
    logic [7:0] b [64];
    logic [31:0] v, e;
    @(negedge clk);
    while (!tx_avail) @(negedge clk);
    tx_start = 1; @(negedge clk); tx_start = 0;
    for (int i = 0; i < 64; i++) begin
      b[i] = tx_data; tx_next = 1; @(negedge clk); tx_next = 0;
    end
    checks++;
    if (b[0] != RPT_SAMPLES || b[1] == 0 || b[1] > 15) begin failures++; $display("FAIL header %h %h", b[0], b[1]); end
    for (int k = 0; k < int'(b[1]); k++) begin
      v = {b[2+4*k+3], b[2+4*k+2], b[2+4*k+1], b[2+4*k]};
      e = sent_q.pop_front() + 32'(3 * (got - sent_edge_base));
      got++;
      checks++;
      if (v !== e) begin failures++; $display("FAIL sample %0d = %h expected %h", got, v, e); end
    end
  endtask

  initial begin
    logic [31:0] s [15];
    int room_low;
    repeat (3) @(negedge clk);
    rst = 0;
    // 1: one full report, then one partial report
    for (int k = 0; k < 15; k++) begin s[k] = $urandom; sent_q.push_back(s[k]); end
    send_report(RPT_SAMPLES, 15, s);
    read_report();
    for (int k = 0; k < 5; k++) begin s[k] = $urandom; sent_q.push_back(s[k]); end
    send_report(RPT_SAMPLES, 5, s);
    read_report();
    // 2: backpressure: five reports without reading the output side
    room_low = 0;
    fork
      for (int r = 0; r < 7; r++) begin
        for (int k = 0; k < 15; k++) begin s[k] = $urandom; sent_q.push_back(s[k]); end
        send_report(RPT_SAMPLES, 15, s);
      end
      begin
        repeat (2500) @(negedge clk) if (!rx_room) room_low++;
      end
    join
    checks++;
    if (room_low == 0) begin failures++; $display("FAIL rx_room never fell"); end
    while (sent_q.size() > 0) read_report();
    // 3: reset command clears the user system
    send_report(RPT_RESET, 0, s);
    repeat (10) @(negedge clk);
    checks++;
    if (resets_seen != 1 || edges != 0) begin failures++; $display("FAIL reset command"); end
    sent_edge_base = got;
    for (int k = 0; k < 3; k++) begin s[k] = $urandom; sent_q.push_back(s[k]); end
    send_report(RPT_SAMPLES, 3, s);
    read_report();
    checks++;
    if (min_period != SETTLE + HIGH + LOW + 1) begin failures++; $display("FAIL sample period %0d", min_period); end
    checks++;
    if (got != 15 + 5 + 105 + 3) begin failures++; $display("FAIL got %0d samples", got); end
    $display("samples=%0d periods=%0d min_period=%0d rx_room_low=%0d", got, periods, min_period, room_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
