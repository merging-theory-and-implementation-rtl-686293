// usb_interface_tb: self-checking test of the assembled USB interface with a
// user system other than the FIR filter.
//
// The user system here is an accumulator modelled in the testbench: its
// output is x[n] plus the sum of all earlier inputs since the last sample
// reset, and its state advances on the rising edge of sample_clk. After
// enumeration through the PDIUSB12 model, random samples (including full
// 32-bit values, which wrap) are sent; every result must equal the running
// sum. A reset command must clear the accumulator, and the chip's RESET_N
// must follow the board reset.
module usb_interface_tb;
  logic clk = 0, reset = 1, vbus = 0;
  always #11 clk = ~clk;

  wire  [7:0] usb_data;
  logic a0, reset_n, dmack_n, wr_n, rd_n, ale, cs_n, int_n, dmreq_n, suspend, configured;
  logic [7:0] dout; logic doe;
  logic [31:0] sample_in, sample_out;
  logic sample_clk, sample_reset;
  int checks = 0, failures = 0;
  assign usb_data = doe ? dout : 8'bz;

  usb_interface dut (.clock_45MHz(clk), .reset, .vbus, .dmreq_n, .int_n, .suspend,
    .a0, .reset_n, .dmack_n, .wr_n, .rd_n, .ale, .cs_n,
    .usb_data_in(usb_data), .usb_data_out(dout), .usb_data_oe(doe),
    .sample_in, .sample_out, .sample_clk, .sample_reset, .configured);
  pdiusb12_model chip (.data(usb_data), .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n, .reset_n,
    .int_n, .dmreq_n, .suspend);

  logic [31:0] acc;
  always @(posedge sample_clk or posedge sample_reset)
    if (sample_reset) acc <= 0; else acc <= acc + sample_out;
  assign sample_in = acc + sample_out;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  task automatic run(input int n, inout logic [31:0] sum);
    logic [31:0] x [$], y [$];
    int reports, bad;
    for (int i = 0; i < n; i++) x.push_back((i % 3 == 0) ? $urandom : 32'($urandom_range(0, 2000)));
    chip.host_send_wave(x, y, reports);
    bad = 0;
    foreach (x[i]) begin
      sum = sum + x[i];
      if (i >= y.size() || y[i] !== sum) bad++;
    end
    check(y.size() == n && bad == 0, $sformatf("%0d samples, %0d mismatches", y.size(), bad));
  endtask

  initial begin
    int err;
    logic [31:0] sum;
    // reset from power-up, released briefly, then a second reset edge for the
    // user system's asynchronous reset (the first has no edge at time zero)
    repeat (10) @(negedge clk);
    reset = 0;
    repeat (5) @(negedge clk);
    reset = 1;
    repeat (2) @(negedge clk);
    check(reset_n === 1'b0, "chip held in reset");
    reset = 0;
    vbus = 1;
    repeat (300) @(negedge clk);
    check(reset_n === 1'b1, "chip released from reset");
    chip.host_enumerate(7'd12, err);
    check(err == 0 && configured, "enumeration");
    sum = 0;
    run(37, sum);
    run(20, sum);
    chip.host_reset_cmd();
    repeat (3000) @(negedge clk);
    check(acc == 0, "reset command clears the user system");
    sum = 0;
    run(16, sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
