// freq_response_tb: measures the frequency response of the FIR filter through
// the whole design, the way the host-side measurement does it.
//
// For every frequency from 100 Hz to 4000 Hz in 100 Hz steps, the host sends
// a reset command and then 30 ms of a cosine sampled at 8 kHz (240 samples)
// with scaling factor 65535 (17-bit samples), and collects the results.
// Every result must match the filter equation exactly; the peak magnitude
// over the second half, divided by the scaling factor, must be within 2 %
// (+0.003) of |2 cos(w) - 1.625|, and the smallest magnitude must fall at
// 800 Hz, the filter's notch (cos(w) = 0.8125, w = 0.1982 pi).
module freq_response_tb;
  logic clock_45MHz = 0, reset = 1, vbus = 0;
  always #11 clock_45MHz = ~clock_45MHz;

  wire  [7:0] usb_data;
  logic a0, reset_n, dmack_n, wr_n, rd_n, ale, cs_n, int_n, dmreq_n, suspend, configured;
  int checks = 0, failures = 0;

  dsp_usb_top dut (.clock_45MHz, .reset, .vbus, .dmreq_n, .int_n, .suspend, .usb_data,
                   .a0, .reset_n, .dmack_n, .wr_n, .rd_n, .ale, .cs_n, .configured);
  pdiusb12_model chip (.data(usb_data), .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n, .reset_n,
                       .int_n, .dmreq_n, .suspend);

  localparam real PI = 3.14159265358979;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  function automatic real rabs(input real v); return (v < 0) ? -v : v; endfunction

  initial begin
    logic [31:0] x [$], y [$];
    longint h1, h2, s;
    int err, reports, bad, fmin;
    real pk, th, mmin, v;
    // reset from power-up, released briefly, then a second reset edge for the
    // filter's asynchronous reset (the first has no edge at time zero)
    repeat (10) @(negedge clock_45MHz);
    reset = 0;
    repeat (5) @(negedge clock_45MHz);
    reset = 1;
    repeat (4) @(negedge clock_45MHz);
    reset = 0;
    vbus = 1;
    repeat (300) @(negedge clock_45MHz);
    chip.host_enumerate(7'd1, err);
    check(err == 0 && configured, "enumeration");
    mmin = 1.0e9; fmin = 0;
    for (int f = 100; f <= 4000; f += 100) begin
      chip.host_reset_cmd();
      repeat (3000) @(negedge clock_45MHz);
      x.delete();
      for (int i = 0; i < 240; i++) begin
        v = 65535.0 * $cos(2.0 * PI * f * i / 8000.0);
        x.push_back(32'($rtoi(v + ((v >= 0) ? 0.5 : -0.5))));
      end
      chip.host_send_wave(x, y, reports);
      h1 = 0; h2 = 0; bad = 0; pk = 0;
      foreach (x[i]) begin
        s = (8 * longint'(signed'(x[i])) - 13 * h1 + 8 * h2) >>> 3;
        h2 = h1; h1 = longint'(signed'(x[i]));
        if (i >= y.size() || y[i] !== s[31:0]) bad++;
        else if (i >= 120 && rabs(real'(signed'(y[i]))) > pk) pk = rabs(real'(signed'(y[i])));
      end
      pk = pk / 65535.0;
      th = rabs(2.0 * $cos(2.0 * PI * f / 8000.0) - 1.625);
      check(bad == 0 && y.size() == 240, $sformatf("%0d Hz: %0d mismatches", f, bad));
      check(rabs(pk - th) <= 0.02 * th + 0.003, $sformatf("%0d Hz: magnitude %f, theory %f", f, pk, th));
      if (pk < mmin) begin mmin = pk; fmin = f; end
      $display("%5d Hz  |H| = %8.5f (%7.2f dB)  theory %8.5f", f, pk, 20.0 * $log10(pk + 1.0e-12), th);
    end
    check(fmin == 800, $sformatf("notch at %0d Hz", fmin));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clock_45MHz);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
