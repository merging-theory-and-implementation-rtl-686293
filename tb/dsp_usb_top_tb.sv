// dsp_usb_top_tb: end-to-end test of the FPGA design with its default
// parameters: USB interface plus the example FIR filter, driven through the
// PDIUSB12 behavioural model acting as the chip and the USB host.
//
// Sequence: enumeration; an unsupported request (must stall); a 600 Hz
// cosine, 10 ms at 8 kHz with scaling factor 65535 (the 17-bit example),
// whose results must match the filter equation sample by sample and settle
// at about 0.157 of the input amplitude; a reset command, after which the
// filter must restart from zero state; a 4 kHz (Nyquist) tone whose gain
// must be 3.625; a full-scale Nyquist tone that overflows the 32-bit output
// (the wrap-around must match the reference); a burst of reports sent while
// the host does not collect results, which must fill the output FIFO and
// hold back OUT reports (backpressure) and still lose nothing; a bus reset
// followed by re-enumeration. Each of these mechanisms is counted and a
// mechanism that never occurred counts as a failure.
module dsp_usb_top_tb;
  logic clock_45MHz = 0, reset = 1, vbus = 0;
  always #11 clock_45MHz = ~clock_45MHz;

  wire  [7:0] usb_data;
  logic a0, reset_n, dmack_n, wr_n, rd_n, ale, cs_n, int_n, dmreq_n, suspend, configured;
  int checks = 0, failures = 0;

  dsp_usb_top dut (.clock_45MHz, .reset, .vbus, .dmreq_n, .int_n, .suspend, .usb_data,
                   .a0, .reset_n, .dmack_n, .wr_n, .rd_n, .ale, .cs_n, .configured);
  pdiusb12_model chip (.data(usb_data), .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n, .reset_n,
                       .int_n, .dmreq_n, .suspend);

  // ---- mechanism counters ----
  int n_enum = 0, n_stall = 0, n_full_rpt = 0, n_part_rpt = 0, n_reset_cmd = 0;
  int n_overflow = 0, n_room_low = 0, n_out_full = 0, n_bus_reset = 0, n_multi_pkt = 0;
  always @(posedge clock_45MHz) begin
    if (!dut.usb1.u_buf.rx_room && dut.usb1.u_high.out_pending) n_room_low++;
    if (dut.usb1.u_buf.out_full) n_out_full++;
  end
  always @(posedge dut.int_sample_reset) if (!reset) n_reset_cmd++;

  // ---- report handling time against the 1 ms USB frame ----
  // 512 kbit/s on an interrupt endpoint is one 64-byte report per 1 ms frame,
  // so the FPGA must empty an OUT report and fill an IN report well within
  // 45,000 clocks. Measured while the host reads promptly (no backpressure).
  localparam int FRAME_CLOCKS = 45000;
  int cyc = 0, out_t0 = 0, in_t0 = 0, out_max = 0, in_max = 0, out_n = 0, in_n = 0;
  logic measure = 0, prev_full4 = 0, prev_full5 = 0;
  always @(posedge clock_45MHz) begin
    cyc++;
    if (chip.full[4] && !prev_full4) out_t0 = cyc;
    if (!chip.full[4] && prev_full4 && measure) begin
      out_n++; if (cyc - out_t0 > out_max) out_max = cyc - out_t0;
    end
    if (dut.usb1.u_high.tx_start) in_t0 = cyc;
    if (chip.full[5] && !prev_full5 && measure) begin
      in_n++; if (cyc - in_t0 > in_max) in_max = cyc - in_t0;
    end
    prev_full4 = chip.full[4];
    prev_full5 = chip.full[5];
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // filter reference: floor((8 x[n] - 13 x[n-1] + 8 x[n-2]) / 8), wrapped to 32 bits
  longint h1 = 0, h2 = 0;
  function automatic logic [31:0] ref_step(input logic [31:0] xv, output bit wrapped);
    longint x0, s;
    x0 = longint'(signed'(xv));
    s = (8 * x0 - 13 * h1 + 8 * h2) >>> 3;
    wrapped = (s > 64'sd2147483647) || (s < -64'sd2147483648);
    h2 = h1; h1 = x0;
    return s[31:0];
  endfunction

  function automatic real rabs(input real v); return (v < 0) ? -v : v; endfunction

  // send x, compare every result with the reference; returns peak |y| of the second half
  task automatic run_wave(input logic [31:0] x [$], input string name, output real peak);
    logic [31:0] y [$];
    int reports, bad;
    bit w;
    logic [31:0] e;
    chip.host_send_wave(x, y, reports);
    bad = 0; peak = 0;
    foreach (x[i]) begin
      e = ref_step(x[i], w);
      if (w) n_overflow++;
      if (y[i] !== e) bad++;
      if (i >= x.size() / 2 && rabs(real'(signed'(y[i]))) > peak) peak = rabs(real'(signed'(y[i])));
    end
    check(y.size() == x.size() && bad == 0, $sformatf("%s: %0d results, %0d mismatches", name, y.size(), bad));
    if (reports * 15 == x.size()) n_full_rpt += reports;
    else begin n_full_rpt += x.size() / 15; n_part_rpt += reports - x.size() / 15; end
  endtask

  function automatic void make_tone(output logic [31:0] x [$], input real f, input real ms,
                                    input real scale, input real fs);
    int n;
    x.delete();
    n = int'(ms * fs / 1000.0);
    for (int i = 0; i < n; i++)
      x.push_back(32'($rtoi(scale * $cos(2.0 * 3.14159265358979 * f * i / fs) +
                            ((scale * $cos(2.0 * 3.14159265358979 * f * i / fs) >= 0) ? 0.5 : -0.5))));
  endfunction

  initial begin
    logic [31:0] x [$];
    real pk;
    int err;
    logic [7:0] d [256]; int n, p; logic st;
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

    chip.host_enumerate(7'd3, err);
    check(err == 0 && configured, "enumeration");
    if (err == 0) n_enum++;
    chip.host_control_read(chip.mk_setup(8'h80, 8'h06, 16'h0200, 16'd41), d, n, p, st);
    check(n == 41 && p == 3, "configuration descriptor in three packets");
    if (p > 1) n_multi_pkt++;
    chip.host_control_read(chip.mk_setup(8'hC0, 8'h33, 16'h0000, 16'd4), d, n, p, st);
    check(st, "vendor request stalls");
    if (st) n_stall++;

    // 600 Hz, 10 ms, scaling 65535, 8 kHz (80 samples)
    make_tone(x, 600.0, 10.0, 65535.0, 8000.0);
    measure = 1;
    run_wave(x, "600 Hz", pk);
    measure = 0;
    $display("report handling: OUT %0d clocks (max of %0d), IN %0d clocks (max of %0d), frame %0d",
             out_max, out_n, in_max, in_n, FRAME_CLOCKS);
    check(out_n > 0 && out_max < FRAME_CLOCKS, "OUT report emptied within one frame");
    check(in_n > 0 && in_max < FRAME_CLOCKS, "IN report filled within one frame");
    check(pk / 65535.0 > 0.150 && pk / 65535.0 < 0.164, $sformatf("600 Hz gain %f", pk / 65535.0));

    // reset command: the filter restarts from zero state
    chip.host_reset_cmd();
    repeat (3000) @(negedge clock_45MHz);
    h1 = 0; h2 = 0;
    make_tone(x, 4000.0, 5.0, 65535.0, 8000.0);
    run_wave(x, "4 kHz after reset", pk);
    check(pk / 65535.0 > 3.62 && pk / 65535.0 < 3.63, $sformatf("4 kHz gain %f", pk / 65535.0));

    // full-scale Nyquist tone: overflow wraps around
    make_tone(x, 4000.0, 2.0, 2147483647.0, 8000.0);
    run_wave(x, "full-scale overflow", pk);

    // backpressure: send 8 reports before collecting anything
    begin
      logic [31:0] y [$];
      logic [7:0] pkt [64];
      int ny, bad;
      bit w;
      make_tone(x, 1000.0, 15.0, 30000.0, 8000.0);   // 120 samples, 8 reports
      fork
        for (int r = 0; r < 8; r++) begin
          for (int i = 0; i < 64; i++) pkt[i] = 0;
          pkt[0] = 8'h01; pkt[1] = 8'd15;
          for (int j = 0; j < 15; j++) for (int b = 0; b < 4; b++) pkt[2+4*j+b] = x[15*r+j][8*b +: 8];
          chip.host_main_out(pkt, 64);
        end
        begin
          repeat (60000) @(negedge clock_45MHz);
          while (y.size() < 120) begin
            chip.host_main_in(pkt, ny);
            for (int j = 0; j < int'(pkt[1]); j++) y.push_back({pkt[2+4*j+3], pkt[2+4*j+2], pkt[2+4*j+1], pkt[2+4*j]});
          end
        end
      join
      bad = 0;
      foreach (x[i]) if (y[i] !== ref_step(x[i], w)) bad++;
      check(bad == 0 && y.size() == 120, $sformatf("backpressure burst: %0d mismatches", bad));
    end

    // bus reset, then the host enumerates again
    chip.host_bus_reset();
    repeat (500) @(negedge clock_45MHz);
    check(!configured, "bus reset unconfigures");
    if (!configured) n_bus_reset++;
    chip.host_enumerate(7'd9, err);
    check(err == 0 && configured, "re-enumeration");

    $display("mechanisms: enum=%0d multi_packet=%0d stall=%0d full_reports=%0d partial_reports=%0d reset_cmd=%0d overflow=%0d rx_room_low=%0d out_fifo_full=%0d bus_reset=%0d",
             n_enum, n_multi_pkt, n_stall, n_full_rpt, n_part_rpt, n_reset_cmd, n_overflow, n_room_low, n_out_full, n_bus_reset);
    check(n_enum > 0, "mechanism: enumeration");
    check(n_multi_pkt > 0, "mechanism: multi-packet control transfer");
    check(n_stall > 0, "mechanism: stall");
    check(n_full_rpt > 0, "mechanism: full report");
    check(n_part_rpt > 0, "mechanism: partial report");
    check(n_reset_cmd > 0, "mechanism: reset command");
    check(n_overflow > 0, "mechanism: overflow");
    check(n_room_low > 0, "mechanism: OUT report held back");
    check(n_out_full > 0, "mechanism: output FIFO full");
    check(n_bus_reset > 0, "mechanism: bus reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clock_45MHz);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
