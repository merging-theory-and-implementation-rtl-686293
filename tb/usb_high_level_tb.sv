// usb_high_level_tb: self-checking test of the USB/HID protocol engine.
//
// The high-level module runs the real mid- and low-level modules against the
// PDIUSB12 behavioural model; the testbench acts as the USB host through the
// model's host tasks and as the sample & buffer module on the byte side.
// It enumerates the device as a host would (device descriptor, SET_ADDRESS,
// configuration descriptor in several 16-byte packets, HID report
// descriptor, SET_CONFIGURATION, SET_IDLE), checks each descriptor against
// the USB and HID rules (lengths, types, endpoint addresses, totals), checks
// that an unknown request stalls the control endpoint, that a bus reset
// unconfigures, that an OUT report reaches the byte side unchanged and in
// order, and that bytes offered on the transmit side leave as an IN report.
module usb_high_level_tb;
  import usb_pkg::*;

  logic clk = 0, rst = 1, vbus = 0;
  always #5 clk = ~clk;

  wire  [7:0] usb_data;
  logic a0, cs_n, wr_n, rd_n, ale, dmack_n, int_n, dmreq_n, suspend;
  logic [7:0] bus_dout; logic bus_doe;
  logic configured;
  assign usb_data = bus_doe ? bus_dout : 8'bz;

  logic      ll_valid, ll_ready, ll_done; bus_xfer_t ll_req; logic [7:0] ll_rdata;
  logic      op_valid, op_ready, op_done; usb_op_e op; logic [2:0] op_ep;
  logic [15:0] op_wdata, op_rdata;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, rx_last, rx_room = 1, tx_avail = 0, tx_start, tx_next;
  int checks = 0, failures = 0;

  usb_low_level u_low (.clk, .rst, .req_valid(ll_valid), .ready(ll_ready), .req(ll_req),
    .done(ll_done), .rdata(ll_rdata), .bus_din(usb_data), .bus_dout, .bus_doe,
    .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n);
  usb_mid_level u_mid (.clk, .rst, .op_valid, .op_ready, .op, .op_ep, .op_wdata, .op_done,
    .op_rdata, .ll_valid, .ll_ready, .ll_req, .ll_done, .ll_rdata);
  usb_high_level dut (.clk, .rst, .vbus, .int_n, .configured, .op_valid, .op_ready, .op,
    .op_ep, .op_wdata, .op_done, .op_rdata, .rx_data, .rx_valid, .rx_last, .rx_room,
    .tx_avail, .tx_start, .tx_next, .tx_data);
  pdiusb12_model chip (.data(usb_data), .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n,
    .reset_n(!rst), .int_n, .dmreq_n, .suspend);

  // ---- byte side: receive log, transmit source ----
  logic [7:0] rx_log [$];
  int rx_lasts = 0;
  always @(posedge clk) if (rx_valid && !rst) begin rx_log.push_back(rx_data); if (rx_last) rx_lasts++; end
  logic [7:0] tx_pat [64];
  int tx_idx = 0;
  always @(posedge clk) begin
    if (tx_start) begin tx_idx <= 0; tx_avail <= 0; end
    else if (tx_next) tx_idx <= tx_idx + 1;
  end
  assign tx_data = tx_pat[tx_idx % 64];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  typedef logic [7:0] setup_t [8];
  function automatic setup_t mk(input logic [7:0] bm, input logic [7:0] br, input logic [15:0] wv,
                                input logic [15:0] wi, input logic [15:0] wl);
    return '{bm, br, wv[7:0], wv[15:8], wi[7:0], wi[15:8], wl[7:0], wl[15:8]};
  endfunction

  initial begin
    logic [7:0] d [256]; int n, pk; logic st;
    logic [7:0] pkt [64]; int total;
    repeat (3) @(negedge clk);
    rst = 0;
    vbus = 1;
    repeat (200) @(negedge clk);
    check(chip.soft_connect === 1'b1 && chip.addr_en === 1'b1, "set mode / address enable at start-up");

    // device descriptor
    chip.host_control_read(mk(8'h80, 8'h06, 16'h0100, 0, 64), d, n, pk, st);
    check(!st && n == 18 && d[0] == 18 && d[1] == 1, "device descriptor length/type");
    check(d[7] == 16 && d[17] == 1 && d[4] == 0, "device descriptor: EP0 size 16, one configuration");
    check(pk == 2, "device descriptor needs two packets");

    // set address 5
    chip.host_control_nodata(mk(8'h00, 8'h05, 16'h0005, 0, 0), st);
    repeat (50) @(negedge clk);
    check(!st && chip.address == 5 && chip.addr_en, "SET_ADDRESS");

    // configuration descriptor, header only then all
    chip.host_control_read(mk(8'h80, 8'h06, 16'h0200, 0, 9), d, n, pk, st);
    check(!st && n == 9 && d[1] == 2, "configuration header");
    total = int'({d[3], d[2]});
    chip.host_control_read(mk(8'h80, 8'h06, 16'h0200, 0, 16'(total)), d, n, pk, st);
    check(!st && n == total && total == 41 && pk == 3, "full configuration descriptor");
    check(d[9+5] == 8'h03, "interface class HID");
    check(d[18] == 9 && d[19] == 8'h21, "HID descriptor");
    check(d[27+2] == 8'h82 && d[27+3] == 8'h03 && d[27+4] == 64, "interrupt IN endpoint 0x82, 64 bytes");
    check(d[34+2] == 8'h02 && d[34+3] == 8'h03 && d[34+4] == 64, "interrupt OUT endpoint 0x02, 64 bytes");
    // report descriptor
    begin
      int rlen; rlen = int'({d[18+8], d[18+7]});
      chip.host_control_read(mk(8'h81, 8'h06, 16'h2200, 0, 16'(rlen + 100)), d, n, pk, st);
      check(!st && n == rlen && d[n-1] == 8'hC0 && d[0] == 8'h06, "report descriptor");
      // full last packet of a short reply must be followed by a zero-length packet
      check(pk == ((rlen + 15) / 16) + ((rlen % 16 == 0) ? 1 : 0), "report descriptor packet count");
    end
    // unsupported request stalls
    chip.host_control_read(mk(8'h80, 8'h06, 16'h0300, 0, 255), d, n, pk, st);
    check(st, "string descriptor request stalls");
    // SET_CONFIGURATION 1 and SET_IDLE
    check(!configured, "not configured before SET_CONFIGURATION");
    chip.host_control_nodata(mk(8'h00, 8'h09, 16'h0001, 0, 0), st);
    repeat (50) @(negedge clk);
    check(!st && configured && chip.ep_en, "SET_CONFIGURATION");
    chip.host_control_nodata(mk(8'h21, 8'h0A, 16'h0000, 0, 0), st);
    check(!st, "SET_IDLE");
    chip.host_control_read(mk(8'h80, 8'h08, 0, 0, 1), d, n, pk, st);
    check(!st && n == 1 && d[0] == 1, "GET_CONFIGURATION");
    chip.host_control_read(mk(8'h80, 8'h00, 0, 0, 2), d, n, pk, st);
    check(!st && n == 2 && d[0] == 0 && d[1] == 0, "GET_STATUS");

    // OUT report reaches the byte side
    for (int i = 0; i < 64; i++) pkt[i] = 8'($urandom);
    rx_log.delete();
    chip.host_main_out(pkt, 64);
    repeat (8000) @(negedge clk);
    check(rx_log.size() == 64 && rx_lasts == 1, $sformatf("OUT report length %0d and end marker %0d", rx_log.size(), rx_lasts));
    if (rx_log.size() == 64) for (int i = 0; i < 64; i++) if (rx_log[i] != pkt[i]) begin
      check(0, $sformatf("OUT byte %0d", i)); break;
    end
    // backpressure: no room, report must wait
    rx_room = 0;
    rx_log.delete();
    chip.host_main_out(pkt, 64);
    repeat (3000) @(negedge clk);
    check(rx_log.size() == 0 && chip.full[4], "OUT report held while no room");
    rx_room = 1;
    repeat (8000) @(negedge clk);
    check(rx_log.size() == 64, "OUT report delivered after room");

    // IN report from the byte side
    for (int i = 0; i < 64; i++) tx_pat[i] = 8'($urandom);
    @(negedge clk); tx_avail = 1;
    chip.host_main_in(pkt, n);
    check(n == 64, "IN report length");
    for (int i = 0; i < 64; i++) if (pkt[i] != tx_pat[i]) begin check(0, $sformatf("IN byte %0d", i)); break; end
    check(1, "IN report received");

    // bus reset unconfigures
    chip.host_bus_reset();
    repeat (400) @(negedge clk);
    check(!configured && chip.address == 0, "bus reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
