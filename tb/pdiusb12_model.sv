// pdiusb12_model: behavioural model of the PDIUSB12 USB device controller,
// for simulation only.
//
// Models the chip's parallel microcontroller interface in separate-address
// mode (A0 selects command or data, ALE unused): commands are latched on the
// rising edge of WR_N with A0 high, data bytes are written on the rising edge
// of WR_N and driven while RD_N and CS_N are low. It keeps six endpoint
// buffers (control OUT/IN 16 bytes, endpoint 1 OUT/IN 16 bytes, main OUT/IN
// 64 bytes), the interrupt register and the last-transaction status of each
// endpoint, and implements the commands the FPGA uses: set address/enable,
// set endpoint enable, set mode, read interrupt register, select endpoint,
// read last transaction status / set endpoint status, read/write buffer,
// clear buffer, validate buffer and acknowledge setup. The USB side is
// replaced by tasks that a testbench calls to act as the host: put a SETUP
// packet or an OUT packet in a buffer, collect an IN packet, signal a bus
// reset. A buffer that is still full makes the host task wait, which is the
// NAK flow control of the real chip. Single-buffered; DMA and suspend are
// not modelled (DMREQ_N high, SUSPEND low).
module pdiusb12_model (
  inout  wire  [7:0] data,
  input  logic       a0,
  input  logic       cs_n,
  input  logic       wr_n,
  input  logic       rd_n,
  input  logic       ale,
  input  logic       dmack_n,
  input  logic       reset_n,
  output logic       int_n,
  output logic       dmreq_n,
  output logic       suspend
);
  logic [7:0] buffer [6][64];
  logic [7:0] blen   [6];
  logic       full   [6];
  logic [7:0] status [6];
  logic       stall  [6];
  logic [15:0] intreg;
  logic [7:0] cmd;
  logic [2:0] sel;
  int         idx;
  logic [7:0] dout;
  logic [7:0] address;
  logic       addr_en, ep_en, soft_connect;
  int         n_commands;

  assign data    = (!cs_n && !rd_n) ? dout : 8'bz;
  assign int_n   = !(|intreg);
  assign dmreq_n = 1'b1;
  assign suspend = 1'b0;

  initial begin
    for (int e = 0; e < 6; e++) begin
      blen[e] = 0; full[e] = 0; status[e] = 0; stall[e] = 0;
      for (int i = 0; i < 64; i++) buffer[e][i] = 0;
    end
    intreg = 0; cmd = 0; sel = 0; idx = 0; dout = 0;
    address = 0; addr_en = 0; ep_en = 0; soft_connect = 0; n_commands = 0;
  end

  // ---------------- bus: writes ----------------
  always @(posedge wr_n) begin
    if (!cs_n && reset_n) begin
      if (a0) begin
        cmd = data;
        idx = 0;
        n_commands++;
        if (data <= 8'h05) sel = data[2:0];
        else if (data == 8'hF2) full[sel] = 0;                 // clear buffer
        else if (data == 8'hFA) full[sel] = 1;                 // validate buffer
        else if (data == 8'hF1) ;                              // acknowledge setup
      end else begin
        if (cmd == 8'hD0)      begin address = {1'b0, data[6:0]}; addr_en = data[7]; end
        else if (cmd == 8'hD8) ep_en = data[0];
        else if (cmd == 8'hF3) begin if (idx == 0) soft_connect = data[4]; end
        else if (cmd >= 8'h40 && cmd <= 8'h45) stall[cmd[2:0]] = data[0];
        else if (cmd == 8'hF0) begin
          if (idx == 1) blen[sel] = data;
          else if (idx >= 2 && idx - 2 < 64) buffer[sel][idx-2] = data;
        end
        idx++;
      end
    end
  end

  // ---------------- bus: reads ----------------
  always @(negedge rd_n) begin
    if (!cs_n && reset_n) begin
      dout = 8'h00;
      if (cmd == 8'hF4) begin
        dout = (idx == 0) ? intreg[7:0] : intreg[15:8];
        if (idx == 0) intreg[6] = 1'b0;                       // bus reset flag clears on read
      end else if (cmd >= 8'h40 && cmd <= 8'h45) begin
        dout = status[cmd[2:0]];
        intreg[{1'b0, cmd[2:0]}] = 1'b0;                              // clears the endpoint interrupt
      end else if (cmd <= 8'h05) begin
        dout = {7'd0, full[cmd[2:0]]};
      end else if (cmd == 8'hF0) begin
        if (idx == 0) dout = 8'h00;
        else if (idx == 1) dout = blen[sel];
        else if (idx - 2 < 64) dout = buffer[sel][idx-2];
      end
      idx++;
    end
  end

  // ---------------- host side ----------------
  task automatic wait_until(input int e, input logic want_full);
    while (full[e] != want_full) #50;
  endtask

  // SETUP packet to the control OUT endpoint
  task automatic host_setup(input logic [7:0] b [8]);
    wait_until(0, 1'b0);
    for (int i = 0; i < 8; i++) buffer[0][i] = b[i];
    blen[0] = 8; full[0] = 1; status[0] = 8'h21; intreg[0] = 1'b1;
    stall[0] = 0; stall[1] = 0;
  endtask

  // zero-length status packet on the control OUT endpoint
  task automatic host_status_out();
    wait_until(0, 1'b0);
    blen[0] = 0; full[0] = 1; status[0] = 8'h01; intreg[0] = 1'b1;
  endtask

  // IN token on the control endpoint: returns the packet, or stalled = 1
  task automatic host_ctrl_in(output logic [7:0] d [64], output int n, output logic stalled);
    n = 0; stalled = 0;
    for (int i = 0; i < 64; i++) d[i] = 0;
    while (!full[1] && !stall[1]) #50;
    if (stall[1]) begin stalled = 1; return; end
    n = int'(blen[1]);
    for (int i = 0; i < 16; i++) d[i] = buffer[1][i];
    full[1] = 0; status[1] = 8'h01; intreg[1] = 1'b1;
  endtask

  // OUT packet to the main OUT endpoint
  task automatic host_main_out(input logic [7:0] d [64], input int n);
    wait_until(4, 1'b0);
    for (int i = 0; i < 64; i++) buffer[4][i] = d[i];
    blen[4] = 8'(n); full[4] = 1; status[4] = 8'h01; intreg[4] = 1'b1;
  endtask

  // IN token on the main IN endpoint (waits for data)
  task automatic host_main_in(output logic [7:0] d [64], output int n);
    wait_until(5, 1'b1);
    n = int'(blen[5]);
    for (int i = 0; i < 64; i++) d[i] = buffer[5][i];
    full[5] = 0; status[5] = 8'h01; intreg[5] = 1'b1;
  endtask

  // complete control transfer with an IN data stage: SETUP, IN packets until a
  // short one (or wLength bytes), then the OUT status packet
  task automatic host_control_read(input logic [7:0] b [8], output logic [7:0] d [256],
                                   output int n, output int packets, output logic stalled);
    logic [7:0] pkt [64];
    int         len, wlen;
    n = 0; packets = 0; stalled = 0;
    for (int i = 0; i < 256; i++) d[i] = 0;
    wlen = int'({b[7], b[6]});
    host_setup(b);
    forever begin
      host_ctrl_in(pkt, len, stalled);
      if (stalled) return;
      packets++;
      for (int i = 0; i < len; i++) if (n + i < 256) d[n+i] = pkt[i];
      n += len;
      if (len < 16 || n >= wlen) break;
    end
    host_status_out();
  endtask

  // complete control transfer without a data stage: SETUP, then the IN
  // zero-length status packet
  task automatic host_control_nodata(input logic [7:0] b [8], output logic stalled);
    logic [7:0] pkt [64];
    int         len;
    host_setup(b);
    host_ctrl_in(pkt, len, stalled);
  endtask

  // ---------------- host: enumeration and sample transfer ----------------
  typedef logic [7:0] setup_t [8];
  function automatic setup_t mk_setup(input logic [7:0] bm, input logic [7:0] br,
                                      input logic [15:0] wv, input logic [15:0] wl);
    return '{bm, br, wv[7:0], wv[15:8], 8'h00, 8'h00, wl[7:0], wl[15:8]};
  endfunction

  // the request sequence a host uses to bring up a HID device; returns the
  // number of steps that did not give the expected answer
  task automatic host_enumerate(input logic [6:0] addr, output int errors);
    logic [7:0] d [256]; int n, pk; logic st; int total, rlen;
    errors = 0;
    host_control_read(mk_setup(8'h80, 8'h06, 16'h0100, 64), d, n, pk, st);
    if (st || n != 18 || d[1] != 8'h01) errors++;
    host_control_nodata(mk_setup(8'h00, 8'h05, {9'd0, addr}, 0), st);
    if (st) errors++;
    host_control_read(mk_setup(8'h80, 8'h06, 16'h0200, 9), d, n, pk, st);
    total = int'({d[3], d[2]});
    if (st || n != 9) errors++;
    host_control_read(mk_setup(8'h80, 8'h06, 16'h0200, 16'(total)), d, n, pk, st);
    if (st || n != total) errors++;
    rlen = int'({d[18+8], d[18+7]});
    host_control_read(mk_setup(8'h81, 8'h06, 16'h2200, 16'(rlen)), d, n, pk, st);
    if (st || n != rlen) errors++;
    host_control_nodata(mk_setup(8'h00, 8'h09, 16'h0001, 0), st);
    if (st) errors++;
    host_control_nodata(mk_setup(8'h21, 8'h0A, 16'h0000, 0), st);
    if (st) errors++;
    if (address != 8'({1'b0, addr}) || !ep_en) errors++;
  endtask

  // report with command 0x02: pulse the user system's reset
  task automatic host_reset_cmd();
    logic [7:0] p [64];
    for (int i = 0; i < 64; i++) p[i] = 0;
    p[0] = 8'h02;
    host_main_out(p, 64);
  endtask

  // send a waveform of 32-bit samples, 15 per OUT report, and collect the
  // same number of results from IN reports; `reports_in` counts IN reports
  task automatic host_send_wave(input logic [31:0] x [$], output logic [31:0] y [$],
                                output int reports_in);
    y.delete();
    reports_in = 0;
    fork
      begin
        logic [7:0] p [64];
        int k, m;
        k = 0;
        while (k < x.size()) begin
          m = (x.size() - k > 15) ? 15 : x.size() - k;
          for (int i = 0; i < 64; i++) p[i] = 0;
          p[0] = 8'h01; p[1] = 8'(m);
          for (int j = 0; j < m; j++)
            for (int b = 0; b < 4; b++) p[2 + 4*j + b] = x[k+j][8*b +: 8];
          host_main_out(p, 64);
          k += m;
        end
      end
      begin
        logic [7:0] p [64];
        int n;
        while (y.size() < x.size()) begin
          host_main_in(p, n);
          reports_in++;
          for (int j = 0; j < int'(p[1]); j++)
            y.push_back({p[2+4*j+3], p[2+4*j+2], p[2+4*j+1], p[2+4*j]});
        end
      end
    join
  endtask

  task automatic host_bus_reset();
    address = 0; intreg[6] = 1'b1;
  endtask

  logic unused;
  assign unused = ale ^ dmack_n;
endmodule
