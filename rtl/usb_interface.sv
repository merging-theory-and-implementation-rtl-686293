// usb_interface: the complete FPGA side of the PC-to-FPGA sample link.
//
// Chains the four modules of the USB interface: usb_low_level (bus cycles
// on the PDIUSB12 pins), usb_mid_level (PDIUSB12 command sequences),
// usb_high_level (USB enumeration and HID reports) and sample_buffer
// (sample FIFOs, byte/sample conversion, sample clock). Towards the user
// system it offers sample_out (to the user's input), sample_in (from the
// user's output), sample_clk and sample_reset; towards the chip its pins.
// The pin and sample names, the 45 MHz clock and the 32-bit sample width
// follow the published component; the bidirectional chip data bus is split
// into an input, an output and an output enable, which the top level joins
// into one tri-state bus. `configured` shows that the host has configured
// the device. The 90 MHz clock of the published component is not used,
// since nothing here needs it; DMREQ_N and SUSPEND are accepted but not
// acted on, as DMA and suspend handling are not used.
module usb_interface #(
  parameter int unsigned STROBE_CYCLES   = 4,
  parameter int unsigned RECOVERY_CYCLES = 8,
  parameter int unsigned IN_DEPTH        = 64,
  parameter int unsigned OUT_DEPTH       = 64
) (
  input  logic        clock_45MHz,
  input  logic        reset,
  // PDIUSB12 control signals
  input  logic        vbus,
  input  logic        dmreq_n,
  input  logic        int_n,
  input  logic        suspend,
  output logic        a0,
  output logic        reset_n,
  output logic        dmack_n,
  output logic        wr_n,
  output logic        rd_n,
  output logic        ale,
  output logic        cs_n,
  // PDIUSB12 data bus, split
  input  logic [7:0]  usb_data_in,
  output logic [7:0]  usb_data_out,
  output logic        usb_data_oe,
  // user system
  input  logic [31:0] sample_in,
  output logic [31:0] sample_out,
  output logic        sample_clk,
  output logic        sample_reset,
  output logic        configured
);
  import usb_pkg::*;

  logic clk, rst;
  assign clk = clock_45MHz;

  // synchronous reset, asserted asynchronously by the board reset
  logic [1:0] rst_sync;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  end
  assign rst     = rst_sync[1] | reset;
  assign reset_n = !rst;

  // low <-> mid
  logic      ll_valid, ll_ready, ll_done;
  bus_xfer_t ll_req;
  logic [7:0] ll_rdata;
  // mid <-> high
  logic        op_valid, op_ready, op_done;
  usb_op_e     op;
  logic [2:0]  op_ep;
  logic [15:0] op_wdata, op_rdata;
  // high <-> sample & buffer
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_last, rx_room, tx_avail, tx_start, tx_next;

  usb_low_level #(.STROBE_CYCLES(STROBE_CYCLES), .RECOVERY_CYCLES(RECOVERY_CYCLES)) u_low (
    .clk, .rst,
    .req_valid(ll_valid), .ready(ll_ready), .req(ll_req), .done(ll_done), .rdata(ll_rdata),
    .bus_din(usb_data_in), .bus_dout(usb_data_out), .bus_doe(usb_data_oe),
    .a0, .cs_n, .wr_n, .rd_n, .ale, .dmack_n);

  usb_mid_level u_mid (
    .clk, .rst,
    .op_valid, .op_ready, .op, .op_ep, .op_wdata, .op_done, .op_rdata,
    .ll_valid, .ll_ready, .ll_req, .ll_done, .ll_rdata);

  usb_high_level u_high (
    .clk, .rst, .vbus, .int_n, .configured,
    .op_valid, .op_ready, .op, .op_ep, .op_wdata, .op_done, .op_rdata,
    .rx_data, .rx_valid, .rx_last, .rx_room, .tx_avail, .tx_start, .tx_next, .tx_data);

  sample_buffer #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_buf (
    .clk, .rst,
    .rx_data, .rx_valid, .rx_last, .rx_room,
    .tx_avail, .tx_start, .tx_next, .tx_data,
    .sample_out, .sample_in, .sample_clk, .sample_reset);

  logic unused;
  assign unused = dmreq_n ^ suspend;
endmodule
