// dsp_usb_top: FPGA top level of the MATLAB-to-FPGA DSP test station.
//
// Wires the USB interface to the example user system, the FIR filter: the
// interface's sample_out feeds the filter input x, the filter output y
// returns on sample_in, the filter's delay registers are clocked by the
// sample clock and cleared by the sample reset. The PDIUSB12 pins are the
// top's ports, with the data bus as one bidirectional port. The 45 MHz
// clock comes from the board PLL, outside this design. Routing the sample
// reset (board reset or host reset command) to the filter follows the
// description of the sample reset; the published port map wires the board
// reset there instead, which would not let the host clear the filter
// between measurements. The published port map also swaps the two sample
// nets (it would leave one driven twice and the other undriven); the
// direction used here is the one the port descriptions give: sample_out
// carries data to the user system, sample_in data from it. `configured` is
// an extra status output.
module dsp_usb_top (
  input  logic       clock_45MHz,
  input  logic       reset,
  input  logic       vbus,
  input  logic       dmreq_n,
  input  logic       int_n,
  input  logic       suspend,
  inout  wire  [7:0] usb_data,
  output logic       a0,
  output logic       reset_n,
  output logic       dmack_n,
  output logic       wr_n,
  output logic       rd_n,
  output logic       ale,
  output logic       cs_n,
  output logic       configured
);
  logic [31:0] int_x, int_y;
  logic        int_sample_clock, int_sample_reset;
  logic [7:0]  data_out;
  logic        data_oe;

  assign usb_data = data_oe ? data_out : 8'bz;

  usb_interface usb1 (
    .clock_45MHz, .reset,
    .vbus, .dmreq_n, .int_n, .suspend,
    .a0, .reset_n, .dmack_n, .wr_n, .rd_n, .ale, .cs_n,
    .usb_data_in(usb_data), .usb_data_out(data_out), .usb_data_oe(data_oe),
    .sample_in(int_y), .sample_out(int_x),
    .sample_clk(int_sample_clock), .sample_reset(int_sample_reset),
    .configured);

  fir_filter filt1 (
    .reset(int_sample_reset),
    .clock(int_sample_clock),
    .x(int_x),
    .y(int_y));
endmodule
