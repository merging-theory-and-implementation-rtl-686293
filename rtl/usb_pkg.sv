// usb_pkg: shared constants and types of the FPGA-side USB interface.
//
// Holds the PDIUSB12 command codes (from the chip's published command set),
// the operation codes that the high-level module hands to the mid-level
// module, the interrupt-register bit positions, the endpoint indices of the
// PDIUSB12, and the HID report layout that the sample & buffer module packs
// and unpacks. The command codes follow the chip; the operation set and the
// report layout are this design's own choices.
package usb_pkg;

  // ---- PDIUSB12 command bytes (written with A0 = 1) ----
  localparam logic [7:0] CMD_SET_ADDR_EN   = 8'hD0;
  localparam logic [7:0] CMD_SET_EP_EN     = 8'hD8;
  localparam logic [7:0] CMD_SET_MODE      = 8'hF3;
  localparam logic [7:0] CMD_READ_INT      = 8'hF4;
  localparam logic [7:0] CMD_SELECT_EP     = 8'h00;  // + endpoint index
  localparam logic [7:0] CMD_EP_STATUS     = 8'h40;  // + endpoint index (read: last transaction, write: stall)
  localparam logic [7:0] CMD_RW_BUFFER     = 8'hF0;
  localparam logic [7:0] CMD_CLEAR_BUFFER  = 8'hF2;
  localparam logic [7:0] CMD_VALIDATE_BUF  = 8'hFA;
  localparam logic [7:0] CMD_ACK_SETUP     = 8'hF1;

  // ---- PDIUSB12 endpoint indices ----
  localparam logic [2:0] EP_CTRL_OUT = 3'd0;
  localparam logic [2:0] EP_CTRL_IN  = 3'd1;
  localparam logic [2:0] EP1_OUT     = 3'd2;
  localparam logic [2:0] EP1_IN      = 3'd3;
  localparam logic [2:0] EP_MAIN_OUT = 3'd4;  // USB endpoint 0x02 OUT
  localparam logic [2:0] EP_MAIN_IN  = 3'd5;  // USB endpoint 0x82 IN

  // ---- interrupt register bits (low byte) ----
  localparam int INT_CTRL_OUT  = 0;
  localparam int INT_CTRL_IN   = 1;
  localparam int INT_EP1_OUT   = 2;
  localparam int INT_EP1_IN    = 3;
  localparam int INT_MAIN_OUT  = 4;
  localparam int INT_MAIN_IN   = 5;
  localparam int INT_BUS_RESET = 6;
  localparam int INT_SUSPEND   = 7;

  // last-transaction-status bit that marks a SETUP packet
  localparam int STAT_SETUP = 5;

  // ---- operations from the high-level to the mid-level module ----
  typedef enum logic [3:0] {
    OP_SET_MODE,     // wdata = {clock_division, configuration}
    OP_SET_ADDR,     // wdata[7:0] = enable bit 7 | address
    OP_SET_EP_EN,    // wdata[0]  = enable generic/main endpoints
    OP_READ_INT,     // rdata = interrupt register {byte1, byte0}
    OP_READ_STATUS,  // rdata[7:0] = last transaction status of ep (clears its interrupt)
    OP_SET_STALL,    // wdata[0] = stall flag for ep
    OP_ACK_SETUP,    // acknowledge setup on control OUT and IN endpoints
    OP_RD_START,     // select ep, start buffer read; rdata[7:0] = byte count
    OP_RD_WORD,      // rdata = next two buffer bytes {second, first}
    OP_RD_BYTE,      // rdata[7:0] = next buffer byte
    OP_RD_END,       // select ep, clear its buffer
    OP_WR_START,     // select ep, start buffer write of wdata[7:0] bytes
    OP_WR_WORD,      // write wdata[7:0] then wdata[15:8]
    OP_WR_BYTE,      // write wdata[7:0]
    OP_WR_END        // select ep, validate its buffer
  } usb_op_e;

  // ---- one byte transfer on the PDIUSB12 bus ----
  typedef struct packed {
    logic       cmd;   // 1: command phase (A0 = 1), 0: data phase (A0 = 0)
    logic       read;  // 1: read cycle (RD_N strobe), 0: write cycle (WR_N strobe)
    logic [7:0] data;  // byte to write
  } bus_xfer_t;

  // ---- HID report layout used on the main endpoints ----
  localparam int REPORT_BYTES      = 64;  // main endpoint packet size
  localparam int SAMPLES_PER_REPORT = 15; // (64 - 2 header bytes) / 4
  localparam logic [7:0] RPT_SAMPLES = 8'h01;  // byte 0: samples follow
  localparam logic [7:0] RPT_RESET   = 8'h02;  // byte 0: pulse sample_reset

endpackage
