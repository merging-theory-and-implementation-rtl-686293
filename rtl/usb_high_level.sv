// usb_high_level: USB device and HID protocol engine for the PDIUSB12.
//
// A state machine that drives the chip through usb_mid_level, one operation
// at a time. After reset (or while VBUS is absent) it sets the chip mode
// (SoftConnect on) and enables address 0. It then waits for the chip's
// interrupt line and services the latched interrupt register bit by bit:
//   * bus reset      - back to address 0, unconfigured;
//   * control OUT    - reads the 8-byte SETUP packet, acknowledges it and
//                      answers the standard requests a host needs to
//                      enumerate a HID device (GET_DESCRIPTOR for the
//                      device, configuration, HID and report descriptors,
//                      SET_ADDRESS, SET/GET_CONFIGURATION, GET_STATUS,
//                      GET_INTERFACE, SET_INTERFACE, CLEAR/SET_FEATURE) and
//                      the HID SET_IDLE and SET_PROTOCOL requests; any other
//                      request stalls the control endpoint;
//   * control IN     - sends the next 16-byte chunk of a descriptor, or the
//                      zero-length packet that ends it;
//   * main OUT/IN    - notes that an interrupt OUT report waits, or that the
//                      interrupt IN buffer is free again.
// Between interrupts, a waiting OUT report is copied byte by byte into the
// sample & buffer module when it has room, and a report the sample & buffer
// module offers is copied into the interrupt IN endpoint once the device is
// configured and the endpoint is free. The reports are 64-byte HID reports
// of a vendor-defined usage on endpoints 0x02 (OUT) and 0x82 (IN).
//
// Implementing USB enumeration and HID in this module follows the interface
// description; the descriptors, the identifiers, the report size and the
// order of servicing are this design's own. `configured` is a status output.
module usb_high_level #(
  parameter logic [15:0] VENDOR_ID  = 16'hFFF0,  // placeholder identifiers
  parameter logic [15:0] PRODUCT_ID = 16'h0001,
  parameter logic [7:0]  MODE_CONFIG = 8'h16,    // SoftConnect | ClockRunning | NoLazyClock
  parameter logic [7:0]  MODE_CLKDIV = 8'h47     // set-to-one bit, divide by 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        vbus,
  input  logic        int_n,
  output logic        configured,
  // to the mid-level module
  output logic        op_valid,
  input  logic        op_ready,
  output usb_pkg::usb_op_e op,
  output logic [2:0]  op_ep,
  output logic [15:0] op_wdata,
  input  logic        op_done,
  input  logic [15:0] op_rdata,
  // to the sample & buffer module
  output logic [7:0]  rx_data,
  output logic        rx_valid,
  output logic        rx_last,
  input  logic        rx_room,
  input  logic        tx_avail,
  output logic        tx_start,
  output logic        tx_next,
  input  logic [7:0]  tx_data
);
  import usb_pkg::*;

  // ---------------- descriptor ROM ----------------
  localparam int DEV_OFF  = 0;   // device descriptor, 18 bytes
  localparam int CFG_OFF  = 18;  // configuration + interface + HID + 2 endpoints, 41 bytes
  localparam int HID_OFF  = 36;  // HID descriptor inside the configuration, 9 bytes
  localparam int RPT_OFF  = 59;  // report descriptor, 27 bytes
  localparam int ZERO_OFF = 86;  // two zero bytes (GET_STATUS, GET_INTERFACE, unconfigured)
  localparam int ONE_OFF  = 88;  // 0x01 (GET_CONFIGURATION when configured)
  localparam int DEV_LEN = 18, CFG_LEN = 41, HID_LEN = 9, RPT_LEN = 27;

  function automatic logic [7:0] rom(input logic [6:0] a);
    unique case (a)
      // device descriptor: USB 1.1, class in interface, EP0 16 bytes, 1 configuration
      7'd0: rom = 8'h12;  7'd1: rom = 8'h01;  7'd2: rom = 8'h10;  7'd3: rom = 8'h01;
      7'd4: rom = 8'h00;  7'd5: rom = 8'h00;  7'd6: rom = 8'h00;  7'd7: rom = 8'h10;
      7'd8: rom = VENDOR_ID[7:0];  7'd9: rom = VENDOR_ID[15:8];
      7'd10: rom = PRODUCT_ID[7:0]; 7'd11: rom = PRODUCT_ID[15:8];
      7'd12: rom = 8'h00; 7'd13: rom = 8'h01; 7'd14: rom = 8'h00; 7'd15: rom = 8'h00;
      7'd16: rom = 8'h00; 7'd17: rom = 8'h01;
      // configuration descriptor: total 41 bytes, 1 interface, value 1, bus powered, 100 mA
      7'd18: rom = 8'h09; 7'd19: rom = 8'h02; 7'd20: rom = 8'h29; 7'd21: rom = 8'h00;
      7'd22: rom = 8'h01; 7'd23: rom = 8'h01; 7'd24: rom = 8'h00; 7'd25: rom = 8'h80;
      7'd26: rom = 8'h32;
      // interface descriptor: 2 endpoints, class HID, no subclass/protocol
      7'd27: rom = 8'h09; 7'd28: rom = 8'h04; 7'd29: rom = 8'h00; 7'd30: rom = 8'h00;
      7'd31: rom = 8'h02; 7'd32: rom = 8'h03; 7'd33: rom = 8'h00; 7'd34: rom = 8'h00;
      7'd35: rom = 8'h00;
      // HID descriptor: HID 1.10, 1 report descriptor of RPT_LEN bytes
      7'd36: rom = 8'h09; 7'd37: rom = 8'h21; 7'd38: rom = 8'h10; 7'd39: rom = 8'h01;
      7'd40: rom = 8'h00; 7'd41: rom = 8'h01; 7'd42: rom = 8'h22; 7'd43: rom = 8'(RPT_LEN);
      7'd44: rom = 8'h00;
      // endpoint 0x82 IN, interrupt, 64 bytes, 1 ms
      7'd45: rom = 8'h07; 7'd46: rom = 8'h05; 7'd47: rom = 8'h82; 7'd48: rom = 8'h03;
      7'd49: rom = 8'h40; 7'd50: rom = 8'h00; 7'd51: rom = 8'h01;
      // endpoint 0x02 OUT, interrupt, 64 bytes, 1 ms
      7'd52: rom = 8'h07; 7'd53: rom = 8'h05; 7'd54: rom = 8'h02; 7'd55: rom = 8'h03;
      7'd56: rom = 8'h40; 7'd57: rom = 8'h00; 7'd58: rom = 8'h01;
      // report descriptor: vendor page, 64-byte input and output reports
      7'd59: rom = 8'h06; 7'd60: rom = 8'h00; 7'd61: rom = 8'hFF;  // usage page (vendor)
      7'd62: rom = 8'h09; 7'd63: rom = 8'h01;                      // usage 1
      7'd64: rom = 8'hA1; 7'd65: rom = 8'h01;                      // collection (application)
      7'd66: rom = 8'h15; 7'd67: rom = 8'h00;                      // logical minimum 0
      7'd68: rom = 8'h26; 7'd69: rom = 8'hFF; 7'd70: rom = 8'h00;  // logical maximum 255
      7'd71: rom = 8'h75; 7'd72: rom = 8'h08;                      // report size 8
      7'd73: rom = 8'h95; 7'd74: rom = 8'h40;                      // report count 64
      7'd75: rom = 8'h09; 7'd76: rom = 8'h01;                      // usage 1
      7'd77: rom = 8'h81; 7'd78: rom = 8'h02;                      // input (data, var, abs)
      7'd79: rom = 8'h95; 7'd80: rom = 8'h40;                      // report count 64
      7'd81: rom = 8'h09; 7'd82: rom = 8'h01;                      // usage 1
      7'd83: rom = 8'h91; 7'd84: rom = 8'h02;                      // output (data, var, abs)
      7'd85: rom = 8'hC0;                                          // end collection
      7'd88: rom = 8'h01;
      default: rom = 8'h00;
    endcase
  endfunction

  // ---------------- interrupt line synchroniser ----------------
  logic [1:0] int_sync;
  logic [1:0] vbus_sync;
  always_ff @(posedge clk) begin
    int_sync  <= {int_sync[0], int_n};
    vbus_sync <= {vbus_sync[0], vbus};
  end
  logic int_pending;
  assign int_pending = !int_sync[1];

  // ---------------- state machine ----------------
  typedef enum logic [4:0] {
    S_INIT_MODE, S_INIT_ADDR, S_IDLE, S_READ_INT, S_DISPATCH, S_STATUS,
    S_SETUP_START, S_SETUP_WORD, S_SETUP_ACK, S_SETUP_CLR, S_DECODE,
    S_SET_ADDR, S_SET_EPEN, S_STALL0, S_STALL1, S_CTRL_CLR,
    S_CIN_START, S_CIN_DATA, S_CIN_END,
    S_OUT_START, S_OUT_DATA, S_OUT_END,
    S_IN_START, S_IN_LO, S_IN_HI, S_IN_WORD, S_IN_END
  } state_e;
  state_e state;

  logic        waiting;
  logic [7:0]  ints;
  logic [2:0]  stat_ep;
  logic [7:0]  setup [8];
  logic [3:0]  setup_idx;
  logic [6:0]  ctl_ptr;
  logic [15:0] ctl_rem;
  logic        ctl_short;
  logic        ctl_active;
  logic [4:0]  ctl_n, ctl_sent;
  logic [6:0]  new_addr;
  logic        in_busy, out_pending;
  logic [6:0]  xfer_len, xfer_cnt;
  logic [7:0]  in_lo, in_hi;
  logic        pend_hi, pend_hi_last;
  logic [7:0]  pend_hi_data;

  logic [7:0]  bm_req, b_req;
  logic [15:0] w_value, w_length;
  assign bm_req   = setup[0];
  assign b_req    = setup[1];
  assign w_value  = {setup[3], setup[2]};
  assign w_length = {setup[7], setup[6]};

  assign tx_start = (state == S_IN_START) && !waiting;
  assign tx_next  = (state == S_IN_LO) || (state == S_IN_HI);

  always_ff @(posedge clk) begin
    if (rst || !vbus_sync[1]) begin
      state        <= S_INIT_MODE;
      waiting      <= 1'b0;
      op_valid     <= 1'b0;
      op           <= OP_READ_INT;
      op_ep        <= '0;
      op_wdata     <= '0;
      ints         <= '0;
      stat_ep      <= '0;
      setup_idx    <= '0;
      ctl_ptr      <= '0;
      ctl_rem      <= '0;
      ctl_short    <= 1'b0;
      ctl_active   <= 1'b0;
      ctl_n        <= '0;
      ctl_sent     <= '0;
      new_addr     <= '0;
      in_busy      <= 1'b0;
      out_pending  <= 1'b0;
      configured   <= 1'b0;
      xfer_len     <= '0;
      xfer_cnt     <= '0;
      in_lo        <= '0;
      in_hi        <= '0;
      rx_valid     <= 1'b0;
      rx_data      <= '0;
      rx_last      <= 1'b0;
      pend_hi      <= 1'b0;
      pend_hi_last <= 1'b0;
      pend_hi_data <= '0;
      for (int i = 0; i < 8; i++) setup[i] <= '0;
    end else begin
      if (op_valid && op_ready) op_valid <= 1'b0;

      // byte stream to the sample & buffer module: second byte of a word
      rx_valid <= 1'b0;
      rx_last  <= 1'b0;
      if (pend_hi) begin
        rx_valid <= 1'b1;
        rx_data  <= pend_hi_data;
        rx_last  <= pend_hi_last;
        pend_hi  <= 1'b0;
      end

      unique case (state)
        S_INIT_MODE: if (!waiting) issue(OP_SET_MODE, 3'd0, {MODE_CLKDIV, MODE_CONFIG});
                     else if (op_done) begin waiting <= 1'b0; state <= S_INIT_ADDR; end
        S_INIT_ADDR: if (!waiting) issue(OP_SET_ADDR, 3'd0, 16'h0080);
                     else if (op_done) begin waiting <= 1'b0; state <= S_DISPATCH; end

        S_IDLE: begin
          if (int_pending)                              state <= S_READ_INT;
          else if (out_pending && rx_room)              state <= S_OUT_START;
          else if (configured && !in_busy && tx_avail)  state <= S_IN_START;
        end

        S_READ_INT: if (!waiting) issue(OP_READ_INT, 3'd0, 16'h0000);
                    else if (op_done) begin waiting <= 1'b0; ints <= op_rdata[7:0]; state <= S_DISPATCH; end

        S_DISPATCH: begin
          if (ints[INT_BUS_RESET]) begin
            ints[INT_BUS_RESET] <= 1'b0;
            configured  <= 1'b0;
            in_busy     <= 1'b0;
            out_pending <= 1'b0;
            ctl_active  <= 1'b0;
            state       <= S_INIT_ADDR;
          end else if (ints[INT_CTRL_OUT]) begin
            ints[INT_CTRL_OUT] <= 1'b0; stat_ep <= EP_CTRL_OUT; state <= S_STATUS;
          end else if (ints[INT_CTRL_IN]) begin
            ints[INT_CTRL_IN] <= 1'b0;  stat_ep <= EP_CTRL_IN;  state <= S_STATUS;
          end else if (ints[INT_MAIN_OUT]) begin
            ints[INT_MAIN_OUT] <= 1'b0; stat_ep <= EP_MAIN_OUT; state <= S_STATUS;
          end else if (ints[INT_MAIN_IN]) begin
            ints[INT_MAIN_IN] <= 1'b0;  stat_ep <= EP_MAIN_IN;  state <= S_STATUS;
          end else if (ints[INT_EP1_OUT]) begin
            ints[INT_EP1_OUT] <= 1'b0;  stat_ep <= EP1_OUT;     state <= S_STATUS;
          end else if (ints[INT_EP1_IN]) begin
            ints[INT_EP1_IN] <= 1'b0;   stat_ep <= EP1_IN;      state <= S_STATUS;
          end else begin
            ints[INT_SUSPEND] <= 1'b0;   // suspend change: nothing to do
            state <= S_IDLE;
          end
        end

        // read the last transaction status, which clears the endpoint's interrupt
        S_STATUS: if (!waiting) issue(OP_READ_STATUS, stat_ep, 16'h0000);
                  else if (op_done) begin
                    waiting <= 1'b0;
                    state   <= S_DISPATCH;
                    unique case (stat_ep)
                      EP_CTRL_OUT: state <= op_rdata[STAT_SETUP] ? S_SETUP_START : S_CTRL_CLR;
                      EP_CTRL_IN:  if (ctl_active) state <= S_CIN_START;
                      EP_MAIN_OUT: out_pending <= 1'b1;
                      EP_MAIN_IN:  in_busy <= 1'b0;
                      default: ;
                    endcase
                  end

        // ---- SETUP packet ----
        S_SETUP_START: if (!waiting) issue(OP_RD_START, EP_CTRL_OUT, 16'h0000);
                       else if (op_done) begin
                         waiting <= 1'b0; setup_idx <= '0; ctl_active <= 1'b0;
                         state <= S_SETUP_WORD;
                       end
        S_SETUP_WORD: if (!waiting) issue(OP_RD_WORD, EP_CTRL_OUT, 16'h0000);
                      else if (op_done) begin
                        waiting <= 1'b0;
                        setup[setup_idx[2:0]]        <= op_rdata[7:0];
                        setup[setup_idx[2:0] + 3'd1] <= op_rdata[15:8];
                        setup_idx <= setup_idx + 4'd2;
                        if (setup_idx == 4'd6) state <= S_SETUP_ACK;
                      end
        S_SETUP_ACK: if (!waiting) issue(OP_ACK_SETUP, 3'd0, 16'h0000);
                     else if (op_done) begin waiting <= 1'b0; state <= S_SETUP_CLR; end
        S_SETUP_CLR: if (!waiting) issue(OP_RD_END, EP_CTRL_OUT, 16'h0000);
                     else if (op_done) begin waiting <= 1'b0; state <= S_DECODE; end
        S_CTRL_CLR:  if (!waiting) issue(OP_RD_END, EP_CTRL_OUT, 16'h0000);
                     else if (op_done) begin waiting <= 1'b0; state <= S_DISPATCH; end

        S_DECODE: begin
          state <= S_STALL0;
          if (bm_req[6:5] == 2'b00) begin
            unique case (b_req)
              8'd0:  respond(7'(ZERO_OFF), 16'd2);                 // GET_STATUS
              8'd1, 8'd3, 8'd11: respond(7'd0, 16'd0);             // CLEAR/SET_FEATURE, SET_INTERFACE
              8'd5:  begin new_addr <= w_value[6:0]; state <= S_SET_ADDR; end
              8'd6:  unique case (w_value[15:8])                    // GET_DESCRIPTOR
                       8'h01: respond(7'(DEV_OFF), 16'(DEV_LEN));
                       8'h02: respond(7'(CFG_OFF), 16'(CFG_LEN));
                       8'h21: respond(7'(HID_OFF), 16'(HID_LEN));
                       8'h22: respond(7'(RPT_OFF), 16'(RPT_LEN));
                       default: state <= S_STALL0;
                     endcase
              8'd8:  respond(configured ? 7'(ONE_OFF) : 7'(ZERO_OFF), 16'd1);  // GET_CONFIGURATION
              8'd9:  begin configured <= w_value[0]; state <= S_SET_EPEN; end  // SET_CONFIGURATION
              8'd10: respond(7'(ZERO_OFF), 16'd1);                 // GET_INTERFACE
              default: state <= S_STALL0;
            endcase
          end else if (bm_req[6:5] == 2'b01 && (b_req == 8'h0A || b_req == 8'h0B)) begin
            respond(7'd0, 16'd0);                                  // HID SET_IDLE, SET_PROTOCOL
          end
        end

        S_SET_ADDR: if (!waiting) issue(OP_SET_ADDR, 3'd0, {8'h00, 1'b1, new_addr});
                    else if (op_done) begin waiting <= 1'b0; respond(7'd0, 16'd0); end
        S_SET_EPEN: if (!waiting) issue(OP_SET_EP_EN, 3'd0, {15'd0, configured});
                    else if (op_done) begin waiting <= 1'b0; respond(7'd0, 16'd0); end
        S_STALL0: if (!waiting) issue(OP_SET_STALL, EP_CTRL_OUT, 16'h0001);
                  else if (op_done) begin waiting <= 1'b0; state <= S_STALL1; end
        S_STALL1: if (!waiting) issue(OP_SET_STALL, EP_CTRL_IN, 16'h0001);
                  else if (op_done) begin waiting <= 1'b0; state <= S_DISPATCH; end

        // ---- control IN data: one packet of up to 16 bytes ----
        S_CIN_START: if (!waiting) begin
                       ctl_n    <= (ctl_rem > 16'd16) ? 5'd16 : 5'(ctl_rem);
                       ctl_sent <= '0;
                       issue(OP_WR_START, EP_CTRL_IN, (ctl_rem > 16'd16) ? 16'd16 : ctl_rem);
                     end else if (op_done) begin waiting <= 1'b0; state <= S_CIN_DATA; end
        S_CIN_DATA: if (ctl_sent == ctl_n) state <= S_CIN_END;
                    else if (!waiting) begin
                      if (ctl_n - ctl_sent >= 5'd2)
                        issue(OP_WR_WORD, EP_CTRL_IN, {rom(ctl_ptr + 7'd1), rom(ctl_ptr)});
                      else
                        issue(OP_WR_BYTE, EP_CTRL_IN, {8'h00, rom(ctl_ptr)});
                    end else if (op_done) begin
                      waiting <= 1'b0;
                      if (ctl_n - ctl_sent >= 5'd2) begin
                        ctl_ptr <= ctl_ptr + 7'd2; ctl_sent <= ctl_sent + 5'd2;
                      end else begin
                        ctl_ptr <= ctl_ptr + 7'd1; ctl_sent <= ctl_sent + 5'd1;
                      end
                    end
        S_CIN_END: if (!waiting) issue(OP_WR_END, EP_CTRL_IN, 16'h0000);
                   else if (op_done) begin
                     waiting    <= 1'b0;
                     ctl_rem    <= ctl_rem - 16'(ctl_n);
                     // more data, or a zero-length packet after a full last packet of a short reply
                     ctl_active <= (ctl_rem - 16'(ctl_n) != 0) ||
                                   (ctl_n == 5'd16 && ctl_short && ctl_rem == 16'd16);
                     if (ctl_rem - 16'(ctl_n) == 0) ctl_short <= (ctl_n == 5'd16) && ctl_short;
                     state <= S_DISPATCH;
                   end

        // ---- interrupt OUT report -> sample & buffer ----
        S_OUT_START: if (!waiting) issue(OP_RD_START, EP_MAIN_OUT, 16'h0000);
                     else if (op_done) begin
                       waiting  <= 1'b0;
                       xfer_len <= (op_rdata[7:0] > 8'd64) ? 7'd64 : op_rdata[6:0];
                       xfer_cnt <= '0;
                       state    <= S_OUT_DATA;
                     end
        S_OUT_DATA: if (xfer_cnt == xfer_len) state <= S_OUT_END;
                    else if (!waiting) begin
                      if (xfer_len - xfer_cnt >= 7'd2) issue(OP_RD_WORD, EP_MAIN_OUT, 16'h0000);
                      else                             issue(OP_RD_BYTE, EP_MAIN_OUT, 16'h0000);
                    end else if (op_done) begin
                      waiting  <= 1'b0;
                      rx_valid <= 1'b1;
                      rx_data  <= op_rdata[7:0];
                      if (xfer_len - xfer_cnt >= 7'd2) begin
                        rx_last      <= 1'b0;
                        pend_hi      <= 1'b1;
                        pend_hi_data <= op_rdata[15:8];
                        pend_hi_last <= (xfer_cnt + 7'd2 == xfer_len);
                        xfer_cnt     <= xfer_cnt + 7'd2;
                      end else begin
                        rx_last  <= 1'b1;
                        xfer_cnt <= xfer_cnt + 7'd1;
                      end
                    end
        S_OUT_END: if (!waiting) issue(OP_RD_END, EP_MAIN_OUT, 16'h0000);
                   else if (op_done) begin waiting <= 1'b0; out_pending <= 1'b0; state <= S_IDLE; end

        // ---- sample & buffer -> interrupt IN report ----
        S_IN_START: if (!waiting) issue(OP_WR_START, EP_MAIN_IN, 16'(REPORT_BYTES));
                    else if (op_done) begin waiting <= 1'b0; xfer_cnt <= '0; state <= S_IN_LO; end
        S_IN_LO:    begin in_lo <= tx_data; state <= S_IN_HI; end
        S_IN_HI:    begin in_hi <= tx_data; state <= S_IN_WORD; end
        S_IN_WORD:  if (!waiting) issue(OP_WR_WORD, EP_MAIN_IN, {in_hi, in_lo});
                    else if (op_done) begin
                      waiting  <= 1'b0;
                      xfer_cnt <= xfer_cnt + 7'd2;
                      state    <= (xfer_cnt + 7'd2 == 7'(REPORT_BYTES)) ? S_IN_END : S_IN_LO;
                    end
        S_IN_END:   if (!waiting) issue(OP_WR_END, EP_MAIN_IN, 16'h0000);
                    else if (op_done) begin waiting <= 1'b0; in_busy <= 1'b1; state <= S_IDLE; end

        default: state <= S_IDLE;
      endcase
    end
  end

  // start an operation of the mid-level module
  task automatic issue(input usb_op_e o, input logic [2:0] ep, input logic [15:0] wd);
    op_valid <= 1'b1;
    op       <= o;
    op_ep    <= ep;
    op_wdata <= wd;
    waiting  <= 1'b1;
  endtask

  // start a control IN reply of `len` bytes from ROM offset `off` (len 0: status packet)
  task automatic respond(input logic [6:0] off, input logic [15:0] len);
    ctl_ptr   <= off;
    ctl_rem   <= (len < w_length) ? len : w_length;
    ctl_short <= (len < w_length);
    state     <= S_CIN_START;
  endtask

  assert property (@(posedge clk) disable iff (rst) op_done |-> waiting);
endmodule
