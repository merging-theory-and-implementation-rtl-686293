// usb_mid_level: command interface of the PDIUSB12.
//
// Translates one operation of the high-level module (usb_pkg::usb_op_e) into
// the short sequence of command-byte and data-byte transfers the PDIUSB12
// expects, runs them one after the other through usb_low_level, and returns a
// 16-bit result. On acceptance (op_valid && op_ready) the operation is
// expanded into at most four bus transfers; `op_done` pulses for one clock
// after the last of them, with `op_rdata` holding the read bytes:
// {second, first} for two-byte reads (interrupt register, buffer words),
// {0, byte} for one-byte reads, and {0, count} for OP_RD_START, whose first
// read byte is the chip's reserved byte. The 16-bit data width towards the
// high-level module and the 8-bit width towards the low-level module are
// those of the interface description; the operation set and the byte
// sequences (taken from the PDIUSB12 command set) are this design's own.
module usb_mid_level (
  input  logic        clk,
  input  logic        rst,
  // from the high-level module
  input  logic        op_valid,
  output logic        op_ready,
  input  usb_pkg::usb_op_e op,
  input  logic [2:0]  op_ep,
  input  logic [15:0] op_wdata,
  output logic        op_done,
  output logic [15:0] op_rdata,
  // to the low-level module
  output logic        ll_valid,
  input  logic        ll_ready,
  output usb_pkg::bus_xfer_t ll_req,
  input  logic        ll_done,
  input  logic [7:0]  ll_rdata
);
  import usb_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} state_e;
  state_e state;

  bus_xfer_t  seq [4];
  logic [2:0] nsteps;
  logic [2:0] step;
  logic [7:0] rd0, rd1;
  logic       rd_count;   // 0: no read byte seen yet, 1: one seen
  usb_op_e    cur_op;

  function automatic bus_xfer_t c(input logic [7:0] b);  // command byte
    return '{cmd: 1'b1, read: 1'b0, data: b};
  endfunction
  function automatic bus_xfer_t w(input logic [7:0] b);  // data write
    return '{cmd: 1'b0, read: 1'b0, data: b};
  endfunction
  function automatic bus_xfer_t r();                     // data read
    return '{cmd: 1'b0, read: 1'b1, data: 8'h00};
  endfunction

  assign op_ready = (state == S_IDLE);
  assign ll_valid = (state == S_ISSUE);
  assign ll_req   = seq[step[1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      nsteps   <= '0;
      step     <= '0;
      rd0      <= '0;
      rd1      <= '0;
      rd_count <= 1'b0;
      cur_op   <= OP_READ_INT;
      op_done  <= 1'b0;
      op_rdata <= '0;
      for (int i = 0; i < 4; i++) seq[i] <= '0;
    end else begin
      op_done <= 1'b0;
      unique case (state)
        S_IDLE: if (op_valid) begin
          cur_op   <= op;
          step     <= '0;
          rd0      <= '0;
          rd1      <= '0;
          rd_count <= 1'b0;
          state    <= S_ISSUE;
          for (int i = 0; i < 4; i++) seq[i] <= '0;
          unique case (op)
            OP_SET_MODE:    begin seq[0] <= c(CMD_SET_MODE); seq[1] <= w(op_wdata[7:0]);
                                  seq[2] <= w(op_wdata[15:8]); nsteps <= 3'd3; end
            OP_SET_ADDR:    begin seq[0] <= c(CMD_SET_ADDR_EN); seq[1] <= w(op_wdata[7:0]); nsteps <= 3'd2; end
            OP_SET_EP_EN:   begin seq[0] <= c(CMD_SET_EP_EN); seq[1] <= w({7'd0, op_wdata[0]}); nsteps <= 3'd2; end
            OP_READ_INT:    begin seq[0] <= c(CMD_READ_INT); seq[1] <= r(); seq[2] <= r(); nsteps <= 3'd3; end
            OP_READ_STATUS: begin seq[0] <= c(CMD_EP_STATUS | {5'd0, op_ep}); seq[1] <= r(); nsteps <= 3'd2; end
            OP_SET_STALL:   begin seq[0] <= c(CMD_EP_STATUS | {5'd0, op_ep});
                                  seq[1] <= w({7'd0, op_wdata[0]}); nsteps <= 3'd2; end
            OP_ACK_SETUP:   begin seq[0] <= c(CMD_SELECT_EP | {5'd0, EP_CTRL_OUT}); seq[1] <= c(CMD_ACK_SETUP);
                                  seq[2] <= c(CMD_SELECT_EP | {5'd0, EP_CTRL_IN});  seq[3] <= c(CMD_ACK_SETUP);
                                  nsteps <= 3'd4; end
            OP_RD_START:    begin seq[0] <= c(CMD_SELECT_EP | {5'd0, op_ep}); seq[1] <= c(CMD_RW_BUFFER);
                                  seq[2] <= r(); seq[3] <= r(); nsteps <= 3'd4; end
            OP_RD_WORD:     begin seq[0] <= r(); seq[1] <= r(); nsteps <= 3'd2; end
            OP_RD_BYTE:     begin seq[0] <= r(); nsteps <= 3'd1; end
            OP_RD_END:      begin seq[0] <= c(CMD_SELECT_EP | {5'd0, op_ep}); seq[1] <= c(CMD_CLEAR_BUFFER); nsteps <= 3'd2; end
            OP_WR_START:    begin seq[0] <= c(CMD_SELECT_EP | {5'd0, op_ep}); seq[1] <= c(CMD_RW_BUFFER);
                                  seq[2] <= w(8'h00); seq[3] <= w(op_wdata[7:0]); nsteps <= 3'd4; end
            OP_WR_WORD:     begin seq[0] <= w(op_wdata[7:0]); seq[1] <= w(op_wdata[15:8]); nsteps <= 3'd2; end
            OP_WR_BYTE:     begin seq[0] <= w(op_wdata[7:0]); nsteps <= 3'd1; end
            OP_WR_END:      begin seq[0] <= c(CMD_SELECT_EP | {5'd0, op_ep}); seq[1] <= c(CMD_VALIDATE_BUF); nsteps <= 3'd2; end
            default:        begin seq[0] <= c(CMD_READ_INT); seq[1] <= r(); seq[2] <= r(); nsteps <= 3'd3; end
          endcase
        end
        S_ISSUE: if (ll_ready) state <= S_WAIT;
        S_WAIT: if (ll_done) begin
          if (seq[step[1:0]].read) begin
            if (!rd_count) rd0 <= ll_rdata; else rd1 <= ll_rdata;
            rd_count <= 1'b1;
          end
          if (step + 3'd1 == nsteps) begin
            state   <= S_IDLE;
            op_done <= 1'b1;
            if (cur_op == OP_RD_START)
              op_rdata <= {8'h00, ll_rdata};
            else if (seq[step[1:0]].read && rd_count)
              op_rdata <= {ll_rdata, rd0};
            else if (seq[step[1:0]].read)
              op_rdata <= {8'h00, ll_rdata};
            else
              op_rdata <= {rd1, rd0};
          end else begin
            step  <= step + 3'd1;
            state <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The low-level module must only complete a transfer that was issued.
  assert property (@(posedge clk) disable iff (rst) ll_done |-> state == S_WAIT);
endmodule
