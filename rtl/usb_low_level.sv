// usb_low_level: physical bus interface to the PDIUSB12 USB device chip.
//
// Each accepted request moves one byte over the chip's 8-bit parallel bus,
// either a command byte (A0 = 1) or a data byte (A0 = 0), written with a
// WR_N strobe or read with an RD_N strobe. A cycle runs in four phases:
// SETUP (CS_N low, A0 and write data driven, 1 clock), STROBE (WR_N or RD_N
// low for STROBE_CYCLES clocks, read data sampled in the last one), HOLD
// (strobe high, data still driven, 1 clock) and RECOVER (CS_N high and bus
// released for RECOVERY_CYCLES clocks). `done` pulses for one clock at the
// end of RECOVER with the read byte on `rdata`; `ready` is high when idle.
// The separate-address mode of the chip is used, so ALE stays low; DMA is
// not used, so DMACK_N stays high. The strobe and recovery lengths are this
// design's choice for a 45 MHz clock; the bus data width (8) and the role of
// the module come from the interface description.
module usb_low_level #(
  parameter int unsigned STROBE_CYCLES   = 4,  // ~89 ns at 45 MHz
  parameter int unsigned RECOVERY_CYCLES = 8   // ~178 ns at 45 MHz
) (
  input  logic       clk,
  input  logic       rst,
  // request from the mid-level module
  input  logic       req_valid,
  output logic       ready,
  input  usb_pkg::bus_xfer_t req,
  output logic       done,
  output logic [7:0] rdata,
  // PDIUSB12 pins
  input  logic [7:0] bus_din,
  output logic [7:0] bus_dout,
  output logic       bus_doe,
  output logic       a0,
  output logic       cs_n,
  output logic       wr_n,
  output logic       rd_n,
  output logic       ale,
  output logic       dmack_n
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_STROBE, S_HOLD, S_RECOVER} state_e;
  state_e state;
  logic [7:0] cnt;
  logic       cur_read;

  assign ready   = (state == S_IDLE);
  assign ale     = 1'b0;
  assign dmack_n = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      cnt      <= '0;
      cur_read <= 1'b0;
      done     <= 1'b0;
      rdata    <= '0;
      a0       <= 1'b0;
      cs_n     <= 1'b1;
      wr_n     <= 1'b1;
      rd_n     <= 1'b1;
      bus_doe  <= 1'b0;
      bus_dout <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (req_valid) begin
          cur_read <= req.read;
          a0       <= req.cmd;
          cs_n     <= 1'b0;
          bus_dout <= req.data;
          bus_doe  <= !req.read;
          state    <= S_SETUP;
        end
        S_SETUP: begin
          wr_n  <= cur_read;
          rd_n  <= !cur_read;
          cnt   <= 8'(STROBE_CYCLES - 1);
          state <= S_STROBE;
        end
        S_STROBE: begin
          if (cnt == 0) begin
            if (cur_read) rdata <= bus_din;
            wr_n  <= 1'b1;
            rd_n  <= 1'b1;
            state <= S_HOLD;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_HOLD: begin
          cs_n    <= 1'b1;
          bus_doe <= 1'b0;
          cnt     <= 8'(RECOVERY_CYCLES - 1);
          state   <= S_RECOVER;
        end
        S_RECOVER: begin
          if (cnt == 0) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A strobe is only ever asserted inside a chip-select window.
  assert property (@(posedge clk) disable iff (rst) (!wr_n || !rd_n) |-> !cs_n);
  assert property (@(posedge clk) disable iff (rst) !(!wr_n && !rd_n));
endmodule
