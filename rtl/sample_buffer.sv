// sample_buffer: sample & buffer module between the USB stack and the user
// DSP system.
//
// Receive side: the bytes of each OUT report arrive on rx_data/rx_valid,
// with rx_last on the final byte. Byte 0 is a command (0x01: samples follow,
// 0x02: reset the user system), byte 1 the number of samples N (at most
// SAMPLES_PER_REPORT), then N 32-bit samples, least significant byte first.
// Complete samples are rebuilt and pushed into the input FIFO. `rx_room`
// tells the USB side that a whole report's worth of samples fits.
//
// Sample engine: whenever the input FIFO holds a sample and the output FIFO
// has room, the sample is popped and driven on sample_out. SETTLE_CYCLES
// clocks later the user system's answer on sample_in is pushed into the
// output FIFO and sample_clk rises for CLK_HIGH_CYCLES clocks, then stays
// low for CLK_LOW_CYCLES clocks. A user system therefore sees a new input
// on sample_out, must present the matching output combinationally from
// its state, and advances its state on the rising edge of sample_clk; one
// sample period is SETTLE + HIGH + LOW + 1 clocks. sample_reset is high
// while the board reset is high and for RESET_CYCLES clocks after a reset
// command.
//
// Transmit side: tx_avail rises when a full report's worth of results is
// waiting, or when some results wait and no more input is pending. The USB
// side then pulses tx_start and pulls REPORT_BYTES bytes from tx_data with
// one tx_next pulse per byte (tx_data is valid one clock after tx_start or
// tx_next). The report has the same layout, with command 0x01, and is
// zero-padded.
//
// FIFOs, byte/sample conversion and the sample clock follow the interface
// description; the report layout, FIFO depths and sample clock timing are
// this design's own.
module sample_buffer #(
  parameter int unsigned IN_DEPTH        = 64,
  parameter int unsigned OUT_DEPTH       = 64,
  parameter int unsigned SETTLE_CYCLES   = 2,
  parameter int unsigned CLK_HIGH_CYCLES = 2,
  parameter int unsigned CLK_LOW_CYCLES  = 2,
  parameter int unsigned RESET_CYCLES    = 4
) (
  input  logic        clk,
  input  logic        rst,
  // receive bytes (from the high-level USB module)
  input  logic [7:0]  rx_data,
  input  logic        rx_valid,
  input  logic        rx_last,
  output logic        rx_room,
  // transmit bytes (to the high-level USB module)
  output logic        tx_avail,
  input  logic        tx_start,
  input  logic        tx_next,
  output logic [7:0]  tx_data,
  // user system
  output logic [31:0] sample_out,
  input  logic [31:0] sample_in,
  output logic        sample_clk,
  output logic        sample_reset
);
  import usb_pkg::*;

  // ---------------- receive: bytes -> samples ----------------
  logic [5:0]  rx_idx;
  logic [7:0]  rx_cmd, rx_count;
  logic [23:0] rx_acc;
  logic        rx_busy;
  logic        in_push;
  logic [31:0] in_din;
  logic [5:0]  rx_sidx;      // index of the sample being rebuilt
  logic        reset_cmd;

  assign rx_sidx = 6'((rx_idx - 6'd2) >> 2);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_idx    <= '0;
      rx_cmd    <= '0;
      rx_count  <= '0;
      rx_acc    <= '0;
      rx_busy   <= 1'b0;
      in_push   <= 1'b0;
      in_din    <= '0;
      reset_cmd <= 1'b0;
    end else begin
      in_push   <= 1'b0;
      reset_cmd <= 1'b0;
      if (rx_valid) begin
        rx_idx  <= rx_last ? 6'd0 : rx_idx + 6'd1;
        rx_busy <= !rx_last;
        if (rx_idx == 6'd0) begin
          rx_cmd    <= rx_data;
          reset_cmd <= (rx_data == RPT_RESET);
        end else if (rx_idx == 6'd1) begin
          rx_count <= (rx_data > 8'(SAMPLES_PER_REPORT)) ? 8'(SAMPLES_PER_REPORT) : rx_data;
        end else if (rx_cmd == RPT_SAMPLES && {2'b00, rx_sidx} < rx_count) begin
          if (rx_idx[1:0] == 2'd1) begin   // fourth byte of a sample (idx 5, 9, ...)
            in_push <= 1'b1;
            in_din  <= {rx_data, rx_acc};
          end else begin
            rx_acc <= {rx_data, rx_acc[23:8]};
          end
        end
      end
    end
  end

  // ---------------- FIFOs ----------------
  logic                      in_pop, in_empty, in_full;
  logic [31:0]               in_dout;
  logic [$clog2(IN_DEPTH):0] in_count;
  logic                      out_push, out_pop, out_empty, out_full;
  logic [31:0]               out_dout;
  logic [$clog2(OUT_DEPTH):0] out_count;

  sync_fifo #(.WIDTH(32), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst, .push(in_push), .din(in_din), .pop(in_pop), .dout(in_dout),
    .count(in_count), .full(in_full), .empty(in_empty));

  sync_fifo #(.WIDTH(32), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst, .push(out_push), .din(sample_in), .pop(out_pop), .dout(out_dout),
    .count(out_count), .full(out_full), .empty(out_empty));

  // room for a full report plus the sample that may still be in flight
  assign rx_room = !rx_busy &&
                   (int'(in_count) + SAMPLES_PER_REPORT + 1 <= int'(IN_DEPTH));

  // ---------------- sample engine ----------------
  typedef enum logic [1:0] {E_IDLE, E_SETTLE, E_HIGH, E_LOW} eng_e;
  eng_e       eng;
  logic [7:0] ecnt;

  assign in_pop   = (eng == E_IDLE) && !in_empty && !out_full;
  assign out_push = (eng == E_SETTLE) && (ecnt == 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      eng        <= E_IDLE;
      ecnt       <= '0;
      sample_out <= '0;
      sample_clk <= 1'b0;
    end else begin
      unique case (eng)
        E_IDLE: if (in_pop) begin
          sample_out <= in_dout;
          ecnt       <= 8'(SETTLE_CYCLES - 1);
          eng        <= E_SETTLE;
        end
        E_SETTLE: if (ecnt == 0) begin
          sample_clk <= 1'b1;
          ecnt       <= 8'(CLK_HIGH_CYCLES - 1);
          eng        <= E_HIGH;
        end else ecnt <= ecnt - 1'b1;
        E_HIGH: if (ecnt == 0) begin
          sample_clk <= 1'b0;
          ecnt       <= 8'(CLK_LOW_CYCLES - 1);
          eng        <= E_LOW;
        end else ecnt <= ecnt - 1'b1;
        E_LOW: if (ecnt == 0) eng <= E_IDLE;
               else ecnt <= ecnt - 1'b1;
        default: eng <= E_IDLE;
      endcase
    end
  end

  // ---------------- sample reset ----------------
  logic [7:0] rcnt;
  always_ff @(posedge clk) begin
    if (rst)            rcnt <= '0;
    else if (reset_cmd) rcnt <= 8'(RESET_CYCLES);
    else if (rcnt != 0) rcnt <= rcnt - 1'b1;
  end
  assign sample_reset = rst || (rcnt != 0);

  // ---------------- transmit: samples -> bytes ----------------
  logic       tx_busy;
  logic [5:0] tx_idx;
  logic [7:0] tx_n;
  logic [5:0] tx_sidx;
  logic [7:0] tx_cur;

  assign tx_sidx  = 6'((tx_idx - 6'd2) >> 2);
  assign tx_avail = !tx_busy && !out_empty &&
                    ((int'(out_count) >= SAMPLES_PER_REPORT) ||
                     (in_empty && eng == E_IDLE && !rx_busy && !in_push));
  assign out_pop  = tx_busy && tx_next && tx_idx >= 6'd2 &&
                    {2'b00, tx_sidx} < tx_n && tx_idx[1:0] == 2'd1;

  always_comb begin
    if (tx_idx == 6'd0)      tx_cur = RPT_SAMPLES;
    else if (tx_idx == 6'd1) tx_cur = tx_n;
    else if ({2'b00, tx_sidx} < tx_n) begin
      unique case (tx_idx[1:0])
        2'd2:    tx_cur = out_dout[7:0];
        2'd3:    tx_cur = out_dout[15:8];
        2'd0:    tx_cur = out_dout[23:16];
        default: tx_cur = out_dout[31:24];
      endcase
    end else tx_cur = 8'h00;
  end
  assign tx_data = tx_cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_busy <= 1'b0;
      tx_idx  <= '0;
      tx_n    <= '0;
    end else if (!tx_busy) begin
      if (tx_start && tx_avail) begin
        tx_busy <= 1'b1;
        tx_idx  <= '0;
        tx_n    <= (int'(out_count) >= SAMPLES_PER_REPORT) ? 8'(SAMPLES_PER_REPORT) : 8'(out_count);
      end
    end else if (tx_next) begin
      tx_idx <= tx_idx + 6'd1;
      if (tx_idx == 6'(REPORT_BYTES - 1)) tx_busy <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (rst) tx_next |-> tx_busy);
  assert property (@(posedge clk) disable iff (rst) in_push |-> !in_full);
endmodule
