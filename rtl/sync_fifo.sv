// sync_fifo: single-clock first-in first-out buffer.
//
// DEPTH words of WIDTH bits kept in a register array with read and write
// pointers one bit wider than the address, so that full and empty are told
// apart by the extra bit. `dout` shows the oldest word combinationally
// whenever the FIFO is not empty; `pop` removes it at the next clock edge
// and `push` stores `din`. A push into a full FIFO or a pop from an empty
// one is ignored (and flagged by an assertion). `count` is the fill level.
// Used for the input and output sample buffers of the sample & buffer
// module; its structure is this design's own.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 64   // power of two
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     full,
  output logic                     empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  assign count = wptr - rptr;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr[AW-1:0]] <= din;
  end

  assert property (@(posedge clk) disable iff (rst) !(push && full));
  assert property (@(posedge clk) disable iff (rst) !(pop && empty));
endmodule
