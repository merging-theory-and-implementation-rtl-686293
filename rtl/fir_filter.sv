// fir_filter: the example user DSP system, a three-tap FIR filter
//
//     y[n] = x[n] - 1.625 x[n-1] + x[n-2]
//
// with a notch near 0.2 of the Nyquist frequency (zeros where
// cos(w) = 0.8125), a gain of 0.375 at DC and 3.625 at Nyquist. The
// coefficients and the structure (two delay registers, two adders) are
// those of the example system; the arithmetic is this design's own.
// The coefficient -1.625 = -13/8 is exact with three fractional bits, so the
// sum is formed exactly as 8 x[n] - 13 x[n-1] + 8 x[n-2] (shift-and-add, no
// multiplier) in a 37-bit accumulator and divided by 8 with an arithmetic
// shift, which rounds towards minus infinity. y is the low 32 bits of that
// result: a sum outside the signed 32-bit range wraps around, which is the
// overflow a too-large input scaling provokes.
//
// Interface: x is the input sample, y is combinational from x and the two
// delay registers. The delay registers shift on the rising edge of `clock`,
// which the sample & buffer module drives as its sample clock after it has
// captured y; `reset` (synchronous to `clock`, and also acting while the
// sample clock idles) clears them.
module fir_filter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             reset,
  input  logic             clock,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned AW = WIDTH + 5;   // room for 8*|x| + 13*|x| + 8*|x|

  logic signed [WIDTH-1:0] x1, x2;          // x[n-1], x[n-2]
  logic signed [AW-1:0]    acc, x0e, x1e, x2e;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      x1 <= '0;
      x2 <= '0;
    end else begin
      x1 <= x;
      x2 <= x1;
    end
  end

  always_comb begin
    x0e = AW'(signed'(x));
    x1e = AW'(x1);
    x2e = AW'(x2);
    // 8*x0 - (8 + 4 + 1)*x1 + 8*x2
    acc = (x0e <<< 3) - ((x1e <<< 3) + (x1e <<< 2) + x1e) + (x2e <<< 3);
    y   = WIDTH'(acc >>> 3);
  end
endmodule
