// fir_filter_tb: self-checking test of the three-tap FIR filter.
//
// Drives random and extreme 32-bit samples, one per sample clock period,
// reads y before each rising edge of the sample clock (as the sample &
// buffer module does) and compares it with a reference computed in 64-bit
// integer arithmetic: floor((8 x[n] - 13 x[n-1] + 8 x[n-2]) / 8), low 32
// bits. Also checks that reset clears both delay registers and that large
// inputs wrap around (overflow) exactly as the reference says.
module fir_filter_tb;
  logic        reset = 1'b0;
  logic        clock = 1'b0;
  logic [31:0] x = '0, y;
  int checks = 0, failures = 0, overflows = 0;
  longint h1 = 0, h2 = 0;

  fir_filter dut (.reset, .clock, .x, .y);

  function automatic logic [31:0] model(input longint a, input longint b, input longint c);
    longint s;
    s = 8 * a - 13 * b + 8 * c;
    s = s >>> 3;
    return s[31:0];
  endfunction

  function automatic bit wraps(input longint a, input longint b, input longint c);
    longint s;
    s = (8 * a - 13 * b + 8 * c) >>> 3;
    return (s > 64'sd2147483647) || (s < -64'sd2147483648);
  endfunction

  task automatic apply(input logic [31:0] v);
    longint xv;
    x = v;
    xv = longint'(signed'(v));
    #5;
    checks++;
    if (y !== model(xv, h1, h2)) begin
      failures++;
      $display("FAIL x=%0d x1=%0d x2=%0d y=%0d expected %0d", xv, h1, h2,
               signed'(y), signed'(model(xv, h1, h2)));
    end
    if (wraps(xv, h1, h2)) overflows++;
    clock = 1'b1; #5; clock = 1'b0;
    h2 = h1; h1 = xv;
  endtask

  initial begin
    #1 reset = 1'b1;
    #3 reset = 1'b0;
    // impulse response: 1, -1.625, 1 scaled by 8
    apply(32'd8); apply(32'd0); apply(32'd0); apply(32'd0);
    checks++; if (signed'(y) != 0) failures++;
    // step response settles at 0.375 * 1000 = 375
    for (int i = 0; i < 4; i++) apply(32'd1000);
    checks++; if (signed'(y) != 375) failures++;
    // random 17-bit samples, the usual input resolution
    for (int i = 0; i < 200; i++) apply(32'($signed($urandom_range(0, 131070)) - 65535));
    // full-range samples: overflow wraps around
    apply(32'h7FFF_FFFF); apply(32'h8000_0000); apply(32'h7FFF_FFFF);
    for (int i = 0; i < 100; i++) apply($urandom);
    // reset clears the delay line
    apply(32'd100); apply(32'd200);
    reset = 1'b1; #2 reset = 1'b0; h1 = 0; h2 = 0;
    x = 32'd16; #5;
    checks++; if (y !== 32'd16) begin failures++; $display("FAIL reset did not clear"); end
    apply(32'd16);
    checks++; if (overflows == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("overflows=%0d", overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
