// tb_fp_pkg: reference number conversions for the testbenches.
//
// Converts between SystemVerilog reals and IEEE-754 single-precision bit
// patterns (truncating the mantissa, as the hardware does), and between reals
// and the Q2.30 / Q4.30 fixed-point words. These are written from the IEEE-754
// bit layout via $realtobits/$bitstoreal and do not share code with the RTL.
package tb_fp_pkg;

  localparam real TWO30 = 1073741824.0;

  // real -> float32 bits, mantissa truncated; tiny values flush to zero
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int e;
    if (r == 0.0) return 32'h0;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0) return {d[63], 31'h0};
    if (e >= 255) return {d[63], 8'hff, 23'h0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // float32 bits -> real (denormals read as zero)
  function automatic real f2r(input logic [31:0] f);
    int e;
    e = int'(f[30:23]);
    if (e == 0) return 0.0;
    return $bitstoreal({f[31], 11'(e - 127 + 1023), f[22:0], 29'h0});
  endfunction

  function automatic real q2r(input logic signed [63:0] q);
    return real'(q) / TWO30;
  endfunction

  function automatic real absr(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // CORDIC gain of n circular micro-rotations with shifts 0..n-1
  function automatic real cordic_gain(input int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k * $sqrt(1.0 + $pow(2.0, -2.0 * i));
    return k;
  endfunction

  // gain of n hyperbolic micro-rotations with shifts 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ...
  function automatic real hyp_gain(input int n);
    real k;
    int  s;
    k = 1.0;
    s = 1;
    for (int i = 0; i < n; i++) begin
      k = k * $sqrt(1.0 - $pow(2.0, -2.0 * s));
      if (!((i == 3) || (i == 13) || (i == 41))) s++;   // shifts 4, 13, 40 repeat
    end
    return k;
  endfunction

  // uniform real in [lo, hi)
  function automatic real urand_r(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

endpackage
