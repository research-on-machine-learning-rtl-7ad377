// float2fixed: IEEE-754 single precision to signed Q2.30 fixed point.
//
// Three pipeline stages, all advancing together when `en` is high:
//   1. unpack sign, exponent and the 24-bit significand (hidden 1 restored) and
//      work out the shift distance e - 120 that places bit 0 of the
//      significand at weight 2^-30;
//   2. shift the significand left or right by that distance;
//   3. apply the sign, or saturate.
// Latency: 3 enabled cycles from f_in to q_out.
//
// The design converts streamed floats in a 3-stage hardware pipeline and
// expects inputs normalised to [-1, +1]. Corner cases are this implementation's
// choice: the magnitude is truncated toward zero; |value| >= 2, infinities and
// NaNs saturate to +-(2^31 - 1) LSB; zero and denormals give 0.
module float2fixed (
  input  logic               clk,
  input  logic               en,
  input  logic [31:0]        f_in,
  output logic signed [31:0] q_out
);

  // stage 1 registers
  logic        s1_sign, s1_sat, s1_zero, s1_left;
  logic [23:0] s1_mant;
  logic [4:0]  s1_sh;
  // stage 2 registers
  logic        s2_sign, s2_sat;
  logic [30:0] s2_mag;

  logic [7:0] exp_w;
  assign exp_w = f_in[30:23];

  always_ff @(posedge clk) begin
    if (en) begin
      s1_sign <= f_in[31];
      s1_sat  <= (exp_w >= 8'd128);
      s1_zero <= (exp_w == 8'd0) || (exp_w < 8'd97);     // below 2^-30 after shift
      s1_mant <= {1'b1, f_in[22:0]};
      s1_left <= (exp_w >= 8'd120);
      s1_sh   <= (exp_w >= 8'd120) ? 5'(exp_w - 8'd120) : 5'(8'd120 - exp_w);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s2_sign <= s1_sign;
      s2_sat  <= s1_sat;
      if (s1_zero)      s2_mag <= '0;
      else if (s1_left) s2_mag <= 31'({7'd0, s1_mant} << s1_sh);
      else              s2_mag <= 31'({7'd0, s1_mant} >> s1_sh);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (s2_sat) q_out <= s2_sign ? -32'sh7fff_ffff : 32'sh7fff_ffff;
      else        q_out <= s2_sign ? -$signed({1'b0, s2_mag}) : $signed({1'b0, s2_mag});
    end
  end

endmodule
