// fixed2float: signed Q4.30 datapath word to IEEE-754 single precision.
//
// Three pipeline stages, all advancing together when `en` is high:
//   1. split off the sign and take the magnitude;
//   2. count leading zeros of the magnitude;
//   3. normalise (shift the leading one to the top), drop it as the hidden
//      bit and pack sign, exponent 130 - lzc and the next 23 bits.
// Latency: 3 enabled cycles from q_in to f_out.
//
// The design returns results to the host as floats through a 3-stage
// pipeline; the stage split and truncation of the mantissa (no rounding) are
// this implementation's choices. A zero input gives +0.0.
module fixed2float
  import cordic_pkg::*;
(
  input  logic        clk,
  input  logic        en,
  input  fx_t         q_in,
  output logic [31:0] f_out
);

  logic          s1_sign;
  logic [IW-1:0] s1_mag;
  logic          s2_sign, s2_zero;
  logic [IW-1:0] s2_mag;
  logic [5:0]    s2_lz;

  // leading-zero count of the stage-1 magnitude
  logic [5:0] lz_w;
  always_comb begin
    lz_w = 6'(IW);
    for (int i = 0; i < IW; i++)
      if (s1_mag[i]) lz_w = 6'(IW - 1 - i);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s1_sign <= q_in[IW-1];
      s1_mag  <= q_in[IW-1] ? IW'(-q_in) : IW'(q_in);
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      s2_sign <= s1_sign;
      s2_zero <= (s1_mag == '0);
      s2_mag  <= s1_mag;
      s2_lz   <= lz_w;
    end
  end

  logic [IW-1:0] norm_w;
  logic [7:0]    exp_w;
  assign norm_w = s2_mag << s2_lz;
  // msb at position IW-1-lz has weight 2^(IW-1-lz-FRAC); biased by 127
  assign exp_w  = 8'(127 + IW - 1 - FRAC) - 8'(s2_lz);

  always_ff @(posedge clk) begin
    if (en) begin
      if (s2_zero) f_out <= '0;
      else         f_out <= {s2_sign, exp_w, norm_w[IW-2 -: 23]};
    end
  end

endmodule
