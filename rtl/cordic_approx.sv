// cordic_approx: first-order replacement of the last half of the micro-rotations.
//
// After the half-range CORDIC the remaining rotation angle is below about
// 2^-15, so one small rotation finishes the job with an error at the level
// of the last bit (the low-latency CORDIC approximation the design builds on):
//   rotation mode  (a=x, b=y, c=z):  af = a - b*c   (circular; hyperbolic
//                                    adds, linear keeps a)
//                                    bf = b + a*c,  cf = c
//   vectoring mode:                  cf = c + b * (1/a),  a and b pass
// (for small t, atan(t), t and atanh(t) agree to first order, so the same
// vectoring step serves all three functional modes).
// The multipliers are truncated to MW = n/2 + log2(n) = 21 bits: a and b keep
// their 21 leading bits, while the small residual (c in rotation mode, b in
// vectoring mode) keeps its 21 low bits. In vectoring mode 1/a comes from the
// block-RAM reciprocal table (recip_table), addressed by the leading bits of a.
//
// Timing: two enabled cycles. Cycle 1 is the hold-register cycle; it computes
// the two products (rotation mode) or reads the reciprocal table (vectoring
// mode). Cycle 2 performs the add/subtract; in vectoring mode the single
// multiply and the add share it, as a DSP slice with post-adder would.
module cordic_approx
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE = ROTATION,
  parameter cordic_func_e FUNC = CIRCULAR,
  parameter int           MW   = DW/2 + $clog2(DW),  // truncated multiplier width
  parameter int           AW   = DW/2,                // reciprocal table address bits
  parameter int           RW   = DW/2                 // reciprocal table entry bits
) (
  input  logic  clk,
  input  logic  en,
  input  cvec_t v_in,
  output cvec_t v_out
);

  cvec_t hold;

  if (MODE == ROTATION) begin : g_rot
    localparam int TSH = IW - MW;      // bits dropped from the leading operand
    localparam int PSH = FRAC - TSH;   // product re-alignment to 2^-FRAC
    logic signed [MW-1:0]   xq, yq, zr;
    logic signed [2*MW-1:0] px, py;    // px = b*c (for a), py = a*c (for b)

    assign xq = MW'(v_in.x >>> TSH);
    assign yq = MW'(v_in.y >>> TSH);
    assign zr = v_in.z[MW-1:0];

    always_ff @(posedge clk) begin
      if (en) begin
        hold <= v_in;
        px   <= yq * zr;
        py   <= xq * zr;
      end
    end

    always_ff @(posedge clk) begin
      if (en) begin
        unique case (FUNC)
          CIRCULAR:   v_out.x <= hold.x - IW'(px >>> PSH);
          HYPERBOLIC: v_out.x <= hold.x + IW'(px >>> PSH);
          default:    v_out.x <= hold.x;
        endcase
        v_out.y <= hold.y + IW'(py >>> PSH);
        v_out.z <= hold.z;
      end
    end
  end else begin : g_vec
    localparam int XINT = (FUNC == LINEAR) ? 1 : 2;     // x range [0, 2^XINT)
    logic [AW-1:0]          addr;
    logic [RW-1:0]          recip;
    logic signed [MW-1:0]   yr;
    logic signed [MW+RW:0]  prod;

    // leading AW bits of x (x >= 0 after angle correction); saturate above range
    assign addr = (v_in.x >= (ONE <<< XINT)) ? '1 : v_in.x[FRAC+XINT-1 -: AW];

    recip_table #(.AW(AW), .RW(RW), .XINT(XINT)) u_recip (
      .clk(clk), .en(en), .addr(addr), .recip(recip)
    );

    always_ff @(posedge clk)
      if (en) hold <= v_in;

    assign yr   = hold.y[MW-1:0];
    assign prod = yr * $signed({1'b0, recip});

    always_ff @(posedge clk) begin
      if (en) begin
        v_out.x <= hold.x;
        v_out.y <= hold.y;
        v_out.z <= hold.z + IW'(prod >>> (RW - 3));
      end
    end
  end

endmodule
