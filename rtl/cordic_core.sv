// cordic_core: angle correction followed by the micro-rotation chain.
//
// Stage 0 (cordic_angle_corr) brings the operand into the convergence range,
// then STAGES micro-rotations (half_range_cordic) follow. This mirrors the
// design's split into a half-range CORDIC and a CORDIC that adds the angle
// correction stage. Latency: 1 + STAGES enabled cycles (1 with EVAL =
// COMBINATIONAL), one vector per cycle.
module cordic_core
  import cordic_pkg::*;
#(
  parameter int           STAGES = 16,
  parameter cordic_mode_e MODE   = ROTATION,
  parameter cordic_func_e FUNC   = CIRCULAR,
  parameter cordic_eval_e EVAL   = PIPELINED
) (
  input  logic  clk,
  input  logic  en,
  input  cvec_t v_in,
  output cvec_t v_out
);

  cvec_t corr;

  cordic_angle_corr #(.MODE(MODE), .FUNC(FUNC)) u_corr (
    .clk(clk), .en(en), .v_in(v_in), .v_out(corr)
  );

  half_range_cordic #(.STAGES(STAGES), .MODE(MODE), .FUNC(FUNC), .EVAL(EVAL)) u_stages (
    .clk(clk), .en(en), .v_in(corr), .v_out(v_out)
  );

endmodule
