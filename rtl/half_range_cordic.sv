// half_range_cordic: the chain of pipelined CORDIC micro-rotations.
//
// STAGES micro-rotation stages with wired shifts 0, 1, ..., STAGES-1 (circular
// and linear) or 1, 2, 3, 4, 4, 5, ..., 13, 13, 14, ... (hyperbolic, see
// cordic_pkg::stage_shift), one register each. With the design's 32-bit operands only the first half of the
// micro-rotations (16) is carried out here; the rest of the precision is
// recovered by a single first-order approximation step (cordic_approx).
// Latency: STAGES enabled cycles; one new vector can enter every cycle. With
// EVAL = COMBINATIONAL the stage registers are left out and the chain is one
// long combinational path (latency 0). EVAL = ITERATED is served by
// iterated_cordic instead and is treated as PIPELINED here.
module half_range_cordic
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

  cvec_t chain [STAGES+1];
  assign chain[0] = v_in;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    cordic_microrotation #(.SHIFT(stage_shift(FUNC, i)), .MODE(MODE), .FUNC(FUNC),
                           .REG(EVAL != COMBINATIONAL)) u_stage (
      .clk  (clk),
      .en   (en),
      .v_in (chain[i]),
      .v_out(chain[i+1])
    );
  end

  assign v_out = chain[STAGES];

endmodule
