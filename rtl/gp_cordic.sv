// gp_cordic: general-purpose pipelined CORDIC cell with DSP/BRAM approximation.
//
// One fully pipelined compute unit. Two float operands b and c arrive on a
// 64-bit AXI-Stream beat each cycle; the third operand a is a constant set
// through the AUX registers. The cell
//   1. converts b, c (and the constant a and scale factor) to Q2.30,
//   2. routes a, b, c to the CORDIC inputs x, y, z through three 3:1 MUXes
//      (mapping_input 0: x,y,z = a,b,c   1: b,c,a   2: c,a,b   3: as 0),
//   3. runs the angle-correction stage and STAGES = 16 micro-rotations,
//   4. finishes the remaining 16 bits with the approximation step
//      (DSP multipliers, plus the BRAM reciprocal table in vectoring mode),
//   5. picks the two results through the output MUXes
//      (mapping_output 0: x,y   1: y,z   2: z,x   3: as 0),
//   6. multiplies output a (mapping_scale[0]) and/or output b
//      (mapping_scale[1]) by the scale factor, to undo the CORDIC gain,
//   7. converts both results back to float and sends them on the output stream.
// STAGES may be raised from 16 up to 30 to approximate fewer bits (DW - STAGES);
// the reciprocal table then has 2^(DW-STAGES) entries of 16 bits.
// EVAL selects the evaluation mode of the micro-rotations: PIPELINED (a chain
// of STAGES registered stages, a beat per cycle), COMBINATIONAL (the same chain
// without registers: LATENCY drops by STAGES, the clock period grows) or
// ITERATED (one stage reused STAGES times; the cell then takes a beat every
// STAGES enabled cycles, which the round-robin scheduler makes up for with
// more cells).
// MODE (rotation/vectoring) and FUNC (circular/linear/hyperbolic) are build-time choices,
// as in the design where rotation and vector cells are separate circuits.
// Stream format (this implementation's choice): input b = tdata[31:0],
// c = tdata[63:32]; output a = tdata[31:0], output b = tdata[63:32].
//
// Timing: LATENCY = 12 + STAGES = 28 cycles from an accepted input beat to its
// output beat, pipelined or iterated (12 when combinational). There is no skid
// buffer: the whole pipeline holds while the output beat waits, so
// s_axis_tready = m_axis_tready or no valid output (and, when iterated, no
// beat accepted in the last STAGES - 1 enabled cycles). tlast travels with its
// beat. Reset (synchronous, active low) clears only the valid bits.
module gp_cordic
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE   = ROTATION,
  parameter cordic_func_e FUNC   = CIRCULAR,
  parameter int           STAGES = 16,
  parameter cordic_eval_e EVAL   = PIPELINED
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI-Stream slave: b and c
  input  logic [63:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // AXI-Stream master: output a and output b
  output logic [63:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // configuration from the AUX registers
  input  logic [31:0] input_a,
  input  logic [31:0] scale,
  input  logic [1:0]  mapping_input,
  input  logic [1:0]  mapping_output,
  input  logic [1:0]  mapping_scale
);

  localparam int LATENCY = 12 + ((EVAL == COMBINATIONAL) ? 0 : STAGES);

  // The first-order finishing step is exact to the last bit only if at least
  // half of the micro-rotations are carried out.
  if (STAGES < DW / 2 || STAGES > DW - 2) begin : g_bad_stages
    $error("gp_cordic: STAGES must lie in [DW/2, DW-2]");
  end

  logic en, take, gap_ok;
  logic [LATENCY-1:0] vld, lst;

  assign en            = m_axis_tready || !vld[LATENCY-1];
  assign s_axis_tready = en && gap_ok;
  assign take          = s_axis_tvalid && s_axis_tready;
  assign m_axis_tvalid = vld[LATENCY-1];
  assign m_axis_tlast  = lst[LATENCY-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vld <= '0;
      lst <= '0;
    end else if (en) begin
      vld <= {vld[LATENCY-2:0], take};
      lst <= {lst[LATENCY-2:0], take && s_axis_tlast};
    end
  end

  // iterated mode: after a beat is taken, refuse the next STAGES - 1 enabled cycles
  if (EVAL == ITERATED) begin : g_gap
    logic [$clog2(STAGES)-1:0] gap;
    always_ff @(posedge clk) begin
      if (!rst_n)  gap <= '0;
      else if (en) gap <= take ? ($bits(gap))'(STAGES - 1) : ((gap != 0) ? gap - 1'b1 : gap);
    end
    assign gap_ok = (gap == 0);
  end else begin : g_nogap
    assign gap_ok = 1'b1;
  end

  // ---- 1. float -> fixed -------------------------------------------------
  logic signed [31:0] qa, qb, qc, qs;

  float2fixed u_f2x_b (.clk(clk), .en(en),   .f_in(s_axis_tdata[31:0]),  .q_out(qb));
  float2fixed u_f2x_c (.clk(clk), .en(en),   .f_in(s_axis_tdata[63:32]), .q_out(qc));
  float2fixed u_f2x_a (.clk(clk), .en(1'b1), .f_in(input_a),             .q_out(qa));
  float2fixed u_f2x_s (.clk(clk), .en(1'b1), .f_in(scale),               .q_out(qs));

  // ---- 2. input MUX ------------------------------------------------------
  cvec_t vin;
  always_ff @(posedge clk) begin
    if (en) begin
      unique case (mapping_input)
        2'd1:    vin <= '{x: IW'(qb), y: IW'(qc), z: IW'(qa)};
        2'd2:    vin <= '{x: IW'(qc), y: IW'(qa), z: IW'(qb)};
        default: vin <= '{x: IW'(qa), y: IW'(qb), z: IW'(qc)};
      endcase
    end
  end

  // ---- 3. angle correction and micro-rotations ---------------------------
  cvec_t vq;
  if (EVAL != ITERATED) begin : g_pipe
    cordic_core #(.STAGES(STAGES), .MODE(MODE), .FUNC(FUNC), .EVAL(EVAL)) u_core (
      .clk(clk), .en(en), .v_in(vin), .v_out(vq)
    );
  end else begin : g_iter
    // vld[4] marks a beat in the angle-correction output register
    cvec_t corr;
    cordic_angle_corr #(.MODE(MODE), .FUNC(FUNC)) u_corr (
      .clk(clk), .en(en), .v_in(vin), .v_out(corr)
    );
    iterated_cordic #(.STAGES(STAGES), .MODE(MODE), .FUNC(FUNC)) u_iter (
      .clk(clk), .en(en), .load(vld[4]), .v_in(corr), .v_out(vq)
    );
  end

  // ---- 4. approximation of the remaining bits ----------------------------
  cvec_t vf;
  cordic_approx #(.MODE(MODE), .FUNC(FUNC), .AW(DW - STAGES), .RW(DW / 2)) u_approx (
    .clk(clk), .en(en), .v_in(vq), .v_out(vf)
  );

  // ---- 5. output MUX -----------------------------------------------------
  fx_t oa, ob;
  always_ff @(posedge clk) begin
    if (en) begin
      unique case (mapping_output)
        2'd1:    begin oa <= vf.y; ob <= vf.z; end
        2'd2:    begin oa <= vf.z; ob <= vf.x; end
        default: begin oa <= vf.x; ob <= vf.y; end
      endcase
    end
  end

  // ---- 6. scale-factor multiply -------------------------------------------
  fx_t sa, sb;
  logic signed [IW+31:0] pa, pb;
  assign pa = oa * qs;
  assign pb = ob * qs;
  always_ff @(posedge clk) begin
    if (en) begin
      sa <= mapping_scale[0] ? IW'(pa >>> FRAC) : oa;
      sb <= mapping_scale[1] ? IW'(pb >>> FRAC) : ob;
    end
  end

  // ---- 7. fixed -> float -------------------------------------------------
  fixed2float u_x2f_a (.clk(clk), .en(en), .q_in(sa), .f_out(m_axis_tdata[31:0]));
  fixed2float u_x2f_b (.clk(clk), .en(en), .q_in(sb), .f_out(m_axis_tdata[63:32]));

  // AXI-Stream rule: a beat that is offered stays offered, unchanged, until taken
  a_axis_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));

endmodule
