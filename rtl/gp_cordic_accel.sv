// gp_cordic_accel: programmable-logic side of one CORDIC accelerator.
//
// Puts together what sits between the host's DMA/interconnect and the
// arithmetic: the AXI-Lite AUX register slave (constant a, scale factor, MUX
// selections), a round-robin scheduler and NUM_CU general-purpose CORDIC
// cells of one kind (MODE, FUNC). All cells share the AUX registers. The DMA
// streams 64-bit beats (two float operands) in through s_axis_* and takes the
// two float results back from m_axis_*, in the same order.
//
// Timing: each beat spends gp_cordic's 28-cycle latency inside; the stream
// runs at one beat per cycle with pipelined cells, or NUM_CU beats per STAGES
// cycles with iterated cells (EVAL = ITERATED). Configuration changes apply to beats that reach
// the input MUX after the register write (plus three cycles of conversion for
// the float constants), so the host writes the AUX registers before streaming.
module gp_cordic_accel
  import cordic_pkg::*;
#(
  parameter cordic_mode_e MODE   = ROTATION,
  parameter cordic_func_e FUNC   = CIRCULAR,
  parameter int           STAGES = 16,
  parameter int           NUM_CU = 1,
  parameter cordic_eval_e EVAL   = PIPELINED
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave: AUX registers
  input  logic [4:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [4:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // AXI-Stream slave (from DMA MM2S)
  input  logic [63:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // AXI-Stream master (to DMA S2MM)
  output logic [63:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast
);

  logic [31:0] input_a, scale_factor;
  logic [1:0]  mapping_input, mapping_output, mapping_scale;

  cordic_aux_regs u_aux (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .input_a, .scale_factor, .mapping_input, .mapping_output, .mapping_scale
  );

  logic [63:0] cu_s_tdata  [NUM_CU];
  logic        cu_s_tvalid [NUM_CU];
  logic        cu_s_tready [NUM_CU];
  logic        cu_s_tlast  [NUM_CU];
  logic [63:0] cu_m_tdata  [NUM_CU];
  logic        cu_m_tvalid [NUM_CU];
  logic        cu_m_tready [NUM_CU];
  logic        cu_m_tlast  [NUM_CU];

  axis_rr_sched #(.NUM_CU(NUM_CU), .DATA_W(64)) u_sched (
    .clk, .rst_n,
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .cu_s_tdata, .cu_s_tvalid, .cu_s_tready, .cu_s_tlast,
    .cu_m_tdata, .cu_m_tvalid, .cu_m_tready, .cu_m_tlast
  );

  for (genvar k = 0; k < NUM_CU; k++) begin : g_cu
    gp_cordic #(.MODE(MODE), .FUNC(FUNC), .STAGES(STAGES), .EVAL(EVAL)) u_cu (
      .clk, .rst_n,
      .s_axis_tdata  (cu_s_tdata[k]),
      .s_axis_tvalid (cu_s_tvalid[k]),
      .s_axis_tready (cu_s_tready[k]),
      .s_axis_tlast  (cu_s_tlast[k]),
      .m_axis_tdata  (cu_m_tdata[k]),
      .m_axis_tvalid (cu_m_tvalid[k]),
      .m_axis_tready (cu_m_tready[k]),
      .m_axis_tlast  (cu_m_tlast[k]),
      .input_a, .scale(scale_factor),
      .mapping_input, .mapping_output, .mapping_scale
    );
  end

endmodule
