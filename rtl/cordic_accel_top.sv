// cordic_accel_top: the two general-purpose CORDIC accelerators side by side.
//
// The design comes in two cells whose approximation hardware differs:
//   rot_* : rotation-mode, circular CORDIC with two DSP multipliers in the
//           approximation step; computes sine and cosine (x,y,z = 1/K, 0, angle
//           gives cos and sin directly) and general vector rotations.
//   vec_* : vectoring-mode, linear CORDIC with the BRAM reciprocal table and one
//           DSP multiplier; computes z + y/x, i.e. division and multiplication
//           by a constant (the reciprocal of the constant operand).
// In the design each cell is built as its own bitstream; here both sit in one
// top, each with its own AXI4-Lite port (for the host's AUX register writes
// through the AXI interconnect) and its own 64-bit AXI-Stream pair (for the
// DMA's MM2S and S2MM channels). The processing system, DMA and interconnect
// are vendor blocks and are not part of this RTL; their signals are the ports.
//
// Timing: 28 cycles from an input beat to its result, one beat per cycle per
// accelerator. Single clock, synchronous active-low reset.
module cordic_accel_top
  import cordic_pkg::*;
#(
  parameter int NUM_CU = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // rotation-mode accelerator
  input  logic [4:0]  rot_axi_awaddr,
  input  logic        rot_axi_awvalid,
  output logic        rot_axi_awready,
  input  logic [31:0] rot_axi_wdata,
  input  logic [3:0]  rot_axi_wstrb,
  input  logic        rot_axi_wvalid,
  output logic        rot_axi_wready,
  output logic [1:0]  rot_axi_bresp,
  output logic        rot_axi_bvalid,
  input  logic        rot_axi_bready,
  input  logic [4:0]  rot_axi_araddr,
  input  logic        rot_axi_arvalid,
  output logic        rot_axi_arready,
  output logic [31:0] rot_axi_rdata,
  output logic [1:0]  rot_axi_rresp,
  output logic        rot_axi_rvalid,
  input  logic        rot_axi_rready,
  input  logic [63:0] rot_s_axis_tdata,
  input  logic        rot_s_axis_tvalid,
  output logic        rot_s_axis_tready,
  input  logic        rot_s_axis_tlast,
  output logic [63:0] rot_m_axis_tdata,
  output logic        rot_m_axis_tvalid,
  input  logic        rot_m_axis_tready,
  output logic        rot_m_axis_tlast,
  // vectoring-mode accelerator
  input  logic [4:0]  vec_axi_awaddr,
  input  logic        vec_axi_awvalid,
  output logic        vec_axi_awready,
  input  logic [31:0] vec_axi_wdata,
  input  logic [3:0]  vec_axi_wstrb,
  input  logic        vec_axi_wvalid,
  output logic        vec_axi_wready,
  output logic [1:0]  vec_axi_bresp,
  output logic        vec_axi_bvalid,
  input  logic        vec_axi_bready,
  input  logic [4:0]  vec_axi_araddr,
  input  logic        vec_axi_arvalid,
  output logic        vec_axi_arready,
  output logic [31:0] vec_axi_rdata,
  output logic [1:0]  vec_axi_rresp,
  output logic        vec_axi_rvalid,
  input  logic        vec_axi_rready,
  input  logic [63:0] vec_s_axis_tdata,
  input  logic        vec_s_axis_tvalid,
  output logic        vec_s_axis_tready,
  input  logic        vec_s_axis_tlast,
  output logic [63:0] vec_m_axis_tdata,
  output logic        vec_m_axis_tvalid,
  input  logic        vec_m_axis_tready,
  output logic        vec_m_axis_tlast
);

  gp_cordic_accel #(.MODE(ROTATION), .FUNC(CIRCULAR), .STAGES(16), .NUM_CU(NUM_CU)) u_rot (
    .clk, .rst_n,
    .s_axi_awaddr  (rot_axi_awaddr),
    .s_axi_awvalid (rot_axi_awvalid),
    .s_axi_awready (rot_axi_awready),
    .s_axi_wdata   (rot_axi_wdata),
    .s_axi_wstrb   (rot_axi_wstrb),
    .s_axi_wvalid  (rot_axi_wvalid),
    .s_axi_wready  (rot_axi_wready),
    .s_axi_bresp   (rot_axi_bresp),
    .s_axi_bvalid  (rot_axi_bvalid),
    .s_axi_bready  (rot_axi_bready),
    .s_axi_araddr  (rot_axi_araddr),
    .s_axi_arvalid (rot_axi_arvalid),
    .s_axi_arready (rot_axi_arready),
    .s_axi_rdata   (rot_axi_rdata),
    .s_axi_rresp   (rot_axi_rresp),
    .s_axi_rvalid  (rot_axi_rvalid),
    .s_axi_rready  (rot_axi_rready),
    .s_axis_tdata  (rot_s_axis_tdata),
    .s_axis_tvalid (rot_s_axis_tvalid),
    .s_axis_tready (rot_s_axis_tready),
    .s_axis_tlast  (rot_s_axis_tlast),
    .m_axis_tdata  (rot_m_axis_tdata),
    .m_axis_tvalid (rot_m_axis_tvalid),
    .m_axis_tready (rot_m_axis_tready),
    .m_axis_tlast  (rot_m_axis_tlast)
  );

  gp_cordic_accel #(.MODE(VECTOR), .FUNC(LINEAR), .STAGES(16), .NUM_CU(NUM_CU)) u_vec (
    .clk, .rst_n,
    .s_axi_awaddr  (vec_axi_awaddr),
    .s_axi_awvalid (vec_axi_awvalid),
    .s_axi_awready (vec_axi_awready),
    .s_axi_wdata   (vec_axi_wdata),
    .s_axi_wstrb   (vec_axi_wstrb),
    .s_axi_wvalid  (vec_axi_wvalid),
    .s_axi_wready  (vec_axi_wready),
    .s_axi_bresp   (vec_axi_bresp),
    .s_axi_bvalid  (vec_axi_bvalid),
    .s_axi_bready  (vec_axi_bready),
    .s_axi_araddr  (vec_axi_araddr),
    .s_axi_arvalid (vec_axi_arvalid),
    .s_axi_arready (vec_axi_arready),
    .s_axi_rdata   (vec_axi_rdata),
    .s_axi_rresp   (vec_axi_rresp),
    .s_axi_rvalid  (vec_axi_rvalid),
    .s_axi_rready  (vec_axi_rready),
    .s_axis_tdata  (vec_s_axis_tdata),
    .s_axis_tvalid (vec_s_axis_tvalid),
    .s_axis_tready (vec_s_axis_tready),
    .s_axis_tlast  (vec_s_axis_tlast),
    .m_axis_tdata  (vec_m_axis_tdata),
    .m_axis_tvalid (vec_m_axis_tvalid),
    .m_axis_tready (vec_m_axis_tready),
    .m_axis_tlast  (vec_m_axis_tlast)
  );

endmodule
