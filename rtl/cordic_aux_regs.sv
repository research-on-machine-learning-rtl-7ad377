// cordic_aux_regs: AXI4-Lite slave holding the CORDIC auxiliary registers.
//
// The host sets the constant operand a, the scale factor and the three MUX
// selections here before it streams data (the design loads control signals
// and the constant a over AXI-Lite). Register map (this implementation's
// choice; byte addresses, 32-bit registers, all readable):
//   0x00 input_a        float32, constant operand a          reset 0.0
//   0x04 scale_factor   float32, output scale factor          reset 1.0
//   0x08 mapping_input  [1:0], input MUX selection            reset 0
//   0x0C mapping_output [1:0], output MUX selection           reset 0
//   0x10 mapping_scale  [1:0], outputs to scale (bit0 a, bit1 b) reset 0
// Other addresses read as 0 and ignore writes; responses are always OKAY.
//
// Handshake: a write is taken in the cycle both AW and W are valid and no
// write response is pending (awready = wready = that condition); the response
// follows the next cycle. A read is taken when no read data is pending and
// answered the next cycle. Reset is synchronous, active low.
module cordic_aux_regs (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
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
  // register outputs
  output logic [31:0] input_a,
  output logic [31:0] scale_factor,
  output logic [1:0]  mapping_input,
  output logic [1:0]  mapping_output,
  output logic [1:0]  mapping_scale
);

  typedef enum logic [2:0] {
    R_INPUT_A   = 3'd0,
    R_SCALE     = 3'd1,
    R_MAP_IN    = 3'd2,
    R_MAP_OUT   = 3'd3,
    R_MAP_SCALE = 3'd4
  } reg_e;

  logic wr_go, rd_go;
  assign wr_go         = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_go;
  assign s_axi_wready  = wr_go;
  assign rd_go         = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;

  // byte-lane merge of a write into a 32-bit register
  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] d,
                                        input logic [3:0] strb);
    for (int i = 0; i < 4; i++)
      if (strb[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      input_a        <= 32'h0000_0000;
      scale_factor   <= 32'h3f80_0000;   // 1.0
      mapping_input  <= 2'd0;
      mapping_output <= 2'd0;
      mapping_scale  <= 2'd0;
      s_axi_bvalid   <= 1'b0;
    end else begin
      if (wr_go) begin
        unique case (reg_e'(s_axi_awaddr[4:2]))
          R_INPUT_A:   input_a      <= merge(input_a, s_axi_wdata, s_axi_wstrb);
          R_SCALE:     scale_factor <= merge(scale_factor, s_axi_wdata, s_axi_wstrb);
          R_MAP_IN:    if (s_axi_wstrb[0]) mapping_input  <= s_axi_wdata[1:0];
          R_MAP_OUT:   if (s_axi_wstrb[0]) mapping_output <= s_axi_wdata[1:0];
          R_MAP_SCALE: if (s_axi_wstrb[0]) mapping_scale  <= s_axi_wdata[1:0];
          default: ;
        endcase
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_go) begin
      s_axi_rvalid <= 1'b1;
      unique case (reg_e'(s_axi_araddr[4:2]))
        R_INPUT_A:   s_axi_rdata <= input_a;
        R_SCALE:     s_axi_rdata <= scale_factor;
        R_MAP_IN:    s_axi_rdata <= {30'd0, mapping_input};
        R_MAP_OUT:   s_axi_rdata <= {30'd0, mapping_output};
        R_MAP_SCALE: s_axi_rdata <= {30'd0, mapping_scale};
        default:     s_axi_rdata <= '0;
      endcase
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rule: a response, once offered, stays until accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
