// tb_gp_cordic_accel: one rotation-mode accelerator with three compute units.
// Configures it over AXI4-Lite like the host would, then streams random angles
// with random gaps and back-pressure and checks cosine/sine results in order;
// reconfigures it to rotate streamed vectors by a constant angle with the
// scale-factor correction and checks again. Also checks that the round-robin
// scheduler used all three units and that read-back of the registers works.
module tb_gp_cordic_accel;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int NCU = 3, N = 300;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0]  awaddr, araddr;
  logic        awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;
  logic [63:0] s_tdata, m_tdata;
  logic        s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;

  gp_cordic_accel #(.MODE(ROTATION), .FUNC(CIRCULAR), .NUM_CU(NCU)) dut (
    .clk, .rst_n,
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  int used [NCU];
  for (genvar k = 0; k < NCU; k++) begin : g_mon
    always @(posedge clk) if (dut.cu_s_tvalid[k] && dut.cu_s_tready[k]) used[k]++;
  end

  task automatic write(input logic [4:0] a, input logic [31:0] d);
    awaddr = a; wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1; bready = 1;
    do @(negedge clk); while (!(awready && wready));
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0;
    do @(negedge clk); while (!bvalid);
    @(posedge clk); #1;
    bready = 0;
  endtask

  task automatic read(input logic [4:0] a, output logic [31:0] d);
    araddr = a; arvalid = 1; rready = 1;
    do @(negedge clk); while (!arready);
    @(posedge clk); #1;
    arvalid = 0;
    do @(negedge clk); while (!rvalid);
    d = rdata;
    @(posedge clk); #1;
    rready = 0;
  endtask

  real b_in [N], c_in [N], ea [N], eb [N];

  task automatic run(input string tag);
    int iin, iout;
    bit in_fire, out_fire;
    iin = 0; iout = 0;
    while (iout < N) begin
      s_tvalid = (iin < N) && ($urandom_range(0, 4) != 0);
      s_tdata  = {r2f(c_in[iin % N]), r2f(b_in[iin % N])};
      s_tlast  = (iin == N - 1);
      m_tready = ($urandom_range(0, 4) != 0);
      @(negedge clk);
      in_fire  = s_tvalid && s_tready;
      out_fire = m_tvalid && m_tready;
      if (out_fire) begin
        checks++;
        if (absr(f2r(m_tdata[31:0]) - ea[iout]) > 4e-7 || absr(f2r(m_tdata[63:32]) - eb[iout]) > 4e-7 ||
            m_tlast != (iout == N - 1)) begin
          failures++;
          if (failures < 10) $display("%s %0d: got %g %g exp %g %g", tag, iout, f2r(m_tdata[31:0]), f2r(m_tdata[63:32]), ea[iout], eb[iout]);
        end
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    s_tvalid = 0;
  endtask

  initial begin
    real k, ca, sa;
    logic [31:0] d;
    k = cordic_gain(16);
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    s_tvalid = 0; m_tready = 1; s_tdata = 0; s_tlast = 0;
    for (int i = 0; i < NCU; i++) used[i] = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    // sine and cosine: x = a = 1/K, y = b = 0, z = c = angle
    write(5'h00, r2f(1.0 / k));
    write(5'h08, 32'd0); write(5'h0c, 32'd0); write(5'h10, 32'd0);
    read(5'h00, d); checks++; if (d != r2f(1.0 / k)) failures++;
    for (int i = 0; i < N; i++) begin
      b_in[i] = 0.0; c_in[i] = urand_r(-1.99, 1.99);
      ea[i] = $cos(c_in[i]); eb[i] = $sin(c_in[i]);
    end
    run("sincos");
    // rotation of streamed vectors by 0.5 rad with the 1/K scale stage
    write(5'h00, r2f(0.5)); write(5'h04, r2f(1.0 / k));
    write(5'h08, 32'd1); write(5'h10, 32'd3);
    ca = $cos(f2r(r2f(0.5))); sa = $sin(f2r(r2f(0.5)));
    for (int i = 0; i < N; i++) begin
      b_in[i] = urand_r(-1.0, 1.0); c_in[i] = urand_r(-1.0, 1.0);
      ea[i] = f2r(r2f(b_in[i])) * ca - f2r(r2f(c_in[i])) * sa;
      eb[i] = f2r(r2f(b_in[i])) * sa + f2r(r2f(c_in[i])) * ca;
    end
    run("rotate");
    for (int i = 0; i < NCU; i++) begin
      checks++;
      if (used[i] != 2 * N / NCU) begin failures++; $display("unit %0d took %0d beats", i, used[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
