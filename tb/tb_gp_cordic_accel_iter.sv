// tb_gp_cordic_accel_iter: accelerators built from iterated cells. Each cell
// takes one beat per 16 cycles, and the round-robin scheduler spreads the
// stream over NUM_CU of them. With 16 cells the accelerator must take a beat
// every cycle; with 4 cells, beat i must be taken exactly at cycle
// 16*floor(i/4) + i%4. Both are configured over AXI4-Lite (the same writes go
// to both), stream random angles and must return cosine and sine in order. The
// 16-cell unit then runs a second pass with random gaps and back-pressure.
module tb_gp_cordic_accel_iter;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 400;
  localparam int NCU [2] = '{16, 4};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [4:0]  awaddr, araddr;
  logic        awvalid, wvalid, bready, arvalid, rready;
  logic        awready [2], wready [2], bvalid [2], arready [2], rvalid [2];
  logic [31:0] wdata, rdata [2];
  logic [3:0]  wstrb;
  logic [1:0]  bresp [2], rresp [2];
  logic [63:0] s_tdata [2], m_tdata [2];
  logic        s_tvalid [2], s_tready [2], s_tlast [2], m_tvalid [2], m_tready [2], m_tlast [2];

  for (genvar u = 0; u < 2; u++) begin : g_dut
    gp_cordic_accel #(.MODE(ROTATION), .FUNC(CIRCULAR), .NUM_CU(NCU[u]), .EVAL(ITERATED)) dut (
      .clk, .rst_n,
      .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready[u]),
      .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready[u]),
      .s_axi_bresp(bresp[u]), .s_axi_bvalid(bvalid[u]), .s_axi_bready(bready),
      .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready[u]),
      .s_axi_rdata(rdata[u]), .s_axi_rresp(rresp[u]), .s_axi_rvalid(rvalid[u]), .s_axi_rready(rready),
      .s_axis_tdata(s_tdata[u]), .s_axis_tvalid(s_tvalid[u]), .s_axis_tready(s_tready[u]), .s_axis_tlast(s_tlast[u]),
      .m_axis_tdata(m_tdata[u]), .m_axis_tvalid(m_tvalid[u]), .m_axis_tready(m_tready[u]), .m_axis_tlast(m_tlast[u]));
  end

  task automatic write(input logic [4:0] a, input logic [31:0] d);
    awaddr = a; wdata = d; wstrb = 4'hf; awvalid = 1; wvalid = 1; bready = 1;
    do @(negedge clk); while (!(awready[0] && wready[0] && awready[1] && wready[1]));
    @(posedge clk); #1;
    awvalid = 0; wvalid = 0;
    do @(negedge clk); while (!(bvalid[0] && bvalid[1]));
    @(posedge clk); #1;
    bready = 0;
  endtask

  real c_in [N];
  int  t_acc [2][N];

  // stream N angles into unit u; rnd = random gaps and back-pressure
  task automatic run(input int u, input bit rnd, input string tag);
    int iin, iout;
    bit in_fire, out_fire;
    iin = 0; iout = 0;
    while (iout < N) begin
      s_tvalid[u] = (iin < N) && (!rnd || $urandom_range(0, 4) != 0);
      s_tdata[u]  = {r2f(c_in[iin % N]), 32'h0};
      s_tlast[u]  = (iin == N - 1);
      m_tready[u] = !rnd || ($urandom_range(0, 4) != 0);
      @(negedge clk);
      in_fire  = s_tvalid[u] && s_tready[u];
      out_fire = m_tvalid[u] && m_tready[u];
      if (in_fire) t_acc[u][iin] = cyc;
      if (out_fire) begin
        checks++;
        if (absr(f2r(m_tdata[u][31:0]) - $cos(f2r(r2f(c_in[iout])))) > 3e-7 ||
            absr(f2r(m_tdata[u][63:32]) - $sin(f2r(r2f(c_in[iout])))) > 3e-7 ||
            m_tlast[u] != (iout == N - 1)) begin
          failures++;
          if (failures < 10) $display("%s %0d: got %g %g", tag, iout, f2r(m_tdata[u][31:0]), f2r(m_tdata[u][63:32]));
        end
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    s_tvalid[u] = 0;
  endtask

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0; wdata = 0; wstrb = 0;
    for (int u = 0; u < 2; u++) begin
      s_tvalid[u] = 0; m_tready[u] = 1; s_tdata[u] = 0; s_tlast[u] = 0;
    end
    for (int i = 0; i < N; i++) c_in[i] = urand_r(-1.99, 1.99);
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    write(5'h00, r2f(1.0 / cordic_gain(16)));
    fork
      run(0, 0, "16 cells");
      run(1, 0, "4 cells");
    join
    // acceptance times
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (t_acc[0][i] - t_acc[0][0] != i) failures++;
      if (t_acc[1][i] - t_acc[1][0] != 16 * (i / 4) + i % 4) begin
        failures++;
        if (failures < 10) $display("4 cells: beat %0d taken at +%0d", i, t_acc[1][i] - t_acc[1][0]);
      end
    end
    $display("16 cells: %0d beats in %0d cycles; 4 cells: %0d beats in %0d cycles",
             N, t_acc[0][N-1] - t_acc[0][0] + 1, N, t_acc[1][N-1] - t_acc[1][0] + 1);
    run(0, 1, "16 cells, random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
