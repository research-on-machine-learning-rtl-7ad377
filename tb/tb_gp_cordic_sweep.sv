// tb_gp_cordic_sweep: the approximated-bit-count trade-off. Builds the
// rotation/circular and vectoring/linear cells with 19 micro-rotations (13
// bits approximated, the point of even LUT/BRAM use) and with 30 (2 bits
// approximated), streams rotations and divisions at full rate and checks the
// results, latency 12 + STAGES and one beat per cycle for each build. The same
// two cells are also built with 16 combinational micro-rotations
// (EVAL = COMBINATIONAL), which must give the same accuracy at latency 12. In
// vectoring mode output a is the leftover y, which must be below 2^(3-STAGES).
module tb_gp_cordic_sweep;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [63:0] s_tdata;
  logic        s_tvalid;
  logic [31:0] a_rot, a_vec;
  logic [63:0] md [6];
  logic        mv [6], ml [6], sr [6];

  gp_cordic #(.MODE(ROTATION), .FUNC(CIRCULAR), .STAGES(19)) u_r19 (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[0]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[0]), .m_axis_tvalid(mv[0]), .m_axis_tready(1'b1), .m_axis_tlast(ml[0]),
    .input_a(a_rot), .scale(32'h3f80_0000), .mapping_input(2'd0), .mapping_output(2'd0), .mapping_scale(2'd0));
  gp_cordic #(.MODE(ROTATION), .FUNC(CIRCULAR), .STAGES(30)) u_r30 (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[1]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[1]), .m_axis_tvalid(mv[1]), .m_axis_tready(1'b1), .m_axis_tlast(ml[1]),
    .input_a(a_rot), .scale(32'h3f80_0000), .mapping_input(2'd0), .mapping_output(2'd0), .mapping_scale(2'd0));
  gp_cordic #(.MODE(VECTOR), .FUNC(LINEAR), .STAGES(19)) u_v19 (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[2]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[2]), .m_axis_tvalid(mv[2]), .m_axis_tready(1'b1), .m_axis_tlast(ml[2]),
    .input_a(a_vec), .scale(32'h3f80_0000), .mapping_input(2'd1), .mapping_output(2'd1), .mapping_scale(2'd0));
  gp_cordic #(.MODE(VECTOR), .FUNC(LINEAR), .STAGES(30)) u_v30 (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[3]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[3]), .m_axis_tvalid(mv[3]), .m_axis_tready(1'b1), .m_axis_tlast(ml[3]),
    .input_a(a_vec), .scale(32'h3f80_0000), .mapping_input(2'd1), .mapping_output(2'd1), .mapping_scale(2'd0));

  gp_cordic #(.MODE(ROTATION), .FUNC(CIRCULAR), .STAGES(16), .EVAL(COMBINATIONAL)) u_rc (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[4]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[4]), .m_axis_tvalid(mv[4]), .m_axis_tready(1'b1), .m_axis_tlast(ml[4]),
    .input_a(a_rot), .scale(32'h3f80_0000), .mapping_input(2'd0), .mapping_output(2'd0), .mapping_scale(2'd0));
  gp_cordic #(.MODE(VECTOR), .FUNC(LINEAR), .STAGES(16), .EVAL(COMBINATIONAL)) u_vc (.clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[5]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[5]), .m_axis_tvalid(mv[5]), .m_axis_tready(1'b1), .m_axis_tlast(ml[5]),
    .input_a(a_vec), .scale(32'h3f80_0000), .mapping_input(2'd1), .mapping_output(2'd1), .mapping_scale(2'd0));

  localparam int NU = 6;
  localparam int ST [NU]  = '{19, 30, 19, 30, 16, 16};
  localparam int LAT [NU] = '{31, 42, 31, 42, 12, 12};
  localparam bit ROT [NU] = '{1, 1, 0, 0, 1, 0};
  real bi [N], ci [N];
  int  t_in0, t_out0 [NU], t_outl [NU], nout [NU];

  always @(negedge clk) begin
    for (int u = 0; u < NU; u++) if (mv[u] && rst_n) begin
      real ga, gb, e_a, e_b, k;
      ga = f2r(md[u][31:0]); gb = f2r(md[u][63:32]);
      if (nout[u] == 0) t_out0[u] = cyc;
      t_outl[u] = cyc;
      if (ROT[u]) begin
        k = cordic_gain(ST[u]);
        e_a = k * (f2r(a_rot) * $cos(f2r(r2f(ci[nout[u]]))) - f2r(r2f(bi[nout[u]])) * $sin(f2r(r2f(ci[nout[u]]))));
        e_b = k * (f2r(a_rot) * $sin(f2r(r2f(ci[nout[u]]))) + f2r(r2f(bi[nout[u]])) * $cos(f2r(r2f(ci[nout[u]]))));
      end else begin
        e_a = 0.0;
        e_b = f2r(r2f(ci[nout[u]])) / f2r(r2f(bi[nout[u]]));
      end
      checks++;
      if (absr(gb - e_b) > 5e-7 * ((absr(e_b) > 1.0) ? absr(e_b) : 1.0) || absr(ga - e_a) > (ROT[u] ? 5e-7 : 2.0 ** (-ST[u] + 3))) begin
        failures++;
        if (failures < 10) $display("unit %0d beat %0d: got %g %g exp %g %g", u, nout[u], ga, gb, e_a, e_b);
      end
      nout[u]++;
    end
  end

  initial begin
    real r;
    a_rot = r2f(1.0 / cordic_gain(32)); a_vec = 32'h0;
    s_tvalid = 0; s_tdata = '0;
    for (int u = 0; u < NU; u++) nout[u] = 0;
    for (int i = 0; i < N; i++) begin
      r = urand_r(0.125, 1.0);
      bi[i] = ($urandom_range(0, 1) != 0) ? r : -r;
      ci[i] = r * urand_r(-1.9, 1.9);
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      s_tvalid = 1;
      s_tdata  = {r2f(ci[i]), r2f(bi[i])};
      if (i == 0) t_in0 = cyc;
      @(posedge clk); #1;
    end
    s_tvalid = 0;
    repeat (60) @(posedge clk);
    for (int u = 0; u < NU; u++) begin
      checks += 3;
      if (nout[u] != N) failures++;
      if (t_out0[u] - t_in0 != LAT[u]) begin failures++; $display("unit %0d latency %0d", u, t_out0[u] - t_in0); end
      if (t_outl[u] - t_out0[u] != N - 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
