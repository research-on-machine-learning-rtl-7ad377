// tb_gp_cordic_hyperbolic: the hyperbolic functional mode in complete cells.
// A rotation/hyperbolic cell gets a = 1/Kh16 as its constant and streams
// (b, t): it must return Kh16*(a cosh t + b sinh t) and Kh16*(a sinh t + b cosh t),
// i.e. cosh t and sinh t when b = 0, and e^t when b = a. A vectoring/hyperbolic
// cell, routed as x = b, y = c, z = a = 0 with outputs (y, z), must return
// atanh(c / b) for |c / b| < 0.8, with b of either sign. Both run at one beat
// per cycle; the test also checks the 28-cycle latency and the beat count.
module tb_gp_cordic_hyperbolic;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 1000, LAT = 28;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [63:0] s_tdata [2];
  logic        s_tvalid;
  logic [31:0] a_cfg [2];
  logic [63:0] md [2];
  logic        mv [2], ml [2], sr [2];

  gp_cordic #(.MODE(ROTATION), .FUNC(HYPERBOLIC)) u_rot (.clk, .rst_n,
    .s_axis_tdata(s_tdata[0]), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[0]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[0]), .m_axis_tvalid(mv[0]), .m_axis_tready(1'b1), .m_axis_tlast(ml[0]),
    .input_a(a_cfg[0]), .scale(32'h3f80_0000), .mapping_input(2'd0), .mapping_output(2'd0), .mapping_scale(2'd0));
  gp_cordic #(.MODE(VECTOR), .FUNC(HYPERBOLIC)) u_vec (.clk, .rst_n,
    .s_axis_tdata(s_tdata[1]), .s_axis_tvalid(s_tvalid), .s_axis_tready(sr[1]), .s_axis_tlast(1'b0),
    .m_axis_tdata(md[1]), .m_axis_tvalid(mv[1]), .m_axis_tready(1'b1), .m_axis_tlast(ml[1]),
    .input_a(a_cfg[1]), .scale(32'h3f80_0000), .mapping_input(2'd1), .mapping_output(2'd1), .mapping_scale(2'd0));

  real bi [2][N], ci [2][N];
  int  t_in0, t_out0 [2], t_outl [2], nout [2];
  int  n_cosh, n_exp, n_neg;

  function automatic real atanh_r(input real t);
    return 0.5 * $ln((1.0 + t) / (1.0 - t));
  endfunction

  always @(negedge clk) begin
    for (int u = 0; u < 2; u++) if (mv[u] && rst_n) begin
      real ga, gb, e_a, e_b, a, b, c, kh;
      ga = f2r(md[u][31:0]); gb = f2r(md[u][63:32]);
      a = f2r(a_cfg[u]); b = f2r(r2f(bi[u][nout[u]])); c = f2r(r2f(ci[u][nout[u]]));
      if (nout[u] == 0) t_out0[u] = cyc;
      t_outl[u] = cyc;
      if (u == 0) begin
        kh  = hyp_gain(16);
        e_a = kh * (a * $cosh(c) + b * $sinh(c));
        e_b = kh * (a * $sinh(c) + b * $cosh(c));
        checks++;
        if (absr(ga - e_a) > 5e-7 || absr(gb - e_b) > 5e-7) begin
          failures++;
          if (failures < 10) $display("rot beat %0d t=%g: got %g %g exp %g %g", nout[u], c, ga, gb, e_a, e_b);
        end
      end else begin
        e_b = atanh_r(c / b);
        checks++;
        if (absr(gb - e_b) > 5e-7 || absr(ga) > 2e-4) begin
          failures++;
          if (failures < 10) $display("vec beat %0d c/b=%g: got %g %g exp %g", nout[u], c / b, ga, gb, e_b);
        end
      end
      nout[u]++;
    end
  end

  initial begin
    real r, kh;
    kh = hyp_gain(16);
    a_cfg[0] = r2f(1.0 / kh); a_cfg[1] = 32'h0;
    s_tvalid = 0; s_tdata[0] = '0; s_tdata[1] = '0;
    n_cosh = 0; n_exp = 0; n_neg = 0;
    for (int u = 0; u < 2; u++) nout[u] = 0;
    for (int i = 0; i < N; i++) begin
      ci[0][i] = urand_r(-1.1, 1.1);
      case (i % 3)
        0: begin bi[0][i] = 0.0; n_cosh++; end                       // cosh, sinh
        1: begin bi[0][i] = f2r(a_cfg[0]); n_exp++; end               // e^t twice
        default: bi[0][i] = urand_r(-0.4, 0.4);
      endcase
      r = urand_r(0.25, 1.0);
      bi[1][i] = ($urandom_range(0, 1) != 0) ? r : -r;
      if (bi[1][i] < 0.0) n_neg++;
      ci[1][i] = r * urand_r(-0.8, 0.8);
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) begin
      s_tvalid = 1;
      s_tdata[0] = {r2f(ci[0][i]), r2f(bi[0][i])};
      s_tdata[1] = {r2f(ci[1][i]), r2f(bi[1][i])};
      if (i == 0) t_in0 = cyc;
      @(posedge clk); #1;
    end
    s_tvalid = 0;
    repeat (LAT + 10) @(posedge clk);
    for (int u = 0; u < 2; u++) begin
      checks += 3;
      if (nout[u] != N) failures++;
      if (t_out0[u] - t_in0 != LAT) begin failures++; $display("unit %0d latency %0d", u, t_out0[u] - t_in0); end
      if (t_outl[u] - t_out0[u] != N - 1) failures++;
    end
    checks++;
    if (n_cosh == 0 || n_exp == 0 || n_neg == 0) failures++;
    $display("cosh/sinh %0d  exp %0d  negative divisors %0d", n_cosh, n_exp, n_neg);
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
