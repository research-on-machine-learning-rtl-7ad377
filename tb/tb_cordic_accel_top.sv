// tb_cordic_accel_top: end-to-end run of the whole design at its default size.
//
// Plays the host and the DMA for both accelerators at once: writes the AUX
// registers over AXI4-Lite, then streams the benchmark operations of the
// design on random arrays and checks every result in order:
//   rotation accelerator: sine and cosine (full rate, then with random
//     back-pressure and angles beyond pi/2 that need the angle correction),
//     rotation of streamed vectors by a constant angle with the scale stage,
//     and a third input/output mapping;
//   vectoring accelerator: division of two streams (divisors of either sign,
//     exercising the sign correction), multiplication by a constant (a = 1/m),
//     and constant/stream division with output scaling.
// It measures latency (28 cycles) and throughput (one 64-bit beat per cycle,
// i.e. 800 MB/s at 100 MHz), reports the mean squared error of sine, cosine,
// multiplication and division, and counts how often each mechanism occurred
// (back-pressure stall, angle correction, sign correction, scale stage, each
// MUX mapping, tlast, register writes); one that never occurred is a failure.
module tb_cordic_accel_top;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 28, NBUF = 4096;
  localparam real PI = 3.14159265358979323846;
  // beats per batch: 262144 beats of 8 bytes = 2 MiB, the buffer size at which
  // the DMA transfers of the design reach full throughput
  int N = 262144;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // statistics: 0 sin, 1 cos, 2 mul, 3 div
  real sq_err [4];
  int  n_err [4];
  int  cfg_writes = 0, n_last = 0, n_angle_corr = 0, n_sign_corr = 0, n_scaled = 0;
  int  map_in_used [3], map_out_used [3];

  logic [4:0]  rot_awaddr, rot_araddr;
  logic        rot_awvalid, rot_awready, rot_wvalid, rot_wready, rot_bvalid, rot_bready, rot_arvalid, rot_arready, rot_rvalid, rot_rready;
  logic [31:0] rot_wdata, rot_rdata;
  logic [3:0]  rot_wstrb;
  logic [1:0]  rot_bresp, rot_rresp;
  logic [63:0] rot_s_tdata, rot_m_tdata;
  logic        rot_s_tvalid, rot_s_tready, rot_s_tlast, rot_m_tvalid, rot_m_tready, rot_m_tlast;
  real rot_b [NBUF], rot_c [NBUF], rot_ea [NBUF], rot_eb [NBUF], rot_ta [NBUF], rot_tb [NBUF];
  int  n_stall_rot;

  logic [4:0]  vec_awaddr, vec_araddr;
  logic        vec_awvalid, vec_awready, vec_wvalid, vec_wready, vec_bvalid, vec_bready, vec_arvalid, vec_arready, vec_rvalid, vec_rready;
  logic [31:0] vec_wdata, vec_rdata;
  logic [3:0]  vec_wstrb;
  logic [1:0]  vec_bresp, vec_rresp;
  logic [63:0] vec_s_tdata, vec_m_tdata;
  logic        vec_s_tvalid, vec_s_tready, vec_s_tlast, vec_m_tvalid, vec_m_tready, vec_m_tlast;
  real vec_b [NBUF], vec_c [NBUF], vec_ea [NBUF], vec_eb [NBUF], vec_ta [NBUF], vec_tb [NBUF];
  int  n_stall_vec;

  cordic_accel_top dut (
    .clk, .rst_n,
    .rot_axi_awaddr(rot_awaddr), .rot_axi_awvalid(rot_awvalid), .rot_axi_awready(rot_awready),
    .rot_axi_wdata(rot_wdata), .rot_axi_wstrb(rot_wstrb), .rot_axi_wvalid(rot_wvalid), .rot_axi_wready(rot_wready),
    .rot_axi_bresp(rot_bresp), .rot_axi_bvalid(rot_bvalid), .rot_axi_bready(rot_bready),
    .rot_axi_araddr(rot_araddr), .rot_axi_arvalid(rot_arvalid), .rot_axi_arready(rot_arready),
    .rot_axi_rdata(rot_rdata), .rot_axi_rresp(rot_rresp), .rot_axi_rvalid(rot_rvalid), .rot_axi_rready(rot_rready),
    .rot_s_axis_tdata(rot_s_tdata), .rot_s_axis_tvalid(rot_s_tvalid), .rot_s_axis_tready(rot_s_tready), .rot_s_axis_tlast(rot_s_tlast),
    .rot_m_axis_tdata(rot_m_tdata), .rot_m_axis_tvalid(rot_m_tvalid), .rot_m_axis_tready(rot_m_tready), .rot_m_axis_tlast(rot_m_tlast),
    .vec_axi_awaddr(vec_awaddr), .vec_axi_awvalid(vec_awvalid), .vec_axi_awready(vec_awready),
    .vec_axi_wdata(vec_wdata), .vec_axi_wstrb(vec_wstrb), .vec_axi_wvalid(vec_wvalid), .vec_axi_wready(vec_wready),
    .vec_axi_bresp(vec_bresp), .vec_axi_bvalid(vec_bvalid), .vec_axi_bready(vec_bready),
    .vec_axi_araddr(vec_araddr), .vec_axi_arvalid(vec_arvalid), .vec_axi_arready(vec_arready),
    .vec_axi_rdata(vec_rdata), .vec_axi_rresp(vec_rresp), .vec_axi_rvalid(vec_rvalid), .vec_axi_rready(vec_rready),
    .vec_s_axis_tdata(vec_s_tdata), .vec_s_axis_tvalid(vec_s_tvalid), .vec_s_axis_tready(vec_s_tready), .vec_s_axis_tlast(vec_s_tlast),
    .vec_m_axis_tdata(vec_m_tdata), .vec_m_axis_tvalid(vec_m_tvalid), .vec_m_axis_tready(vec_m_tready), .vec_m_axis_tlast(vec_m_tlast)
  );

  task automatic rot_write(input logic [4:0] a, input logic [31:0] d);
    rot_awaddr = a; rot_wdata = d; rot_wstrb = 4'hf; rot_awvalid = 1; rot_wvalid = 1; rot_bready = 1;
    do @(negedge clk); while (!(rot_awready && rot_wready));
    @(posedge clk); #1;
    rot_awvalid = 0; rot_wvalid = 0;
    do @(negedge clk); while (!rot_bvalid);
    @(posedge clk); #1;
    rot_bready = 0;
    cfg_writes++;
  endtask

  // stream n beats from rot_b/rot_c, compare with rot_ea/rot_eb; full_rate: no gaps, no back-pressure
  task automatic rot_run(input int n, input bit full_rate, input int op_a, input int op_b, input string tag);
    int iin, iout, t_in0, t_out0, t_outl;
    bit in_fire, out_fire;
    real ga, gb;
    iin = 0; iout = 0; t_in0 = -1; t_out0 = -1; t_outl = -1;
    while (iout < n) begin
      rot_s_tvalid = (iin < n) && (full_rate || ($urandom_range(0, 3) != 0));
      rot_s_tdata  = {r2f(rot_c[iin % NBUF]), r2f(rot_b[iin % NBUF])};
      rot_s_tlast  = (iin == n - 1);
      rot_m_tready = full_rate || ($urandom_range(0, 3) != 0);
      @(negedge clk);
      in_fire  = rot_s_tvalid && rot_s_tready;
      out_fire = rot_m_tvalid && rot_m_tready;
      if (rot_m_tvalid && !rot_m_tready) n_stall_rot++;
      if (in_fire && iin == 0) t_in0 = cyc;
      if (out_fire) begin
        if (iout == 0) t_out0 = cyc;
        t_outl = cyc;
        ga = f2r(rot_m_tdata[31:0]); gb = f2r(rot_m_tdata[63:32]);
        checks++;
        if (absr(ga - rot_ea[iout % NBUF]) > rot_ta[iout % NBUF] || absr(gb - rot_eb[iout % NBUF]) > rot_tb[iout % NBUF] ||
            rot_m_tlast != (iout == n - 1)) begin
          failures++;
          if (failures < 12) $display("%s beat %0d: got %g %g exp %g %g", tag, iout, ga, gb, rot_ea[iout % NBUF], rot_eb[iout % NBUF]);
        end
        if (op_a >= 0) begin sq_err[op_a] += (ga - rot_ea[iout % NBUF]) ** 2; n_err[op_a]++; end
        if (op_b >= 0) begin sq_err[op_b] += (gb - rot_eb[iout % NBUF]) ** 2; n_err[op_b]++; end
        if (rot_m_tlast) n_last++;
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    rot_s_tvalid = 0;
    if (full_rate) begin
      checks += 2;
      if (t_out0 - t_in0 != LAT) begin failures++; $display("%s latency %0d", tag, t_out0 - t_in0); end
      if (t_outl - t_out0 != n - 1) begin failures++; $display("%s: %0d beats took %0d cycles", tag, n, t_outl - t_out0 + 1); end
      else $display("%s: %0d beats in %0d cycles, %0.1f MB/s at 100 MHz", tag, n, t_outl - t_out0 + 1,
                    8.0 * n / (t_outl - t_out0 + 1) * 100.0);
    end
  endtask


  task automatic vec_write(input logic [4:0] a, input logic [31:0] d);
    vec_awaddr = a; vec_wdata = d; vec_wstrb = 4'hf; vec_awvalid = 1; vec_wvalid = 1; vec_bready = 1;
    do @(negedge clk); while (!(vec_awready && vec_wready));
    @(posedge clk); #1;
    vec_awvalid = 0; vec_wvalid = 0;
    do @(negedge clk); while (!vec_bvalid);
    @(posedge clk); #1;
    vec_bready = 0;
    cfg_writes++;
  endtask

  // stream n beats from vec_b/vec_c, compare with vec_ea/vec_eb; full_rate: no gaps, no back-pressure
  task automatic vec_run(input int n, input bit full_rate, input int op_a, input int op_b, input string tag);
    int iin, iout, t_in0, t_out0, t_outl;
    bit in_fire, out_fire;
    real ga, gb;
    iin = 0; iout = 0; t_in0 = -1; t_out0 = -1; t_outl = -1;
    while (iout < n) begin
      vec_s_tvalid = (iin < n) && (full_rate || ($urandom_range(0, 3) != 0));
      vec_s_tdata  = {r2f(vec_c[iin % NBUF]), r2f(vec_b[iin % NBUF])};
      vec_s_tlast  = (iin == n - 1);
      vec_m_tready = full_rate || ($urandom_range(0, 3) != 0);
      @(negedge clk);
      in_fire  = vec_s_tvalid && vec_s_tready;
      out_fire = vec_m_tvalid && vec_m_tready;
      if (vec_m_tvalid && !vec_m_tready) n_stall_vec++;
      if (in_fire && iin == 0) t_in0 = cyc;
      if (out_fire) begin
        if (iout == 0) t_out0 = cyc;
        t_outl = cyc;
        ga = f2r(vec_m_tdata[31:0]); gb = f2r(vec_m_tdata[63:32]);
        checks++;
        if (absr(ga - vec_ea[iout % NBUF]) > vec_ta[iout % NBUF] || absr(gb - vec_eb[iout % NBUF]) > vec_tb[iout % NBUF] ||
            vec_m_tlast != (iout == n - 1)) begin
          failures++;
          if (failures < 12) $display("%s beat %0d: got %g %g exp %g %g", tag, iout, ga, gb, vec_ea[iout % NBUF], vec_eb[iout % NBUF]);
        end
        if (op_a >= 0) begin sq_err[op_a] += (ga - vec_ea[iout % NBUF]) ** 2; n_err[op_a]++; end
        if (op_b >= 0) begin sq_err[op_b] += (gb - vec_eb[iout % NBUF]) ** 2; n_err[op_b]++; end
        if (vec_m_tlast) n_last++;
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    vec_s_tvalid = 0;
    if (full_rate) begin
      checks += 2;
      if (t_out0 - t_in0 != LAT) begin failures++; $display("%s latency %0d", tag, t_out0 - t_in0); end
      if (t_outl - t_out0 != n - 1) begin failures++; $display("%s: %0d beats took %0d cycles", tag, n, t_outl - t_out0 + 1); end
      else $display("%s: %0d beats in %0d cycles, %0.1f MB/s at 100 MHz", tag, n, t_outl - t_out0 + 1,
                    8.0 * n / (t_outl - t_out0 + 1) * 100.0);
    end
  endtask

  function automatic real q(input real r);   // value as the float stream carries it
    return f2r(r2f(r));
  endfunction

  function automatic real tol(input real v);
    return 3e-7 * ((absr(v) > 1.0) ? absr(v) : 1.0);
  endfunction

  task automatic cfg_rot(input real a, input real s, input int mi, input int mo, input int ms);
    rot_write(5'h00, r2f(a)); rot_write(5'h04, r2f(s));
    rot_write(5'h08, 32'(mi)); rot_write(5'h0c, 32'(mo)); rot_write(5'h10, 32'(ms));
    map_in_used[mi]++; map_out_used[mo]++;
  endtask

  task automatic cfg_vec(input real a, input real s, input int mi, input int mo, input int ms);
    vec_write(5'h00, r2f(a)); vec_write(5'h04, r2f(s));
    vec_write(5'h08, 32'(mi)); vec_write(5'h0c, 32'(mo)); vec_write(5'h10, 32'(ms));
    map_in_used[mi]++; map_out_used[mo]++;
  endtask

  task automatic rotation_side();
    real k, ca, sa;
    k = cordic_gain(16);
    // sine / cosine at full rate
    cfg_rot(1.0 / k, 1.0, 0, 0, 0);
    for (int i = 0; i < NBUF; i++) begin
      rot_b[i] = 0.0; rot_c[i] = urand_r(-1.5, 1.5);
      rot_ea[i] = $cos(q(rot_c[i])); rot_eb[i] = $sin(q(rot_c[i])); rot_ta[i] = 3e-7; rot_tb[i] = 3e-7;
    end
    rot_run(N, 1, 1, 0, "sin/cos full rate");
    // sine / cosine over the whole input range, with back-pressure
    for (int i = 0; i < NBUF; i++) begin
      rot_c[i] = urand_r(-1.99, 1.99);
      rot_ea[i] = $cos(q(rot_c[i])); rot_eb[i] = $sin(q(rot_c[i]));
    end
    for (int i = 0; i < N; i++) if (absr(q(rot_c[i % NBUF])) > PI / 2) n_angle_corr++;
    rot_run(N, 0, 1, 0, "sin/cos");
    // rotate streamed vectors by a constant angle, gain removed by the scale stage
    cfg_rot(0.6, 1.0 / k, 1, 0, 3);
    ca = $cos(q(0.6)); sa = $sin(q(0.6));
    for (int i = 0; i < NBUF; i++) begin
      rot_b[i] = urand_r(-1.0, 1.0); rot_c[i] = urand_r(-1.0, 1.0);
      rot_ea[i] = q(rot_b[i]) * ca - q(rot_c[i]) * sa;
      rot_eb[i] = q(rot_b[i]) * sa + q(rot_c[i]) * ca;
      rot_ta[i] = 4e-7; rot_tb[i] = 4e-7;
    end
    n_scaled += 2 * N;
    rot_run(N, 0, -1, -1, "rotate");
    // x = c, y = a = 0, z = b; outputs (y, z): K16 * c * sin(b) and the residual angle
    cfg_rot(0.0, 1.0, 2, 1, 0);
    for (int i = 0; i < NBUF; i++) begin
      rot_b[i] = urand_r(-1.99, 1.99); rot_c[i] = urand_r(-1.0, 1.0);
      rot_ea[i] = k * q(rot_c[i]) * $sin(q(rot_b[i])); rot_ta[i] = 4e-7;
      rot_eb[i] = 0.0; rot_tb[i] = 3.1e-5;
    end
    rot_run(N, 0, -1, -1, "mapping 2/1");
  endtask

  task automatic vectoring_side();
    real r, m;
    // division of two streams: x = b, y = c, z = a = 0; outputs (y, z)
    cfg_vec(0.0, 1.0, 1, 1, 0);
    for (int i = 0; i < NBUF; i++) begin
      r = urand_r(0.125, 1.0);
      vec_b[i] = ($urandom_range(0, 1) != 0) ? r : -r;
      vec_c[i] = r * urand_r(-1.9, 1.9);
      vec_ea[i] = 0.0; vec_ta[i] = 6e-5;
      vec_eb[i] = q(vec_c[i]) / q(vec_b[i]); vec_tb[i] = tol(vec_eb[i]);
    end
    for (int i = 0; i < N; i++) if (vec_b[i % NBUF] < 0.0) n_sign_corr++;
    vec_run(N, 1, -1, 3, "divide full rate");
    vec_run(N, 0, -1, 3, "divide");
    // multiplication by a constant m: x = a = 1/m, y = b, z = c = 0
    m = 1.5;
    cfg_vec(1.0 / m, 1.0, 0, 1, 0);
    for (int i = 0; i < NBUF; i++) begin
      vec_b[i] = urand_r(-1.25, 1.25); vec_c[i] = 0.0;
      vec_ea[i] = 0.0; vec_ta[i] = 6e-5;
      vec_eb[i] = q(vec_b[i]) / q(1.0 / m); vec_tb[i] = tol(vec_eb[i]);
    end
    vec_run(N, 0, -1, 2, "multiply");
    // constant over a stream plus an offset, output a halved: x = c, y = a, z = b; outputs (z, x)
    cfg_vec(0.3, 0.5, 2, 2, 1);
    for (int i = 0; i < NBUF; i++) begin
      r = urand_r(0.25, 1.0);
      vec_c[i] = ($urandom_range(0, 1) != 0) ? r : -r;
      vec_b[i] = urand_r(-0.3, 0.3);
      vec_ea[i] = 0.5 * (q(vec_b[i]) + q(0.3) / q(vec_c[i])); vec_ta[i] = tol(vec_ea[i]);
      vec_eb[i] = absr(q(vec_c[i])); vec_tb[i] = 3e-7;
    end
    for (int i = 0; i < N; i++) if (vec_c[i % NBUF] < 0.0) n_sign_corr++;
    n_scaled += N;
    vec_run(N, 0, -1, -1, "const/stream");
  endtask

  task automatic need(input int count, input string what);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin failures++; $display("  never happened"); end
  endtask

  initial begin
    void'($value$plusargs("N=%d", N));
    for (int i = 0; i < 4; i++) begin sq_err[i] = 0.0; n_err[i] = 0; end
    for (int i = 0; i < 3; i++) begin map_in_used[i] = 0; map_out_used[i] = 0; end
    rot_awvalid = 0; rot_wvalid = 0; rot_bready = 0; rot_arvalid = 0; rot_rready = 0; rot_awaddr = 0; rot_araddr = 0;
    rot_wdata = 0; rot_wstrb = 0; rot_s_tvalid = 0; rot_m_tready = 1; rot_s_tdata = 0; rot_s_tlast = 0; n_stall_rot = 0;
    vec_awvalid = 0; vec_wvalid = 0; vec_bready = 0; vec_arvalid = 0; vec_rready = 0; vec_awaddr = 0; vec_araddr = 0;
    vec_wdata = 0; vec_wstrb = 0; vec_s_tvalid = 0; vec_m_tready = 1; vec_s_tdata = 0; vec_s_tlast = 0; n_stall_vec = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    fork
      rotation_side();
      vectoring_side();
    join
    $display("mean squared error: sin %g  cos %g  mul %g  div %g",
             sq_err[0] / n_err[0], sq_err[1] / n_err[1], sq_err[2] / n_err[2], sq_err[3] / n_err[3]);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (!(sq_err[i] / n_err[i] < 1e-13)) failures++;
    end
    need(n_stall_rot + n_stall_vec, "back-pressure stalls");
    need(n_angle_corr, "angle corrections");
    need(n_sign_corr, "divisor sign corrections");
    need(n_scaled, "scaled outputs");
    need(n_last, "tlast beats");
    need(cfg_writes, "AUX register writes");
    for (int i = 0; i < 3; i++) need(map_in_used[i], $sformatf("input mapping %0d", i));
    for (int i = 0; i < 3; i++) need(map_out_used[i], $sformatf("output mapping %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16 * 262144 + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
