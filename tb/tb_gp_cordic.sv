// tb_gp_cordic: end-to-end test of the CORDIC cell in its two main builds,
// rotation/circular and vectoring/linear, through its AXI-Stream ports.
// Each batch sets the configuration inputs, streams float operands with random
// valid gaps and random output back-pressure, and compares every result (in
// order, with tlast) against real-number references:
//   A rot: x=a=1/K, y=b=0, z=c=theta   -> cos, sin   (full-rate, latency 28)
//   B rot: x=b, y=c, z=a=0.7, scale both by 1/K     -> rotation of (b,c)
//   C rot: x=c, y=a=0, z=b, out (z,x)  -> residual angle, K16*c*cos(b)
//   D vec: x=a=0.8, y=b, z=c, out (y,z) -> residual, c + b/0.8
//   E vec: x=b, y=c, z=a=0, out (y,z)   -> residual, c/b (b of either sign)
//   F vec: x=c, y=a=0.3, z=b, out (z,x), scale a by 0.5 -> (b + 0.3/c)/2, |c|
module tb_gp_cordic;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 28;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // stimulus side, routed to the selected cell
  logic        sel;            // 0 rotation cell, 1 vectoring cell
  logic [63:0] s_tdata;
  logic        s_tvalid, s_tlast, m_tready;
  logic [31:0] input_a, scale;
  logic [1:0]  map_in, map_out, map_scale;

  logic [63:0] r_mdata, v_mdata;
  logic r_sready, v_sready, r_mvalid, v_mvalid, r_mlast, v_mlast;

  gp_cordic #(.MODE(ROTATION), .FUNC(CIRCULAR)) u_rot (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid && !sel), .s_axis_tready(r_sready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(r_mdata), .m_axis_tvalid(r_mvalid), .m_axis_tready(m_tready || sel), .m_axis_tlast(r_mlast),
    .input_a, .scale, .mapping_input(map_in), .mapping_output(map_out), .mapping_scale(map_scale));

  gp_cordic #(.MODE(VECTOR), .FUNC(LINEAR)) u_vec (
    .clk, .rst_n,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid && sel), .s_axis_tready(v_sready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(v_mdata), .m_axis_tvalid(v_mvalid), .m_axis_tready(m_tready || !sel), .m_axis_tlast(v_mlast),
    .input_a, .scale, .mapping_input(map_in), .mapping_output(map_out), .mapping_scale(map_scale));

  logic        s_tready, m_tvalid, m_tlast;
  logic [63:0] m_tdata;
  assign s_tready = sel ? v_sready : r_sready;
  assign m_tvalid = sel ? v_mvalid : r_mvalid;
  assign m_tdata  = sel ? v_mdata  : r_mdata;
  assign m_tlast  = sel ? v_mlast  : r_mlast;

  localparam int NMAX = 400;
  real b_in [NMAX], c_in [NMAX], ea [NMAX], eb [NMAX], ta [NMAX], tb [NMAX];
  int  first_in_cyc, first_out_cyc, last_out_cyc, cyc;
  int  stalls;

  always @(posedge clk) cyc <= cyc + 1;

  // stream n beats; random gaps/back-pressure unless full_rate
  task automatic run(input int n, input bit full_rate, input string tag);
    int iin, iout;
    bit in_fire, out_fire;
    iin = 0; iout = 0;
    first_in_cyc = -1; first_out_cyc = -1;
    s_tvalid = 0; m_tready = 1;
    @(posedge clk); #1;
    while (iout < n) begin
      s_tvalid = (iin < n) && (full_rate || ($urandom_range(0, 3) != 0));
      s_tdata  = {r2f(c_in[iin % NMAX]), r2f(b_in[iin % NMAX])};
      s_tlast  = (iin % 16) == 15;
      m_tready = full_rate || ($urandom_range(0, 3) != 0);
      @(negedge clk);
      in_fire  = s_tvalid && s_tready;
      out_fire = m_tvalid && m_tready;
      if (m_tvalid && !m_tready) stalls++;
      if (in_fire && iin == 0) first_in_cyc = cyc;
      if (out_fire) begin
        real ga, gb;
        if (iout == 0) first_out_cyc = cyc;
        last_out_cyc = cyc;
        ga = f2r(m_tdata[31:0]); gb = f2r(m_tdata[63:32]);
        checks++;
        if (absr(ga - ea[iout]) > ta[iout] || absr(gb - eb[iout]) > tb[iout] || m_tlast != ((iout % 16) == 15)) begin
          failures++;
          if (failures < 12) $display("%s beat %0d: got %g %g exp %g %g", tag, iout, ga, gb, ea[iout], eb[iout]);
        end
        iout++;
      end
      @(posedge clk); #1;
      if (in_fire) iin++;
    end
    s_tvalid = 0;
  endtask

  function automatic real tol(input real v);
    return 3e-7 * ((absr(v) > 1.0) ? absr(v) : 1.0);
  endfunction

  initial begin
    real k, r, ca, sa;
    int n;
    k = cordic_gain(16);
    cyc = 0; stalls = 0;
    sel = 0; s_tvalid = 0; s_tlast = 0; m_tready = 1; s_tdata = '0;
    input_a = r2f(1.0 / k); scale = r2f(1.0); map_in = 0; map_out = 0; map_scale = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // A: sine / cosine, full rate, latency and throughput
    n = 200;
    for (int i = 0; i < n; i++) begin
      b_in[i] = 0.0; c_in[i] = urand_r(-1.99, 1.99);
      ea[i] = $cos(c_in[i]); eb[i] = $sin(c_in[i]); ta[i] = 3e-7; tb[i] = 3e-7;
    end
    run(n, 1, "A");
    checks++;
    if (first_out_cyc - first_in_cyc != LAT) begin
      failures++; $display("latency %0d, expected %0d", first_out_cyc - first_in_cyc, LAT);
    end
    checks++;
    if (last_out_cyc - first_out_cyc != n - 1) begin
      failures++; $display("throughput: %0d beats over %0d cycles", n, last_out_cyc - first_out_cyc + 1);
    end

    // B: rotate streamed vectors by a constant angle, gain removed by the scale stage
    input_a = r2f(0.7); scale = r2f(1.0 / k); map_in = 1; map_out = 0; map_scale = 3;
    ca = $cos(f2r(input_a)); sa = $sin(f2r(input_a));
    for (int i = 0; i < n; i++) begin
      b_in[i] = urand_r(-1.0, 1.0); c_in[i] = urand_r(-1.0, 1.0);
      ea[i] = f2r(r2f(b_in[i])) * ca - f2r(r2f(c_in[i])) * sa;
      eb[i] = f2r(r2f(b_in[i])) * sa + f2r(r2f(c_in[i])) * ca;
      ta[i] = 4e-7; tb[i] = 4e-7;
    end
    repeat (4) @(posedge clk);
    run(n, 0, "B");

    // C: other input/output mappings
    input_a = r2f(0.0); scale = r2f(1.0); map_in = 2; map_out = 2; map_scale = 0;
    for (int i = 0; i < n; i++) begin
      b_in[i] = urand_r(-1.99, 1.99); c_in[i] = urand_r(-1.0, 1.0);
      ea[i] = 0.0; ta[i] = 3.1e-5;
      eb[i] = k * f2r(r2f(c_in[i])) * $cos(f2r(r2f(b_in[i]))); tb[i] = 4e-7;
    end
    repeat (4) @(posedge clk);
    run(n, 0, "C");

    // D: multiply-accumulate by a constant reciprocal: z = c + b / 0.8
    sel = 1;
    input_a = r2f(0.8); map_in = 0; map_out = 1; map_scale = 0;
    for (int i = 0; i < n; i++) begin
      b_in[i] = urand_r(-1.0, 1.0); c_in[i] = urand_r(-0.5, 0.5);
      ea[i] = 0.0; ta[i] = 6e-5;
      eb[i] = f2r(r2f(c_in[i])) + f2r(r2f(b_in[i])) / f2r(input_a); tb[i] = tol(eb[i]);
    end
    repeat (4) @(posedge clk);
    run(n, 0, "D");

    // E: stream division c / b, divisor of either sign
    input_a = r2f(0.0); map_in = 1; map_out = 1;
    for (int i = 0; i < n; i++) begin
      r = urand_r(0.2, 1.0);
      b_in[i] = ($urandom_range(0, 1) != 0) ? r : -r;
      c_in[i] = r * urand_r(-1.9, 1.9);
      ea[i] = 0.0; ta[i] = 6e-5;
      eb[i] = f2r(r2f(c_in[i])) / f2r(r2f(b_in[i])); tb[i] = tol(eb[i]);
    end
    repeat (4) @(posedge clk);
    run(n, 0, "E");

    // F: constant divided by a stream, plus scale of output a
    input_a = r2f(0.3); scale = r2f(0.5); map_in = 2; map_out = 2; map_scale = 1;
    for (int i = 0; i < n; i++) begin
      r = urand_r(0.25, 1.0);
      c_in[i] = ($urandom_range(0, 1) != 0) ? r : -r;
      b_in[i] = urand_r(-0.3, 0.3);
      ea[i] = 0.5 * (f2r(r2f(b_in[i])) + 0.3 / f2r(r2f(c_in[i]))); ta[i] = tol(ea[i]);
      eb[i] = absr(f2r(r2f(c_in[i]))); tb[i] = 3e-7;
    end
    repeat (4) @(posedge clk);
    run(n, 0, "F");

    checks++;
    if (stalls == 0) begin failures++; $display("back-pressure never exercised"); end
    $display("output stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
