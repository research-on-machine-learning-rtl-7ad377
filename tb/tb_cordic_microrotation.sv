// tb_cordic_microrotation: checks single micro-rotation stages of all six
// kinds (circular/linear/hyperbolic x rotation/vectoring, different shifts) against the
// CORDIC update equations evaluated in 64-bit integer arithmetic, and checks
// the one-cycle register latency (output changes only after the clock edge).
module tb_cordic_microrotation;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cvec_t vin;
  cvec_t o_rc, o_vc, o_rl, o_vl, o_rh, o_vh;

  cordic_microrotation #(.SHIFT(3), .MODE(ROTATION), .FUNC(CIRCULAR)) u_rc (.clk, .en(1'b1), .v_in(vin), .v_out(o_rc));
  cordic_microrotation #(.SHIFT(1), .MODE(VECTOR),   .FUNC(CIRCULAR)) u_vc (.clk, .en(1'b1), .v_in(vin), .v_out(o_vc));
  cordic_microrotation #(.SHIFT(2), .MODE(ROTATION), .FUNC(LINEAR))   u_rl (.clk, .en(1'b1), .v_in(vin), .v_out(o_rl));
  cordic_microrotation #(.SHIFT(0), .MODE(VECTOR),   .FUNC(LINEAR))   u_vl (.clk, .en(1'b1), .v_in(vin), .v_out(o_vl));
  cordic_microrotation #(.SHIFT(4), .MODE(ROTATION), .FUNC(HYPERBOLIC)) u_rh (.clk, .en(1'b1), .v_in(vin), .v_out(o_rh));
  cordic_microrotation #(.SHIFT(1), .MODE(VECTOR),   .FUNC(HYPERBOLIC)) u_vh (.clk, .en(1'b1), .v_in(vin), .v_out(o_vh));

  // arctangent of 2^-i to 30 fraction bits, from the real-number library
  function automatic longint atan_ref(input int i);
    return longint'($floor($atan($pow(2.0, -i)) * TWO30 + 0.5));
  endfunction

  // inverse hyperbolic tangent of 2^-i to 30 fraction bits
  function automatic longint atanh_ref(input int i);
    real t;
    t = $pow(2.0, -i);
    return longint'($floor(0.5 * $ln((1.0 + t) / (1.0 - t)) * TWO30 + 0.5));
  endfunction

  // f: 0 circular, 1 linear, 2 hyperbolic
  function automatic cvec_t ref_step(input cvec_t v, input int sh, input bit vec, input int f);
    longint x, y, z, a;
    int s;
    cvec_t r;
    x = longint'(v.x); y = longint'(v.y); z = longint'(v.z);
    a = (f == 1) ? (longint'(1) << (30 - sh)) : (f == 2) ? atanh_ref(sh) : atan_ref(sh);
    if (vec) s = (y < 0) ? 1 : -1;
    else     s = (z >= 0) ? 1 : -1;
    r.x = (f == 1) ? v.x : (f == 2) ? 34'(x + s * (y >>> sh)) : 34'(x - s * (y >>> sh));
    r.y = 34'(y + s * (x >>> sh));
    r.z = 34'(z - s * a);
    return r;
  endfunction

  task automatic cmp(input cvec_t got, input cvec_t exp, input string tag);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got %h exp %h", tag, got, exp);
    end
  endtask

  initial begin
    cvec_t e_rc, e_vc, e_rl, e_vl, e_rh, e_vh, prev;
    vin = '0;
    @(posedge clk); #1;
    for (int n = 0; n < 500; n++) begin
      vin.x = 34'($signed(32'($urandom)) >>> 1);
      vin.y = 34'($signed(32'($urandom)) >>> 1);
      vin.z = 34'($signed(32'($urandom)) >>> 1);
      e_rc = ref_step(vin, 3, 0, 0);
      e_vc = ref_step(vin, 1, 1, 0);
      e_rl = ref_step(vin, 2, 0, 1);
      e_vl = ref_step(vin, 0, 1, 1);
      e_rh = ref_step(vin, 4, 0, 2);
      e_vh = ref_step(vin, 1, 1, 2);
      prev = o_rc;
      #1;
      checks++;
      if (o_rc !== prev) failures++;           // nothing changes before the edge
      @(posedge clk); #1;
      cmp(o_rc, e_rc, "rot/circ");
      cmp(o_vc, e_vc, "vec/circ");
      cmp(o_rl, e_rl, "rot/lin");
      cmp(o_vl, e_vl, "vec/lin");
      cmp(o_rh, e_rh, "rot/hyp");
      cmp(o_vh, e_vh, "vec/hyp");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
