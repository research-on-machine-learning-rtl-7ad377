// tb_iterated_cordic: the single reused stage must give exactly the bits of the
// pipelined chain. Random vectors are first streamed through four pipelined
// chains (half_range_cordic: circular rotation and vectoring, linear
// vectoring, hyperbolic rotation) as the reference. The same vectors are then
// loaded one at a time into four iterated units with the enable randomly
// dropped; the result must appear after exactly STAGES enabled cycles, match
// the reference bit for bit, and hold through idle cycles until the next load.
module tb_iterated_cordic;
  import cordic_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 200, ST = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  en, load;
  cvec_t vin;
  cvec_t o_p [4], o_i [4];
  cvec_t stim [N];
  cvec_t ref_r [4][N];

  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(CIRCULAR))   p0 (.clk, .en(1'b1), .v_in(vin), .v_out(o_p[0]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(CIRCULAR))   p1 (.clk, .en(1'b1), .v_in(vin), .v_out(o_p[1]));
  half_range_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(LINEAR))     p2 (.clk, .en(1'b1), .v_in(vin), .v_out(o_p[2]));
  half_range_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(HYPERBOLIC)) p3 (.clk, .en(1'b1), .v_in(vin), .v_out(o_p[3]));
  iterated_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(CIRCULAR))   i0 (.clk, .en, .load, .v_in(vin), .v_out(o_i[0]));
  iterated_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(CIRCULAR))   i1 (.clk, .en, .load, .v_in(vin), .v_out(o_i[1]));
  iterated_cordic #(.STAGES(ST), .MODE(VECTOR),   .FUNC(LINEAR))     i2 (.clk, .en, .load, .v_in(vin), .v_out(o_i[2]));
  iterated_cordic #(.STAGES(ST), .MODE(ROTATION), .FUNC(HYPERBOLIC)) i3 (.clk, .en, .load, .v_in(vin), .v_out(o_i[3]));

  function automatic fx_t r2q(input real r);
    return 34'(longint'(r * TWO30));
  endfunction

  initial begin
    int n_idle, n_hold;
    en = 1; load = 0; vin = '0;
    n_idle = 0; n_hold = 0;
    for (int n = 0; n < N; n++)
      stim[n] = '{x: r2q(urand_r(0.05, 1.0)), y: r2q(urand_r(-1.0, 1.0)), z: r2q(urand_r(-1.0, 1.0))};
    // reference: stream through the pipelined chains
    for (int c = 0; c < N + ST; c++) begin
      vin = (c < N) ? stim[c] : '0;
      @(posedge clk); #1;
      if (c >= ST - 1 && c - (ST - 1) < N)
        for (int u = 0; u < 4; u++) ref_r[u][c-(ST-1)] = o_p[u];
    end
    // iterated units, one vector at a time
    for (int n = 0; n < N; n++) begin
      int done;
      vin = stim[n]; load = 1; en = 1;
      @(posedge clk); #1;
      load = 0; vin = '0;
      done = 1;
      while (done < ST) begin
        en = ($urandom_range(0, 3) != 0);
        if (!en) n_idle++;
        @(posedge clk); #1;
        if (en) done++;
      end
      en = 1;
      for (int u = 0; u < 4; u++) begin
        checks++;
        if (o_i[u] !== ref_r[u][n]) begin
          failures++;
          if (failures < 10) $display("unit %0d vector %0d: got %h exp %h", u, n, o_i[u], ref_r[u][n]);
        end
      end
      // idle cycles: the result must stay
      repeat ($urandom_range(0, 3)) begin
        @(posedge clk); #1;
        n_hold++;
        checks++;
        if (o_i[0] !== ref_r[0][n] || o_i[2] !== ref_r[2][n]) failures++;
      end
    end
    checks++;
    if (n_idle == 0 || n_hold == 0) failures++;
    $display("enable gaps %0d, hold cycles %0d", n_idle, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
