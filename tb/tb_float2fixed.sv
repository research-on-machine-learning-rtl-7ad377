// tb_float2fixed: checks the float -> Q2.30 converter against a real-number
// reference, one new input per cycle, including the 3-cycle latency, zero,
// denormals, saturation of |x| >= 2, infinity and NaN.
module tb_float2fixed;
  import tb_fp_pkg::*;

  localparam int N = 400, LAT = 3;
  logic clk = 0;
  logic [31:0] f_in;
  logic signed [31:0] q_out;
  int checks = 0, failures = 0;

  float2fixed dut (.clk(clk), .en(1'b1), .f_in(f_in), .q_out(q_out));

  always #5 clk = ~clk;

  logic [31:0] stim [N];
  logic signed [31:0] expv [N];

  function automatic logic signed [31:0] ref_q(input logic [31:0] f);
    real m;
    longint q;
    if (f[30:23] == 8'hff) return f[31] ? -32'sh7fffffff : 32'sh7fffffff;
    m = absr(f2r(f)) * TWO30;
    if (m >= 2147483648.0) q = 64'h7fffffff;
    else q = longint'($floor(m));
    return f[31] ? 32'(-q) : 32'(q);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) begin
      logic [7:0] e;
      e = 8'(90 + $urandom_range(0, 40));     // from below 2^-30 up to 2^3
      stim[i] = {1'($urandom), e, 23'($urandom)};
    end
    stim[0] = 32'h0000_0000;  // +0
    stim[1] = 32'h8000_0000;  // -0
    stim[2] = 32'h3f80_0000;  // 1.0
    stim[3] = 32'hbf80_0000;  // -1.0
    stim[4] = 32'h4000_0000;  // 2.0 saturates
    stim[5] = 32'h7f80_0000;  // +inf
    stim[6] = 32'hff80_0000;  // -inf
    stim[7] = 32'h0000_1234;  // denormal
    stim[8] = 32'h3fff_ffff;  // just below 2.0
    stim[9] = 32'h3080_0000;  // 2^-30, one LSB
    for (int i = 0; i < N; i++) expv[i] = ref_q(stim[i]);

    for (int c = 0; c < N + LAT; c++) begin
      f_in = (c < N) ? stim[c] : 32'h0;
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - (LAT - 1) < N) begin
        checks++;
        if (q_out !== expv[c-(LAT-1)]) begin
          failures++;
          if (failures < 10) $display("mismatch in=%h got=%h exp=%h", stim[c-(LAT-1)], q_out, expv[c-(LAT-1)]);
        end
      end
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
