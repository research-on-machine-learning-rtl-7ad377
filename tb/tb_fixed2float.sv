// tb_fixed2float: checks the Q4.30 -> float converter against a real-number
// reference (mantissa truncation), one input per cycle, 3-cycle latency,
// including zero, the most negative word and values across the whole range.
module tb_fixed2float;
  import tb_fp_pkg::*;

  localparam int N = 400, LAT = 3;
  logic clk = 0;
  logic signed [33:0] q_in;
  logic [31:0] f_out;
  int checks = 0, failures = 0;

  fixed2float dut (.clk(clk), .en(1'b1), .q_in(q_in), .f_out(f_out));

  always #5 clk = ~clk;

  logic signed [33:0] stim [N];
  logic [31:0] expv [N];

  initial begin
    for (int i = 0; i < N; i++)
      stim[i] = 34'($signed({$urandom, $urandom}) >>> $urandom_range(0, 31));
    stim[0] = 34'sd0;
    stim[1] = 34'sd1;
    stim[2] = -34'sd1;
    stim[3] = 34'sd1073741824;        // 1.0
    stim[4] = -34'sd8589934592;       // -8.0
    stim[5] = 34'sd8589934591;        // just below 8
    for (int i = 0; i < N; i++) expv[i] = r2f(q2r(64'(stim[i])));

    for (int c = 0; c < N + LAT; c++) begin
      q_in = (c < N) ? stim[c] : '0;
      @(posedge clk); #1;
      if (c >= LAT - 1 && c - (LAT - 1) < N) begin
        checks++;
        if (f_out !== expv[c-(LAT-1)]) begin
          failures++;
          if (failures < 10) $display("mismatch in=%0d got=%h exp=%h", stim[c-(LAT-1)], f_out, expv[c-(LAT-1)]);
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
