// tb_recip_table: reads random addresses (one per cycle) and the corner
// addresses of the 2^16-entry reciprocal table and compares each entry, one
// cycle after its address, with 1/x of the address-interval centre computed in
// real arithmetic (UQ3.13, rounded, saturated at 0xFFFF). Also checks that the
// entry error against every x inside the interval stays within 2^-13 relative
// for x >= 1/4.
module tb_recip_table;
  import tb_fp_pkg::*;

  localparam int AW = 16, RW = 16, XINT = 2, N = 3000;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AW-1:0] addr;
  logic [RW-1:0] recip;
  recip_table #(.AW(AW), .RW(RW), .XINT(XINT)) dut (.clk, .en(1'b1), .addr, .recip);

  function automatic int ref_entry(input int i);
    real xm, r;
    xm = (real'(i) + 0.5) * $pow(2.0, XINT - AW);
    r  = $floor($pow(2.0, RW - 3) / xm + 0.5);
    return (r > 65535.0) ? 65535 : int'(r);
  endfunction

  initial begin
    int a [N];
    for (int n = 0; n < N; n++) a[n] = int'($urandom_range(0, 2**AW - 1));
    a[0] = 0; a[1] = 2**AW - 1; a[2] = 2**(AW - 3); a[3] = 2**(AW - 2); a[4] = 2**(AW - 1);
    for (int c = 0; c <= N; c++) begin
      addr = (c < N) ? AW'(a[c]) : '0;
      @(posedge clk); #1;
      if (c < N) begin
        checks++;
        if (int'(recip) != ref_entry(a[c])) begin
          failures++;
          if (failures < 10) $display("addr %0d got %0d exp %0d", a[c], recip, ref_entry(a[c]));
        end
        if (a[c] >= 2**(AW - XINT - 2)) begin        // x >= 1/4
          real xlo, rv;
          xlo = real'(a[c]) * $pow(2.0, XINT - AW);
          rv  = real'(recip) / $pow(2.0, RW - 3);
          checks++;
          if (absr(rv * xlo - 1.0) > $pow(2.0, -12.0)) failures++;
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
