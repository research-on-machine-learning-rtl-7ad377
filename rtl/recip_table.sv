// recip_table: block-RAM reciprocal lookup table for vectoring mode.
//
// Holds 2^AW entries of RW bits (16 x 2^16, the "n/2 x 2^(n/2)" table of the
// design, about 1 Mbit of block RAM). Address i stands for the x interval
// [i, i+1) * 2^(XINT-AW), i.e. the leading AW bits of a non-negative x in
// [0, 2^XINT). Each entry is the reciprocal of the interval centre as an
// unsigned fixed-point number with 3 integer and RW-3 fraction bits:
//   recip[i] = min(2^RW - 1, round(2^(RW-3) / ((i + 0.5) * 2^(XINT-AW))))
//            = min(2^RW - 1, round(2^(RW-2+AW-XINT) / (2i + 1)))
// so divisors below 1/8 saturate. The content is computed from this formula at
// initialisation, the entry format and interval-centre rounding being this
// implementation's choices. The read is registered: the entry for `addr`
// appears on `recip` one enabled cycle later (block-RAM read latency).
module recip_table #(
  parameter int AW   = 16,
  parameter int RW   = 16,
  parameter int XINT = 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [RW-1:0] recip
);

  logic [RW-1:0] rom [2**AW];

  function automatic logic [RW-1:0] entry(input longint unsigned i);
    longint unsigned num, q;
    num = longint'(1) << (RW - 1 + AW - XINT);   // twice the numerator, for rounding
    q   = (num / (2 * i + 1) + 1) >> 1;
    return (q > (longint'(1) << RW) - 1) ? RW'((longint'(1) << RW) - 1) : RW'(q);
  endfunction

  initial begin
    for (int i = 0; i < 2**AW; i++)
      rom[i] = entry(longint'(i));
  end

  always_ff @(posedge clk)
    if (en) recip <= rom[addr];

endmodule
