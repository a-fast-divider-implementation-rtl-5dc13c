// recip_rom: reciprocal seed table, 2^M words of M bits.
//
// The address is the M fraction bits of the divisor b that follow its
// leading one, so address i covers b in [1 + i/2^M, 1 + (i+1)/2^M).  Each
// word holds the seed X = floor(2^(M+1) / (1 + (i+1)/2^M)) / 2^(M+1) minus
// its always-set top bit (X lies in [1/2,1)).  Rounding the seed down from
// the reciprocal of the interval's upper end keeps X at or below 1/b for
// every b of the interval, so 1 - bX is never negative; this rule is the
// design description's, the word layout with a hidden top bit is this
// design's choice.  The contents are computed at elaboration time, so no
// data file is needed.
//
// Interface: addr in, word out.  Timing: purely combinational (an
// asynchronous ROM); the divider registers its output together with 1 - bX.
module recip_rom #(
  parameter int unsigned M = nr4_div_pkg::M_DEFAULT
) (
  input  logic [M-1:0] addr,
  output logic [M-1:0] word
);

  typedef logic [M-1:0] rom_t [2**M];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned i = 0; i < 2**M; i++) begin
      // Drop the top bit (weight 2^M) of the (M+1)-bit seed.
      r[i] = M'(nr4_div_pkg::seed_full(M, i) - (longint'(1) << M));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_comb word = ROM[addr];

endmodule
