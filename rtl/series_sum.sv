// series_sum: the "1 + SUM" adder, S = 1 + e + e^2 + e^3 + e^4.
//
// e arrives as an exact E_W-bit value with F fraction bits; its powers
// arrive exact from the squaring, cubing and fourth-power units with 2F, 3F
// and 4F fraction bits.  Each power is truncated to F fraction bits before
// the five operands are added, so S carries F fraction bits and lies in
// [1,2).  Truncation makes S at most 3 units of 2^-F smaller than the exact
// series sum.  The number of fraction bits kept is this design's choice.
//
// Interface: e and its three powers in, S (1 integer bit, F fraction bits)
// out.  Requires 4*E_W > 3*F, which holds whenever e has fewer than F/4
// leading zero bits (true for every practical table size).
// Timing: combinational.
module series_sum #(
  parameter int unsigned F   = nr4_div_pkg::N_DEFAULT + nr4_div_pkg::M_DEFAULT,
  parameter int unsigned E_W = F - nr4_div_pkg::e_lead_zeros(nr4_div_pkg::M_DEFAULT)
) (
  input  logic [E_W-1:0]   e,
  input  logic [2*E_W-1:0] e2,
  input  logic [3*E_W-1:0] e3,
  input  logic [4*E_W-1:0] e4,
  output logic [F:0]       s
);

  // Bits of each power that remain after dropping all but F fraction bits.
  localparam int unsigned W2 = 2 * E_W - F;
  localparam int unsigned W3 = 3 * E_W - 2 * F;
  localparam int unsigned W4 = 4 * E_W - 3 * F;

  logic [W2-1:0] e2_t;
  logic [W3-1:0] e3_t;
  logic [W4-1:0] e4_t;

  always_comb begin
    e2_t = e2[2*E_W-1 -: W2];
    e3_t = e3[3*E_W-1 -: W3];
    e4_t = e4[4*E_W-1 -: W4];
    s = ((F + 1)'(1) << F) + (F + 1)'(e) + (F + 1)'(e2_t)
      + (F + 1)'(e3_t) + (F + 1)'(e4_t);
  end

endmodule
