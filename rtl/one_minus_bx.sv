// one_minus_bx: fused multiply-subtract e = 1 - b*X.
//
// b is an N-bit mantissa in [1,2) (format 1.(N-1)) and X the (M+1)-bit seed
// in [1/2,1) (format 0.(M+1)).  The product has F = N+M fraction bits and,
// because the seed never exceeds 1/b, lies at or below 1, so e = 1 - bX is
// non-negative and exact with F fraction bits.  The M+1 partial-product rows
// of b*X are summed in one multi-operand addition and subtracted from 1 in
// the same expression (the subtraction is fused with the multiplication as
// the design description says; the partial product reduction is left to
// synthesis, where the description names a Wallace tree).  The seed table
// guarantees e < 2^-(F-E_W), so only the low E_W bits are brought out.
//
// Timing: combinational.
module one_minus_bx #(
  parameter int unsigned N   = nr4_div_pkg::N_DEFAULT,
  parameter int unsigned M   = nr4_div_pkg::M_DEFAULT,
  parameter int unsigned E_W = N + M - nr4_div_pkg::e_lead_zeros(M)
) (
  input  logic [N-1:0]   b,
  input  logic [M:0]     x,
  output logic [E_W-1:0] e
);

  localparam int unsigned F  = N + M;   // fraction bits of b*X
  localparam int unsigned PW = F + 1;   // b*X < 2

  logic [PW-1:0] prod;
  logic [PW:0]   diff;

  // Partial product rows of b*X, one per seed bit, summed in one go.
  always_comb begin
    prod = '0;
    for (int unsigned j = 0; j <= M; j++) begin
      if (x[j]) prod = prod + (PW'(b) << j);
    end
    // 1.0 has weight 2^F; the difference is never negative for a table seed.
    diff = (PW + 1)'(1) << F;
    diff = diff - (PW + 1)'(prod);
  end

  assign e = diff[E_W-1:0];

endmodule
