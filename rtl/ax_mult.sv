// ax_mult: small multiplier a * X.
//
// a is the N-bit dividend mantissa (format 1.(N-1)) and X the (M+1)-bit
// seed (format 0.(M+1)), so the product has F = N+M fraction bits and lies
// below 2.  It is the short (n by n/5) multiplier of the divider; it runs in
// parallel with 1 - bX.  It is written as a plain product and its structure
// is left to synthesis: the design description asks only for an efficient
// multiplier.
//
// Timing: combinational.  The result is exact.
module ax_mult #(
  parameter int unsigned N = nr4_div_pkg::N_DEFAULT,
  parameter int unsigned M = nr4_div_pkg::M_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [M:0]   x,
  output logic [N+M:0] ax
);

  assign ax = (N + M + 1)'(a) * (N + M + 1)'(x);

endmodule
