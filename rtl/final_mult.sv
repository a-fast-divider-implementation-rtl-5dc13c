// final_mult: the full-precision multiplier q = (a*X) * S.
//
// Both operands carry F fraction bits: a*X lies below 2 and S in [1,2).
// The full product has 2F fraction bits; the quotient is its top part,
// truncated to N bits in the operands' format 1.(N-1).  It is the only
// full-length multiplication of the divider.  The multiplier is written as
// a plain product; its structure is left to synthesis.
//
// Interface: a*X and S in, q out.  Timing: combinational.
module final_mult #(
  parameter int unsigned N = nr4_div_pkg::N_DEFAULT,
  parameter int unsigned F = nr4_div_pkg::N_DEFAULT + nr4_div_pkg::M_DEFAULT
) (
  input  logic [F:0]   ax,
  input  logic [F:0]   s,
  output logic [N-1:0] q
);

  localparam int unsigned PW = 2 * F + 2;

  localparam int unsigned LSB = 2 * F - (N - 1);   // weight 2^-(N-1)

  logic [PW-1:0] prod;

  always_comb begin
    prod = PW'(ax) * PW'(s);
    q    = prod[LSB +: N];
  end

endmodule
