// cube_unit: parallel cubing unit built from a reduced partial product
// array (RPPA).
//
// The full array of a*a*a holds W^3 products a_i a_j a_k at column i+j+k.
// Three reductions, taken from the design description, leave one term per
// distinct set of bits:
//   - three identical bits: a_i a_i a_i = a_i, weight 1, column 3i;
//   - two identical bits: the three orderings of a_i a_i a_j (i != j)
//     become a_i a_j with weight 3 = 2 + 1 at column 2i+j;
//   - three different bits: the six orderings of a_i a_j a_k (i<j<k) become
//     one term with weight 6 = 4 + 2 at column i+j+k.
// The reduced array is written as rows: the single terms form one row; for
// each i the two-identical terms form the row a_i & a (bit i cleared) from
// column 2i; for each i<j the three-different terms form the row
// a_i a_j & a[W-1:j+1] from column i+j.  Weights 3 and 6 are realised as
// two shifted copies of a row.  Adding the rows is left to synthesis.
//
// Interface: W-bit unsigned operand in, exact 3W-bit cube out.
// Timing: combinational, one array reduction deep.
module cube_unit #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   a,
  output logic [3*W-1:0] p
);

  localparam int unsigned PW = 3 * W;

  logic [PW-1:0] single;   // a_i at column 3i
  logic [PW-1:0] part [W]; // all reduced terms whose lowest repeated/owning bit is i

  always_comb begin
    single = '0;
    for (int unsigned i = 0; i < W; i++) single[3*i] = a[i];
  end

  // Operand bits above position k.
  function automatic logic [W-1:0] above(logic [W-1:0] v, int unsigned k);
    return v & ~((W'(1) << (k + 1)) - W'(1));
  endfunction

  for (genvar gi = 0; gi < W; gi++) begin : g_slice
    localparam int unsigned I = gi;
    localparam logic [W-1:0] NOT_I = ~(W'(1) << I);   // every bit but i
    logic [PW-1:0] r;

    always_comb begin
      // a_i a_i a_j, j != i: weight 3.
      r = {PW{a[I]}} & (PW'(a & NOT_I) << (2 * I));
      part[I] = r + (r << 1);
      // a_i a_j a_k, i < j < k: weight 6.
      for (int unsigned j = I + 1; j < W; j++) begin
        r = {PW{a[I] & a[j]}} & (PW'(above(a, j)) << (I + j));
        part[I] = part[I] + (r << 1) + (r << 2);
      end
    end
  end

  always_comb begin
    p = single;
    for (int unsigned i = 0; i < W; i++) p = p + part[i];
  end

endmodule
