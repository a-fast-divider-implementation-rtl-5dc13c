// pow4_unit: parallel fourth-power unit built from a reduced partial
// product array (RPPA).
//
// The full array of a^4 holds W^4 products of four operand bits.  Equal
// bits collapse (a_i a_i = a_i) and the orderings of one set of bits are
// merged into a single term whose weight is the number of orderings:
//   - a_i a_i a_i a_i       -> a_i,             weight 1,  column 4i;
//   - a_i a_i a_i a_j       -> a_i a_j,         weight 4,  column 3i+j;
//   - a_i a_i a_j a_j (i<j) -> a_i a_j,         weight 6,  column 2i+2j;
//   - a_i a_i a_j a_k       -> a_i a_j a_k,     weight 12, column 2i+j+k;
//   - a_i a_j a_k a_l       -> a_i a_j a_k a_l, weight 24, column i+j+k+l
//     (i<j<k<l).
// Weights are realised as shifted copies of a row: 4 = two columns left,
// 6 = 4+2, 12 = 8+4, 24 = 16+8.  The weights 1, 4, 12 and 24 are those of
// the design description; its list leaves out the two-pairs class, whose
// weight 6 is needed for an exact result and follows from the count of
// orderings.  The reduced terms are grouped in rows (a gated, masked,
// shifted copy of the operand: all terms that differ only in their highest
// bit), and slice i holds the rows owned by bit i.  Adding the rows is left
// to synthesis, which maps it onto a compressor tree.
//
// Interface: W-bit unsigned operand in, exact 4W-bit fourth power out.
// Timing: combinational, one array reduction deep.
module pow4_unit #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   a,
  output logic [4*W-1:0] p
);

  localparam int unsigned PW = 4 * W;

  logic [PW-1:0] single;   // a_i at column 4i
  logic [PW-1:0] spread2;  // a_j at column 2j
  logic [PW-1:0] part [W];

  always_comb begin
    single  = '0;
    spread2 = '0;
    for (int unsigned i = 0; i < W; i++) begin
      single[4*i]  = a[i];
      spread2[2*i] = a[i];
    end
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
      // a_i a_i a_i a_j, j != i: weight 4.
      r = {PW{a[I]}} & (PW'(a & NOT_I) << (3 * I));
      part[I] = r << 2;
      // a_i a_i a_j a_j, i < j: weight 6, the a_j at column 2j.
      r = {PW{a[I]}} & ((spread2 & ~((PW'(1) << (2 * I + 1)) - PW'(1))) << (2 * I));
      part[I] = part[I] + (r << 1) + (r << 2);
      // a_i a_i a_j a_k, j < k, both != i: weight 12.
      for (int unsigned j = 0; j < W; j++) begin
        if (j != I) begin
          r = {PW{a[I] & a[j]}} & (PW'(above(a, j) & NOT_I) << (2 * I + j));
          part[I] = part[I] + (r << 2) + (r << 3);
        end
      end
      // a_i a_j a_k a_l, i < j < k < l: weight 24.
      for (int unsigned j = I + 1; j < W; j++) begin
        for (int unsigned k = j + 1; k < W; k++) begin
          r = {PW{a[I] & a[j] & a[k]}} & (PW'(above(a, k)) << (I + j + k));
          part[I] = part[I] + (r << 3) + (r << 4);
        end
      end
    end
  end

  always_comb begin
    p = single;
    for (int unsigned i = 0; i < W; i++) p = p + part[i];
  end

endmodule
