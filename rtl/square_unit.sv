// square_unit: parallel squaring unit built from a reduced partial product
// array (RPPA).
//
// The full partial product array of a*a holds every product a_i a_j at
// column i+j.  Two identities shrink it: a_i a_i = a_i, so each diagonal
// term becomes the single bit a_i at column 2i, and a_i a_j + a_j a_i =
// 2 a_i a_j, so each pair of matched off-diagonal terms becomes one term
// a_i a_j (i < j) moved one column left, to column i+j+1.  The reduction
// rule is the design description's.  The reduced array is written as rows:
// one row holding every a_i at column 2i, and for each i one row
// a_i & a[W-1:i+1] starting at column 2i+2.  Adding the rows is left to
// synthesis, which maps it onto a compressor tree.
//
// Interface: W-bit unsigned operand in, exact 2W-bit square out.
// Timing: combinational.
module square_unit #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]   a,
  output logic [2*W-1:0] p
);

  localparam int unsigned PW = 2 * W;

  logic [PW-1:0] diag;     // a_i at column 2i
  logic [PW-1:0] row [W];  // reduced two-different terms of bit i

  always_comb begin
    diag = '0;
    for (int unsigned i = 0; i < W; i++) diag[2*i] = a[i];
  end

  for (genvar gi = 0; gi < W; gi++) begin : g_row
    // Bits above i, gated by a_i, weight 2: a_i a_j lands at column i+j+1.
    logic [W-1:0] upper;
    assign upper      = a & ~((W'(1) << (gi + 1)) - W'(1));
    assign row[gi]    = {PW{a[gi]}} & (PW'(upper) << (gi + 1));
  end

  always_comb begin
    p = diag;
    for (int unsigned i = 0; i < W; i++) p = p + row[i];
  end

endmodule
