// rsd_schoolbook_mul: N x N digit RSD schoolbook multiplier (the leaf of the
// recursive Karatsuba multiplier, used at N = 4).
//
// Each digit b_j in {-1, 0, +1} selects a partial product row: a, -a (plus and
// minus components swapped) or 0, shifted left by j digits. The N rows are
// summed by a chain of carry-free rsd_adder instances; accumulator j needs at
// most N+j+1 digits, so the final product fits 2N digits without truncation
// (adding two numbers needs one digit more than the wider one).
// Operands and product use the {x+, x-} vector pair format of rsd_pkg.
// Purely combinational; karatsuba_rsd registers the output.
module rsd_schoolbook_mul #(
  parameter int N = 4
) (
  input  logic [1:0][N-1:0]   a,
  input  logic [1:0][N-1:0]   b,
  output logic [1:0][2*N-1:0] p
);

  // Partial product rows, zero-extended to 2N digits; acc[j] = rows 0..j.
  logic [N-1:0][1:0][2*N-1:0] row;
  logic [N-1:0][1:0][2*N-1:0] acc;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      logic bp, bn;
      bp = b[1][j] & ~b[0][j];
      bn = b[0][j] & ~b[1][j];
      row[j][1] = bp ? ((2*N)'(a[1]) << j) : bn ? ((2*N)'(a[0]) << j) : '0;
      row[j][0] = bp ? ((2*N)'(a[0]) << j) : bn ? ((2*N)'(a[1]) << j) : '0;
    end
  end

  assign acc[0] = row[0];

  for (genvar j = 1; j < N; j++) begin : g_chain
    logic [1:0][2*N:0] s;
    rsd_adder #(.W(2 * N)) u_add (
      .x  (acc[j-1]),
      .y  (row[j]),
      .sub(1'b0),
      .s  (s)
    );
    // Digit 2N of the sum is zero: both operands fit N+j digits.
    assign acc[j] = {s[1][2*N-1:0], s[0][2*N-1:0]};
  end

  assign p = acc[N-1];

endmodule
