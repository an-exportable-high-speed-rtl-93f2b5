// rsd_to_bin_mod: converts an RSD number to a binary residue in [0, m).
//
// The value is formed by one subtraction of the components (x+ - x-) in two's
// complement, then at most two additions of m (for a negative value) and two
// subtractions of m (for a value of m or more) bring it into [0, m). This
// covers every value the units hand over: |x| < 2m. Combinational.
// The conversion is this design's own addition: the published design's ports carry
// binary operands and results while its arithmetic unit works in RSD.
// m must be odd with 2^(N-1) < m < 2^N.
module rsd_to_bin_mod #(
  parameter int N = 256,
  parameter int W = 258
) (
  input  logic [1:0][W-1:0] x,
  input  logic [N-1:0]      m,
  output logic [N-1:0]      r
);

  localparam int VW = (W > N ? W : N) + 2;   // signed working width

  logic signed [VW-1:0] v, mm;

  always_comb begin
    mm = VW'(m);
    v  = VW'(x[1]) - VW'(x[0]);
    for (int i = 0; i < 2; i++)
      if (v < 0) v = v + mm;
    for (int i = 0; i < 2; i++)
      if (v >= mm) v = v - mm;
    r = v[N-1:0];
  end

endmodule
