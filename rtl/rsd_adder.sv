// rsd_adder: carry-free radix-2 redundant signed digit adder/subtractor.
//
// Two W-digit RSD operands x and y give the (W+1)-digit RSD sum s = x + y, or
// s = x - y when sub is set (y is negated digit by digit by swapping its plus
// and minus bits, so subtraction costs nothing extra). Purely combinational;
// the delay does not depend on W because no carry travels more than one digit.
//
// Two layers, as in the published design's adder:
//   layer 1, per digit i, takes the digit sum p_i = x_i + y_i in {-2..2} and
//   splits it into a transfer (carry) c_{i+1} and an interim sum w_i with
//   p_i = 2*c_{i+1} + w_i. Where p_i is +1 or -1 the split looks at the pair
//   of the next lower position: if neither x_{i-1} nor y_{i-1} is negative,
//   the incoming carry c_i can only be 0 or +1, so w_i is chosen in {-1, 0};
//   otherwise c_i is 0 or -1 and w_i is chosen in {0, +1}.
//      p = +2 : c = +1, w =  0
//      p = +1 : lower pair non-negative ? (c = +1, w = -1) : (c =  0, w = +1)
//      p =  0 : c =  0, w =  0
//      p = -1 : lower pair non-negative ? (c =  0, w = -1) : (c = -1, w = +1)
//      p = -2 : c = -1, w =  0
//   layer 2 forms s_i = w_i + c_i, which by the choice above never leaves
//   {-1, 0, +1}, so no second carry arises. Below digit 0 the pair is taken as
//   non-negative, so c_0 = 0; the top digit is s_W = c_W.
// The rule table itself is the standard one for this two-layer scheme and is
// this design's own statement of it.
// A property used throughout the design: a position where both inputs are 0
// produces no carry, so the sum needs at most one digit more than the wider
// of the two operands' used digits. W must be at least 2.
module rsd_adder #(
  parameter int W = 256
) (
  input  logic [1:0][W-1:0] x,
  input  logic [1:0][W-1:0] y,
  input  logic              sub,
  output logic [1:0][W:0]   s
);

  // Digit vectors: xp[i] is 1 when x_i = +1, xn[i] when x_i = -1.
  logic [W-1:0] xp, xn, yp, yn;
  // Digit sum classes of layer 1.
  logic [W-1:0] p_two, p_one, p_mone, p_mtwo;
  // Pair at position i-1 has no negative digit (position -1 counts as such).
  logic [W-1:0] nn_low;
  // Layer 1 outputs: transfer into position i, interim sum of position i.
  logic [W:0]   c_pos, c_neg;
  logic [W-1:0] w_pos, w_neg;
  logic [W:0]   s_pos, s_neg;

  assign xp = x[1] & ~x[0];
  assign xn = x[0] & ~x[1];
  assign yp = y[1] & ~y[0];
  assign yn = y[0] & ~y[1];

  logic [W-1:0] ep, en;   // effective y digits after the optional negation
  assign ep = sub ? yn : yp;
  assign en = sub ? yp : yn;

  // layer 1
  assign p_two  = xp & ep;
  assign p_mtwo = xn & en;
  assign p_one  = (xp & ~ep & ~en) | (ep & ~xp & ~xn);
  assign p_mone = (xn & ~ep & ~en) | (en & ~xp & ~xn);
  assign nn_low = {~(xn[W-2:0] | en[W-2:0]), 1'b1};
  assign c_pos  = {p_two | (p_one & nn_low), 1'b0};
  assign c_neg  = {p_mtwo | (p_mone & ~nn_low), 1'b0};
  assign w_pos  = (p_one | p_mone) & ~nn_low;
  assign w_neg  = (p_one | p_mone) & nn_low;

  // layer 2: s_i = w_i + c_i, always in {-1, 0, +1}
  assign s_pos = {1'b0, w_pos & ~c_neg[W-1:0]} | (c_pos & ~{1'b0, w_neg});
  assign s_neg = {1'b0, w_neg & ~c_pos[W-1:0]} | (c_neg & ~{1'b0, w_pos});

  assign s = {s_pos, s_neg};

endmodule
