// rsd_pkg: types and helper functions shared by the RSD arithmetic unit.
//
// A radix-2 redundant signed digit (RSD) takes the values -1, 0 and +1 and is
// stored in two bits {plus, minus}: 0 is 2'b00, +1 is 2'b10 and -1 is 2'b01,
// as in the digit coding of the published design. The code
// 2'b11 never leaves an adder; it is read as 0. An RSD number X of W digits is
// held as its positive and negative components, X = x+ - x-, in a packed
// logic [1:0][W-1:0]: X[1] is the x+ bit vector and X[0] the x- bit vector,
// bit 0 least significant. Digit i is therefore {X[1][i], X[0][i]}, and its
// value is the plain binary difference X[1] - X[0]. Keeping the two components
// as vectors makes negation a swap of the halves and a shift by k digits a
// shift of both halves.
//
// kara_width() and kara_latency() give the output width (in digits) and the
// pipeline latency (in clock cycles) of the recursive Karatsuba multiplier for
// an N-digit operand and a schoolbook base of BASE digits. They follow the
// adder tree of karatsuba_rsd: the base product is 2*BASE digits wide and
// every recursion level adds N+1 digits to the width of its half-size products.
package rsd_pkg;

  typedef logic [1:0] rsd_digit_t;  // {plus, minus}

  localparam rsd_digit_t RSD_Z = 2'b00;
  localparam rsd_digit_t RSD_P = 2'b10;
  localparam rsd_digit_t RSD_N = 2'b01;

  // Operation codes of the arithmetic unit (sel port of the top level).
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_DIV = 2'd3
  } au_op_e;

  // Negation of a digit: swap plus and minus.
  function automatic rsd_digit_t rsd_neg(rsd_digit_t d);
    return {d[0], d[1]};
  endfunction

  // Digit value in {-1, 0, +1}.
  function automatic int rsd_val(rsd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  // Product of two digits (the "x" cell of the Karatsuba carry path).
  function automatic rsd_digit_t rsd_mul_digit(rsd_digit_t a, rsd_digit_t b);
    int v;
    v = rsd_val(a) * rsd_val(b);
    return (v > 0) ? RSD_P : (v < 0) ? RSD_N : RSD_Z;
  endfunction

  function automatic int kara_width(int n, int base);
    if (n <= base) return 2 * n;
    return kara_width(n / 2, base) + n + 1;
  endfunction

  function automatic int kara_latency(int n, int base);
    if (n <= base) return 1;
    return kara_latency(n / 2, base) + 1;
  endfunction

endpackage
