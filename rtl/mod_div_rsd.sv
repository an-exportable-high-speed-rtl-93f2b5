// mod_div_rsd: modular division z = x / y mod m by the binary GCD method,
// radix 4, on RSD numbers.
//
// Four registers hold A, B, U and V with the invariants A*x == U*y and
// B*x == V*y (mod m). They start as A = y, B = m, U = x, V = 0. A is driven
// to zero while B stays odd and keeps gcd(y, m) = 1; at the end B = +1 or -1,
// so z = V or z = -V.
// Each iteration passes through up to three states, as in the published design:
//   CHECK  A even? If A = 0 mod 4: A <- A/4, U <- U/4 mod m; if A = 2 mod 4:
//          A <- A/2, U <- U/2 mod m. Both shifts are plain right shifts of the
//          RSD digits, because a number divisible by 2 (4) has its lowest
//          one (two) digits zero. An odd A moves on to SWAP.
//   SWAP   if delta < 0, swap A with B and U with V, and negate delta.
//   DIV    A <- (A + B)/4 or (A - B)/4, whichever is divisible by 4, and
//          U <- (U +/- V)/4 mod m likewise.
// Division by 2 or 4 modulo m adds k*m first, with k in {0, +1, -1, 2}
// chosen from the low digits of the dividend and from m mod 4 so that the sum
// is divisible by 4 (or 2); the 4:1 multiplexer offers 0, m, -m and 2m.
// Three RSD adders do the work: A +/- B, U +/- V, and (U or U +/- V) + k*m.
// |U| and |V| stay below 2m, so U and V are N+2 digits and need no
// truncation; A and B fit N digits.
//
// delta = alpha - beta, where 2^alpha and 2^beta are upper bounds of |A| and
// |B| that every step lowers by the digits it shifts out. Swapping whenever
// delta < 0 keeps alpha >= beta in DIV, so (A +/- B)/4 < 2^(alpha-1). rho = alpha + beta - 1 counts
// down to zero, at which point A must be zero and the loop ends. As in the
// design, neither is kept as a binary counter: rho is a one-hot vector that
// starts at its top bit (2N-1) and is shifted right by one or two places,
// and only its LSB is tested for termination; delta is a one-hot magnitude
// vector plus a sign flag that sets the shift direction, and delta < 0 is
// read from the flag and the LSB. At most 2N-1 shifts of rho take place, so
// a division takes at most about 3*(2N-1) + 2 cycles.
//
// The three states, the three adders, the multiple-of-m multiplexer and the
// one-hot delta and rho vectors follow the published design. This design's own
// choices are the exact update rules above,
// the bounds alpha, beta that define delta and rho, and the handshake.
// Requirements: m odd with 2^(N-1) < m < 2^N, y not 0 mod m, |x| < 2^N.
// Interface: start is accepted when busy is low; x, y and m are sampled in
// the start cycle. valid_out is high for one cycle with z (N+2 digits,
// |z| < 2m, z == x/y mod m). Numbers use the {x+, x-} format of rsd_pkg.
// Reset is synchronous, active high.
module mod_div_rsd
  import rsd_pkg::*;
#(
  parameter int N = 256
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [1:0][N-1:0]   x,
  input  logic [1:0][N-1:0]   y,
  input  logic [N-1:0]        m,
  output logic [1:0][N+1:0]   z,
  output logic                valid_out,
  output logic                busy
);

  localparam int UW = N + 2;    // width of U and V in digits

  typedef enum logic [2:0] {S_IDLE, S_CHECK, S_SWAP, S_DIV, S_FIN} state_e;
  state_e state_q;

  logic [1:0][N-1:0]  a_q, b_q;
  logic [1:0][UW-1:0] u_q, v_q;
  logic [N-1:0]       m_q;
  logic [2*N-1:0]     rho_q;          // one-hot, bit alpha+beta-1
  logic [N+1:0]       dmag_q;         // one-hot |delta|
  logic               dneg_q;         // delta sign flag
  logic               fin_q;

  // ---------------------------------------------------------------- helpers
  // Residue mod 4 of an RSD number from its two lowest digits.
  function automatic logic [1:0] low_mod4(logic p0, logic n0, logic p1, logic n1);
    // two's complement wraps mod 4
    return 2'({1'b0, p0} - {1'b0, n0} + {p1, 1'b0} - {n1, 1'b0});
  endfunction

  logic [1:0] a_mod4, ab_sum_mod4, w_mod4;
  logic       delta_neg;
  logic       ab_add;                 // A + B (else A - B) is divisible by 4

  assign a_mod4      = low_mod4(a_q[1][0], a_q[0][0], a_q[1][1], a_q[0][1]);
  assign ab_sum_mod4 = a_mod4 + low_mod4(b_q[1][0], b_q[0][0], b_q[1][1], b_q[0][1]);
  assign ab_add      = (ab_sum_mod4 == 2'd0);
  assign delta_neg   = dneg_q & ~dmag_q[0];

  // ---------------------------------------------------------------- adder 1: A +/- B
  logic [1:0][N:0] ab_sum;
  rsd_adder #(.W(N)) u_add_ab (.x(a_q), .y(b_q), .sub(~ab_add), .s(ab_sum));

  // ---------------------------------------------------------------- adder 2: U +/- V
  logic [1:0][UW:0] uv_sum;
  rsd_adder #(.W(UW)) u_add_uv (.x(u_q), .y(v_q), .sub(~ab_add), .s(uv_sum));

  // ---------------------------------------------------------------- adder 3: W + k*m
  // W is U (even step) or U +/- V (odd step); 3:1-style operand multiplexer.
  logic [1:0][UW:0]   w_op;
  logic [1:0][UW:0]   km;             // 4:1 multiplexer: 0, m, -m, 2m
  logic [1:0][UW+1:0] wk_sum;
  logic               div4;           // divide the sum by 4 (else by 2)
  logic               w_odd, w_odd_pos;

  always_comb begin
    if (state_q == S_DIV) begin
      w_op = uv_sum;
      div4 = 1'b1;
    end else begin
      w_op = {1'b0, u_q[1], 1'b0, u_q[0]};
      div4 = (a_mod4 == 2'd0);
    end
    w_mod4    = low_mod4(w_op[1][0], w_op[0][0], w_op[1][1], w_op[0][1]);
    w_odd     = w_op[1][0] ^ w_op[0][0];
    w_odd_pos = w_op[1][0] & ~w_op[0][0];
    km = '0;
    if (div4) begin
      // k = -w * m^-1 mod 4, and m^-1 = m mod 4 for odd m
      unique case (2'(-(w_mod4 * m_q[1:0])))
        2'd1: km[1] = (UW+1)'(m_q);
        2'd2: km[1] = (UW+1)'(m_q) << 1;
        2'd3: km[0] = (UW+1)'(m_q);
        default: ;
      endcase
    end else if (w_odd) begin
      // odd dividend: subtract m after a +1 digit, add m after a -1 digit
      if (w_odd_pos) km[0] = (UW+1)'(m_q);
      else           km[1] = (UW+1)'(m_q);
    end
  end

  rsd_adder #(.W(UW + 1)) u_add_wk (.x(w_op), .y(km), .sub(1'b0), .s(wk_sum));

  // (W + k*m)/4 and /2: drop the lowest digits, which are zero
  logic [1:0][UW-1:0] wk_div;
  assign wk_div = div4 ? {wk_sum[1][UW+1:2], wk_sum[0][UW+1:2]}
                       : {wk_sum[1][UW:1],   wk_sum[0][UW:1]};

  // ---------------------------------------------------------------- counters
  function automatic logic [2*N-1:0] rho_shift(logic [2*N-1:0] r, logic two);
    if (two) return (r >> 2) | (2*N)'(r[1]);  // saturate at bit 0
    return r >> 1;
  endfunction

  // delta - 1 and delta - 2 on the one-hot magnitude/sign representation
  function automatic logic [N+2:0] delta_dec(logic [N+1:0] mag, logic neg, logic two);
    logic [N+1:0] nm;
    logic         nn;
    if (neg && !mag[0]) begin
      nm = two ? mag << 2 : mag << 1;
      nn = 1'b1;
    end else if (mag[0]) begin                // 0 -> -1 or -2
      nm = two ? (N+2)'(4) : (N+2)'(2);
      nn = 1'b1;
    end else if (two && mag[1]) begin         // 1 -> -1
      nm = (N+2)'(2);
      nn = 1'b1;
    end else begin
      nm = two ? mag >> 2 : mag >> 1;
      nn = 1'b0;
    end
    return {nn, nm};
  endfunction

  logic [N+2:0] dec1, dec2;
  assign dec1 = delta_dec(dmag_q, dneg_q, 1'b0);
  assign dec2 = delta_dec(dmag_q, dneg_q, 1'b1);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      u_q     <= '0;
      v_q     <= '0;
      m_q     <= '0;
      rho_q   <= '0;
      dmag_q  <= '0;
      dneg_q  <= 1'b0;
      fin_q   <= 1'b0;
    end else begin
      fin_q <= 1'b0;
      case (state_q)
        S_IDLE:
          if (start) begin
            a_q     <= y;
            b_q     <= {m, {N{1'b0}}};
            u_q     <= {2'b00, x[1], 2'b00, x[0]};
            v_q     <= '0;
            m_q     <= m;
            rho_q   <= {1'b1, {(2*N-1){1'b0}}};
            dmag_q  <= (N+2)'(1);
            dneg_q  <= 1'b0;
            state_q <= S_CHECK;
          end
        S_CHECK:
          if (rho_q[0]) begin
            state_q <= S_FIN;
          end else if (a_mod4 == 2'd0) begin
            a_q    <= {2'b00, a_q[1][N-1:2], 2'b00, a_q[0][N-1:2]};
            u_q    <= wk_div;
            rho_q  <= rho_shift(rho_q, 1'b1);
            {dneg_q, dmag_q} <= dec2;
          end else if (a_mod4 == 2'd2) begin
            a_q    <= {1'b0, a_q[1][N-1:1], 1'b0, a_q[0][N-1:1]};
            u_q    <= wk_div;
            rho_q  <= rho_shift(rho_q, 1'b0);
            {dneg_q, dmag_q} <= dec1;
          end else begin
            state_q <= S_SWAP;
          end
        S_SWAP: begin
          if (delta_neg) begin
            a_q    <= b_q;
            b_q    <= a_q;
            u_q    <= v_q;
            v_q    <= u_q;
            dneg_q <= 1'b0;
          end
          state_q <= S_DIV;
        end
        S_DIV: begin
          a_q     <= {1'b0, ab_sum[1][N:2], 1'b0, ab_sum[0][N:2]};
          u_q     <= wk_div;
          rho_q   <= rho_shift(rho_q, 1'b0);
          {dneg_q, dmag_q} <= dec1;
          state_q <= S_CHECK;
        end
        S_FIN: begin
          fin_q   <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // B = +1 or -1 at the end; z = V or -V
  logic [N:0] b_bin;
  assign b_bin     = {1'b0, b_q[1]} - {1'b0, b_q[0]};
  assign z         = (b_bin == (N+1)'(1)) ? v_q : {v_q[0], v_q[1]};
  assign valid_out = fin_q;
  assign busy      = (state_q != S_IDLE) | fin_q;

endmodule
