// karatsuba_rsd: recursive, pipelined Karatsuba-Ofman multiplier on RSD digits.
//
// Multiplies two N-digit RSD numbers and returns their exact product as a
// PW-digit RSD number (PW = kara_width(N, BASE), 518 digits for N = 256).
// An operand pair can be presented every clock cycle; the product appears
// LAT = kara_latency(N, BASE) cycles later (7 for N = 256, BASE = 4).
// Numbers use the {x+, x-} vector pair format of rsd_pkg.
//
// Structure of one level (N > BASE), following the published design's multiplier:
//   * the operands are split into halves aH, aL and bH, bL of H = N/2 digits;
//   * K_low = aL*bL and K_high = aH*bH are formed by two half-size instances
//     of this module;
//   * the half sums aL+aH and bL+bH are formed by carry-free RSD adders. Each
//     is H+1 digits: a carry digit CA (CB) in {-1, 0, +1} and a sum SA (SB).
//     Only SA*SB goes through the third half-size instance K_1, so all three
//     sub-multipliers are balanced. The carry digits are handled outside:
//       (aL+aH)(bL+bH) = SA*SB + (CA*SB + CB*SA)*2^H + CA*CB*2^N
//     where CA*SB and CB*SA are multiplexers choosing SB, -SB or 0 (the "-1"
//     and "0" inputs) and CA*CB is a single digit product;
//   * middle = (aL+aH)(bL+bH) - K_high - K_low, and
//     product = K_low + middle*2^H + K_high*2^N, all with RSD adders.
// Every level ends in a register, so the recursion forms a pipeline with
// one stage per level; SA, SB, CA and CB are delayed by the latency of the
// sub-multipliers to meet their products. The recursion stops at BASE digits
// (4 in the published design) with a schoolbook multiplier, rsd_schoolbook_mul.
//
// All adders of a level are PW digits wide on zero-extended inputs. Their top
// output digit is dropped: an RSD sum needs at most one digit more than its
// wider operand, and PW = width(K) + N + 1 covers the deepest chain of
// additions of a level, so only zero digits are ever discarded. N must be
// BASE times a power of two and BASE at least 4.
//
// Lint note: Verilator's lint-only pass does not follow the module into its
// own recursive instances, so it reports k_low, k_high and k_1 as undriven
// and sa_lo, sb_lo as unused. They are driven and read by the half-size
// instances; the simulations, which elaborate the full recursion, check every
// product bit.
module karatsuba_rsd
  import rsd_pkg::*;
#(
  parameter int N    = 256,
  parameter int BASE = 4
) (
  input  logic                                 clk,
  input  logic [1:0][N-1:0]                    a,
  input  logic [1:0][N-1:0]                    b,
  output logic [1:0][kara_width(N, BASE)-1:0]  p
);

  // Keep each recursion level a module of its own in simulation, so that
  // the many equal sub-multipliers share one model.
  /*verilator no_inline_module*/

  localparam int PW = kara_width(N, BASE);

  if (N <= BASE) begin : g_leaf

    logic [1:0][2*N-1:0] prod;

    rsd_schoolbook_mul #(.N(N)) u_school (
      .a(a),
      .b(b),
      .p(prod)
    );

    always_ff @(posedge clk) p <= prod;

  end else begin : g_node

    localparam int H  = N / 2;
    localparam int SW = kara_width(H, BASE);
    localparam int SL = kara_latency(H, BASE);

    logic [1:0][H-1:0]  a_lo, a_hi, b_lo, b_hi;
    logic [1:0][H:0]    sa, sb;           // {carry digit, H-digit sum}
    logic [1:0][H-1:0]  sa_lo, sb_lo;
    logic [1:0][SW-1:0] k_low, k_high, k_1;

    assign a_lo  = {a[1][H-1:0], a[0][H-1:0]};
    assign a_hi  = {a[1][N-1:H], a[0][N-1:H]};
    assign b_lo  = {b[1][H-1:0], b[0][H-1:0]};
    assign b_hi  = {b[1][N-1:H], b[0][N-1:H]};
    assign sa_lo = {sa[1][H-1:0], sa[0][H-1:0]};
    assign sb_lo = {sb[1][H-1:0], sb[0][H-1:0]};

    rsd_adder #(.W(H)) u_sum_a (.x(a_lo), .y(a_hi), .sub(1'b0), .s(sa));
    rsd_adder #(.W(H)) u_sum_b (.x(b_lo), .y(b_hi), .sub(1'b0), .s(sb));

    karatsuba_rsd #(.N(H), .BASE(BASE)) u_k_low  (.clk(clk), .a(a_lo),  .b(b_lo),  .p(k_low));
    karatsuba_rsd #(.N(H), .BASE(BASE)) u_k_high (.clk(clk), .a(a_hi),  .b(b_hi),  .p(k_high));
    karatsuba_rsd #(.N(H), .BASE(BASE)) u_k_1    (.clk(clk), .a(sa_lo), .b(sb_lo), .p(k_1));

    // Delay the half sums to line up with the sub-products.
    logic [SL-1:0][1:0][H:0] sa_dl, sb_dl;

    always_ff @(posedge clk) begin
      sa_dl[0] <= sa;
      sb_dl[0] <= sb;
      for (int k = 1; k < SL; k++) begin
        sa_dl[k] <= sa_dl[k-1];
        sb_dl[k] <= sb_dl[k-1];
      end
    end

    logic [1:0][H:0]    sa_d, sb_d;
    logic               ca_p, ca_n, cb_p, cb_n;
    logic [1:0][PW-1:0] cross_a, cross_b, carry_term;
    logic [1:0][PW-1:0] x_low, x_high, x_1;

    assign sa_d = sa_dl[SL-1];
    assign sb_d = sb_dl[SL-1];
    assign ca_p = sa_d[1][H] & ~sa_d[0][H];
    assign ca_n = sa_d[0][H] & ~sa_d[1][H];
    assign cb_p = sb_d[1][H] & ~sb_d[0][H];
    assign cb_n = sb_d[0][H] & ~sb_d[1][H];

    always_comb begin
      // -1 / 0 / +1 multiplexers: CA*SB and CB*SA
      cross_a[1] = ca_p ? PW'(sb_d[1][H-1:0]) : ca_n ? PW'(sb_d[0][H-1:0]) : '0;
      cross_a[0] = ca_p ? PW'(sb_d[0][H-1:0]) : ca_n ? PW'(sb_d[1][H-1:0]) : '0;
      cross_b[1] = cb_p ? PW'(sa_d[1][H-1:0]) : cb_n ? PW'(sa_d[0][H-1:0]) : '0;
      cross_b[0] = cb_p ? PW'(sa_d[0][H-1:0]) : cb_n ? PW'(sa_d[1][H-1:0]) : '0;
      // CA*CB at digit N
      carry_term = '0;
      carry_term[1][N] = (ca_p & cb_p) | (ca_n & cb_n);
      carry_term[0][N] = (ca_p & cb_n) | (ca_n & cb_p);
      x_low  = {PW'(k_low[1]),  PW'(k_low[0])};
      x_high = {PW'(k_high[1]), PW'(k_high[0])};
      x_1    = {PW'(k_1[1]),    PW'(k_1[0])};
    end

    logic [1:0][PW:0]   t1, t2, t3, t4, mid, r1, r2;
    logic [1:0][PW-1:0] t1_w, t2_w, t3_sh, t4_w, mid_sh, r1_w, high_sh;

    assign t1_w    = {t1[1][PW-1:0], t1[0][PW-1:0]};
    assign t2_w    = {t2[1][PW-1:0], t2[0][PW-1:0]};
    assign t3_sh   = {t3[1][PW-1:0] << H, t3[0][PW-1:0] << H};
    assign t4_w    = {t4[1][PW-1:0], t4[0][PW-1:0]};
    assign mid_sh  = {mid[1][PW-1:0] << H, mid[0][PW-1:0] << H};
    assign r1_w    = {r1[1][PW-1:0], r1[0][PW-1:0]};
    assign high_sh = {x_high[1] << N, x_high[0] << N};

    // middle = K_1 - K_low - K_high + (CA*SB + CB*SA)*2^H + CA*CB*2^N
    rsd_adder #(.W(PW)) u_t1  (.x(x_1),     .y(x_low),      .sub(1'b1), .s(t1));
    rsd_adder #(.W(PW)) u_t2  (.x(t1_w),    .y(x_high),     .sub(1'b1), .s(t2));
    rsd_adder #(.W(PW)) u_t3  (.x(cross_a), .y(cross_b),    .sub(1'b0), .s(t3));
    rsd_adder #(.W(PW)) u_t4  (.x(t3_sh),   .y(carry_term), .sub(1'b0), .s(t4));
    rsd_adder #(.W(PW)) u_mid (.x(t2_w),    .y(t4_w),       .sub(1'b0), .s(mid));
    // product = K_low + middle*2^H + K_high*2^N
    rsd_adder #(.W(PW)) u_r1  (.x(x_low),   .y(mid_sh),     .sub(1'b0), .s(r1));
    rsd_adder #(.W(PW)) u_r2  (.x(r1_w),    .y(high_sh),    .sub(1'b0), .s(r2));

    always_ff @(posedge clk) p <= {r2[1][PW-1:0], r2[0][PW-1:0]};

  end

endmodule
