// mod_add_sub_rsd: modular addition/subtraction on N-digit RSD operands.
//
// Computes r == a + b (mod m), or r == a - b (mod m) when sub is set, with r an
// N-digit RSD number (|r| < 2^N). The hardware is the one of the published design's
// modular adder: a single N-digit rsd_adder, MUX A choosing between the
// operand a and the low N digits of the result register, MUX B choosing
// between b and the modulus m, the result register and a small controller
// that only looks at the most significant digit (MSD, digit N) of the result.
//
// Operation:
//   cycle 0 (start): register <= a +/- b; its MSD is the adder's carry digit.
//   following cycles: while the MSD is +1 the register becomes reg - m, while
//   it is -1 it becomes reg + m; the new MSD is the old MSD plus the adder's
//   carry digit. As soon as the MSD is 0, valid_out is raised for one cycle
//   and result holds the low N digits.
// The correction adds only N digits (low part and m) and folds the carry into
// the MSD. Because m is stored with all-positive digits and its top digit is
// +1 (m must satisfy 2^(N-1) < m < 2^N and be odd), subtracting m can never
// produce a +1 carry and adding it never a -1 carry, so the MSD moves toward
// 0 and never changes sign. With reduced inputs (|a|, |b| < 2^N) the sum is
// below 4m, so at most three corrections are ever needed; the common cases
// take one, two or three cycles from start to valid_out.
//
// Numbers use the {x+, x-} vector pair format of rsd_pkg.
// Interface: start is accepted when busy is low. a, b, m and sub are sampled
// in the start cycle only. result is valid in the cycle valid_out is high.
// Reset (synchronous, active high) returns the controller to idle.
module mod_add_sub_rsd
  import rsd_pkg::*;
#(
  parameter int N = 256
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic               sub,
  input  logic [1:0][N-1:0] a,
  input  logic [1:0][N-1:0] b,
  input  logic [1:0][N-1:0] m,
  output logic [1:0][N-1:0] result,
  output logic               valid_out,
  output logic               busy
);

  logic [1:0][N-1:0] m_q;       // modulus held for the corrections
  logic [1:0][N-1:0] low_q;     // low N digits of the intermediate result
  logic signed [2:0]  msd_q;     // MSD of the intermediate result, -1..+1
  logic               run_q;

  logic [1:0][N-1:0] mux_a, mux_b;
  logic [1:0][N:0]    sum;
  logic               add_sub;
  logic signed [2:0]  carry_v;

  // MUX A / MUX B and the add/sub control
  always_comb begin
    if (!run_q) begin
      mux_a   = a;
      mux_b   = b;
      add_sub = sub;
    end else begin
      mux_a   = low_q;
      mux_b   = m_q;
      add_sub = (msd_q > 0);
    end
  end

  rsd_adder #(.W(N)) u_adder (
    .x  (mux_a),
    .y  (mux_b),
    .sub(add_sub),
    .s  (sum)
  );

  assign carry_v   = 3'(rsd_val({sum[1][N], sum[0][N]}));
  assign valid_out = run_q && (msd_q == 0);
  assign result    = low_q;
  assign busy      = run_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q <= 1'b0;
      msd_q <= '0;
      low_q <= '0;
      m_q   <= '0;
    end else if (!run_q) begin
      if (start) begin
        run_q <= 1'b1;
        m_q   <= m;
        low_q <= {sum[1][N-1:0], sum[0][N-1:0]};
        msd_q <= carry_v;
      end
    end else if (msd_q == 0) begin
      run_q <= 1'b0;
    end else begin
      low_q <= {sum[1][N-1:0], sum[0][N-1:0]};
      msd_q <= msd_q + carry_v;
    end
  end

  // The MSD never leaves {-1, 0, +1} (see the header).
  assert property (@(posedge clk) disable iff (rst) (msd_q >= -1 && msd_q <= 1));

endmodule
