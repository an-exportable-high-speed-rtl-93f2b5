// mod_reduce: reduction of a signed double-length RSD product modulo m.
//
// The multiplier produces an exact RSD product P (|P| < 2^(2N)) of PW digits;
// this block returns P mod m as an N-bit binary number in [0, m).
// How it works: at start the product is converted to two's complement by one
// subtraction of its components (x+ - x-), kept to 2N+1 bits, which holds P
// exactly. Its magnitude is then reduced one bit per clock cycle, most
// significant bit first, by the shift-and-subtract (restoring) rule
//   r <- 2r + bit;  if r >= m then r <- r - m,
// and a negative P is mapped to m - r at the end. 2N cycles after start,
// valid_out is high for one cycle with the result.
// The reduction step is this design's own choice: the design calls its
// multiplier modular but does not describe how the product is reduced.
// m must be odd with 2^(N-1) < m < 2^N, as for the other units.
// Interface: start is accepted when busy is low; prod and m are sampled then.
// Reset is synchronous, active high.
module mod_reduce
  import rsd_pkg::*;
#(
  parameter int N  = 256,
  parameter int PW = kara_width(256, 4)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [1:0][PW-1:0] prod,
  input  logic [N-1:0]       m,
  output logic [N-1:0]       result,
  output logic               valid_out,
  output logic               busy
);

  localparam int CW = $clog2(2 * N + 1);

  logic [2*N:0]   p_bin;        // P in two's complement, 2N+1 bits
  logic [2*N-1:0] mag_q;        // |P|, shifted out MSB first
  logic           neg_q;
  logic [N-1:0]   m_q;
  logic [N:0]     r_q;          // partial remainder, < m
  logic [CW-1:0]  cnt_q;
  logic           run_q, fin_q;

  logic [N:0] r_shift, r_next;

  assign p_bin   = prod[1][2*N:0] - prod[0][2*N:0];
  assign r_shift = {r_q[N-1:0], mag_q[2*N-1]};
  assign r_next  = (r_shift >= {1'b0, m_q}) ? r_shift - {1'b0, m_q} : r_shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q <= 1'b0;
      fin_q <= 1'b0;
      neg_q <= 1'b0;
      mag_q <= '0;
      m_q   <= '0;
      r_q   <= '0;
      cnt_q <= '0;
    end else begin
      fin_q <= 1'b0;
      if (!run_q) begin
        if (start) begin
          run_q <= 1'b1;
          neg_q <= p_bin[2*N];
          mag_q <= p_bin[2*N] ? (2*N)'(-p_bin) : p_bin[2*N-1:0];
          m_q   <= m;
          r_q   <= '0;
          cnt_q <= CW'(2 * N);
        end
      end else begin
        r_q   <= r_next;
        mag_q <= mag_q << 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          run_q <= 1'b0;
          fin_q <= 1'b1;
        end
      end
    end
  end

  assign valid_out = fin_q;
  assign busy      = run_q | fin_q;
  assign result    = (neg_q && r_q != '0) ? m_q - r_q[N-1:0] : r_q[N-1:0];

endmodule
