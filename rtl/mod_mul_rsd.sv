// mod_mul_rsd: modular multiplier, a*b mod m on N-digit RSD operands.
//
// The operands are held in registers and multiplied by the pipelined
// Karatsuba multiplier (karatsuba_rsd, LAT = kara_latency(N, BASE) cycles);
// the exact product is then reduced modulo m by mod_reduce (2N cycles). The
// result is returned as an N-digit RSD number whose negative component is
// zero, i.e. as the binary value in [0, m) on the x+ vector.
// From start to valid_out takes LAT + 2N + 2 clock cycles (521 for N = 256).
// The Karatsuba structure follows the published design; the reduction stage and the
// handshake are this design's own choices.
// Interface: start is accepted when busy is low; a, b and m are sampled in the
// start cycle. valid_out is high for one cycle with result. Reset is
// synchronous, active high.
module mod_mul_rsd
  import rsd_pkg::*;
#(
  parameter int N    = 256,
  parameter int BASE = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [1:0][N-1:0] a,
  input  logic [1:0][N-1:0] b,
  input  logic [N-1:0]      m,
  output logic [1:0][N-1:0] result,
  output logic              valid_out,
  output logic              busy
);

  localparam int PW  = kara_width(N, BASE);
  localparam int LAT = kara_latency(N, BASE);
  localparam int LW  = $clog2(LAT + 1);

  typedef enum logic [1:0] {S_IDLE, S_MULT, S_RED} state_e;
  state_e state_q;

  logic [1:0][N-1:0]  a_q, b_q;
  logic [N-1:0]       m_q;
  logic [LW-1:0]      cnt_q;
  logic [1:0][PW-1:0] prod;
  logic               red_start, red_valid;
  logic [N-1:0]       red_result;

  karatsuba_rsd #(.N(N), .BASE(BASE)) u_kara (
    .clk(clk),
    .a  (a_q),
    .b  (b_q),
    .p  (prod)
  );

  assign red_start = (state_q == S_MULT) && (cnt_q == '0);

  mod_reduce #(.N(N), .PW(PW)) u_red (
    .clk      (clk),
    .rst      (rst),
    .start    (red_start),
    .prod     (prod),
    .m        (m_q),
    .result   (red_result),
    .valid_out(red_valid),
    .busy     ()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      m_q     <= '0;
      cnt_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE:
          if (start) begin
            a_q     <= a;
            b_q     <= b;
            m_q     <= m;
            cnt_q   <= LW'(LAT);
            state_q <= S_MULT;
          end
        S_MULT:
          if (cnt_q == '0) state_q <= S_RED;
          else             cnt_q   <= cnt_q - 1'b1;
        S_RED:
          if (red_valid) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign result    = {red_result, {N{1'b0}}};
  assign valid_out = red_valid;
  assign busy      = (state_q != S_IDLE);

endmodule
