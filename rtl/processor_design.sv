// processor_design: RSD arithmetic unit for prime-field ECC (NIST P-256 size).
//
// Performs one modular operation on N-bit binary operands: a+b, a-b, a*b or
// a/b modulo an odd modulus m, selected by sel (see rsd_pkg::au_op_e). Inside,
// all arithmetic is carried out in radix-2 redundant signed digit (RSD) form,
// so no adder has a carry chain longer than one digit:
//   * mod_add_sub_rsd - modular adder/subtractor, 1 to 3 cycles (+1, see below)
//   * mod_mul_rsd     - pipelined recursive Karatsuba multiplier followed by a
//                       reduction step
//   * mod_div_rsd     - radix-4 binary GCD modular divider
// A binary operand enters as an RSD number with a zero negative component;
// the RSD result of the selected unit is mapped back to binary in [0, m) by
// rsd_to_bin_mod and registered.
//
// Interface (the port set of the published design's processor top level; the result
// port is called result because "output" is a keyword):
//   start  one-cycle pulse while idle; sel, a, b and m are sampled with it
//   done   one-cycle pulse, result valid from that cycle until the next start
// Timing from start to done: add/sub 2 to 4 cycles, mul kara_latency + 2N + 2
// cycles (521 for N = 256), div data dependent, at most about 6N cycles.
// Operands must satisfy 0 <= a, b < m, 2^(N-1) < m < 2^N, m odd, and for
// division b != 0 (m prime, e.g. the P-256 prime). Starts while busy are
// ignored. Reset is synchronous and active high.
// The controller, ROM, memory and buses that sequence whole point operations
// around this unit are not part of this module.
module processor_design
  import rsd_pkg::*;
#(
  parameter int N    = 256,
  parameter int BASE = 4
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         start,
  input  logic [1:0]   sel,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] m,
  output logic [N-1:0] result,
  output logic         done
);

  typedef enum logic {S_IDLE, S_BUSY} state_e;
  state_e  state_q;
  au_op_e  op_q;

  au_op_e op_in;
  assign op_in = au_op_e'(sel);

  // binary -> RSD: the value sits on the positive component
  logic [1:0][N-1:0] a_rsd, b_rsd, m_rsd;
  assign a_rsd = {a, {N{1'b0}}};
  assign b_rsd = {b, {N{1'b0}}};
  assign m_rsd = {m, {N{1'b0}}};

  logic launch;
  assign launch = (state_q == S_IDLE) && start;

  // ------------------------------------------------------------ add / sub
  logic              as_valid, as_busy;
  logic [1:0][N-1:0] as_result;

  mod_add_sub_rsd #(.N(N)) u_add_sub (
    .clk      (clk),
    .rst      (reset),
    .start    (launch && (op_in == OP_ADD || op_in == OP_SUB)),
    .sub      (op_in == OP_SUB),
    .a        (a_rsd),
    .b        (b_rsd),
    .m        (m_rsd),
    .result   (as_result),
    .valid_out(as_valid),
    .busy     (as_busy)
  );

  // ------------------------------------------------------------ mul
  logic              mul_valid, mul_busy;
  logic [1:0][N-1:0] mul_result;

  mod_mul_rsd #(.N(N), .BASE(BASE)) u_mul (
    .clk      (clk),
    .rst      (reset),
    .start    (launch && op_in == OP_MUL),
    .a        (a_rsd),
    .b        (b_rsd),
    .m        (m),
    .result   (mul_result),
    .valid_out(mul_valid),
    .busy     (mul_busy)
  );

  // ------------------------------------------------------------ div
  logic                div_valid, div_busy;
  logic [1:0][N+1:0]   div_result;

  mod_div_rsd #(.N(N)) u_div (
    .clk      (clk),
    .rst      (reset),
    .start    (launch && op_in == OP_DIV),
    .x        (a_rsd),
    .y        (b_rsd),
    .m        (m),
    .z        (div_result),
    .valid_out(div_valid),
    .busy     (div_busy)
  );

  // ------------------------------------------------------------ result path
  logic [N-1:0]        m_q;
  logic [1:0][N+1:0]   unit_result;
  logic                unit_valid;
  logic [N-1:0]        bin_result;

  always_comb begin
    unique case (op_q)
      OP_ADD, OP_SUB: begin
        unit_result = {2'b00, as_result[1], 2'b00, as_result[0]};
        unit_valid  = as_valid;
      end
      OP_MUL: begin
        unit_result = {2'b00, mul_result[1], 2'b00, mul_result[0]};
        unit_valid  = mul_valid;
      end
      default: begin
        unit_result = div_result;
        unit_valid  = div_valid;
      end
    endcase
  end

  rsd_to_bin_mod #(.N(N), .W(N + 2)) u_to_bin (
    .x(unit_result),
    .m(m_q),
    .r(bin_result)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      state_q <= S_IDLE;
      op_q    <= OP_ADD;
      m_q     <= '0;
      result  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state_q)
        S_IDLE:
          if (start) begin
            op_q    <= op_in;
            m_q     <= m;
            state_q <= S_BUSY;
          end
        S_BUSY:
          if (unit_valid) begin
            result  <= bin_result;
            done    <= 1'b1;
            state_q <= S_IDLE;
          end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Only the unit that was started may be busy.
  assert property (@(posedge clk) disable iff (reset)
    (int'(as_busy) + int'(mul_busy) + int'(div_busy)) <= 1);

endmodule
