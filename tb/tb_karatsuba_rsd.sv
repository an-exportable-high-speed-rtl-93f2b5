// tb_karatsuba_rsd: self-checking test of the pipelined Karatsuba multiplier.
//
// Presents a new random operand pair (random digits in {-1,0,+1}, plus some
// all-(+1) and all-(-1) corner operands) every clock cycle, and checks every
// product against the integer product of the operand values, computed from
// the plus/minus vectors with wide signed arithmetic. It also checks that the
// first product appears exactly kara_latency(N, BASE) cycles after the first
// operands, and that one product leaves the pipeline every cycle.
module tb_karatsuba_rsd;
  import rsd_pkg::*;

  localparam int N    = 64;
  localparam int BASE = 4;
  localparam int PW   = kara_width(N, BASE);
  localparam int LAT  = kara_latency(N, BASE);
  localparam int NV   = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0][N-1:0]  a, b;
  logic [1:0][PW-1:0] p;

  karatsuba_rsd #(.N(N), .BASE(BASE)) dut (.clk(clk), .a(a), .b(b), .p(p));

  int checks = 0, failures = 0;

  // value of an RSD number: positive component minus negative component
  function automatic logic signed [2*PW+1:0] val_n(logic [1:0][N-1:0] d);
    logic signed [2*PW+1:0] v;
    v = '0;
    for (int i = N - 1; i >= 0; i--) v = 2 * v + rsd_val({d[1][i], d[0][i]});
    return v;
  endfunction

  function automatic logic signed [2*PW+1:0] val_p(logic [1:0][PW-1:0] d);
    logic signed [2*PW+1:0] v;
    v = '0;
    for (int i = PW - 1; i >= 0; i--) v = 2 * v + rsd_val({d[1][i], d[0][i]});
    return v;
  endfunction

  function automatic logic [1:0][N-1:0] rnd_op(int kind);
    logic [1:0][N-1:0] d;
    for (int i = 0; i < N; i++) begin
      rsd_digit_t g;
      case (kind)
        0: g = RSD_P;
        1: g = RSD_N;
        default: case ($urandom_range(2)) 0: g = RSD_Z; 1: g = RSD_P; default: g = RSD_N; endcase
      endcase
      {d[1][i], d[0][i]} = g;
    end
    return d;
  endfunction

  logic signed [2*PW+1:0] expect_q[$];
  int cyc = 0;
  int first_out = -1;

  initial begin
    a = '0; b = '0;
    for (int t = 0; t < NV + LAT + 2; t++) begin
      if (t < NV) begin
        a = rnd_op(t == 0 ? 0 : t == 1 ? 1 : t == 2 ? 0 : 2);
        b = rnd_op(t == 0 ? 0 : t == 1 ? 0 : t == 2 ? 1 : 2);
        expect_q.push_back(val_n(a) * val_n(b));
      end
      @(posedge clk);
      #1;
      cyc++;
      // the product of the pair presented at cycle t is on p after LAT edges
      if (cyc >= LAT && cyc - LAT < NV) begin
        logic signed [2*PW+1:0] e;
        e = expect_q.pop_front();
        checks++;
        if (val_p(p) !== e) begin
          failures++;
          if (failures < 5) $display("mismatch at cycle %0d", cyc);
        end
      end
    end
    $display("latency %0d cycles, %0d products", LAT, NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
