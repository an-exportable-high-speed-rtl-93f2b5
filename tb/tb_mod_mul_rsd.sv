// tb_mod_mul_rsd: self-checking test of the modular multiplier (Karatsuba
// product followed by reduction), here at N = 32 digits.
//
// Operands are random RSD numbers (including negative ones) and binary
// residues; moduli are random odd numbers with the top bit set. Each result
// must be the residue of a*b in [0, m) on the positive component with a zero
// negative component, and valid_out must come kara_latency(N) + 2N + 2
// cycles after start.
module tb_mod_mul_rsd;
  import rsd_pkg::*;

  localparam int N   = 32;
  localparam int NV  = 200;
  localparam int LAT = kara_latency(N, 4) + 2 * N + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, start, valid_out, busy;
  logic [1:0][N-1:0] a, b, result;
  logic [N-1:0]      m;

  mod_mul_rsd #(.N(N), .BASE(4)) dut (
    .clk(clk), .rst(rst), .start(start), .a(a), .b(b), .m(m),
    .result(result), .valid_out(valid_out), .busy(busy));

  int checks = 0, failures = 0;
  typedef logic signed [2*N+4:0] wide_t;

  function automatic logic [1:0][N-1:0] rnd_rsd();
    logic [1:0][N-1:0] d;
    for (int i = 0; i < N; i++) begin
      int g;
      g = int'($urandom_range(2));
      d[1][i] = (g == 1);
      d[0][i] = (g == 2);
    end
    return d;
  endfunction

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; b = '0; m = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      wide_t e;
      int cyc;
      m = {1'b1, 31'($urandom)} | 32'd1;
      if (t % 2 == 0) begin
        a = rnd_rsd();
        b = rnd_rsd();
      end else begin
        a = {$urandom % m, 32'd0};
        b = {$urandom % m, 32'd0};
      end
      e = ((wide_t'(a[1]) - wide_t'(a[0])) * (wide_t'(b[1]) - wide_t'(b[0]))) % wide_t'(m);
      if (e < 0) e += wide_t'(m);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!valid_out && cyc < 4 * LAT) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      checks++;
      if (result[0] != '0 || wide_t'(result[1]) != e) begin
        failures++;
        if (failures < 5) $display("t=%0d result %0d expected %0d", t, result[1], e);
      end
      checks++;
      if (cyc != LAT) begin
        failures++;
        if (failures < 5) $display("t=%0d latency %0d, expected %0d", t, cyc, LAT);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * (LAT + 3) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
