// tb_mod_reduce: self-checking test of the product reduction stage.
//
// Random signed RSD numbers of 2N digits (as the multiplier produces them,
// zero-extended to PW digits) are reduced modulo random odd m with the top
// bit set; the result must equal P mod m in [0, m), computed with integer
// arithmetic, and valid_out must come exactly 2N cycles after start.
module tb_mod_reduce;
  import rsd_pkg::*;

  localparam int N  = 32;
  localparam int PW = kara_width(N, 4);
  localparam int NV = 300;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, start, valid_out, busy;
  logic [1:0][PW-1:0] prod;
  logic [N-1:0]       m, result;

  mod_reduce #(.N(N), .PW(PW)) dut (
    .clk(clk), .rst(rst), .start(start), .prod(prod), .m(m),
    .result(result), .valid_out(valid_out), .busy(busy));

  int checks = 0, failures = 0;
  typedef logic signed [2*N+4:0] wide_t;

  initial begin
    rst = 1'b1; start = 1'b0; prod = '0; m = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      wide_t pv, e;
      int cyc;
      prod = '0;
      for (int i = 0; i < 2 * N; i++) begin
        int g;
        g = (t == 0) ? 1 : (t == 1) ? 2 : int'($urandom_range(2));
        prod[1][i] = (g == 1);
        prod[0][i] = (g == 2);
      end
      m = {1'b1, 31'($urandom)} | 32'd1;
      pv = wide_t'(prod[1][2*N-1:0]) - wide_t'(prod[0][2*N-1:0]);
      e  = pv % wide_t'(m);
      if (e < 0) e += wide_t'(m);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!valid_out && cyc < 4 * N) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      checks++;
      if (wide_t'(result) != e) begin
        failures++;
        if (failures < 5) $display("t=%0d result %0d expected %0d", t, result, e);
      end
      checks++;
      if (cyc != 2 * N + 1) begin
        failures++;
        if (failures < 5) $display("t=%0d latency %0d", t, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * (2 * N + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
