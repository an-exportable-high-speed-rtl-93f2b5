// tb_rsd_adder: self-checking test of the carry-free RSD adder/subtractor.
//
// Random W-digit operands (digits drawn from {-1, 0, +1}, plus runs of all
// +1 and all -1 digits that stress the carry rules) are added and subtracted.
// Each result is checked against the integer sum/difference of the operand
// values, and every output digit is checked to be a legal code (never 2'b11).
module tb_rsd_adder;
  import rsd_pkg::*;

  localparam int W  = 24;
  localparam int NV = 4000;

  logic [1:0][W-1:0] x, y;
  logic              sub;
  logic [1:0][W:0]   s;

  rsd_adder #(.W(W)) dut (.x(x), .y(y), .sub(sub), .s(s));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  function automatic longint val(logic [1:0][W:0] d);
    return longint'(d[1]) - longint'(d[0]);
  endfunction

  function automatic logic [1:0][W-1:0] rnd(int kind);
    logic [1:0][W-1:0] d;
    for (int i = 0; i < W; i++) begin
      int r;
      r = (kind == 0) ? 1 : (kind == 1) ? 2 : int'($urandom_range(2));
      d[1][i] = (r == 1);
      d[0][i] = (r == 2);
    end
    return d;
  endfunction

  initial begin
    for (int t = 0; t < NV; t++) begin
      x   = rnd(t < 4 ? t % 2 : 2);
      y   = rnd(t < 4 ? t / 2 : 2);
      sub = t[0] ^ t[3];
      #1;
      checks++;
      if (val(s) != (sub ? val({1'b0, x[1], 1'b0, x[0]}) - val({1'b0, y[1], 1'b0, y[0]})
                         : val({1'b0, x[1], 1'b0, x[0]}) + val({1'b0, y[1], 1'b0, y[0]}))) begin
        failures++;
        if (failures < 5) $display("value mismatch t=%0d", t);
      end
      checks++;
      if ((s[1] & s[0]) != '0) begin
        failures++;
        if (failures < 5) $display("illegal digit code t=%0d", t);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
