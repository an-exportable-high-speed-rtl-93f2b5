// tb_rsd_schoolbook_mul: exhaustive self-checking test of the 4-digit RSD
// schoolbook multiplier. All 3^4 x 3^4 digit combinations are applied and the
// product value is compared with the integer product of the operand values.
module tb_rsd_schoolbook_mul;
  import rsd_pkg::*;

  localparam int N = 4;

  logic [1:0][N-1:0]   a, b;
  logic [1:0][2*N-1:0] p;

  rsd_schoolbook_mul #(.N(N)) dut (.a(a), .b(b), .p(p));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // the i-th combination of N digits, base 3: 0 -> 0, 1 -> +1, 2 -> -1
  function automatic logic [1:0][N-1:0] digits(int code);
    logic [1:0][N-1:0] d;
    for (int i = 0; i < N; i++) begin
      d[1][i] = (code % 3 == 1);
      d[0][i] = (code % 3 == 2);
      code = code / 3;
    end
    return d;
  endfunction

  initial begin
    for (int i = 0; i < 81; i++) begin
      for (int j = 0; j < 81; j++) begin
        int va, vb, vp;
        a = digits(i);
        b = digits(j);
        #1;
        va = int'(a[1]) - int'(a[0]);
        vb = int'(b[1]) - int'(b[0]);
        vp = int'(p[1]) - int'(p[0]);
        checks++;
        if (vp != va * vb) begin
          failures++;
          if (failures < 5) $display("mismatch %0d * %0d gave %0d", va, vb, vp);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
