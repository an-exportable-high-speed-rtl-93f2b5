// tb_mod_add_sub_rsd: self-checking test of the RSD modular adder/subtractor
// at the full 256-digit width with the NIST P-256 prime as modulus (and a
// few random odd moduli with the top bit set).
//
// Operands are random 256-digit RSD numbers (digits in {-1, 0, +1}) and
// binary residues in [0, m). For each operation the testbench checks that
// the result is congruent to a + b (or a - b) modulo m, and that valid_out
// comes 1, 2 or 3 cycles after start, as stated for this adder. It counts
// how many operations needed each number of cycles and requires each of the
// three to occur.
module tb_mod_add_sub_rsd;
  import rsd_pkg::*;

  localparam int N  = 256;
  localparam int NV = 3000;
  localparam logic [N-1:0] P256 =
    256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst, start, sub, valid_out, busy;
  logic [1:0][N-1:0] a, b, m, result;

  mod_add_sub_rsd #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .sub(sub), .a(a), .b(b), .m(m),
    .result(result), .valid_out(valid_out), .busy(busy));

  int checks = 0, failures = 0;
  int hist[5];

  typedef logic signed [N+3:0] wide_t;

  function automatic wide_t val(logic [1:0][N-1:0] d);
    return wide_t'(d[1]) - wide_t'(d[0]);
  endfunction

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

  function automatic logic [N-1:0] rnd_bin();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    rst = 1'b1; start = 1'b0; sub = 1'b0; a = '0; b = '0; m = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      logic [N-1:0] mv;
      wide_t e, r, mw;
      int cyc;
      mv = (t % 10 == 9) ? (rnd_bin() | {1'b1, {(N-1){1'b0}}} | N'(1)) : P256;
      m  = {mv, {N{1'b0}}};
      if (t % 2 == 0) begin
        a = rnd_rsd();
        b = rnd_rsd();
      end else begin
        a = {rnd_bin() % mv, {N{1'b0}}};
        b = {rnd_bin() % mv, {N{1'b0}}};
      end
      if (t % 7 == 3) b = a;            // a - a and a + a
      sub   = t[0] ^ t[2];
      mw    = wide_t'(mv);
      e     = sub ? val(a) - val(b) : val(a) + val(b);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc   = 1;
      while (!valid_out && cyc < 10) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      r = val(result);
      checks++;
      if (((r - e) % mw) != 0) begin
        failures++;
        if (failures < 5) $display("t=%0d wrong residue", t);
      end
      checks++;
      if (cyc > 3) begin
        failures++;
        if (failures < 5) $display("t=%0d took %0d cycles", t, cyc);
      end
      hist[cyc > 4 ? 4 : cyc]++;
      @(posedge clk);
    end
    $display("cycles: 1:%0d 2:%0d 3:%0d more:%0d", hist[1], hist[2], hist[3], hist[4]);
    for (int c = 1; c <= 3; c++) begin
      checks++;
      if (hist[c] == 0) begin
        failures++;
        $display("no operation took %0d cycles", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 15 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
