// tb_mod_div_rsd: self-checking test of the radix-4 binary GCD modular
// divider at the full 256-digit width with the NIST P-256 prime, plus a run
// of small cases with an 8-digit unit and modulus 251.
//
// Each quotient z is checked by multiplication: z*y - x must be a multiple of
// m, and |z| < 2m. The number of cycles from start to valid_out is checked
// against the bound 3*(2N-1)+3 that follows from the rho counter. The
// testbench also counts how often the divider took each kind of step (A/4,
// A/2, swap, (A+-B)/4) and requires every kind to occur.
module tb_mod_div_rsd;
  import rsd_pkg::*;

  localparam int N  = 256;
  localparam int NS = 8;
  localparam int NV = 60;
  localparam logic [N-1:0] P256 =
    256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst, start, valid_out, busy;
  logic [1:0][N-1:0]   x, y;
  logic [N-1:0]        m;
  logic [1:0][N+1:0]   z;

  mod_div_rsd #(.N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .x(x), .y(y), .m(m),
    .z(z), .valid_out(valid_out), .busy(busy));

  // small instance: every x, y pair for a few moduli would take long, so a
  // random sample of pairs with m = 251 and m = 131
  logic                s_start, s_valid, s_busy;
  logic [1:0][NS-1:0]  sx, sy;
  logic [NS-1:0]       sm;
  logic [1:0][NS+1:0]  sz;

  mod_div_rsd #(.N(NS)) dut_s (
    .clk(clk), .rst(rst), .start(s_start), .x(sx), .y(sy), .m(sm),
    .z(sz), .valid_out(s_valid), .busy(s_busy));

  int checks = 0, failures = 0;
  int n_div4 = 0, n_div2 = 0, n_swap = 0, n_odd = 0, max_cyc = 0;

  typedef logic signed [2*N+8:0] wide_t;

  function automatic logic [N-1:0] rnd_bin();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // step statistics of the large unit
  always @(posedge clk) begin
    if (dut.state_q == dut.S_CHECK && !dut.rho_q[0]) begin
      if (dut.a_mod4 == 2'd0) n_div4++;
      else if (dut.a_mod4 == 2'd2) n_div2++;
    end
    if (dut.state_q == dut.S_SWAP && dut.delta_neg) n_swap++;
    if (dut.state_q == dut.S_DIV) n_odd++;
  end

  initial begin
    rst = 1'b1; start = 1'b0; s_start = 1'b0;
    x = '0; y = '0; m = P256; sx = '0; sy = '0; sm = 8'd251;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      logic [N-1:0] xv, yv;
      wide_t zv, e;
      int cyc;
      xv = rnd_bin() % P256;
      yv = rnd_bin() % P256;
      if (t == 0) yv = 1;
      if (t == 1) yv = P256 - 1;
      if (t == 2) xv = 0;
      if (yv == 0) yv = 3;
      x = {xv, {N{1'b0}}};
      // negative RSD digits in the dividend: x = xv - (random)
      if (t % 3 == 2) x[0] = rnd_bin() >> 2;
      y = {yv, {N{1'b0}}};
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!valid_out && cyc < 8 * N) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      if (cyc > max_cyc) max_cyc = cyc;
      zv = wide_t'(z[1]) - wide_t'(z[0]);
      e  = zv * wide_t'(yv) - (wide_t'(x[1]) - wide_t'(x[0]));
      checks++;
      if (!valid_out || (e % wide_t'(P256)) != 0) begin
        failures++;
        if (failures < 5) $display("t=%0d wrong quotient", t);
      end
      checks++;
      if (zv >= 2 * wide_t'(P256) || zv <= -2 * wide_t'(P256)) begin
        failures++;
        $display("t=%0d quotient out of range", t);
      end
      checks++;
      if (cyc > 3 * (2 * N - 1) + 3) begin
        failures++;
        $display("t=%0d took %0d cycles", t, cyc);
      end
      @(posedge clk);
    end
    // small unit
    for (int t = 0; t < 400; t++) begin
      int xv, yv, mv, zv, cyc;
      mv = (t < 200) ? 251 : 131;
      xv = int'($urandom_range(mv - 1));
      yv = 1 + int'($urandom_range(mv - 2));
      sm = NS'(mv);
      sx = {NS'(xv), NS'(0)};
      sy = {NS'(yv), NS'(0)};
      s_start = 1'b1;
      @(posedge clk);
      #1;
      s_start = 1'b0;
      cyc = 1;
      while (!s_valid && cyc < 100) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      zv = int'(sz[1]) - int'(sz[0]);
      checks++;
      if (!s_valid || ((zv * yv - xv) % mv) != 0) begin
        failures++;
        if (failures < 10) $display("small: %0d / %0d mod %0d gave %0d", xv, yv, mv, zv);
      end
      @(posedge clk);
    end
    $display("steps: A/4 %0d, A/2 %0d, swap %0d, (A+-B)/4 %0d; longest division %0d cycles",
             n_div4, n_div2, n_swap, n_odd, max_cyc);
    checks++;
    if (n_div4 == 0 || n_div2 == 0 || n_swap == 0 || n_odd == 0) begin
      failures++;
      $display("a step kind never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 3 * 2 * N + 400 * 110 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
