// tb_processor_design: end-to-end test of the RSD arithmetic unit at N = 32.
//
// Runs a random mix of the four operations (add, sub, mul, div) through the
// top level with binary operands in [0, m), and checks every result against
// integer arithmetic: sums, differences and products directly, quotients by
// checking result*b == a (mod m). Moduli are random odd 32-bit numbers with
// the top bit set for add/sub/mul and the prime 2^32 - 5 for div.
// It also checks the cycle count of add/sub (2 to 4 cycles from start to done)
// and of mul (kara_latency + 2N + 3), and that a start pulse given while an
// operation runs is ignored.
// A second instance at N = 8 (the 8-bit build with the port widths a[7:0],
// b[7:0], m[7:0]) runs 200 more mixed operations modulo the prime 251.
// Mechanisms counted, each of which must occur at least once: every
// operation, modular add/sub needing one and two MSD corrections, a nonzero
// carry digit in the top Karatsuba level, divider swaps, divider A/2 and A/4
// steps, and an ignored start.
module tb_processor_design;
  import rsd_pkg::*;

  localparam int N  = 32;
  localparam int NV = 400;
  localparam logic [N-1:0] PRIME = 32'hFFFF_FFFB;
  localparam int MUL_LAT = kara_latency(N, 4) + 2 * N + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         reset, start, done;
  logic [1:0]   sel;
  logic [N-1:0] a, b, m, result;

  processor_design #(.N(N)) dut (
    .clk(clk), .reset(reset), .start(start), .sel(sel),
    .a(a), .b(b), .m(m), .result(result), .done(done));

  // 8-bit build
  logic         s_start, s_done;
  logic [1:0]   s_sel;
  logic [7:0]   s_a, s_b, s_m, s_result;

  processor_design #(.N(8)) dut8 (
    .clk(clk), .reset(reset), .start(s_start), .sel(s_sel),
    .a(s_a), .b(s_b), .m(s_m), .result(s_result), .done(s_done));

  int checks = 0, failures = 0;
  int n_op[4];
  int n_corr1 = 0, n_corr2 = 0, n_carry = 0, n_swap = 0, n_half = 0, n_quarter = 0;
  int n_ignored = 0;

  // mechanism monitors (divider states: 1 = CHECK, 2 = SWAP)
  int corr_run = 0;
  always @(posedge clk) begin
    if (dut.u_add_sub.run_q && dut.u_add_sub.msd_q != 0) corr_run++;
    if (dut.u_add_sub.valid_out) begin
      if (corr_run == 1) n_corr1++;
      if (corr_run >= 2) n_corr2++;
      corr_run = 0;
    end
    if (dut.u_mul.u_kara.g_node.ca_p || dut.u_mul.u_kara.g_node.ca_n) n_carry++;
    if (dut.u_div.state_q == 3'd2 && dut.u_div.delta_neg) n_swap++;
    if (dut.u_div.state_q == 3'd1 && !dut.u_div.rho_q[0]) begin
      if (dut.u_div.a_mod4 == 2'd2) n_half++;
      if (dut.u_div.a_mod4 == 2'd0) n_quarter++;
    end
  end

  initial begin
    reset = 1'b1; start = 1'b0; sel = '0; a = '0; b = '0; m = '0;
    s_start = 1'b0; s_sel = '0; s_a = '0; s_b = '0; s_m = 8'd251;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      longint e, av, bv, mv;
      int cyc;
      logic [1:0] op;
      op = 2'(t % 4);
      mv = (op == 2'd3) ? longint'(PRIME) : longint'({1'b1, 31'($urandom)} | 32'd1);
      av = longint'($urandom) % mv;
      bv = longint'($urandom) % mv;
      if (t % 17 == 5) av = mv - 1;
      if (t % 19 == 6) bv = mv - 1;
      if (op == 2'd3 && bv == 0) bv = 1;
      sel = op; a = N'(av); b = N'(bv); m = N'(mv);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 20 * N) begin
        // a second start in the middle of a long operation must be ignored
        if (cyc == 3 && op >= 2'd2) begin
          start = 1'b1;
          sel   = 2'd0;
          a     = '1;
          n_ignored++;
        end
        @(posedge clk);
        #1;
        start = 1'b0;
        cyc++;
      end
      case (op)
        2'd0: e = (av + bv) % mv;
        2'd1: e = (av - bv + mv) % mv;
        2'd2: e = longint'((128'(av) * 128'(bv)) % 128'(mv));
        default: e = -1;
      endcase
      checks++;
      if (!done) begin
        failures++;
        $display("t=%0d op=%0d: no done", t, op);
      end else if (op == 2'd3) begin
        if (longint'(result) >= mv || ((128'(result) * 128'(bv)) % 128'(mv)) != 128'(av)) begin
          failures++;
          if (failures < 10) $display("t=%0d div %0d/%0d mod %0d gave %0d", t, av, bv, mv, result);
        end
      end else if (longint'(result) != e) begin
        failures++;
        if (failures < 10) $display("t=%0d op=%0d a=%0d b=%0d m=%0d gave %0d expected %0d",
                                    t, op, av, bv, mv, result, e);
      end
      if (op <= 2'd1) begin
        checks++;
        if (cyc < 2 || cyc > 4) begin
          failures++;
          $display("t=%0d add/sub took %0d cycles", t, cyc);
        end
      end else if (op == 2'd2) begin
        checks++;
        if (cyc != MUL_LAT) begin
          failures++;
          if (failures < 10) $display("t=%0d mul took %0d cycles, expected %0d", t, cyc, MUL_LAT);
        end
      end
      n_op[op]++;
      @(posedge clk);
      #1;
    end
    // 8-bit build, modulus 251
    for (int t = 0; t < 200; t++) begin
      int av, bv, e, cyc;
      logic [1:0] op;
      op = 2'(t % 4);
      av = int'($urandom_range(250));
      bv = int'($urandom_range(250));
      if (op == 2'd3 && bv == 0) bv = 7;
      s_sel = op; s_a = 8'(av); s_b = 8'(bv);
      s_start = 1'b1;
      @(posedge clk);
      #1;
      s_start = 1'b0;
      cyc = 1;
      while (!s_done && cyc < 200) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      case (op)
        2'd0: e = (av + bv) % 251;
        2'd1: e = (av - bv + 251) % 251;
        2'd2: e = (av * bv) % 251;
        default: e = -1;
      endcase
      checks++;
      if (!s_done || (op != 2'd3 && int'(s_result) != e) ||
          (op == 2'd3 && (int'(s_result) * bv) % 251 != av)) begin
        failures++;
        if (failures < 10) $display("8-bit: op=%0d a=%0d b=%0d gave %0d", op, av, bv, s_result);
      end
      @(posedge clk);
      #1;
    end
    $display("ops add %0d sub %0d mul %0d div %0d", n_op[0], n_op[1], n_op[2], n_op[3]);
    $display("add/sub with 1 correction %0d, with 2+ %0d; karatsuba carry digits %0d",
             n_corr1, n_corr2, n_carry);
    $display("divider swaps %0d, A/2 %0d, A/4 %0d; ignored starts %0d",
             n_swap, n_half, n_quarter, n_ignored);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_op[k] == 0) failures++;
    end
    checks++;
    if (n_corr1 == 0 || n_corr2 == 0 || n_carry == 0 || n_swap == 0 ||
        n_half == 0 || n_quarter == 0 || n_ignored == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 8 * N + 200 * 210 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
