// tb_processor_design_full: the top level at its default size (N = 256
// digits) on the NIST P-256 prime field.
//
// Runs a few operations of each kind - modular addition, subtraction,
// multiplication and division - on random residues mod p256 and checks the
// results with wide integer arithmetic (the quotient by result*b == a mod p).
// It also checks that addition/subtraction finishes in 2 to 4 cycles and
// multiplication in kara_latency(256) + 2*256 + 3 cycles, and reports the
// division time.
module tb_processor_design_full;
  import rsd_pkg::*;

  localparam int N  = 256;
  localparam int NV = 12;
  localparam logic [N-1:0] P256 =
    256'hFFFFFFFF_00000001_00000000_00000000_00000000_FFFFFFFF_FFFFFFFF_FFFFFFFF;
  localparam int MUL_LAT = kara_latency(N, 4) + 2 * N + 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         reset, start, done;
  logic [1:0]   sel;
  logic [N-1:0] a, b, m, result;

  processor_design dut (
    .clk(clk), .reset(reset), .start(start), .sel(sel),
    .a(a), .b(b), .m(m), .result(result), .done(done));

  int checks = 0, failures = 0;
  typedef logic [2*N+1:0] wide_t;

  function automatic logic [N-1:0] rnd_bin();
    logic [N-1:0] v;
    for (int i = 0; i < N / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    reset = 1'b1; start = 1'b0; sel = '0; a = '0; b = '0; m = P256;
    repeat (3) @(posedge clk);
    reset = 1'b0;
    #1;
    for (int t = 0; t < NV; t++) begin
      wide_t e, av, bv, mv;
      int cyc;
      logic [1:0] op;
      op = 2'(t % 4);
      mv = wide_t'(P256);
      av = wide_t'(rnd_bin()) % mv;
      bv = wide_t'(rnd_bin()) % mv;
      if (t == 1) begin av = 0; bv = mv - 1; end
      if (bv == 0) bv = 1;
      sel = op; a = N'(av); b = N'(bv);
      start = 1'b1;
      @(posedge clk);
      #1;
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 8 * N) begin
        @(posedge clk);
        #1;
        cyc++;
      end
      case (op)
        2'd0: e = (av + bv) % mv;
        2'd1: e = (av + mv - bv) % mv;
        2'd2: e = (av * bv) % mv;
        default: e = av;
      endcase
      checks++;
      if (!done) begin
        failures++;
        $display("t=%0d op=%0d: no done", t, op);
      end else if (op == 2'd3) begin
        if (wide_t'(result) >= mv || (wide_t'(result) * bv) % mv != av) begin
          failures++;
          $display("t=%0d: wrong quotient", t);
        end
      end else if (wide_t'(result) != e) begin
        failures++;
        $display("t=%0d op=%0d: wrong result", t, op);
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
          $display("t=%0d mul took %0d cycles, expected %0d", t, cyc, MUL_LAT);
        end
      end
      $display("op %0d done after %0d cycles", op, cyc);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 8 * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
