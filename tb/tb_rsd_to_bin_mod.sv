// tb_rsd_to_bin_mod: self-checking test of the RSD to binary residue
// converter. Random RSD inputs of N+2 digits whose value lies in (-2m, 2m)
// are converted and compared with the value reduced into [0, m) by integer
// arithmetic.
module tb_rsd_to_bin_mod;
  localparam int N  = 32;
  localparam int W  = N + 2;
  localparam int NV = 3000;

  logic [1:0][W-1:0] x;
  logic [N-1:0]      m;
  logic [N-1:0]      r;

  rsd_to_bin_mod #(.N(N), .W(W)) dut (.x(x), .m(m), .r(r));

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    int tried;
    tried = 0;
    while (checks < NV) begin
      longint v, e;
      m = {1'b1, N'($urandom) | N'(1)};
      m[N-1] = 1'b1;
      for (int i = 0; i < W; i++) begin
        int g;
        g = int'($urandom_range(2));
        x[1][i] = (g == 1);
        x[0][i] = (g == 2);
      end
      // keep the top digits sparse so the value falls inside (-2m, 2m)
      x[1][W-1:N-1] = '0;
      x[0][W-1:N-1] = '0;
      if (tried % 3 == 0) x[1][N-1] = 1'b1;
      if (tried % 5 == 0) x[0][N-1] = 1'b1;
      tried++;
      v = longint'(x[1]) - longint'(x[0]);
      if (v <= -2 * longint'(m) || v >= 2 * longint'(m)) continue;
      e = v % longint'(m);
      if (e < 0) e += longint'(m);
      #1;
      checks++;
      if (longint'(r) != e) begin
        failures++;
        if (failures < 5) $display("mismatch v=%0d m=%0d r=%0d", v, m, r);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV * 3 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
