// tb_vmm_zero_error: the zero-error operating point.  With N = 63 cells per
// row and 6-bit converters whose 64 levels coincide with the 0..63 counts of
// active cells, every partial is resolved exactly, so after reference
// subtraction each output must equal the integer product sum_n W*X at the
// full I + J + log2(N+1) = 14-bit resolution, for random and for extreme
// (all-ones) matrices and inputs, with feedthrough and leakage present.
module tb_vmm_zero_error;
  localparam int unsigned N = 63, M = 8, I = 4, J = 4, L = 6, P = 2, FS = 63;
  localparam int unsigned R = M * I, OW = L + 1 + I + J;

  logic clk = 1'b0, rst_n = 1'b0, refresh = 1'b0;
  logic w_req = 1'b0, w_ready, x_load = 1'b0, start = 1'b0, busy, q_valid;
  logic [0:0] w_chip = '0, chip_select = '0, q_chip;
  logic [2:0] w_m = '0;
  logic [I-1:0] w_row [N];
  logic [J-1:0] x_vec [N];
  logic signed [OW-1:0] q_out [M];

  // feedthrough 0.005 per input (0.315 cell at most), weak leakage
  vmm_system #(.N(N), .M(M), .I(I), .J(J), .L(L), .P(P), .FS_CELLS(FS),
               .EPS_FX(327), .LEAK_FX(20)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  int W [P][M][N];
  int X [N];
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(negedge clk) refresh <= (cyc % 4 == 0);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) begin w_row[n] = '0; x_vec[n] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 6; round++) begin
      for (int p = 0; p < P; p++)
        for (int m = 0; m < M; m++) begin
          while (!w_ready) @(negedge clk);
          w_req = 1'b1; w_chip = 1'(p); w_m = 3'(m);
          for (int n = 0; n < N; n++) begin
            W[p][m][n] = (round == 0) ? 15 : $urandom_range(0, 15);
            w_row[n] = I'(W[p][m][n]);
          end
          @(negedge clk);
          w_req = 1'b0;
          @(negedge clk);
        end
      while (!w_ready) @(negedge clk);
      x_load = 1'b1;
      for (int n = 0; n < N; n++) begin
        X[n] = (round == 0) ? 15 : $urandom_range(0, 15);
        x_vec[n] = J'(X[n]);
      end
      @(negedge clk);
      x_load = 1'b0;
      for (int p = 0; p < P; p++) begin
        start = 1'b1; chip_select = 1'(p);
        @(negedge clk);
        start = 1'b0;
        while (!q_valid) @(negedge clk);
        for (int m = 0; m < M; m++) begin
          longint ideal;
          ideal = 0;
          for (int n = 0; n < N; n++) ideal += W[p][m][n] * X[n];
          if (ideal == 63 * 225) n_full++;
          checks++;
          if (longint'(q_out[m]) != ideal) begin
            failures++;
            $display("round %0d chip %0d m %0d: %0d expected %0d", round, p, m, q_out[m], ideal);
          end
        end
        @(negedge clk);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("full-scale product never computed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
