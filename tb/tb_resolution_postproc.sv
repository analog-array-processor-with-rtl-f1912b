// tb_resolution_postproc: self-checking test of the digital reconstruction.
// Feeds random signed I x J partial matrices column by column (LSB column
// first) and compares q_out with the directly weighted sum
// sum_ij 2^(I+J-2-i-j) Q_ij computed here; also checks that out_valid comes
// exactly K = I+J-1 clocks after the first column and that an unsigned
// zero-error case gives the integer inner product.
module tb_resolution_postproc;
  localparam int unsigned I = 4, J = 4, QW = 7, K = I + J - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_first = 1'b0;
  logic signed [QW-1:0] q_in [I];
  logic out_valid;
  logic signed [QW+I+J-1:0] q_out;
  int checks = 0, failures = 0;

  resolution_postproc #(.I(I), .J(J), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one operation; qm[i][j] uses the published indices (j = J-1 is the LSB
  // column and is sent first).
  task automatic run_op(input int qm [I][J], input int gap);
    longint expv;
    int lat;
    expv = 0;
    for (int i = 0; i < I; i++)
      for (int j = 0; j < J; j++)
        expv += longint'(qm[i][j]) <<< (I + J - 2 - i - j);
    for (int c = 0; c < J; c++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_first = (c == 0);
      for (int i = 0; i < I; i++) q_in[i] = QW'(qm[i][J-1-c]);
    end
    @(negedge clk);
    in_valid = 1'b0; in_first = 1'b0;
    for (int i = 0; i < I; i++) q_in[i] = QW'($urandom);   // must be ignored
    lat = J;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
      if (lat > 40) break;
    end
    checks++;
    if (lat != K) begin
      failures++;
      $display("latency %0d, expected %0d", lat, K);
    end
    checks++;
    if (longint'(q_out) != expv) begin
      failures++;
      $display("q_out %0d, expected %0d", q_out, expv);
    end
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    int qm [I][J];
    for (int i = 0; i < I; i++) q_in[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Directed: a single partial at each position gives its weight.
    for (int i = 0; i < I; i++)
      for (int j = 0; j < J; j++) begin
        foreach (qm[a, b]) qm[a][b] = 0;
        qm[i][j] = 1;
        run_op(qm, 0);
      end
    // Extremes.
    foreach (qm[a, b]) qm[a][b] = (1 <<< (QW - 1)) - 1;
    run_op(qm, 1);
    foreach (qm[a, b]) qm[a][b] = -(1 <<< (QW - 1));
    run_op(qm, 0);
    // Random signed partials.
    for (int t = 0; t < 200; t++) begin
      foreach (qm[a, b]) qm[a][b] = int'($urandom_range(0, (1 << QW) - 1)) - (1 << (QW - 1));
      run_op(qm, t % 3);
    end
    // Zero-error unsigned case: partials are exact bit-plane inner products,
    // so the result must equal sum_n W*X.
    for (int t = 0; t < 50; t++) begin
      int w [8], x [8];
      longint dot;
      dot = 0;
      for (int n = 0; n < 8; n++) begin
        w[n] = $urandom_range(0, 15); x[n] = $urandom_range(0, 15);
        dot += w[n] * x[n];
      end
      foreach (qm[a, b]) begin
        qm[a][b] = 0;
        for (int n = 0; n < 8; n++)
          qm[a][b] += ((w[n] >> (I - 1 - a)) & 1) * ((x[n] >> (J - 1 - b)) & 1);
      end
      run_op(qm, 0);
      checks++;
      if (longint'(q_out) != dot) begin
        failures++;
        $display("inner product %0d, expected %0d", q_out, dot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
