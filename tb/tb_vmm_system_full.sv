// tb_vmm_system_full: the multi-chip multiplier at its default size
// (N = 1000 inputs, M = 250 outputs of I = 4 bits, J = 4-bit inputs, 6-bit
// converters over 1000 cells, two processor chips plus the reference chip).
//
// Loads random matrices into both processor chips (the reference chip is
// cleared alongside), applies a random input vector and computes both
// chips.  A model kept here (stored bits, row ages, line voltages,
// rounding converters) predicts every compensated result exactly; the
// results are also compared with the ideal product sum_n W*X to measure
// the resolution of the digitally combined output against that of a single
// converter (median absolute error over full scale).  Refresh pulses come
// every 6 clocks.
module tb_vmm_system_full;
  localparam int unsigned N = 1000, M = 250, I = 4, J = 4, L = 6, P = 2, FS = 1000;
  localparam int unsigned EPS = 1311, LEAK = 8;
  localparam int unsigned R = M * I, OW = L + 1 + I + J;
  localparam int unsigned LAT = I + J + 1;
  localparam longint LEVELS = (1 << L) - 1;

  logic clk = 1'b0, rst_n = 1'b0, refresh = 1'b0;
  logic w_req = 1'b0, w_ready, x_load = 1'b0, start = 1'b0, busy, q_valid;
  logic [0:0] w_chip = '0, chip_select = '0, q_chip;
  logic [7:0] w_m = '0;
  logic [I-1:0] w_row [N];
  logic [J-1:0] x_vec [N];
  logic signed [OW-1:0] q_out [M];

  vmm_system dut (.*);

  int checks = 0, failures = 0;
  int n_write = 0, n_refresh = 0, n_sel [P], n_refnz = 0;

  int  W   [P][M][N];
  int  X   [N];
  logic [N-1:0] cellm [P+1][R];
  longint age [P+1][R];
  int  rptr = 0;
  longint cyc = 0, start_cyc = -100;
  int  sel_model;
  int  w_pp, w_mm;
  longint w_base;
  bit  w_busy = 1'b0;
  int  qc  [R][J];
  real qerr [R][J];            // quantization error of each processor partial, in codes
  real abs_err [$];            // |E| of the compensated output
  real abs_qerr [$];           // |E| from processor-converter quantization only

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int adc(longint v);
    longint c;
    c = (2 * v * LEVELS + (longint'(FS) << 16)) / (2 * (longint'(FS) << 16));
    return (c > LEVELS) ? int'(LEVELS) : int'(c);
  endfunction

  always @(posedge clk) if (rst_n) begin
    longint d;
    d = cyc - start_cyc;
    if (d >= 1 && d <= J) begin : compute
      int b, nx;
      logic [N-1:0] xp;
      b = int'(d) - 1;
      for (int n = 0; n < N; n++) xp[n] = 1'((X[n] >> b) & 1);
      nx = $countones(xp);
      for (int r = 0; r < R; r++) begin
        longint vp, vr;
        int n11, cr;
        n11 = $countones(cellm[sel_model][r] & xp);
        vp = longint'(n11) * (65536 + longint'(EPS)) + longint'(nx - n11) * longint'(EPS)
           + (longint'(LEAK) * age[sel_model][r] * longint'(nx)) / longint'(N);
        vr = longint'(nx) * longint'(EPS)
           + (longint'(LEAK) * age[P][r] * longint'(nx)) / longint'(N);
        cr = adc(vr);
        if (cr != 0) n_refnz++;
        qc[r][b] = adc(vp) - cr;
        qerr[r][b] = real'(adc(vp)) - real'(vp) * real'(LEVELS) / (real'(FS) * 65536.0);
      end
    end
    for (int c = 0; c <= P; c++)
      for (int r = 0; r < R; r++)
        age[c][r] = (refresh && rptr == r) ? 0 : age[c][r] + 1;
    if (refresh) begin rptr = (rptr + 1) % R; n_refresh++; end
    if (w_busy && cyc >= w_base + 1 && cyc <= w_base + I) begin : row_write
      int i, r;
      i = int'(cyc - w_base) - 1;
      r = w_mm * I + i;
      for (int n = 0; n < N; n++) begin
        cellm[w_pp][r][n] = 1'((W[w_pp][w_mm][n] >> (I - 1 - i)) & 1);
        cellm[P][r][n] = 1'b0;
      end
      age[w_pp][r] = 0;
      age[P][r] = 0;
      if (i == I - 1) w_busy = 1'b0;
    end
    cyc++;
  end

  always @(negedge clk) refresh <= (cyc % 6 == 0);

  task automatic write_row(int p, int m);
    while (!w_ready) @(negedge clk);
    w_req = 1'b1; w_chip = 1'(p); w_m = 8'(m);
    for (int n = 0; n < N; n++) begin
      W[p][m][n] = $urandom_range(0, 15);
      w_row[n] = I'(W[p][m][n]);
    end
    w_pp = p; w_mm = m; w_base = cyc; w_busy = 1'b1;
    @(negedge clk);
    w_req = 1'b0;
    while (w_busy) @(negedge clk);
    n_write++;
  endtask

  task automatic compute(int p);
    int lat;
    while (busy) @(negedge clk);
    start = 1'b1; chip_select = 1'(p);
    sel_model = p;
    start_cyc = cyc;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!q_valid && lat < 50) begin @(negedge clk); lat++; end
    n_sel[p]++;
    checks++;
    if (lat != LAT) begin failures++; $display("latency %0d expected %0d", lat, LAT); end
    checks++;
    if (int'(q_chip) != p) begin failures++; $display("q_chip %0d expected %0d", q_chip, p); end
    for (int m = 0; m < M; m++) begin
      longint e, ideal;
      e = 0; ideal = 0;
      for (int i = 0; i < I; i++)
        for (int b = 0; b < J; b++)
          e += longint'(qc[m*I+i][b]) <<< (I - 1 - i + b);
      for (int n = 0; n < N; n++) ideal += W[p][m][n] * X[n];
      checks++;
      if (longint'(q_out[m]) != e) begin
        failures++;
        $display("chip %0d m %0d: q_out %0d expected %0d", p, m, q_out[m], e);
      end
      // error of Q^(m) in converter codes: Q = q_out / 2^(I+J), Y = ideal*LEVELS/FS / 2^(I+J)
      abs_err.push_back((real'(q_out[m]) - real'(ideal) * real'(LEVELS) / real'(FS)) / 256.0);
      begin
        real eq;
        eq = 0.0;
        for (int i = 0; i < I; i++)
          for (int b = 0; b < J; b++)
            eq += qerr[m*I+i][b] * real'(1 << (I - 1 - i + b)) / 256.0;
        abs_qerr.push_back(eq);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    real med, s_full, gain;
    for (int c = 0; c <= P; c++) for (int r = 0; r < R; r++) age[c][r] = 0;
    for (int n = 0; n < N; n++) begin w_row[n] = '0; x_vec[n] = '0; end
    n_sel[0] = 0; n_sel[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < P; p++) for (int m = 0; m < M; m++) write_row(p, m);
    for (int v = 0; v < 2; v++) begin
      x_load = 1'b1;
      for (int n = 0; n < N; n++) begin
        X[n] = $urandom_range(0, 15);
        x_vec[n] = J'(X[n]);
      end
      @(negedge clk);
      x_load = 1'b0;
      for (int p = 0; p < P; p++) compute(p);
    end
    // Resolution: median |E| over the output full scale S = s(1-2^-I)(1-2^-J)
    // (s = 2^L-1 codes) against the median |e| = 1/4 code of one rounding
    // converter over s.  The quantization-only figure is the case of
    // independent converter errors; it must show at least one bit of gain.
    // The compensated output also carries the reference chip's quantization
    // error, which is common to all rows fed by the same input plane.
    s_full = real'(LEVELS) * (1.0 - 1.0 / 16.0) * (1.0 - 1.0 / 16.0);
    foreach (abs_err[k]) if (abs_err[k] < 0) abs_err[k] = -abs_err[k];
    abs_err.sort();
    med  = abs_err[abs_err.size() / 2];
    gain = (s_full / med) / (real'(LEVELS) / 0.25);
    $display("compensated output: median |E| = %f codes, gain over one converter = %f (%f bits)",
             med, gain, $ln(gain) / $ln(2.0));
    foreach (abs_qerr[k]) if (abs_qerr[k] < 0) abs_qerr[k] = -abs_qerr[k];
    abs_qerr.sort();
    med  = abs_qerr[abs_qerr.size() / 2];
    gain = (s_full / med) / (real'(LEVELS) / 0.25);
    $display("quantization only:  median |E| = %f codes, gain over one converter = %f (%f bits)",
             med, gain, $ln(gain) / $ln(2.0));
    checks++;
    if (gain < 2.0) begin failures++; $display("resolution gain below one bit"); end
    $display("writes=%0d refresh=%0d sel0=%0d sel1=%0d ref_nonzero=%0d",
             n_write, n_refresh, n_sel[0], n_sel[1], n_refnz);
    checks++;
    if (n_write == 0 || n_refresh == 0 || n_sel[0] == 0 || n_sel[1] == 0 || n_refnz == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
