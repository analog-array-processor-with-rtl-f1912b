// tb_vmm_system: end-to-end test of the multi-chip multiplier.
//
// Small system: N=15 inputs, M=4 outputs, I=J=4 bits, P=2 processor chips
// plus the reference chip, 4-bit converters spanning 15 cells (zero-error
// converters), feedthrough eps = 0.2 cell per active input and a leakage
// rise strong enough to move codes.  Refresh pulses arrive every 3 clocks.
//
// The bench keeps its own model of every chip: stored bits, row ages
// (cleared by writes and by the refresh pointer), summing-line voltages and
// rounding converters.  For each computation it predicts the reference-
// compensated, binary-weighted result and checks q_out, q_chip and the
// latency.  Since compensation is exact with zero-error converters (unless a
// converter clips), it also checks q_out against the ideal integer product
// sum_n W*X, and counts the mechanisms exercised: matrix writes, refresh,
// both chip selections, nonzero reference partials (feedthrough), leakage
// that changed a code, converter clipping, and results where the
// uncompensated sum would have been wrong.
module tb_vmm_system;
  localparam int unsigned N = 15, M = 4, I = 4, J = 4, L = 4, P = 2, FS = 15;
  localparam int unsigned EPS = 13107, LEAK = 1000;
  localparam int unsigned R = M * I, OW = L + 1 + I + J;
  localparam int unsigned LAT = I + J + 1;

  logic clk = 1'b0, rst_n = 1'b0, refresh = 1'b0;
  logic w_req = 1'b0, w_ready, x_load = 1'b0, start = 1'b0, busy, q_valid;
  logic [0:0] w_chip = '0, chip_select = '0, q_chip;
  logic [1:0] w_m = '0;
  logic [I-1:0] w_row [N];
  logic [J-1:0] x_vec [N];
  logic signed [OW-1:0] q_out [M];

  vmm_system #(.N(N), .M(M), .I(I), .J(J), .L(L), .P(P), .FS_CELLS(FS),
               .EPS_FX(EPS), .LEAK_FX(LEAK)) dut (.*);

  int checks = 0, failures = 0;
  int n_write = 0, n_refresh = 0, n_sel [P], n_refnz = 0, n_leak = 0, n_clip = 0,
      n_rawbad = 0;

  // ---- reference model ----
  int  W   [P][M][N];          // matrix elements per processor chip
  int  X   [N];
  logic [N-1:0] cellm [P+1][R];
  longint age [P+1][R];
  int  rptr = 0;
  longint cyc = 0, start_cyc = -100;
  int  sel_model;
  int  w_pp, w_mm;
  longint w_base;
  bit  w_busy = 1'b0;
  bit  clip_now = 1'b0;
  int  n_exact = 0;
  localparam longint ERR_MAX = ((1 << I) - 1) * ((1 << J) - 1);
  int  qc  [R][J];             // predicted compensated partial, by row and LSB-first bit b
  int  qraw[R][J];             // predicted uncompensated partial

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int adc(longint v, output bit clip);
    longint c;
    c = (2 * v * 15 + (longint'(FS) << 16)) / (2 * (longint'(FS) << 16));
    clip = (c > 15);
    return clip ? 15 : int'(c);
  endfunction

  // Model of the chips, evaluated with the values of each clock period.
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
        longint vp, vr, vp0, vr0;
        int n11, cp, cr;
        bit clp, clr, dummy;
        n11 = $countones(cellm[sel_model][r] & xp);
        vp0 = longint'(n11) * (65536 + EPS) + longint'(nx - n11) * EPS;
        vr0 = longint'(nx) * EPS;
        vp  = vp0 + (longint'(LEAK) * age[sel_model][r] * nx) / N;
        vr  = vr0 + (longint'(LEAK) * age[P][r] * nx) / N;
        cp = adc(vp, clp);
        cr = adc(vr, clr);
        if (clp) begin n_clip++; clip_now = 1'b1; end
        if (cr != 0) n_refnz++;
        if (cp != adc(vp0, dummy) || cr != adc(vr0, dummy)) n_leak++;
        qc[r][b]   = cp - cr;
        qraw[r][b] = cp;
      end
    end
    // state update of the model at this edge
    for (int c = 0; c <= P; c++)
      for (int r = 0; r < R; r++)
        age[c][r] = (refresh && rptr == r) ? 0 : age[c][r] + 1;
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
    if (refresh) begin rptr = (rptr + 1) % R; n_refresh++; end
    cyc++;
  end

  always @(negedge clk) refresh <= (cyc % 3 == 0);

  // Write matrix row m of chip p; model the I row writes (clock after the
  // request, one plane per clock) in both that chip and the reference chip.
  task automatic write_row(int p, int m);
    while (!w_ready) @(negedge clk);
    w_req = 1'b1; w_chip = 1'(p); w_m = 2'(m);
    for (int n = 0; n < N; n++) begin
      W[p][m][n] = $urandom_range(0, 15);
      if ($urandom_range(0, 3) == 0) W[p][m][n] = 15;
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
    clip_now = 1'b0;
    @(negedge clk);
    start = 1'b0; chip_select = 1'(~p);
    lat = 1;
    while (!q_valid && lat < 50) begin @(negedge clk); lat++; end
    n_sel[p]++;
    checks++;
    if (lat != LAT) begin failures++; $display("latency %0d expected %0d", lat, LAT); end
    checks++;
    if (int'(q_chip) != p) begin failures++; $display("q_chip %0d expected %0d", q_chip, p); end
    for (int m = 0; m < M; m++) begin
      longint e, ideal, raw;
      e = 0; ideal = 0; raw = 0;
      for (int i = 0; i < I; i++)
        for (int b = 0; b < J; b++) begin
          e   += longint'(qc[m*I+i][b])   <<< (I - 1 - i + b);
          raw += longint'(qraw[m*I+i][b]) <<< (I - 1 - i + b);
        end
      for (int n = 0; n < N; n++) ideal += W[p][m][n] * X[n];
      checks++;
      if (longint'(q_out[m]) != e) begin
        failures++;
        $display("chip %0d m %0d: q_out %0d expected %0d (ideal %0d)", p, m, q_out[m], e, ideal);
      end
      if (raw != ideal) n_rawbad++;
      // With zero-error converters the residual error e' = e - e_REF is at
      // most one code per partial (rounding after unequal leakage since a
      // recent write), i.e. at most (2^I-1)(2^J-1) overall, unless clipping.
      if (e == ideal) n_exact++;
      if ((e - ideal > ERR_MAX || ideal - e > ERR_MAX) && !clip_now) begin
        failures++;
        $display("chip %0d m %0d: compensated %0d differs from ideal %0d", p, m, e, ideal);
      end
      checks++;
    end
    @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c <= P; c++) for (int r = 0; r < R; r++) age[c][r] = 0;
    for (int n = 0; n < N; n++) begin w_row[n] = '0; x_vec[n] = '0; end
    n_sel[0] = 0; n_sel[1] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 12; round++) begin
      if (round == 0) begin
        for (int p = 0; p < P; p++) for (int m = 0; m < M; m++) write_row(p, m);
      end else if (round % 3 == 0) begin
        write_row($urandom_range(0, P - 1), $urandom_range(0, M - 1));
      end
      x_load = 1'b1;
      for (int n = 0; n < N; n++) begin
        X[n] = $urandom_range(0, 15);
        if (round % 4 == 1) X[n] = 15;
        x_vec[n] = J'(X[n]);
      end
      @(negedge clk);
      x_load = 1'b0;
      for (int p = 0; p < P; p++) compute(p);
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    checks++;
    if (n_exact < (M * P * 12) / 2) begin failures++; $display("only %0d exact results", n_exact); end
    $display("mechanisms: exact=%0d writes=%0d refresh=%0d sel0=%0d sel1=%0d ref_nonzero=%0d leak=%0d clip=%0d raw_wrong=%0d",
             n_exact, n_write, n_refresh, n_sel[0], n_sel[1], n_refnz, n_leak, n_clip, n_rawbad);
    checks++;
    if (n_write == 0 || n_refresh == 0 || n_sel[0] == 0 || n_sel[1] == 0 ||
        n_refnz == 0 || n_leak == 0 || n_rawbad == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
