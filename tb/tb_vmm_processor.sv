// tb_vmm_processor: one chip with N=15 cells per row, M=3 components of
// I=4 bits and 4-bit converters spanning 15 cells.  Random bit-planes are
// written, random input planes applied with scanout, and every captured
// code is compared with round(n11*(1+eps) + n10*eps) computed here from the
// stored bits (n11: active inputs over stored ones, n10: over stored zeros),
// clipped to 15.  The feedthrough eps = 0.4 makes offsets visible.
module tb_vmm_processor;
  import vmm_pkg::*;

  localparam int unsigned N = 15, M = 3, I = 4, L = 4, FS = 15, EPS = 26214;
  localparam int unsigned R = M * I;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, refresh = 1'b0, scanout = 1'b0;
  logic [R-1:0] rs = '0;
  logic [N-1:0] w_data = '0, x = '0;
  logic [L-1:0] q [R];
  int checks = 0, failures = 0;
  logic [N-1:0] model [R];
  int n_offset = 0;

  vmm_processor #(.N(N), .M(M), .I(I), .L(L), .FS_CELLS(FS), .EPS_FX(EPS), .LEAK_FX(0))
    dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < R; r++) begin
      we = 1'b1; rs = '0; rs[r] = 1'b1;
      w_data = N'($urandom);
      model[r] = w_data;
      @(negedge clk);
    end
    we = 1'b0; rs = '0;
    for (int t = 0; t < 300; t++) begin
      logic [L-1:0] prev [R];
      logic [N-1:0] xv;
      xv = N'($urandom);
      if (t % 9 == 0) xv = '1;
      x = xv;
      scanout = (t % 4 != 3);
      for (int r = 0; r < R; r++) prev[r] = q[r];
      @(negedge clk);
      for (int r = 0; r < R; r++) begin
        longint v, c;
        int n11, n10;
        n11 = $countones(model[r] & xv);
        n10 = $countones(~model[r] & xv);
        v = longint'(n11) * (65536 + EPS) + longint'(n10) * EPS;
        c = (2 * v * 15 + (longint'(FS) << 16)) / (2 * (longint'(FS) << 16));
        if (c > 15) c = 15;
        if (c != n11) n_offset++;
        checks++;
        if (scanout ? (longint'(q[r]) != c) : (q[r] != prev[r])) begin
          failures++;
          $display("t=%0d row %0d: q=%0d expected %0d (scanout %b)", t, r, q[r], c, scanout);
        end
      end
    end
    checks++;
    if (n_offset == 0) begin failures++; $display("feedthrough never changed a code"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
