// tb_cid_dram_array: checks the cell-array model.  Random bit-planes are
// written through one-hot Row Select, random input planes are applied, and
// each summing line is compared with a reference built cell by cell from
// the cell table (x,w: 00->0, 01->0, 10->eps, 11->1+eps) plus the leakage
// term computed from row ages tracked here (cleared by a write or by the
// refresh pulse that reaches the row).
module tb_cid_dram_array;
  import vmm_pkg::*;

  localparam int unsigned N = 16, ROWS = 8, EPS = 1311, LEAK = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, refresh = 1'b0;
  logic [ROWS-1:0] rs = '0;
  logic [N-1:0] w_data = '0, x = '0;
  vline_t vout [ROWS];
  int checks = 0, failures = 0;

  logic [N-1:0] model [ROWS];
  longint       age   [ROWS];
  int           rptr;
  int           n_refresh = 0, n_eps = 0;

  cid_dram_array #(.N(N), .ROWS(ROWS), .EPS_FX(EPS), .LEAK_FX(LEAK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference state, updated on every clock edge after reset.
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < ROWS; r++) begin
      if ((we && rs[r]) || (refresh && rptr == r)) age[r] = 0;
      else age[r] = age[r] + 1;
      if (we && rs[r]) model[r] = w_data;
    end
    if (refresh) begin
      rptr = (rptr + 1) % ROWS;
      n_refresh++;
    end
  end

  task automatic check_lines();
    for (int r = 0; r < ROWS; r++) begin
      longint expv;
      int nx;
      expv = 0; nx = 0;
      for (int n = 0; n < N; n++) begin
        if (x[n]) nx++;
        if (x[n] && model[r][n]) expv += 65536 + EPS;
        else if (x[n]) expv += EPS;
      end
      expv += (longint'(LEAK) * age[r] * nx) / N;
      checks++;
      if (longint'(vout[r]) != expv) begin
        failures++;
        $display("row %0d: vout %0d expected %0d", r, vout[r], expv);
      end
    end
  endtask

  initial begin
    rptr = 0;
    for (int r = 0; r < ROWS; r++) age[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Write every row.
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      we = 1'b1; rs = '0; rs[r] = 1'b1; w_data = N'($urandom);
    end
    @(negedge clk);
    we = 1'b0; rs = '0;
    // Compute with random inputs, interleaved with refresh and rewrites.
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      x = N'($urandom);
      if (t % 7 == 3) x = '0;
      if (t % 11 == 5) x = '1;
      refresh = (t % 5 == 0);
      we = (t % 13 == 7);
      rs = '0;
      if (we) rs[$urandom_range(0, ROWS - 1)] = 1'b1;
      w_data = N'($urandom);
      #1;
      check_lines();
      if (x != 0 && model[0] != '1) n_eps++;
    end
    checks++;
    if (n_refresh == 0 || n_eps == 0) begin
      failures++;
      $display("refresh or feedthrough never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
