// tb_chip_decoder: random partial codes on every chip; each chip-select
// value must pass that chip's codes, and an out-of-range select zeros.
module tb_chip_decoder;
  localparam int unsigned P = 3, R = 10, L = 6;

  logic [L-1:0] q_chips [P][R];
  logic [1:0]   chip_sel;
  logic [L-1:0] q_sel [R];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  chip_decoder #(.P(P), .R(R), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int p = 0; p < P; p++)
        for (int r = 0; r < R; r++) q_chips[p][r] = L'($urandom);
      chip_sel = 2'($urandom_range(0, 3));
      #1;
      for (int r = 0; r < R; r++) begin
        checks++;
        if (q_sel[r] != (chip_sel < P ? q_chips[chip_sel][r] : L'(0))) begin
          failures++;
          $display("sel %0d row %0d: %0d", chip_sel, r, q_sel[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
