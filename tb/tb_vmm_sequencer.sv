// tb_vmm_sequencer: starts computations and checks the control pattern clock
// by clock against the documented schedule (drive/bit_sel in cycles 0..J-1,
// scanout in 1..J, pp_valid in 2..J+1, pp_first in 2), then answers with
// pp_done after a chosen delay and checks that busy ends there and that a
// start while busy is ignored.
module tb_vmm_sequencer;
  localparam int unsigned J = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, pp_done = 1'b0;
  logic busy, drive, scanout, pp_valid, pp_first;
  logic [1:0] bit_sel;
  int checks = 0, failures = 0;

  vmm_sequencer #(.J(J)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(int c, logic got, logic want, string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("cycle %0d: %s=%b expected %b", c, what, got, want);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      int wait_cyc;
      wait_cyc = $urandom_range(0, 6);
      @(negedge clk);
      expect_sig(-1, busy, 1'b0, "busy");
      start = 1'b1;
      for (int c = 0; c <= J + 1; c++) begin
        #1;
        expect_sig(c, drive, c < J, "drive");
        if (c < J) begin
          checks++;
          if (int'(bit_sel) != c) begin failures++; $display("bit_sel %0d at %0d", bit_sel, c); end
        end
        expect_sig(c, scanout,  c >= 1 && c <= J, "scanout");
        expect_sig(c, pp_valid, c >= 2 && c <= J + 1, "pp_valid");
        expect_sig(c, pp_first, c == 2, "pp_first");
        @(negedge clk);
        start = (c == 1);   // ignored while busy
        expect_sig(c, busy, 1'b1, "busy");
      end
      start = 1'b0;
      repeat (wait_cyc) begin
        #1;
        expect_sig(99, scanout | pp_valid | drive, 1'b0, "idle outputs");
        @(negedge clk);
        expect_sig(99, busy, 1'b1, "busy");
      end
      pp_done = 1'b1;
      @(negedge clk);
      pp_done = 1'b0;
      expect_sig(100, busy, 1'b0, "busy after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
