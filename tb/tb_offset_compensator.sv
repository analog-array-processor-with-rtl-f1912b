// tb_offset_compensator: processor and reference codes at random and at the
// extremes; every output must be the signed difference.
module tb_offset_compensator;
  localparam int unsigned R = 12, L = 6;

  logic        [L-1:0] q_proc [R], q_ref [R];
  logic signed [L:0]   q_comp [R];
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  offset_compensator #(.R(R), .L(L)) dut (.*);

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
      for (int r = 0; r < R; r++) begin
        q_proc[r] = L'($urandom);
        q_ref[r]  = (t % 4 == 0) ? L'($urandom) : L'($urandom_range(0, 3));
      end
      if (t == 0) begin q_proc[0] = '0; q_ref[0] = '1; q_proc[1] = '1; q_ref[1] = '0; end
      #1;
      for (int r = 0; r < R; r++) begin
        checks++;
        if (int'(q_comp[r]) != int'(q_proc[r]) - int'(q_ref[r])) begin
          failures++;
          $display("row %0d: %0d - %0d gave %0d", r, q_proc[r], q_ref[r], q_comp[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
