// tb_input_vector_reg: loads random input vectors and checks that each
// requested bit-plane appears on the column lines one clock later, and that
// the lines are all inactive while drive is low.
module tb_input_vector_reg;
  localparam int unsigned N = 24, J = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, drive = 1'b0;
  logic [J-1:0] x_vec [N];
  logic [1:0] bit_sel = '0;
  logic [N-1:0] x_lines;
  int checks = 0, failures = 0;
  int xv [N];

  input_vector_reg #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) x_vec[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk);
      load = 1'b1;
      for (int n = 0; n < N; n++) begin
        xv[n] = $urandom_range(0, (1 << J) - 1);
        x_vec[n] = J'(xv[n]);
      end
      @(negedge clk);
      load = 1'b0;
      for (int n = 0; n < N; n++) x_vec[n] = J'($urandom);   // not loaded
      for (int b = 0; b < J; b++) begin
        drive = 1'b1; bit_sel = 2'(b);
        @(negedge clk);
        for (int n = 0; n < N; n++) begin
          checks++;
          if (x_lines[n] != ((xv[n] >> b) & 1)) begin
            failures++;
            $display("n=%0d bit %0d: %b", n, b, x_lines[n]);
          end
        end
      end
      drive = 1'b0; bit_sel = 2'($urandom);
      @(negedge clk);
      checks++;
      if (x_lines != '0) begin
        failures++;
        $display("lines active while not driven");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
