// tb_matrix_element_loader: writes random matrix rows and records the row
// writes the loader produces; each request must give exactly I writes on
// consecutive clocks, to rows m*I+i with a one-hot Row Select, carrying bit
// w_i = W[I-1-i] of every element, with ready low meanwhile.
module tb_matrix_element_loader;
  localparam int unsigned N = 12, M = 5, I = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0;
  logic [2:0] m_addr = '0;
  logic [I-1:0] w_row [N];
  logic ready, we;
  logic [M*I-1:0] rs;
  logic [N-1:0] w_data;
  int checks = 0, failures = 0;

  matrix_element_loader #(.N(N), .M(M), .I(I)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wv [N];
    int m;
    for (int n = 0; n < N; n++) w_row[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      checks++;
      if (!ready || we) begin
        failures++;
        $display("loader not idle");
      end
      m = $urandom_range(0, M - 1);
      req = 1'b1; m_addr = 3'(m);
      for (int n = 0; n < N; n++) begin
        wv[n] = $urandom_range(0, (1 << I) - 1);
        w_row[n] = I'(wv[n]);
      end
      @(negedge clk);
      req = 1'b0;
      for (int n = 0; n < N; n++) w_row[n] = I'($urandom);
      for (int i = 0; i < I; i++) begin
        logic [M*I-1:0] exp_rs;
        logic [N-1:0]   exp_d;
        exp_rs = '0; exp_rs[m*I + i] = 1'b1;
        for (int n = 0; n < N; n++) exp_d[n] = 1'((wv[n] >> (I - 1 - i)) & 1);
        checks++;
        if (!we || ready || rs != exp_rs || w_data != exp_d) begin
          failures++;
          $display("m=%0d plane %0d: we=%b rs=%h data=%h expected %h/%h", m, i, we, rs,
                   w_data, exp_rs, exp_d);
        end
        @(negedge clk);
      end
      checks++;
      if (we || !ready) begin
        failures++;
        $display("extra write after %0d planes", I);
      end
      // a request while busy must be ignored (tested on odd rounds)
      if (t % 2 == 1) begin
        req = 1'b1;
        @(negedge clk);
        req = 1'b0;
        repeat (I) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
