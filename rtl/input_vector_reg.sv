// input_vector_reg: holds the N-component input vector X of one chip and
// presents it to the array's column lines one bit-plane at a time.
//
// Each component is a J-bit unsigned integer X_int = sum_j 2^(J-1-j) x_j,
// so bit x_j of the published notation (x_0 the MSB) is X_int[J-1-j].  The
// sequencer asks for integer bit `bit_sel` (0 = LSB), which makes the
// LSB-first order simply bit_sel = 0, 1, ..., J-1.  While `drive` is low all
// column lines are held inactive (logic 0, no charge transfer).
//
// Timing: `load` captures x_vec on the clock edge.  The column lines are
// registered: the plane selected in one clock appears on x_lines in the
// next.  The bit-serial LSB-first presentation follows the published architecture; the
// parallel load port and the registered output are this design's choices.
module input_vector_reg #(
  parameter int unsigned N = 1000,  // input dimension
  parameter int unsigned J = 4,     // bits per input component
  localparam int unsigned JSW = (J > 1) ? $clog2(J) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [J-1:0]            x_vec [N],
  input  logic                    drive,
  input  logic [JSW-1:0]          bit_sel,
  output logic [N-1:0]            x_lines
);

  logic [J-1:0] xr [N];

  always_ff @(posedge clk) begin
    if (load)
      for (int n = 0; n < N; n++) xr[n] <= x_vec[n];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_lines <= '0;
    else
      for (int n = 0; n < N; n++)
        x_lines[n] <= drive && xr[n][bit_sel];
  end

endmodule
