// chip_decoder: read-out multiplexer of the multi-chip system.
//
// P processor chips compute in lock step on the same input; their quantized
// partials are read out one chip at a time (output multiplexing in time).
// CHIP SELECT picks which chip's R partial codes pass to the reference
// subtraction.  Purely combinational; a select value of P or above passes
// zeros.  The function follows the published architecture; the encoding of CHIP SELECT as a
// binary chip number is this design's choice.
module chip_decoder #(
  parameter int unsigned P  = 2,     // processor chips
  parameter int unsigned R  = 1000,  // partial codes per chip (M*I)
  parameter int unsigned L  = 6,     // code width
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1
) (
  input  logic [L-1:0]  q_chips [P][R],
  input  logic [PW-1:0] chip_sel,
  output logic [L-1:0]  q_sel [R]
);

  always_comb begin
    for (int r = 0; r < R; r++) q_sel[r] = '0;
    for (int p = 0; p < P; p++)
      if (chip_sel == PW'(p))
        for (int r = 0; r < R; r++) q_sel[r] = q_chips[p][r];
  end

endmodule
