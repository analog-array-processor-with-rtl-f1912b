// offset_compensator: digital reference subtraction of the multi-chip
// system.
//
// The reference chip sees the same inputs and the same refresh clock as the
// processor chips but stores only zero matrix elements, so its partials hold
// exactly the offsets the processors also see: input-output feedthrough
// (eps times the number of active inputs) and the leakage rise of each row
// since its last refresh.  Subtracting the reference partial of the same
// row from each processor partial removes both:
//     Q_ij,COMP = Q_ij(p) - Q_ij,REF
// Results are signed (one bit wider than the codes) since quantization can
// make a difference negative.  Purely combinational; R subtractors in
// parallel, one per binary row.  Follows the published architecture.
module offset_compensator #(
  parameter int unsigned R = 1000,  // partial codes (M*I)
  parameter int unsigned L = 6      // code width
) (
  input  logic        [L-1:0] q_proc [R],
  input  logic        [L-1:0] q_ref  [R],
  output logic signed [L:0]   q_comp [R]
);

  always_comb begin
    for (int r = 0; r < R; r++)
      q_comp[r] = $signed({1'b0, q_proc[r]}) - $signed({1'b0, q_ref[r]});
  end

endmodule
