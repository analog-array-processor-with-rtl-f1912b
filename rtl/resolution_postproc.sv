// resolution_postproc: digital reconstruction of one output component Q^(m)
// from its quantized binary-binary partials Q_ij.
//
// Each clock one column j of the I x J partial matrix arrives, one code per
// bit-plane row i, LSB of the input first (j = J-1 first).  Partials on a
// common diagonal k = i + j carry the same binary weight, so a chain of
// adders with one-cycle delays between rows (row 0 -> z^-1 -> + row 1 ->
// z^-1 -> ... -> + row I-1) forms the diagonal sums Q'_k, highest k first.
// A shift-and-accumulate stage then adds each diagonal sum to half of the
// previous total: S(t) = Q'(t) + S(t-1)/2, which gives the radix-2 weighting
// without a multiplier.  After K = I + J - 1 diagonal sums the total is read
// out (the output switch).
//
// Fixed point: the accumulator keeps K-1 fraction bits so halving loses
// nothing, and the result is reported as the integer
//     q_out = sum_ij 2^(I+J-2-i-j) Q_ij  =  2^(I+J) * Q^(m)
// i.e. with unsigned inputs and a zero-error converter q_out equals the
// integer inner product sum_n W_int^(m,n) X_int^(n).
//
// Timing: in_first marks the first column (j = J-1).  Columns are taken on
// J consecutive clocks; the next I-1 clocks flush the chain with zeros.
// out_valid pulses K cycles after the clock that took in_first (one-clock
// registered output).  A new in_first may arrive in the cycle after
// out_valid or later.  The structure follows the published architecture; the fixed-point
// widths, the start/flush control and signed inputs (needed after
// reference subtraction) are this design's choices.
module resolution_postproc #(
  parameter int unsigned I  = 4,  // bits of a matrix element (bit-plane rows)
  parameter int unsigned J  = 4,  // bits of an input component
  parameter int unsigned QW = 7   // width of a signed input partial
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_first,
  input  logic signed [QW-1:0]          q_in [I],
  output logic                          out_valid,
  output logic signed [QW+I+J-1:0]      q_out
);

  localparam int unsigned K    = I + J - 1;
  localparam int unsigned CW   = QW + $clog2(I + 1);        // chain width
  localparam int unsigned AW   = CW + K + 1;                // accumulator width
  localparam int unsigned OW   = QW + I + J;
  localparam int unsigned TW   = $clog2(K + 1);

  logic [TW-1:0]         t;           // diagonal index counter
  logic                  run;
  logic signed [CW-1:0]  chain [I];   // z^-1 registers between rows
  logic signed [AW-1:0]  acc_half;    // z^-1 after the 1/2 in the feedback
  logic signed [CW-1:0]  col   [I];   // current column, zero while flushing
  logic signed [CW-1:0]  diag;        // diagonal sum Q'_k
  logic signed [AW-1:0]  sum;
  logic                  active;      // this clock carries a diagonal
  logic [TW-1:0]         t_now;

  assign active = in_first || run;
  assign t_now  = in_first ? '0 : t;

  always_comb begin
    for (int i = 0; i < I; i++)
      col[i] = (active && t_now < TW'(J) && (in_valid || in_first))
               ? CW'(q_in[i]) : '0;
  end

  // Adder chain: row 0 enters the first delay, each later row adds to the
  // delayed partial sum of the row above.  The registers read as zero at the
  // start of an operation.
  always_comb begin
    logic signed [CW-1:0] prev;
    prev = (in_first || I == 1) ? '0 : chain[I > 1 ? I-2 : 0];
    diag = prev + col[I-1];
  end

  assign sum = (AW'(diag) <<< (K - 1)) + (in_first ? '0 : acc_half);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      run       <= 1'b0;
      acc_half  <= '0;
      out_valid <= 1'b0;
      q_out     <= '0;
      for (int i = 0; i < I; i++) chain[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (active) begin
        chain[0] <= col[0];
        for (int i = 1; i < I - 1; i++)
          chain[i] <= ((in_first) ? '0 : chain[i-1]) + col[i];
        acc_half <= sum >>> 1;
        if (t_now == TW'(K - 1)) begin
          run       <= 1'b0;
          t         <= '0;
          out_valid <= 1'b1;
          q_out     <= OW'(sum);
        end else begin
          run <= 1'b1;
          t   <= t_now + 1'b1;
        end
      end
    end
  end

endmodule
