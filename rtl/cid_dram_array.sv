// cid_dram_array: BEHAVIOURAL MODEL of the charge-mode CID/DRAM cell array
// (analog part, not synthesizable as intended circuitry).
//
// The array has ROWS = M*I rows of N cells.  Each cell is a three-transistor
// CID/DRAM cell: M1/M2 form a DRAM cell that stores one bit w_i^(m,n) of a
// matrix element when its Row Select line RS is active, M2/M3 form a charge
// injection device that moves the stored charge onto the row's output line
// when the column input line x_j^(n) is active.  Each row's output summing
// line therefore collects the binary-binary inner product
//     Y_ij = sum_n w_i^(m,n) x_j^(n)
// (a logical AND per cell, summed as charge on one wire).
//
// Non-idealities of the published multi-chip analysis are modelled:
//   * input-output feedthrough: every active input adds eps to the line,
//     also over a cell storing 0 (cell table: 00->0, 01->0, 10->eps,
//     11->1+eps for (x,w));
//   * DRAM leakage: every row ages from its last write or refresh; the line
//     gains LEAK_FX * age * (active inputs) / N.  The leakage law is this
//     model's own assumption; the published description only says the offset depends on the
//     inputs and on time since refresh, and that rows are refreshed one at a
//     time.
// Refresh: each pulse on `refresh` restores one row (a row pointer cycles
// through the rows) and clears its age.
//
// Interface / timing: writes are synchronous (row r written on the clock
// edge while rs[r]=1 and we=1).  vout[] is combinational in x and the stored
// state, in units of one cell's charge step with vmm_pkg::FRAC_BITS fraction
// bits.  Stored bits are not reset (DRAM content is undefined at power-up);
// ages and the refresh pointer are reset.
module cid_dram_array
  import vmm_pkg::*;
#(
  parameter int unsigned N       = 1000,  // cells per row (input dimension)
  parameter int unsigned ROWS    = 1000,  // M*I binary rows
  parameter int unsigned EPS_FX  = 1311,  // feedthrough per active input, ~0.02 cell step
  parameter int unsigned LEAK_FX = 8,     // leakage rise per clock of age at full input activity
  parameter int unsigned AGE_W   = 16     // saturating age counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,              // write phase
  input  logic [ROWS-1:0]  rs,              // Row Select, one-hot
  input  logic [N-1:0]     w_data,          // bit-plane written into the selected row
  input  logic [N-1:0]     x,               // column input lines, 1 = active (x_j = 1)
  input  logic             refresh,         // refresh clock pulse (one row per pulse)
  output vline_t           vout [ROWS]      // summing-line voltage per row
);

  localparam int unsigned PTR_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [N-1:0]     cells [ROWS];
  logic [AGE_W-1:0] age   [ROWS];
  logic [PTR_W-1:0] rptr;

  // Storage: DRAM write through M1, refresh one row per refresh pulse.
  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++)
      if (we && rs[r]) cells[r] <= w_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr <= '0;
      for (int r = 0; r < ROWS; r++) age[r] <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++) begin
        if ((we && rs[r]) || (refresh && rptr == PTR_W'(r)))
          age[r] <= '0;
        else if (age[r] != '1)
          age[r] <= age[r] + 1'b1;
      end
      if (refresh)
        rptr <= (rptr == PTR_W'(ROWS - 1)) ? '0 : rptr + 1'b1;
    end
  end

  // Compute: charge summed on each output line.
  always_comb begin
    int unsigned n_x, n11, n10;
    vline_t leak;
    n_x = $countones(x);
    for (int r = 0; r < ROWS; r++) begin
      n11  = $countones(cells[r] & x);
      n10  = n_x - n11;
      leak = vline_t'((longint'(LEAK_FX) * longint'(age[r]) * longint'(n_x)) / longint'(N));
      vout[r] = vline_t'(n11) * cell_response(1'b1, 1'b1, vline_t'(EPS_FX))
              + vline_t'(n10) * cell_response(1'b1, 1'b0, vline_t'(EPS_FX))
              + leak;
    end
  end

endmodule
