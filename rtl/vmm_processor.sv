// vmm_processor: one vector-matrix multiplication chip.
//
// The chip is internally analog and externally digital.  Its cell array
// (cid_dram_array) stores M output components of I-bit matrix elements as
// M*I binary rows of N cells and, in every clock, computes the binary-binary
// partials Y_ij of all rows for the input bit-plane on the column lines.  A
// bank of M*I row-parallel flash converters (flash_adc), one per summing
// line, quantizes all partials at once.  The SCANOUT strobe captures the
// codes into the chip's output register, from which the multi-chip
// read-out takes them.
//
// Interface / timing: row writes (we, rs, w_data) are synchronous.  Column
// lines x are sampled combinationally by the array and converters; with
// scanout=1 the codes of that clock appear on q in the next clock.  The
// output register and the meaning of SCANOUT as its capture strobe are this
// design's choices; array, converter bank and their sizes follow the published architecture.
// The array and converters are behavioural models, so this module simulates
// the chip but is not a synthesizable netlist of it.
module vmm_processor
  import vmm_pkg::*;
#(
  parameter int unsigned N        = 1000,
  parameter int unsigned M        = 250,
  parameter int unsigned I        = 4,
  parameter int unsigned L        = 6,
  parameter int unsigned FS_CELLS = N,
  parameter int unsigned EPS_FX   = 1311,
  parameter int unsigned LEAK_FX  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [M*I-1:0]   rs,
  input  logic [N-1:0]     w_data,
  input  logic [N-1:0]     x,
  input  logic             refresh,
  input  logic             scanout,
  output logic [L-1:0]     q [M*I]
);

  localparam int unsigned ROWS = M * I;

  vline_t       vline [ROWS];
  logic [L-1:0] code  [ROWS];

  cid_dram_array #(
    .N(N), .ROWS(ROWS), .EPS_FX(EPS_FX), .LEAK_FX(LEAK_FX)
  ) u_array (
    .clk, .rst_n, .we, .rs, .w_data, .x, .refresh, .vout(vline)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    flash_adc #(.L(L), .FS_CELLS(FS_CELLS)) u_adc (.vin(vline[r]), .code(code[r]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      for (int r = 0; r < ROWS; r++) q[r] <= '0;
    else if (scanout)
      for (int r = 0; r < ROWS; r++) q[r] <= code[r];
  end

endmodule
