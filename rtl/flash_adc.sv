// flash_adc: BEHAVIOURAL MODEL of one row-parallel flash A/D converter
// (analog/mixed-signal part).
//
// One converter sits on each output summing line of the cell array and turns
// the line voltage into an L-bit code Q_ij every clock.  As a flash converter
// it compares the input against 2^L - 1 reference levels at once and counts
// the comparators that trip (thermometer to binary).  The references are
// spaced evenly over a full-scale range of FS_CELLS cell steps, with each
// threshold half a level below the level it stands for (rounding
// quantizer).  With FS_CELLS = 2^L - 1 every level coincides with one count
// of active cells, which is the zero-error case; with FS_CELLS larger than
// 2^L - 1 the code is a coarse estimate and the digital post-processing
// averages the error.  Inputs above full scale saturate at 2^L - 1.
//
// L = 6 follows the published architecture; the reference ladder and the rounding thresholds
// are this model's choice.  Purely combinational; the input is the
// fixed-point line voltage of vmm_pkg (one cell = 1 << FRAC_BITS).
module flash_adc
  import vmm_pkg::*;
#(
  parameter int unsigned L        = 6,     // resolution in bits
  parameter int unsigned FS_CELLS = 1000   // full-scale range in cell charge steps
) (
  input  vline_t          vin,
  output logic [L-1:0]    code
);

  localparam longint unsigned LEVELS = (64'd1 << L) - 1;
  localparam longint unsigned FS_FX  = longint'(FS_CELLS) << FRAC_BITS;

  logic [(1<<L)-2:0] therm;

  // Comparator k trips when vin >= (k - 1/2) * FS / LEVELS.
  always_comb begin
    longint unsigned v2;
    v2 = 64'(vin) * LEVELS * 2;
    for (int k = 1; k <= int'(LEVELS); k++)
      therm[k-1] = (v2 >= (2 * longint'(k) - 1) * FS_FX);
  end

  assign code = L'($countones(therm));

endmodule
