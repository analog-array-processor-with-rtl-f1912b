// vmm_pkg: constants and helpers shared by the analog vector-matrix multiplier.
//
// The analog summing-line voltage is carried between the cell-array model
// and the flash A/D converter model as a fixed-point number in units of one
// cell's charge step (Delta V_out = Delta Q / C, the response of one active
// cell).  FRAC_BITS fractional bits hold the small offsets (input-output
// feedthrough, leakage).  The fixed-point representation is this design's
// own choice; the physical quantity is an analog voltage.
package vmm_pkg;

  // Fractional bits of the summing-line voltage; one active cell = 1 << FRAC_BITS.
  localparam int unsigned FRAC_BITS = 16;
  // Width of the fixed-point summing-line voltage.
  localparam int unsigned VW = 40;

  typedef logic [VW-1:0] vline_t;

  // Response of one CID/DRAM cell (input-output mapping of the cell):
  //   x=0 -> 0, x=1,w=0 -> eps, x=1,w=1 -> 1+eps   (in cell charge steps)
  function automatic vline_t cell_response(input logic x, input logic w,
                                           input vline_t eps_fx);
    vline_t one;
    one = vline_t'(1) << FRAC_BITS;
    if (!x)      return '0;
    else if (!w) return eps_fx;
    else         return one + eps_fx;
  endfunction

endpackage
