// vmm_system: multi-chip analog vector-matrix multiplier with digital
// resolution enhancement and reference-chip offset compensation.
//
// Computes Q^(m,p) ~ sum_n W_p^(m,n) X^(n) for P matrices W_p (one per
// processor chip, M x N, I-bit elements) and one N-component input X of
// J-bit elements.  All chips, plus a reference chip that stores only zero
// matrix elements, receive the same input bit-planes and the same refresh
// pulses.  Each chip quantizes its M*I binary partials every clock with
// L-bit flash converters.  The decoder passes the partials of the chip named
// by CHIP SELECT, the reference partials are subtracted row by row, and M
// reconstruction units (one per output component) combine the J columns of
// partials with binary weights into the result.
//
// Number format: q_out[m] = sum_ij 2^(I+J-2-i-j) Q_ij,COMP, which equals the
// integer product sum_n W_int * X_int when the converters resolve every
// count (FS_CELLS = 2^L - 1 >= N); otherwise q_out is in units of the
// converter step FS_CELLS / (2^L - 1) cells.
//
// Interface / timing:
//   * w_req/w_chip/w_m/w_row: write matrix row m of chip w_chip; taken when
//     w_ready, then I clocks of row writes.  Every write also writes zeros
//     into the same rows of the reference chip.  w_ready is low during a
//     computation and while start is high; a start during a write is ignored.
//   * x_load/x_vec: load the input vector (one clock, while not busy).
//   * start/chip_select: one computation for the selected chip; q_valid
//     pulses J+I+1 clocks after start with q_out[] and q_chip.
//   * refresh: DRAM refresh pulse, one row of every chip per pulse.
// Chip count P, reading out one chip per computation and the port protocol
// are this design's choices; the chip structure, reference subtraction and
// reconstruction follow the published architecture.
module vmm_system
  import vmm_pkg::*;
#(
  parameter int unsigned N        = 1000,  // input dimension (cells per row)
  parameter int unsigned M        = 250,   // output components per chip
  parameter int unsigned I        = 4,     // matrix element bits
  parameter int unsigned J        = 4,     // input element bits
  parameter int unsigned L        = 6,     // converter resolution
  parameter int unsigned P        = 2,     // processor chips (plus one reference)
  parameter int unsigned FS_CELLS = N,     // converter full scale in cells
  parameter int unsigned EPS_FX   = 1311,  // feedthrough, 2^-16 cell steps
  parameter int unsigned LEAK_FX  = 8,     // leakage rise, 2^-16 cell steps per clock
  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned OW = L + 1 + I + J
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 refresh,
  // matrix elements
  input  logic                 w_req,
  input  logic [PW-1:0]        w_chip,
  input  logic [MW-1:0]        w_m,
  input  logic [I-1:0]         w_row [N],
  output logic                 w_ready,
  // input vector
  input  logic                 x_load,
  input  logic [J-1:0]         x_vec [N],
  // computation and read-out
  input  logic                 start,
  input  logic [PW-1:0]        chip_select,
  output logic                 busy,
  output logic                 q_valid,
  output logic [PW-1:0]        q_chip,
  output logic signed [OW-1:0] q_out [M]
);

  localparam int unsigned R   = M * I;
  localparam int unsigned JSW = (J > 1) ? $clog2(J) : 1;

  // ---------------- control ----------------
  logic           drive, scanout, pp_valid, pp_first, pp_done;
  logic [JSW-1:0] bit_sel;
  logic [PW-1:0]  sel_q;
  logic [M-1:0]   pp_ovalid;

  // Writes and computations exclude each other: column inputs must be
  // inactive while cells are written.  A start wins over a write request.
  logic start_ok;
  logic loaders_idle;
  assign start_ok = start && !busy && loaders_idle;

  vmm_sequencer #(.J(J)) u_seq (
    .clk, .rst_n, .start(start_ok), .pp_done, .busy, .drive, .bit_sel, .scanout,
    .pp_valid, .pp_first
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                sel_q <= '0;
    else if (start_ok)         sel_q <= chip_select;
  end

  // ---------------- chips: P processors + reference (index P) ----------------
  logic [L-1:0] q_chips [P][R];
  logic [L-1:0] q_ref   [R];
  logic [P:0]   ld_ready;

  for (genvar p = 0; p <= P; p++) begin : g_chip
    logic           we;
    logic [R-1:0]   rs;
    logic [N-1:0]   w_data;
    logic [N-1:0]   x_lines;
    logic [L-1:0]   q [R];
    logic           req;
    logic [I-1:0]   row_src [N];

    // The reference chip's matrix elements are all "0".
    if (p < P) begin : g_req
      assign req = w_req && w_ready && (w_chip == PW'(p));
      always_comb for (int n = 0; n < N; n++) row_src[n] = w_row[n];
    end else begin : g_req_ref
      assign req = w_req && w_ready;
      always_comb for (int n = 0; n < N; n++) row_src[n] = '0;
    end

    matrix_element_loader #(.N(N), .M(M), .I(I)) u_load (
      .clk, .rst_n, .req, .m_addr(w_m),
      .w_row(row_src),
      .ready(ld_ready[p]), .we, .rs, .w_data
    );

    input_vector_reg #(.N(N), .J(J)) u_xin (
      .clk, .rst_n, .load(x_load && !busy), .x_vec, .drive, .bit_sel,
      .x_lines
    );

    vmm_processor #(
      .N(N), .M(M), .I(I), .L(L), .FS_CELLS(FS_CELLS),
      .EPS_FX(EPS_FX), .LEAK_FX(LEAK_FX)
    ) u_chip (
      .clk, .rst_n, .we, .rs, .w_data, .x(x_lines), .refresh, .scanout, .q
    );

    if (p < P) begin : g_out
      always_comb for (int r = 0; r < R; r++) q_chips[p][r] = q[r];
    end else begin : g_out_ref
      always_comb for (int r = 0; r < R; r++) q_ref[r] = q[r];
    end
  end

  assign loaders_idle = &ld_ready;

  // No cell is written while a computation drives the column lines.
  a_no_write_in_compute: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> loaders_idle);
  assign w_ready      = loaders_idle && !busy && !start;

  // ---------------- read-out, compensation, reconstruction ----------------
  logic [L-1:0]        q_sel  [R];
  logic signed [L:0]   q_comp [R];

  chip_decoder #(.P(P), .R(R), .L(L)) u_dec (
    .q_chips, .chip_sel(sel_q), .q_sel
  );

  offset_compensator #(.R(R), .L(L)) u_comp (
    .q_proc(q_sel), .q_ref, .q_comp
  );

  for (genvar m = 0; m < M; m++) begin : g_pp
    logic signed [L:0] col [I];
    always_comb for (int i = 0; i < I; i++) col[i] = q_comp[m*I + i];

    resolution_postproc #(.I(I), .J(J), .QW(L + 1)) u_pp (
      .clk, .rst_n, .in_valid(pp_valid), .in_first(pp_first), .q_in(col),
      .out_valid(pp_ovalid[m]), .q_out(q_out[m])
    );
  end

  // All reconstruction units run in lock step.
  assign q_valid = &pp_ovalid;
  assign pp_done = q_valid;
  assign q_chip  = sel_q;

endmodule
