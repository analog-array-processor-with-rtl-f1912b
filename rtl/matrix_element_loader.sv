// matrix_element_loader: writes one row of I-bit matrix elements
// W^(m,n), n = 0..N-1, into the cell array of one chip.
//
// The array stores matrix elements bit-parallel: output component m uses I
// binary rows, row m*I + i holding bit w_i^(m,n) of every element, where
// W_int = sum_i 2^(I-1-i) w_i (w_0 is the MSB).  A write request is split
// into I row writes, one per clock, each raising one Row Select line RS
// (one-hot over the M*I rows) and driving that bit-plane on the data lines.
//
// Interface / timing: a request (req=1 while ready=1) is captured on the
// clock edge; the I row writes follow on the next I clocks (we=1), during
// which ready is low.  The bit-plane storage with one Row Select per row
// follows the published architecture; the request handshake and the one-row-per-clock order
// are this design's choices.
module matrix_element_loader #(
  parameter int unsigned N = 1000,  // elements per matrix row
  parameter int unsigned M = 250,   // output components
  parameter int unsigned I = 4      // bits per matrix element
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     req,
  input  logic [$clog2(M)-1:0]     m_addr,
  input  logic [I-1:0]             w_row [N],
  output logic                     ready,
  output logic                     we,
  output logic [M*I-1:0]           rs,
  output logic [N-1:0]             w_data
);

  localparam int unsigned IW = $clog2(I + 1);

  logic [I-1:0]           wr [N];
  logic [$clog2(M)-1:0]   m_q;
  logic [IW-1:0]          plane;     // bit-plane i being written
  logic                   active;

  assign ready = !active;

  always_ff @(posedge clk) begin
    if (req && ready) begin
      for (int n = 0; n < N; n++) wr[n] <= w_row[n];
      m_q <= m_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      plane  <= '0;
    end else if (!active) begin
      if (req) begin
        active <= 1'b1;
        plane  <= '0;
      end
    end else if (plane == IW'(I - 1)) begin
      active <= 1'b0;
      plane  <= '0;
    end else begin
      plane <= plane + 1'b1;
    end
  end

  // Row Select decoder and bit-plane data: plane i carries w_i = W_int[I-1-i].
  always_comb begin
    rs     = '0;
    w_data = '0;
    we     = active;
    if (active) begin
      rs[32'(m_q) * I + 32'(plane)] = 1'b1;
      for (int n = 0; n < N; n++) w_data[n] = wr[n][I - 1 - 32'(plane)];
    end
  end

endmodule
