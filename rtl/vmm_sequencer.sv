// vmm_sequencer: steps one computational cycle of the multi-chip system.
//
// One computation presents the J bit-planes of the input vector, LSB first,
// one per clock, to all chips; captures each clock's quantized partials
// with SCANOUT; feeds them, one column j per clock, to the digital
// reconstruction; and waits for the reconstructed outputs.
//
// Timing, counting the clock that sees `start` as cycle 0:
//   cycles 0..J-1     bit_sel = c, drive = 1 (column lines show plane c one
//                     clock later, cycles 1..J)
//   cycles 1..J       scanout = 1 (codes of plane c-1 captured)
//   cycles 2..J+1     pp_valid = 1, pp_first in cycle 2
//   pp_done           ends the computation (cycle J+I+1 for K = I+J-1)
// busy is high from the clock after start until pp_done.  The published architecture gives the
// LSB-first bit-serial order and J clocks per computation; this sequence
// and its pipeline offsets are this design's own.
module vmm_sequencer #(
  parameter int unsigned J = 4,
  localparam int unsigned JSW = (J > 1) ? $clog2(J) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            pp_done,
  output logic            busy,
  output logic            drive,
  output logic [JSW-1:0]  bit_sel,
  output logic            scanout,
  output logic            pp_valid,
  output logic            pp_first
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_t;

  localparam int unsigned CW = $clog2(J + 3);

  state_t        state;
  logic [CW-1:0] cyc;
  logic [CW-1:0] c_now;
  logic          run_now;

  assign run_now = (state == S_IDLE) ? start : (state == S_RUN);
  assign c_now   = (state == S_IDLE) ? '0 : cyc;

  always_comb begin
    drive    = run_now && c_now < CW'(J);
    bit_sel  = drive ? JSW'(c_now) : '0;
    scanout  = run_now && c_now >= CW'(1) && c_now <= CW'(J);
    pp_valid = run_now && c_now >= CW'(2) && c_now <= CW'(J + 1);
    pp_first = run_now && c_now == CW'(2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cyc   <= CW'(1);
        end
        S_RUN: begin
          if (cyc == CW'(J + 1)) state <= S_WAIT;
          cyc <= cyc + 1'b1;
        end
        S_WAIT: if (pp_done) begin
          state <= S_IDLE;
          cyc   <= '0;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
