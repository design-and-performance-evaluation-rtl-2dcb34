// pl_subreg -- sub-register latch bank: N single-latch cells and the
// temporary storage latches that feed them.
//
// The N cells are split into segments of K cells. Each segment is preceded
// by one temporary storage latch. In every clock period the pulses arrive in
// this order:
//
//   ph_t   : every temporary latch copies the cell just upstream of it
//            (for the first segment: the sub-register input `din`);
//   ph[0]  : the cell at the output end of each segment loads its neighbour;
//   ph[1]  : the next cell towards the input loads its neighbour;
//   ...
//   ph[K-1]: the first cell of each segment loads its temporary latch.
//
// Counting cells from the output end of a segment, cell number i is thus
// opened by phase i (mod K). A cell is always opened before the cell that
// feeds it, so every cell takes its neighbour's previous value and the data
// moves exactly one stage per clock period, with no race-through. Cells in
// different segments share a phase, but they never read each other directly.
//
// Interface: `din` serial input; `q[0]` is the cell nearest the input and
// `q[N-1]` the one nearest the output; `rst_n` clears every latch.
// Timing: the value of `din` during ph_t enters q[0] in the same period and
// appears on q[N-1] N-1 periods later.
//
// Grouping, phase reuse and temporary latches follow the published design.
// Putting a temporary latch in front of every K cells, rather than only every
// N, is this implementation's choice: with K phases no longer chain of cells
// can be made race-free. N must be a multiple of K.
module pl_subreg #(
  parameter int unsigned N = pl_pkg::N_DEF,
  parameter int unsigned K = pl_pkg::K_DEF
) (
  input  logic         rst_n,
  input  logic         ph_t,
  input  logic [K-1:0] ph,
  input  logic         din,
  output logic [N-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned S = N / K;  // segments in this sub-register

  if (N % K != 0 || N == 0) begin : g_param_check
    $fatal(1, "pl_subreg: N (%0d) must be a non-zero multiple of K (%0d)", N, K);
  end

  logic t_d [S];  // temporary latch inputs
  logic t_q [S];  // temporary latch outputs

  for (genvar s = 0; s < S; s++) begin : g_seg
    if (s == 0) begin : g_first
      assign t_d[s] = din;
    end else begin : g_next
      assign t_d[s] = g_seg[s-1].g_cell[K-1].q_cell;
    end
    // boundary latch of this segment: a one-wide slice of the bank, kept
    // separate per segment so that no signal spans two segments
    tsl_bank #(.M(1)) u_tsl (
      .rst_n (rst_n),
      .ph_t  (ph_t),
      .d     (t_d[s]),
      .q     (t_q[s])
    );
    for (genvar j = 0; j < K; j++) begin : g_cell
      logic d_cell, q_cell;
      if (j == 0) begin : g_head
        assign d_cell = t_q[s];
      end else begin : g_body
        assign d_cell = g_cell[j-1].q_cell;
      end
      // output end of the segment (j = K-1) opens first, on ph[0]
      pl_cell u_cell (
        .rst_n (rst_n),
        .ph    (ph[K-1-j]),
        .d     (d_cell),
        .q     (q_cell)
      );
      assign q[s*K+j] = q_cell;
    end
  end

endmodule
