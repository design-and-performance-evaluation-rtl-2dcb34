// pl_shift_register -- L-bit shift register built from pulsed latches.
//
// One latch per bit instead of a master-slave flip-flop. The system clock
// drives a single shared pulse generator; a delay-line controller spreads its
// pulse into a boundary pulse and K non-overlapping data phases; the L cells
// are grouped into L/N sub-registers in which the K phases repeat, with a
// temporary storage latch in front of every K cells. Only K+1 pulsed lines
// run along the register, whatever its length. A control block gates the
// pulse generator while `shift_en` is low and steers the outputs.
//
// Interface:
//   clk       system clock (500 MHz by default)
//   rst_n     asynchronous clear of every latch, active low
//   shift_en  1: shift one position in the next clock period; 0: hold
//   mode      OUT_SERIAL or OUT_PARALLEL (parallel bus enabled)
//   d         serial data in
//   q_ser     serial data out (last cell)
//   q_par     parallel data out, q_par[0] nearest the input
// Timing: `d` and `shift_en` are sampled at the rising edge of `clk` and
// must stay stable for the first part of the period, until the last data
// phase has closed (about 1.1 ns with the defaults). A bit applied in period
// n is in q_par[0] at the end of period n and on q_ser at the end of period
// n + L - 1: one stage per clock period, one bit per period of throughput.
//
// Length 128, groups of 8, 4 phases, 500 MHz and the block structure follow
// the published design; the timing numbers, reset and port names are this
// implementation's own. All latches in the hierarchy are intended.
module pl_shift_register #(
  parameter int unsigned L        = pl_pkg::L_DEF,
  parameter int unsigned N        = pl_pkg::N_DEF,
  parameter int unsigned K        = pl_pkg::K_DEF,
  parameter int unsigned TINV_PS  = pl_pkg::TINV_PS_DEF,
  parameter int unsigned CHAIN    = pl_pkg::CHAIN_DEF,
  parameter int unsigned DELTA_PS = pl_pkg::DELTA_PS_DEF,
  parameter int unsigned TCLK_PS  = pl_pkg::TCLK_PS_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  pl_pkg::out_mode_e mode,
  input  logic              d,
  output logic              q_ser,
  output logic [L-1:0]      q_par
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned G = L / N;  // number of sub-registers

  if (L % N != 0 || L == 0) begin : g_param_check
    $fatal(1, "pl_shift_register: L (%0d) must be a non-zero multiple of N (%0d)", L, N);
  end

  logic         pg_en;  // gated enable of the pulse generator
  logic         phi;    // shared pulse
  logic         ph_t;   // boundary pulse of the temporary latches
  logic [K-1:0] ph;     // data phases, in firing order
  logic [L-1:0] cells;  // contents, cells[0] nearest the input

  pl_ctrl #(.L(L)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (shift_en),
    .mode     (mode),
    .cells    (cells),
    .pg_en    (pg_en),
    .q_ser    (q_ser),
    .q_par    (q_par)
  );

  pl_pulse_gen #(.TINV_PS(TINV_PS), .CHAIN(CHAIN)) u_pg (
    .clk (clk),
    .en  (pg_en),
    .phi (phi)
  );

  pl_phase_ctrl #(
    .K        (K),
    .TP_PS    (TINV_PS * CHAIN),
    .DELTA_PS (DELTA_PS),
    .TCLK_PS  (TCLK_PS)
  ) u_phase (
    .phi  (phi),
    .ph_t (ph_t),
    .ph   (ph)
  );

  for (genvar g = 0; g < G; g++) begin : g_sub
    logic         din;
    logic [N-1:0] q_sub;
    if (g == 0) begin : g_first
      assign din = d;
    end else begin : g_next
      assign din = g_sub[g-1].q_sub[N-1];
    end
    pl_subreg #(.N(N), .K(K)) u_sub (
      .rst_n (rst_n),
      .ph_t  (ph_t),
      .ph    (ph),
      .din   (din),
      .q     (q_sub)
    );
    assign cells[g*N +: N] = q_sub;
  end
endmodule
