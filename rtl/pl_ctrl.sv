// pl_ctrl -- enable and data-steering logic of the pulsed-latch register.
//
// Clock gating: `shift_en` is captured by a latch that is transparent while
// the system clock is low, as in an integrated clock-gating cell. Its output
// `pg_en` is therefore stable for the whole high half of the clock, the time
// in which the pulse generator fires, and a change of `shift_en` can never
// clip or create a pulse. With `shift_en` low the generator stays silent and
// the register holds its contents without any clock activity.
//
// Output steering: the serial output `q_ser` is always the last cell. The
// parallel bus `q_par` carries the cell contents in OUT_PARALLEL mode and is
// held at zero in OUT_SERIAL mode, so the wide bus does not toggle while the
// register is used as a delay line.
//
// Interface: `clk`, `rst_n`, `shift_en`, `mode`, `cells` (cell contents,
// index 0 nearest the input); outputs `pg_en`, `q_ser`, `q_par`.
// Timing: `shift_en` sampled before each rising edge of `clk` decides whether
// that period shifts; the outputs follow `cells` and `mode` combinationally.
//
// Idle-time gating and serial/parallel output selection follow the published
// design; the gating latch, the zeroed bus and the reset are this
// implementation's choices. The latch inferred here is the intended gating
// latch.
module pl_ctrl #(
  parameter int unsigned L = pl_pkg::L_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  pl_pkg::out_mode_e mode,
  input  logic [L-1:0]     cells,
  output logic             pg_en,
  output logic             q_ser,
  output logic [L-1:0]     q_par
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)    pg_en = 1'b0;
    else if (!clk) pg_en = shift_en;
  end

  always_comb begin
    q_ser = cells[L-1];
    q_par = (mode == pl_pkg::OUT_PARALLEL) ? cells : '0;
  end
endmodule
