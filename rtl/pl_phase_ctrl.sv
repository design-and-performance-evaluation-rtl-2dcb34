// pl_phase_ctrl -- non-overlap delayed-clock controller (behavioural model:
// it is a tapped delay line whose timing cannot be expressed as synthesizable
// logic).
//
// The shared pulse `phi` is copied onto K+1 lines. `ph_t`, the boundary pulse
// of the temporary storage latches, is `phi` itself. Data phase ph[j] is `phi`
// delayed by (j+1) * (T_p + DELTA_PS), so consecutive pulses are separated by
// a gap of DELTA_PS and never overlap. Each tap reproduces the T_p-wide
// pulse after its delay, which requires the whole sequence to end within one
// clock period -- exactly what the spacing rule below demands.
//
// Interface: `phi` in; `ph_t` and `ph[0]..ph[K-1]` out, in firing order.
// Timing: ph[K-1] falls (K+1) * T_p + K * DELTA_PS after `phi` rises.
//
// Spacing rule checked at elaboration (published rule (1), with the boundary
// pulse counted as one more slot of the period):
//     TCQ_PS + THOLD_PS <= DELTA_PS <= TCLK_PS / (K+1) - T_p
// The staggering of one shared pulse into k non-overlapping phases and rule
// (1) follow the published design; the boundary pulse and the default numbers
// for the gap and the hold time are this model's choices.
module pl_phase_ctrl #(
  parameter int unsigned K        = pl_pkg::K_DEF,
  parameter int unsigned TP_PS    = pl_pkg::TINV_PS_DEF * pl_pkg::CHAIN_DEF,
  parameter int unsigned DELTA_PS = pl_pkg::DELTA_PS_DEF,
  parameter int unsigned TCLK_PS  = pl_pkg::TCLK_PS_DEF,
  parameter int unsigned TCQ_PS   = pl_pkg::TCQ_PS_DEF,
  parameter int unsigned THOLD_PS = pl_pkg::THOLD_PS_DEF
) (
  input  logic         phi,
  output logic         ph_t,
  output logic [K-1:0] ph
);
  timeunit 1ps;
  timeprecision 1ps;

  if (!pl_pkg::spacing_ok(TCQ_PS, THOLD_PS, DELTA_PS, TCLK_PS, K + 1, TP_PS)) begin : g_param_check
    $fatal(1, "pl_phase_ctrl: DELTA_PS=%0d violates the spacing rule", DELTA_PS);
  end

  assign ph_t = phi;

  for (genvar j = 0; j < K; j++) begin : g_tap
    localparam int unsigned DLY_PS = (j + 1) * (TP_PS + DELTA_PS);
    logic tap;
    initial tap = 1'b0;
    // one pulse of width T_p, DLY_PS after each rising edge of phi
    always begin
      @(posedge phi);
      #(DLY_PS) tap = 1'b1;
      #(TP_PS)  tap = 1'b0;
    end
    assign ph[j] = tap;
  end

  // no two lines are ever high together
  always @(ph_t or ph)
    assert ($countones({ph_t, ph}) <= 1)
      else $error("pl_phase_ctrl: pulsed clocks overlap");
endmodule
