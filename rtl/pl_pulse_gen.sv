// pl_pulse_gen -- shared pulse generator (behavioural model: it describes a
// delay-chain circuit whose timing cannot be expressed as synthesizable logic).
//
// The system clock goes through a chain of CHAIN inverters; the AND of the
// clock and the chain output is high for CHAIN inverter delays after every
// rising clock edge. That narrow pulse `phi`, of width T_p = CHAIN * TINV_PS,
// is the only clock the register's latches see. The enable `en` (already
// latched while the clock is low, see pl_ctrl) is a third AND input, so a
// disabled generator produces no pulse at all.
//
// Interface: `clk` system clock, `en` gated-clock enable, `phi` pulse.
// Timing: `phi` rises with `clk` and falls T_p later.
//
// The delay chain, the AND gate and T_p = 3 inverter delays follow the
// published design. The inverter delay (20 ps) is this model's choice. The
// chain is modelled as one lumped delay; a synthesis tool would remove it.
module pl_pulse_gen #(
  parameter int unsigned TINV_PS = pl_pkg::TINV_PS_DEF,
  parameter int unsigned CHAIN   = pl_pkg::CHAIN_DEF
) (
  input  logic clk,
  input  logic en,
  output logic phi
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TP_PS = TINV_PS * CHAIN;

  if (CHAIN % 2 != 1) begin : g_param_check
    $fatal(1, "pl_pulse_gen: CHAIN (%0d) must be odd to invert the clock", CHAIN);
  end

  logic clk_dly_n;  // inverted clock, delayed by the chain

  initial clk_dly_n = 1'b0;
  // the chain output follows the inverted clock T_p later (T_p must be
  // shorter than half a clock period)
  always begin
    @(clk);
    #(TP_PS) clk_dly_n = ~clk;
  end

  assign phi = clk & clk_dly_n & en;
endmodule
