// pl_pkg -- shared constants and types of the pulsed-latch shift register.
//
// The register keeps one latch per bit and moves data race-free by opening
// the latches of a segment one after the other, output end first, with a set
// of non-overlapping delayed pulsed clocks. This package holds the default
// sizes (128-bit register, groups of 8 latches, 4 phases), the default timing
// of the pulsed clocks in picoseconds, the output-mode type and the timing
// rule that the phase spacing must satisfy:
//
//     t_cq + t_hold <= delta <= T_clk / slots - T_p
//
// where "slots" is the number of pulses that must fit in one clock period
// (the k data phases plus the boundary pulse of the temporary latches).
// Register size, group size, phase count and the 500 MHz clock follow the
// published design; the inverter delay, hold time and default spacing are
// this implementation's own choices.
package pl_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Register organisation
  localparam int unsigned L_DEF = 128;  // register length in bits
  localparam int unsigned N_DEF = 8;    // latches per sub-register
  localparam int unsigned K_DEF = 4;    // non-overlapping data phases

  // Pulsed-clock timing, in ps
  localparam int unsigned TCLK_PS_DEF  = 2000; // 500 MHz system clock
  localparam int unsigned TINV_PS_DEF  = 20;   // one inverter of the delay chain
  localparam int unsigned CHAIN_DEF    = 3;    // T_p = 3 inverter delays
  localparam int unsigned DELTA_PS_DEF = 200;  // gap between consecutive pulses
  localparam int unsigned TCQ_PS_DEF   = 97;   // data-to-Q delay of one cell
  localparam int unsigned THOLD_PS_DEF = 20;   // hold time of one cell

  // Output steering: serial only, or serial plus the parallel bus
  typedef enum logic {
    OUT_SERIAL   = 1'b0,
    OUT_PARALLEL = 1'b1
  } out_mode_e;

  // Timing rule (1) for a given number of pulse slots per clock period.
  function automatic bit spacing_ok(int unsigned tcq, int unsigned thold,
                                    int unsigned delta, int unsigned tclk,
                                    int unsigned slots, int unsigned tp);
    return (tcq + thold <= delta) && (delta + tp <= tclk / slots);
  endfunction
endpackage
