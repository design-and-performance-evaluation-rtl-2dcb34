// tb_pl_shift_register -- end-to-end test of the pulsed-latch shift register
// at its default size (128 bits, groups of 8, 4 phases, 500 MHz).
//
// A behavioural reference (a plain 128-bit vector shifted on each enabled
// clock edge) runs beside the register. Inputs change, and outputs are
// checked, 1.5 ns after every rising edge, when all pulses of the period are
// over: the serial output, the parallel bus and the number of pulses seen on
// each pulsed-clock line are compared with the reference.
// Phases: random streaming with idle periods and output-mode changes, a
// single-bit latency measurement (a bit must reach the serial output L-1
// periods after the period it entered), an alternating 1010 pattern that
// would expose any race-through, and a reset in the middle of the data.
// Every mechanism (shift, idle gating, serial mode, parallel mode, reset)
// is counted and must have occurred.
module tb_pl_shift_register;
  timeunit 1ps;
  timeprecision 1ps;
  import pl_pkg::*;

  localparam int unsigned L       = L_DEF;
  localparam int unsigned K       = K_DEF;
  localparam int unsigned TCLK    = TCLK_PS_DEF;
  localparam int unsigned SETTLE  = 1500;   // ps after the rising edge

  logic         clk = 1'b0;
  logic         rst_n;
  logic         shift_en;
  out_mode_e    mode;
  logic         d;
  logic         q_ser;
  logic [L-1:0] q_par;

  pl_shift_register dut (
    .clk, .rst_n, .shift_en, .mode, .d, .q_ser, .q_par
  );

  always #(TCLK/2) clk = ~clk;

  int unsigned checks = 0, failures = 0;
  int unsigned n_shift = 0, n_idle = 0, n_ser = 0, n_par = 0, n_reset = 0;
  int unsigned n_phi = 0, n_pht = 0;
  int unsigned n_ph [K];
  logic [L-1:0] model;

  always @(posedge dut.phi)  n_phi++;
  always @(posedge dut.ph_t) n_pht++;
  for (genvar j = 0; j < K; j++) begin : g_cnt
    always @(posedge dut.ph[j]) n_ph[j]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // one clock period: inputs are applied once the previous period's pulses
  // are over (clock low), checks are made once this period's are over
  task automatic cycle(input logic en, input logic din, input out_mode_e m);
    int unsigned phi0, pht0;
    int unsigned ph0 [K];
    shift_en = en; d = din; mode = m;
    phi0 = n_phi; pht0 = n_pht;
    foreach (ph0[j]) ph0[j] = n_ph[j];
    @(posedge clk);
    if (en) begin
      model = {model[L-2:0], din};
      n_shift++;
    end else begin
      n_idle++;
    end
    #(SETTLE);
    if (m == OUT_PARALLEL) n_par++; else n_ser++;
    check(q_ser == model[L-1], "serial output");
    check(q_par == ((m == OUT_PARALLEL) ? model : '0), "parallel output");
    check(n_phi - phi0 == (en ? 1 : 0), "shared pulse count");
    check(n_pht - pht0 == (en ? 1 : 0), "boundary pulse count");
    for (int j = 0; j < K; j++)
      check(n_ph[j] - ph0[j] == (en ? 1 : 0), $sformatf("phase %0d pulse count", j));
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #(TCLK);
    rst_n = 1'b1;
    model = '0;
    n_reset++;
    check(q_par == '0 || mode == OUT_SERIAL, "reset clears the register");
  endtask

  initial begin
    int unsigned lat;
    rst_n = 1'b0; shift_en = 1'b0; d = 1'b0; mode = OUT_PARALLEL;
    model = '0;
    foreach (n_ph[j]) n_ph[j] = 0;
    #(3*TCLK);
    @(posedge clk);
    #(SETTLE);
    rst_n = 1'b1;
    n_reset++;

    // random streaming with idle periods and mode changes
    for (int i = 0; i < 3*L; i++)
      cycle(($urandom_range(0, 7) != 0), 1'($urandom),
            out_mode_e'($urandom_range(0, 3) != 0));

    // latency: one marker bit, then zeros, until it leaves the register
    do_reset();
    cycle(1'b1, 1'b1, OUT_SERIAL);
    lat = 0;
    while (q_ser !== 1'b1 && lat < 2*L) begin
      cycle(1'b1, 1'b0, OUT_SERIAL);
      lat++;
    end
    check(lat == L-1, $sformatf("latency %0d periods, expected %0d", lat, L-1));

    // alternating pattern: every stage differs from its neighbour
    for (int i = 0; i < L + 8; i++)
      cycle(1'b1, 1'(i % 2), OUT_PARALLEL);
    check(q_par == model, "alternating pattern intact");

    // hold for a while: nothing may move, no pulse may fire
    for (int i = 0; i < 10; i++)
      cycle(1'b0, 1'($urandom), OUT_PARALLEL);

    // reset in the middle of the data, then resume
    do_reset();
    for (int i = 0; i < L/2; i++)
      cycle(1'b1, 1'($urandom), OUT_PARALLEL);

    check(n_shift > 0, "shift happened");
    check(n_idle  > 0, "idle gating happened");
    check(n_ser   > 0, "serial mode used");
    check(n_par   > 0, "parallel mode used");
    check(n_reset > 1, "reset happened");
    $display("mechanisms: shift=%0d idle=%0d serial=%0d parallel=%0d reset=%0d",
             n_shift, n_idle, n_ser, n_par, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'(TCLK) * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
