// tb_pl_sr_prbs -- benchmark stimulus: PRBS-15 data through registers of 8,
// 16, 32, 64 and 128 bits at two activity factors.
//
// Five registers (groups of 8, 4 phases, 500 MHz) run side by side from one
// clock. Each is fed 10,000 periods of a PRBS-15 sequence (x^15 + x^14 + 1)
// twice: once with a new sequence bit every period (activity about 0.5) and
// once with every bit held for two periods (activity about 0.25). After
// every period the parallel contents of every register are compared with a
// reference shift register, and the measured activity factor (cell toggles
// per cell per period) is checked against the target.
module tb_pl_sr_prbs;
  timeunit 1ps;
  timeprecision 1ps;
  import pl_pkg::*;

  localparam int unsigned NLEN   = 5;
  localparam int unsigned LMAX   = 128;
  localparam int unsigned TCLK   = TCLK_PS_DEF;
  localparam int unsigned SETTLE = 1500;
  localparam int unsigned CYCLES = 10_000;
  localparam int unsigned LENS [NLEN] = '{8, 16, 32, 64, 128};

  logic clk = 1'b0, rst_n, shift_en, d;
  logic [LMAX-1:0] q_par [NLEN];
  logic [LMAX-1:0] prev  [NLEN];
  logic [LMAX-1:0] model;
  int unsigned checks = 0, failures = 0;

  always #(TCLK/2) clk = ~clk;

  for (genvar i = 0; i < NLEN; i++) begin : g_len
    localparam int unsigned LI = LENS[i];
    logic          q_ser;
    logic [LI-1:0] q;
    pl_shift_register #(.L(LI)) dut (
      .clk, .rst_n, .shift_en, .mode(OUT_PARALLEL), .d, .q_ser, .q_par(q)
    );
    assign q_par[i] = LMAX'(q);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  function automatic logic [LMAX-1:0] mask(int unsigned len);
    return (len == LMAX) ? '1 : ((LMAX'(1) << len) - 1);
  endfunction

  task automatic run(input int unsigned hold, input real target);
    logic [14:0] lfsr = 15'h7fff;
    longint toggles [NLEN];
    real    alpha;
    foreach (toggles[i]) toggles[i] = 0;
    for (int c = 0; c < CYCLES; c++) begin
      if (c % hold == 0) lfsr = {lfsr[13:0], lfsr[14] ^ lfsr[13]};
      d = lfsr[0];
      foreach (prev[i]) prev[i] = q_par[i];
      @(posedge clk);
      model = {model[LMAX-2:0], d};
      #(SETTLE);
      for (int i = 0; i < NLEN; i++) begin
        check(q_par[i] == (model & mask(LENS[i])), $sformatf("%0d-bit contents", LENS[i]));
        toggles[i] += $countones(q_par[i] ^ prev[i]);
      end
    end
    for (int i = 0; i < NLEN; i++) begin
      alpha = real'(toggles[i]) / (real'(LENS[i]) * CYCLES);
      $display("%0d-bit register, bit held %0d period(s): activity %0.3f", LENS[i], hold, alpha);
      check(alpha > target - 0.05 && alpha < target + 0.05, "activity factor");
    end
  endtask

  initial begin
    rst_n = 1'b0; shift_en = 1'b1; d = 1'b0; model = '0;
    #(3*TCLK);
    @(posedge clk);
    #(SETTLE);
    rst_n = 1'b1;
    run(1, 0.5);
    run(2, 0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'(TCLK) * 25_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
