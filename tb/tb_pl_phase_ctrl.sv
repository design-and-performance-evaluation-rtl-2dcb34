// tb_pl_phase_ctrl -- self-checking test of the non-overlap delayed-clock
// controller with its default timing (4 phases, T_p = 60 ps, 200 ps gaps).
//
// Feeds 60 ps pulses every 2 ns and records the rising and falling time of
// every output line. Per period: the boundary pulse coincides with the
// input; phase j rises (j+1) x 260 ps after it and is 60 ps wide; each line
// pulses exactly once; and no two lines are ever high together (sampled on
// every change of any line).
module tb_pl_phase_ctrl;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K     = 4;
  localparam int unsigned TP    = 60;
  localparam int unsigned DELTA = 200;
  localparam int unsigned TCLK  = 2000;

  logic         phi, ph_t;
  logic [K-1:0] ph;
  int unsigned checks = 0, failures = 0;
  longint t_rise [K], t_fall [K];
  int unsigned n_rise [K];
  int unsigned overlaps = 0;

  pl_phase_ctrl dut (.phi, .ph_t, .ph);

  for (genvar j = 0; j < K; j++) begin : g_mon
    always @(posedge ph[j]) begin n_rise[j]++; t_rise[j] = $time; end
    always @(negedge ph[j]) t_fall[j] = $time;
  end
  always @(ph_t or ph) if ($countones({ph_t, ph}) > 1) overlaps++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    longint t0;
    int unsigned n0 [K];
    phi = 1'b0;
    for (int j = 0; j < K; j++) begin n_rise[j] = 0; t_rise[j] = -1; t_fall[j] = -1; end
    #(TCLK);
    for (int i = 0; i < 100; i++) begin
      foreach (n0[j]) n0[j] = n_rise[j];
      t0 = $time;
      phi = 1'b1;
      #1 check(ph_t == 1'b1, "boundary pulse follows phi");
      #(TP - 1) phi = 1'b0;
      #1 check(ph_t == 1'b0, "boundary pulse ends with phi");
      #(TCLK - TP - 1);
      for (int j = 0; j < K; j++) begin
        check(n_rise[j] - n0[j] == 1, $sformatf("phase %0d pulses once", j));
        check(t_rise[j] - t0 == (j + 1) * (TP + DELTA),
              $sformatf("phase %0d delay %0d", j, t_rise[j] - t0));
        check(t_fall[j] - t_rise[j] == TP, $sformatf("phase %0d width", j));
      end
    end
    check(overlaps == 0, "no two pulsed lines high together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'(TCLK) * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
