// tb_pl_subreg -- self-checking test of one sub-register (8 cells, 4 phases).
//
// The testbench plays the role of the phase controller: each clock period
// it fires the boundary pulse and then the four data phases in order, each
// 60 ps wide with 200 ps gaps, and changes the serial input only after the
// last phase. A reference vector is shifted once per period. After every
// period the contents must equal the reference: one stage per period, no
// bit duplicated (race-through) and none lost at the segment boundary in
// the middle of the sub-register. Periods without pulses must hold.
module tb_pl_subreg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N  = 8;
  localparam int unsigned K  = 4;
  localparam int unsigned TP = 60;
  localparam int unsigned GAP = 200;

  logic         rst_n, ph_t, din;
  logic [K-1:0] ph;
  logic [N-1:0] q, model;
  int unsigned checks = 0, failures = 0;

  pl_subreg #(.N(N), .K(K)) dut (.rst_n, .ph_t, .ph, .din, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s (q=%b model=%b)", $time, what, q, model);
    end
  endtask

  task automatic fire(ref logic line);
    line = 1'b1;
    #(TP) line = 1'b0;
    #(GAP);
  endtask

  // one clock period; `pulse` = 0 models a gated (idle) period
  task automatic period(input logic bit_in, input bit pulse);
    din = bit_in;
    #(GAP);
    if (pulse) begin
      fire(ph_t);
      for (int j = 0; j < K; j++) begin
        ph[j] = 1'b1;
        #(TP) ph[j] = 1'b0;
        #(GAP);
      end
      model = {model[N-2:0], bit_in};
    end else begin
      #((K + 1) * (TP + GAP));
    end
    din = 1'($urandom);  // input changes after the last phase
    #(GAP);
    check(q == model, pulse ? "shift by one stage" : "hold when idle");
  endtask

  initial begin
    rst_n = 1'b0; ph_t = 1'b0; ph = '0; din = 1'b0; model = '0;
    #100 check(q == '0, "reset clears");
    rst_n = 1'b1;
    // single marker bit: must take N-1 periods to reach the last cell
    period(1'b1, 1);
    for (int i = 0; i < N - 2; i++) begin
      period(1'b0, 1);
      check(q[N-1] == 1'b0, "marker not early");
    end
    period(1'b0, 1);
    check(q[N-1] == 1'b1, "marker on last cell after N-1 periods");
    // alternating and random data, with idle periods
    for (int i = 0; i < 2*N; i++) period(1'(i % 2), 1);
    for (int i = 0; i < 300; i++) period(1'($urandom), ($urandom_range(0, 4) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
