// tb_pl_pulse_gen -- self-checking test of the shared pulse generator.
//
// Runs a 500 MHz clock with the enable toggled between periods (always while
// the clock is low, as the gating latch guarantees). For every period the
// testbench records when `phi` rose and fell: with the enable high there
// must be exactly one pulse, starting with the rising clock edge and
// 3 x 20 ps = 60 ps wide; with the enable low there must be none.
module tb_pl_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TCLK = 2000;
  localparam int unsigned TP   = 60;

  logic clk = 1'b0, en, phi;
  int unsigned checks = 0, failures = 0;
  int unsigned n_rise = 0;
  longint t_rise, t_fall, t_edge;

  pl_pulse_gen dut (.clk, .en, .phi);

  always #(TCLK/2) clk = ~clk;
  always @(posedge clk) t_edge = $time;
  always @(posedge phi) begin n_rise++; t_rise = $time; end
  always @(negedge phi) t_fall = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    int unsigned n0;
    en = 1'b0;
    t_rise = -1; t_fall = -1; t_edge = -1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      en = ($urandom_range(0, 3) != 0);
      n0 = n_rise;
      @(negedge clk);
      if (en) begin
        check(n_rise - n0 == 1, "one pulse per enabled period");
        check(t_rise == t_edge, "pulse starts at the rising clock edge");
        check(t_fall - t_rise == TP, $sformatf("pulse width %0d ps", t_fall - t_rise));
      end else begin
        check(n_rise == n0, "no pulse while disabled");
      end
    end
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
