// tb_pl_cell -- self-checking test of one pulsed-latch cell.
//
// Drives random data with and without the pulsed clock and checks the three
// behaviours of the cell: it follows `d` while `ph` is high, holds while
// `ph` is low whatever `d` does, and is cleared by `rst_n`.
module tb_pl_cell;
  timeunit 1ps;
  timeprecision 1ps;

  logic rst_n, ph, d, q;
  int unsigned checks = 0, failures = 0;

  pl_cell dut (.rst_n, .ph, .d, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    logic held;
    rst_n = 1'b0; ph = 1'b0; d = 1'b1;
    #10 check(q == 1'b0, "reset clears");
    rst_n = 1'b1;
    #10 check(q == 1'b0, "holds after reset");
    for (int i = 0; i < 200; i++) begin
      // open: the cell must follow d
      d = 1'($urandom);
      ph = 1'b1;
      #10 check(q == d, "transparent while ph high");
      d = ~d;
      #10 check(q == d, "follows d while ph high");
      ph = 1'b0;
      held = d;
      // closed: the cell must hold whatever d does
      repeat (3) begin
        d = 1'($urandom);
        #10 check(q == held, "holds while ph low");
      end
    end
    ph = 1'b1; d = 1'b1;
    #10 rst_n = 1'b0;
    #10 check(q == 1'b0, "reset overrides ph");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
