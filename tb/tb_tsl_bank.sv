// tb_tsl_bank -- self-checking test of the temporary storage latch bank.
//
// Uses a 5-wide bank. Checks that every latch copies its input while the
// boundary pulse is high, keeps the copy while it is low even as the inputs
// change (the situation in the register, where the upstream cell is
// overwritten after the copy), and is cleared by `rst_n`.
module tb_tsl_bank;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned M = 5;
  logic         rst_n, ph_t;
  logic [M-1:0] d, q, held;
  int unsigned checks = 0, failures = 0;

  tsl_bank #(.M(M)) dut (.rst_n, .ph_t, .d, .q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    rst_n = 1'b0; ph_t = 1'b0; d = '1;
    #10 check(q == '0, "reset clears");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = M'($urandom);
      ph_t = 1'b1;
      #10 check(q == d, "copies while ph_t high");
      ph_t = 1'b0;
      held = d;
      repeat (3) begin
        d = M'($urandom);
        #10 check(q == held, "keeps copy while ph_t low");
      end
    end
    rst_n = 1'b0;
    #10 check(q == '0, "reset clears after use");
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
