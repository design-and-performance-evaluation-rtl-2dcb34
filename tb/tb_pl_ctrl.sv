// tb_pl_ctrl -- self-checking test of the enable and data-steering logic.
//
// Gating: `shift_en` is changed at random times, including while the clock
// is high; the testbench checks that `pg_en` follows `shift_en` while the
// clock is low and keeps the value it had at the rising edge for the whole
// high half. Steering: with random cell contents, `q_ser` must be the last
// cell, and `q_par` the contents in parallel mode and zero in serial mode.
module tb_pl_ctrl;
  timeunit 1ps;
  timeprecision 1ps;
  import pl_pkg::*;

  localparam int unsigned L = 16;
  localparam int unsigned TCLK = 2000;

  logic         clk = 1'b0, rst_n, shift_en, pg_en, q_ser;
  out_mode_e    mode;
  logic [L-1:0] cells, q_par;
  int unsigned checks = 0, failures = 0;

  pl_ctrl #(.L(L)) dut (.clk, .rst_n, .shift_en, .mode, .cells, .pg_en, .q_ser, .q_par);

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  initial begin
    logic at_edge;
    rst_n = 1'b0; shift_en = 1'b1; mode = OUT_SERIAL; cells = '0;
    #(TCLK/4) check(pg_en == 1'b0, "reset disables the generator");
    @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      // clock low half: transparent
      @(negedge clk);
      shift_en = 1'($urandom);
      #(TCLK/8) check(pg_en == shift_en, "enable follows while clock low");
      shift_en = 1'($urandom);
      #(TCLK/8) check(pg_en == shift_en, "enable follows while clock low");
      @(posedge clk);
      at_edge = shift_en;
      // clock high half: the enable may change, the gated enable may not
      repeat (3) begin
        #(TCLK/8) shift_en = 1'($urandom);
        #1 check(pg_en == at_edge, "enable frozen while clock high");
      end
      // steering
      cells = L'($urandom);
      mode = out_mode_e'($urandom_range(0, 1));
      #1;
      check(q_ser == cells[L-1], "serial output is the last cell");
      check(q_par == ((mode == OUT_PARALLEL) ? cells : '0), "parallel bus steering");
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
