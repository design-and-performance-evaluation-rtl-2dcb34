// tb_pl_sr_freq -- clock-frequency sweep, 100 MHz to 800 MHz in steps of
// 100 MHz, of the 128-bit register.
//
// Eight registers run side by side, each on its own clock. The period of
// each is rounded to an even number of picoseconds. The pulse gap is the
// default 200 ps up to 700 MHz. At 800 MHz it is 180 ps, because the default
// gap no longer fits five pulses into the 1250 ps period. Each register gets
// 600 periods of random data with random idle periods. Its contents are
// compared with a reference shift register right after the last pulse of
// every period, and the input changes at that moment too, which is as late
// as the timing allows.
module tb_pl_sr_freq;
  timeunit 1ps;
  timeprecision 1ps;
  import pl_pkg::*;

  localparam int unsigned NF     = 8;
  localparam int unsigned L      = L_DEF;
  localparam int unsigned PERIOD [NF] = '{10000, 5000, 3334, 2500, 2000, 1666, 1428, 1250};
  localparam int unsigned GAP    [NF] = '{200, 200, 200, 200, 200, 200, 200, 180};
  localparam int unsigned TP     = TINV_PS_DEF * CHAIN_DEF;
  localparam int unsigned NCYC   = 600;

  int unsigned checks = 0, failures = 0, done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  for (genvar f = 0; f < NF; f++) begin : g_freq
    localparam int unsigned P      = PERIOD[f];
    localparam int unsigned SETTLE = (K_DEF + 1) * (TP + GAP[f]) + 10;
    logic         clk = 1'b0, rst_n, shift_en, d, q_ser;
    logic [L-1:0] q_par, model;

    pl_shift_register #(.TCLK_PS(P), .DELTA_PS(GAP[f])) dut (
      .clk, .rst_n, .shift_en, .mode(OUT_PARALLEL), .d, .q_ser, .q_par
    );

    always #(P/2) clk = ~clk;

    initial begin
      rst_n = 1'b0; shift_en = 1'b0; d = 1'b0; model = '0;
      #(3*P);
      @(posedge clk);
      #(SETTLE);
      rst_n = 1'b1;
      for (int c = 0; c < NCYC; c++) begin
        shift_en = ($urandom_range(0, 5) != 0);
        d = 1'($urandom);
        @(posedge clk);
        if (shift_en) model = {model[L-2:0], d};
        #(SETTLE);
        check(q_par == model, $sformatf("contents at %0d ps period", P));
        check(q_ser == model[L-1], $sformatf("serial output at %0d ps period", P));
      end
      done++;
    end
  end

  initial begin
    wait (done == NF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'(10000) * (NCYC + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
