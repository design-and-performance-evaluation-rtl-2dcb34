// tsl_bank -- bank of temporary storage latches.
//
// One latch per segment boundary. All of them open on the boundary pulse
// `ph_t`, which comes before every data phase of the clock period, so each
// latch takes a copy of the last cell of the segment upstream while that cell
// still holds last period's value. The first cell of the next segment reads
// the copy later in the same period, after the upstream cell has been
// overwritten. This is what lets the same k phases be reused along a register
// of any length.
//
// Interface: `d[i]` is the value to copy at boundary i, `q[i]` the copy.
// `rst_n` clears the bank asynchronously.
//
// The role of the latches follows the published design; the single shared
// boundary pulse and the asynchronous clear are this implementation's choices.
// The latches inferred here are intended. Where the register instantiates
// the bank one bit wide, Verilator's lint reports "no latches detected" for
// it; that report is wrong (synthesis maps every bit to a latch) and stands.
module tsl_bank #(
  parameter int unsigned M = 2  // number of boundaries served
) (
  input  logic         rst_n,
  input  logic         ph_t,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  for (genvar i = 0; i < M; i++) begin : g_latch
    always_latch begin
      if (!rst_n)    q[i] = 1'b0;
      else if (ph_t) q[i] = d[i];
    end
  end
endmodule
