// pl_cell -- one pulsed-latch storage cell.
//
// A transmission gate feeds a static latch followed by an output inverter;
// functionally the cell is a level-sensitive D latch that is transparent only
// while its pulsed clock `ph` is high and holds its value otherwise. Because
// the pulse is narrow and the neighbouring cells never share a pulse, the
// chain of cells behaves like an edge-triggered shift register while using a
// single storage stage per bit.
//
// Interface: `ph` opens the latch, `d` is sampled while it is open, `q` is the
// stored (non-inverted) value. `rst_n` clears the cell asynchronously.
//
// The cell structure follows the published design. The asynchronous clear and
// the non-inverting overall polarity are this implementation's choices. The
// latch inferred here is the intended storage element, not a coding slip.
module pl_cell (
  input  logic rst_n,
  input  logic ph,
  input  logic d,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (!rst_n)  q = 1'b0;
    else if (ph) q = d;
  end
endmodule
