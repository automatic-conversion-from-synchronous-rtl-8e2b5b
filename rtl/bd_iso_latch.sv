// bd_iso_latch: operand-isolation D latch.
//
// Inserted between a source register and a functional unit (or the
// multiplexer in front of it) that the register also feeds in other states.
// It is transparent only while g is high; g is the local state signal lst of
// the state(s) that use this path (ORed when several states do).  In every
// other state the latch holds, so changes of the source register do not ripple
// through the unit and waste power.  Unlike AND-gate isolation it never forces
// the unit's inputs to 0, so it causes no transitions of its own.  The latch
// and its control by lst follow the document; the reset to 0 is this design's.
//
// Timing: q follows d while g is high and holds while g is low.
`timescale 1ps/1ps
module bd_iso_latch #(
  parameter int unsigned WIDTH = bd_pkg::DATA_W
) (
  input  logic             rst,
  input  logic             g,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_latch begin
    if (rst)    q = '0;
    else if (g) q = d;
  end

endmodule
