// bd_delay: behavioural model of a delay element (sd_i, pd_i or a hold delay).
//
// This is a behavioural model, not synthesizable logic: in silicon the element
// is a chain of buffers or inverter pairs whose length is tuned until the setup,
// hold, branch and pulse-width constraints of the bundled-data circuit hold.
// Here the output simply follows the input DELAY picoseconds later.  The request
// delay sd_i is built from pairs of inverters so that rising and falling
// transitions see the same delay; the model therefore uses one delay for both
// edges.  A pulse shorter than DELAY is swallowed (inertial delay), which never
// happens on the two-phase request wires it is used on.
//
// Ports: in -> out, WIDTH bits wide (1 for request wires, wider for a hold
// delay on a data bus).  Default delay: CT - 1 = 999 ps, the document's value for
// sd_i when the target cycle time is 1000 ps.
`timescale 1ps/1ps
module bd_delay #(
  parameter int unsigned DELAY = bd_pkg::SD_PS,
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] in,
  output logic [WIDTH-1:0] out
);

  assign #DELAY out = in;

endmodule
