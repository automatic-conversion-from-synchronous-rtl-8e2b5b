// bd_add: adder data-path resource (modularised functional unit).
//
// y = a + b, modulo 2^WIDTH, purely combinational.  Keeping each functional
// unit in its own module lets a synthesis script name it as a through point of
// a per-state maximum-delay constraint, so that e.g. an adder used in one
// state can be constrained harder than a multiplier used in another.
`timescale 1ps/1ps
module bd_add #(
  parameter int unsigned WIDTH = bd_pkg::DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = a + b;

endmodule
