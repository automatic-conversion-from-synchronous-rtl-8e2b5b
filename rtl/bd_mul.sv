// bd_mul: multiplier data-path resource (modularised functional unit).
//
// y = a * b, keeping the low WIDTH bits of the product, purely combinational,
// as the document's 32-bit multiplier with a 32-bit output.  Its own module
// lets a synthesis script give it a looser delay constraint than the states
// with short paths (see bd_add).
`timescale 1ps/1ps
module bd_mul #(
  parameter int unsigned WIDTH = bd_pkg::DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = a * b;

endmodule
