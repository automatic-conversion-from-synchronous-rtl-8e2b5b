// bd_mux2: two-input multiplexer data-path resource.
//
// y = sel ? in1 : in0, purely combinational.  In the asynchronous circuit sel
// comes from multiplexer glue logic (XOR of a control module's st and out),
// so it is 1 exactly while the state that selects input 1 is active.
`timescale 1ps/1ps
module bd_mux2 #(
  parameter int unsigned WIDTH = bd_pkg::DATA_W
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);

  assign y = sel ? in1 : in0;

endmodule
