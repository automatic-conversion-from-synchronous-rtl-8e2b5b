// bd_celement: two-input Muller C-element with reset.
//
// The output copies the inputs when both agree and otherwise keeps its value.
// A control module whose inputs are a primary request (start) and feedback
// requests from the last states of a loop uses it to join the two: a new start
// transition only passes once the previous run has come back.  The document
// names the C-element for this case; the active-high reset that clears the
// state element to 0 is this design's choice.
//
// The state element is written as a latch (always_latch); a tool that reports
// an inferred latch here is reporting the intended storage of the C-element.
`timescale 1ps/1ps
module bd_celement (
  input  logic rst,  // asynchronous, active high: c = 0
  input  logic a,
  input  logic b,
  output logic c
);

  always_latch begin
    if (rst)         c = 1'b0;
    else if (a == b) c = a;
  end

endmodule
