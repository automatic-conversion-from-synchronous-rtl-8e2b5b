// bd_branch: branch glue of a control module (bDFF_i).
//
// When a state has several successors chosen by a data-path condition, each
// successor's control module receives the predecessor's local clock lclk_{i-1}
// ANDed with the condition (or its complement).  The rising edge of that AND
// toggles the flip-flop bDFF_i, whose output is the successor's two-phase
// request w0.  Only the successor whose condition holds sees a clock pulse, so
// exactly one branch is taken per visit.  Structure (AND gate, toggle DFF with
// reset) follows the document; COND_VAL selects the branch polarity.
//
// Timing: the condition must be stable before the lclk pulse reaches the AND
// gate (the branch constraint).  w0 toggles in the time step of lclk's rising edge.
`timescale 1ps/1ps
module bd_branch #(
  parameter bit COND_VAL = 1'b1  // condition value that selects this branch
) (
  input  logic rst,    // asynchronous, active high: w0 = 0
  input  logic lclk_p, // local clock of the predecessor control module
  input  logic cond,   // branch condition from the data-path
  output logic w0      // two-phase request for this control module
);

  logic trig;

  assign trig = lclk_p & (cond == COND_VAL);

  always_ff @(posedge trig or posedge rst) begin
    if (rst) w0 <= 1'b0;
    else     w0 <= ~w0;
  end

endmodule
