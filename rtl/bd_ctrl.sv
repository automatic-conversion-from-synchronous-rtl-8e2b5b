// bd_ctrl: self-timed control module ctrl_i of a bundled-data circuit.
//
// One control module replaces one state of the synchronous FSM (or one stage
// of a synchronous pipeline).  It is a Click element reduced to a request-only
// design: there is no acknowledge; timing is guaranteed by the delay element.
//
//   w0 --+------------------------------------------------> st   (state signal)
//        +--> sd (SD_DELAY) --> dreq --\
//                                      XOR --> lclk (local clock of the state)
//        out --> pd (PD_DELAY) --> ackd/
//   DFF_i: on every rising lclk, out <= ~out               --> out  (request to successors)
//   lst = st XOR out  (high while this state is active; opens isolation latches)
//
// Two-phase operation: every transition of w0 (rising or falling) is one
// request.  After SD_DELAY the XOR's inputs differ, lclk rises, registers of
// this state capture, and DFF_i toggles out, which is the request for the next
// control module.  PD_DELAY later the XOR inputs agree again and lclk falls,
// so lclk is a pulse of PD_DELAY for every request.  lst rises with st and
// falls when out toggles.
//
// The internal request w0 is built according to W0_MODE (bd_pkg::w0_mode_e):
//   W0_XOR    w0 = XOR of the N_IN inputs i (one predecessor, or several
//             mutually exclusive predecessors merged);
//   W0_CELEM  w0 = C(i[0], ~(XOR of the N_FB feedback inputs fb)): i[0] is the
//             primary start request, fb are the out signals of the last states;
//   W0_BRANCH w0 = bDFF toggled by i[0] AND (cond == COND_VAL), where i[0] is
//             the predecessor's lclk.
// The three cases, the delay element, the XOR, the toggle DFF with reset, the
// pd_i element and lst follow the document.  The inversion of the merged
// feedback at the C-element (so that the first start can pass after reset) and
// the active-high reset are this design's choices.
//
// Timing: lclk rises SD_DELAY after w0 changes and stays high PD_DELAY;
// out changes with the rising lclk.  A new request must not arrive before the
// previous one has toggled out (two-phase rule; the testbenches check it).
// rst must be held longer than SD_DELAY + PD_DELAY so the delay lines settle
// to the reset values before the first request.
//
// Lint notes: fb is read only in the C-element mode and cond only in the branch
// mode, so a lint run of the default (XOR) configuration reports both unused.
`timescale 1ps/1ps
module bd_ctrl #(
  parameter bd_pkg::w0_mode_e W0_MODE  = bd_pkg::W0_XOR,
  parameter int unsigned      N_IN     = 1,
  parameter int unsigned      N_FB     = 1,
  parameter bit               COND_VAL = 1'b1,
  parameter int unsigned      SD_DELAY = bd_pkg::SD_PS,
  parameter int unsigned      PD_DELAY = bd_pkg::PD_PS
) (
  input  logic            rst,   // asynchronous, active high
  input  logic [N_IN-1:0] i,     // predecessor requests (or predecessor lclk for a branch)
  input  logic [N_FB-1:0] fb,    // feedback requests (W0_CELEM only)
  input  logic            cond,  // branch condition (W0_BRANCH only)
  output logic            st,    // state signal = internal request
  output logic            lclk,  // local clock pulse
  output logic            out,   // request to the successors (nreq)
  output logic            lst    // local state signal st XOR out
);

  logic w0, dreq, ackd;

  // ---- input glue w0 ----
  if (W0_MODE == bd_pkg::W0_CELEM) begin : g_celem
    logic fb_n;
    assign fb_n = ~(^fb);
    bd_celement u_c (.rst(rst), .a(i[0]), .b(fb_n), .c(w0));
  end else if (W0_MODE == bd_pkg::W0_BRANCH) begin : g_branch
    bd_branch #(.COND_VAL(COND_VAL)) u_b (.rst(rst), .lclk_p(i[0]), .cond(cond), .w0(w0));
  end else begin : g_xor
    assign w0 = ^i;
  end

  // ---- delay element, local clock, control flip-flop ----
  bd_delay #(.DELAY(SD_DELAY)) u_sd (.in(w0),  .out(dreq));
  bd_delay #(.DELAY(PD_DELAY)) u_pd (.in(out), .out(ackd));

  assign lclk = dreq ^ ackd;

  always_ff @(posedge lclk or posedge rst) begin
    if (rst) out <= 1'b0;
    else     out <= ~out;
  end

  assign st  = w0;
  assign lst = st ^ out;

endmodule
