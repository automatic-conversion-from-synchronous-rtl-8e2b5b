// bd_sample_np: bundled-data asynchronous version of the four-state example.
//
// The synchronous original is an FSM with states 0..3 over five 32-bit
// registers, an adder, a multiplier and a multiplexer:
//   state 0: reg0 <= cond, reg1 <= in0, reg2 <= in1   (waits for start)
//   state 1: reg3 <= reg1 + reg2;  next state 2 if reg0[0] else 3
//   state 2: reg4 <= reg1 * reg3   (mux0 selects input 0)
//   state 3: reg4 <= reg2 * reg3   (mux0 selects input 1)
//   then back to state 0.
// Here the clock and the FSM are replaced by one control module per state:
//   ctrl0  C-element of start and the merged feedback of ctrl2/ctrl3
//   ctrl1  request from ctrl0
//   ctrl2  branch: lclk1 AND reg0[0]        ctrl3  branch: lclk1 AND NOT reg0[0]
// Register write glue ORs the local clocks of the writing states
// (reg0..reg2: lclk0, reg3: lclk1, reg4: lclk2 | lclk3) and the multiplexer
// glue is st3 XOR out3, which is 1 exactly while state 3 is active.
//
// Handshake: start and done are two-phase.  Each transition of start (after
// reset the first one is a rise) runs states 0, 1 and 2 or 3 once; done
// toggles when the run is over and out0 holds the result.  start must not
// toggle again before done has toggled.  Latency from start to done is three
// request delays (3 x SD_DELAY = 2997 ps with the defaults), one per visited
// state, against three 1000 ps cycles of the synchronous original.
//
// Optional optimisations (both off by default, the unoptimised conversion):
//   USE_DLATCH    every register is a D latch open during its local clock pulse;
//   OP_ISOLATION  D latches between reg1/reg2 and mux0, open only while
//                 state 2 or 3 is active (lst2 | lst3), so reloading reg1 and
//                 reg2 in state 0 does not toggle the multiplier.
// With USE_DLATCH a hold delay element of HD_DELAY (> PD_DELAY) is placed on
// the multiplexer control, as the document prescribes for hold violations
// through a multiplexer control signal; its 2 ps value is this design's.
// The structure, the glue equations and the register contents follow the
// document's example; the done output and the choice of where the isolation
// latches go (worked out from the document's latch-insertion rule with its
// example delays and a 10% margin) are this design's.
//
// Lint notes: st, lst and out of some control modules are left unread (each
// module brings all of them out; only the ones the glue needs are used), only
// bit 0 of reg0 (the branch condition) is read, and the isolation gate iso_g
// has no reader when OP_ISOLATION is 0.
`timescale 1ps/1ps
module bd_sample_np #(
  parameter int unsigned WIDTH        = bd_pkg::DATA_W,
  parameter bit          USE_DLATCH   = 1'b0,
  parameter bit          OP_ISOLATION = 1'b0,
  parameter int unsigned SD_DELAY     = bd_pkg::SD_PS,
  parameter int unsigned PD_DELAY     = bd_pkg::PD_PS,
  parameter int unsigned HD_DELAY     = 2 * bd_pkg::PD_PS
) (
  input  logic             rst,    // asynchronous, active high
  input  logic             start,  // two-phase run request
  input  logic             cond,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out0,
  output logic             done    // two-phase: toggles when a run completes
);

  import bd_pkg::*;

  // ---- control circuit ----
  logic [3:0] st, lclk, out, lst;

  bd_ctrl #(.W0_MODE(W0_CELEM), .N_IN(1), .N_FB(2),
            .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl0 (
    .rst(rst), .i(start), .fb({out[3], out[2]}), .cond(1'b0),
    .st(st[0]), .lclk(lclk[0]), .out(out[0]), .lst(lst[0]));

  bd_ctrl #(.W0_MODE(W0_XOR), .N_IN(1),
            .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl1 (
    .rst(rst), .i(out[0]), .fb(1'b0), .cond(1'b0),
    .st(st[1]), .lclk(lclk[1]), .out(out[1]), .lst(lst[1]));

  logic [WIDTH-1:0] reg0_q, reg1_q, reg2_q, reg3_q, reg4_q;

  bd_ctrl #(.W0_MODE(W0_BRANCH), .COND_VAL(1'b1),
            .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl2 (
    .rst(rst), .i(lclk[1]), .fb(1'b0), .cond(reg0_q[0]),
    .st(st[2]), .lclk(lclk[2]), .out(out[2]), .lst(lst[2]));

  bd_ctrl #(.W0_MODE(W0_BRANCH), .COND_VAL(1'b0),
            .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl3 (
    .rst(rst), .i(lclk[1]), .fb(1'b0), .cond(reg0_q[0]),
    .st(st[3]), .lclk(lclk[3]), .out(out[3]), .lst(lst[3]));

  assign done = out[2] ^ out[3];

  // ---- glue logic ----
  logic wr0, wr3, wr4, sm0, sm0_st, iso_g;
  assign wr0   = lclk[0];             // en0 = en1 = en2: state 0
  assign wr3   = lclk[1];             // en3: state 1
  assign wr4   = lclk[2] | lclk[3];   // en4: states 2 and 3
  assign sm0_st = st[3] ^ out[3];     // mux0 selects in1 in state 3
  assign iso_g = lst[2] | lst[3];     // isolation latches open in states 2, 3

  // Hold delay hd_mux on the multiplexer control.  sm0 falls in the time step
  // where lclk3 rises; a D-latch reg4 is still open for the PD_DELAY-wide
  // pulse and would capture the other multiplexer input.  Delaying sm0 by
  // more than the pulse width fixes that hold violation.  Edge-triggered
  // registers have no such violation and get no delay element.
  if (USE_DLATCH) begin : g_hd_mux
    bd_delay #(.DELAY(HD_DELAY)) hd_mux0 (.in(sm0_st), .out(sm0));
  end else begin : g_no_hd_mux
    assign sm0 = sm0_st;
  end

  // ---- data-path ----
  logic [WIDTH-1:0] add0_y, mux0_y, mul0_y, mux_a, mux_b;

  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg0 (
    .rst(rst), .clk(wr0), .en(1'b1), .d({{(WIDTH-1){1'b0}}, cond}), .q(reg0_q));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg1 (
    .rst(rst), .clk(wr0), .en(1'b1), .d(in0), .q(reg1_q));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg2 (
    .rst(rst), .clk(wr0), .en(1'b1), .d(in1), .q(reg2_q));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg3 (
    .rst(rst), .clk(wr3), .en(1'b1), .d(add0_y), .q(reg3_q));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg4 (
    .rst(rst), .clk(wr4), .en(1'b1), .d(mul0_y), .q(reg4_q));

  bd_add #(.WIDTH(WIDTH)) add0 (.a(reg1_q), .b(reg2_q), .y(add0_y));

  if (OP_ISOLATION) begin : g_iso
    bd_iso_latch #(.WIDTH(WIDTH)) dl0 (.rst(rst), .g(iso_g), .d(reg1_q), .q(mux_a));
    bd_iso_latch #(.WIDTH(WIDTH)) dl1 (.rst(rst), .g(iso_g), .d(reg2_q), .q(mux_b));
  end else begin : g_noiso
    assign mux_a = reg1_q;
    assign mux_b = reg2_q;
  end

  bd_mux2 #(.WIDTH(WIDTH)) mux0 (.in0(mux_a), .in1(mux_b), .sel(sm0), .y(mux0_y));
  bd_mul  #(.WIDTH(WIDTH)) mul0 (.a(mux0_y), .b(reg3_q), .y(mul0_y));

  assign out0 = reg4_q;

endmodule
