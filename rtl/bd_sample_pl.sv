// bd_sample_pl: bundled-data asynchronous version of the three-stage example pipeline.
//
// The synchronous original has one register per stage and a valid bit per
// stage boundary in its control circuit:
//   stage 0: reg0  <= in0           if istart            creg0 <= istart
//   stage 1: reg1  <= reg0 + 10     if creg0             creg1 <= creg0
//   stage 2: reg2  <= reg1 * 3      if creg1
// and every write (data and valid bits) happens only while stall_n is 1.
// Here each stage gets one control module, chained ctrl0 -> ctrl1 -> ctrl2;
// register k of stage k is written by lclk_k with enable en_k AND stall_n
// (en0 = istart, en1 = creg0, en2 = creg1), and creg0/creg1 are written by
// lclk0/lclk1 with enable stall_n.
//
// Handshake: every transition of start is one pipeline step (the asynchronous
// counterpart of one clock cycle): ctrl0 fires SD_DELAY after it, ctrl1 another
// SD_DELAY later, ctrl2 a third.  With start toggling every 1000 ps (the input
// interval of one cycle) the three stages of successive tokens fire within a
// few ps of each other, the downstream stage first, as the edges of a
// synchronous clock would.  start may toggle again once ctrl0 has answered
// (SD_DELAY after the previous toggle).  istart, in0 and stall_n of a
// step are sampled in the firing window that ends SD_DELAY after that step's
// start toggle (stall_n by all three stages); they must be stable around that
// window and may change between windows, e.g. half a step after the toggle.
//
// Optional optimisations (off by default):
//   USE_DLATCH   every register is a D latch open during its local clock pulse.
//                The stages of consecutive steps fire about one pulse width
//                apart, so a downstream latch can still be open when its
//                upstream source changes; every value passed from one stage to
//                the next therefore goes through a hold delay hd_reg of
//                HD_DELAY (> PD_DELAY) first, as the document prescribes for
//                hold violations on a register.  The 2 ps value is this design's.
//   GATED_WRITE  registers without enable: the enable is moved out of the
//                register into an AND with the local clock.
// The stage structure, the constants 10 and 3, the valid chain and the stall
// gating follow the document's example; naming the stall input stall_n (the
// original writes only while its stall input is 1) is this design's.
//
// Lint notes: st and lst of the control modules and out of the last one have
// no reader here; every control module brings them out for the glue logic.
`timescale 1ps/1ps
module bd_sample_pl #(
  parameter int unsigned WIDTH       = bd_pkg::DATA_W,
  parameter bit          USE_DLATCH  = 1'b0,
  parameter bit          GATED_WRITE = 1'b0,
  parameter int unsigned SD_DELAY    = bd_pkg::SD_PS,
  parameter int unsigned PD_DELAY    = bd_pkg::PD_PS,
  parameter int unsigned HD_DELAY    = 2 * bd_pkg::PD_PS
) (
  input  logic             rst,     // asynchronous, active high
  input  logic             start,   // two-phase: one transition per pipeline step
  input  logic             istart,  // input token valid
  input  logic             stall_n, // 0 freezes every pipeline register
  input  logic [WIDTH-1:0] in0,
  output logic [WIDTH-1:0] out0
);

  import bd_pkg::*;

  // ---- control circuit ----
  logic [2:0] st, lclk, out, lst;

  bd_ctrl #(.W0_MODE(W0_XOR), .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl0 (
    .rst(rst), .i(start), .fb(1'b0), .cond(1'b0),
    .st(st[0]), .lclk(lclk[0]), .out(out[0]), .lst(lst[0]));
  bd_ctrl #(.W0_MODE(W0_XOR), .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl1 (
    .rst(rst), .i(out[0]), .fb(1'b0), .cond(1'b0),
    .st(st[1]), .lclk(lclk[1]), .out(out[1]), .lst(lst[1]));
  bd_ctrl #(.W0_MODE(W0_XOR), .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) ctrl2 (
    .rst(rst), .i(out[1]), .fb(1'b0), .cond(1'b0),
    .st(st[2]), .lclk(lclk[2]), .out(out[2]), .lst(lst[2]));

  // stage valid bits (the original's control registers creg0, creg1)
  logic creg0_q, creg1_q;
  logic [2:0] en, wclk, wen;

  // Values one stage hands to the next.  With D latches a downstream latch
  // may still be open when its upstream source changes (the stages of
  // consecutive steps fire about a pulse width apart), so each such value
  // passes a hold delay hd_reg of HD_DELAY first.
  logic creg0_h, creg1_h;
  logic [WIDTH-1:0] add0_y, mul0_y, add0_h, mul0_h;

  if (USE_DLATCH) begin : g_hd
    bd_delay #(.DELAY(HD_DELAY), .WIDTH(1))     hd_creg0 (.in(creg0_q), .out(creg0_h));
    bd_delay #(.DELAY(HD_DELAY), .WIDTH(1))     hd_creg1 (.in(creg1_q), .out(creg1_h));
    bd_delay #(.DELAY(HD_DELAY), .WIDTH(WIDTH)) hd_reg1  (.in(add0_y),  .out(add0_h));
    bd_delay #(.DELAY(HD_DELAY), .WIDTH(WIDTH)) hd_reg2  (.in(mul0_y),  .out(mul0_h));
  end else begin : g_no_hd
    assign creg0_h = creg0_q;
    assign creg1_h = creg1_q;
    assign add0_h  = add0_y;
    assign mul0_h  = mul0_y;
  end

  assign en[0] = istart  & stall_n;
  assign en[1] = creg0_h & stall_n;
  assign en[2] = creg1_h & stall_n;

  if (GATED_WRITE) begin : g_gated
    assign wclk = lclk & en;
    assign wen  = 3'b111;
  end else begin : g_en
    assign wclk = lclk;
    assign wen  = en;
  end

  bd_reg #(.WIDTH(1), .LATCH(USE_DLATCH)) creg0 (
    .rst(rst), .clk(lclk[0]), .en(stall_n), .d(istart), .q(creg0_q));
  bd_reg #(.WIDTH(1), .LATCH(USE_DLATCH)) creg1 (
    .rst(rst), .clk(lclk[1]), .en(stall_n), .d(creg0_h), .q(creg1_q));

  // ---- data-path ----
  localparam logic [WIDTH-1:0] ADD_K = WIDTH'(10);
  localparam logic [WIDTH-1:0] MUL_K = WIDTH'(3);

  logic [WIDTH-1:0] reg0_q, reg1_q, reg2_q;

  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg0 (
    .rst(rst), .clk(wclk[0]), .en(wen[0]), .d(in0), .q(reg0_q));
  bd_add #(.WIDTH(WIDTH)) add0 (.a(reg0_q), .b(ADD_K), .y(add0_y));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg1 (
    .rst(rst), .clk(wclk[1]), .en(wen[1]), .d(add0_h), .q(reg1_q));
  bd_mul #(.WIDTH(WIDTH)) mul0 (.a(reg1_q), .b(MUL_K), .y(mul0_y));
  bd_reg #(.WIDTH(WIDTH), .LATCH(USE_DLATCH)) reg2 (
    .rst(rst), .clk(wclk[2]), .en(wen[2]), .d(mul0_h), .q(reg2_q));

  assign out0 = reg2_q;

endmodule
