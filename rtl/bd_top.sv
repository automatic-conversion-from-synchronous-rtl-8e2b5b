// bd_top: the two converted example circuits side by side.
//
// np_*: the non-pipelined four-state circuit (bd_sample_np): two-phase
//       np_start/np_done handshake, operands np_cond, np_in0, np_in1, result
//       np_out0 = (np_cond ? np_in0 : np_in1) * (np_in0 + np_in1).
// pl_*: the three-stage pipeline (bd_sample_pl): one pipeline step per
//       transition of pl_start, token valid pl_istart, freeze with pl_stall_n = 0,
//       result pl_out0 = (pl_in0 + 10) * 3 three steps after the token enters.
// The two circuits share only the reset.  The top's parameters select the
// optional optimisations of each circuit (all off by default) and the delay
// elements' lengths.  Neither circuit has a clock.
`timescale 1ps/1ps
module bd_top #(
  parameter int unsigned WIDTH        = bd_pkg::DATA_W,
  parameter bit          USE_DLATCH   = 1'b0,
  parameter bit          OP_ISOLATION = 1'b0,
  parameter bit          GATED_WRITE  = 1'b0,
  parameter int unsigned SD_DELAY     = bd_pkg::SD_PS,
  parameter int unsigned PD_DELAY     = bd_pkg::PD_PS
) (
  input  logic             rst,
  // non-pipelined circuit
  input  logic             np_start,
  input  logic             np_cond,
  input  logic [WIDTH-1:0] np_in0,
  input  logic [WIDTH-1:0] np_in1,
  output logic [WIDTH-1:0] np_out0,
  output logic             np_done,
  // pipelined circuit
  input  logic             pl_start,
  input  logic             pl_istart,
  input  logic             pl_stall_n,
  input  logic [WIDTH-1:0] pl_in0,
  output logic [WIDTH-1:0] pl_out0
);

  bd_sample_np #(.WIDTH(WIDTH), .USE_DLATCH(USE_DLATCH), .OP_ISOLATION(OP_ISOLATION),
                 .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) u_np (
    .rst(rst), .start(np_start), .cond(np_cond), .in0(np_in0), .in1(np_in1),
    .out0(np_out0), .done(np_done));

  bd_sample_pl #(.WIDTH(WIDTH), .USE_DLATCH(USE_DLATCH), .GATED_WRITE(GATED_WRITE),
                 .SD_DELAY(SD_DELAY), .PD_DELAY(PD_DELAY)) u_pl (
    .rst(rst), .start(pl_start), .istart(pl_istart), .stall_n(pl_stall_n),
    .in0(pl_in0), .out0(pl_out0));

endmodule
