// tb_bd_top_full: bd_top exactly as delivered, every parameter at its default
// (32-bit data, 1000 ps cycle, DFF registers, no isolation).
//
// Runs the non-pipelined circuit on both branch outcomes and random operands,
// checking the result and the 3 x SD start-to-done latency, then streams 100
// random steps (tokens, bubbles, stalls) through the pipelined circuit at the
// full 1000 ps rate and compares out0 with the synchronous pipeline.
`timescale 1ps/1ps
module tb_bd_top_full;
  localparam int unsigned W = 32, SD = 999, P = 1000;

  int checks = 0, failures = 0;

  logic rst;
  logic np_start, np_cond, np_done;
  logic [W-1:0] np_in0, np_in1, np_out0;
  logic pl_start, pl_istart, pl_stall_n;
  logic [W-1:0] pl_in0, pl_out0;
  int unsigned ndone;
  time t_done;

  bd_top dut (.*);

  always @(posedge np_done or negedge np_done) begin
    ndone++;
    t_done = $time;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic np_run(input logic c, input logic [W-1:0] a, input logic [W-1:0] b);
    time t0;
    int unsigned nd;
    np_cond = c; np_in0 = a; np_in1 = b;
    #50;
    nd = ndone;
    np_start = ~np_start;
    t0 = $time;
    while (ndone == nd && $time - t0 < 10 * SD) #1;
    #20;
    check(ndone == nd + 1, "one done transition per start");
    check(t_done - t0 == 3 * SD, $sformatf("latency %0t", t_done - t0));
    check(np_out0 == (c ? a : b) * (a + b), $sformatf("np out=%h", np_out0));
  endtask

  logic [W-1:0] r0, r1, r2;
  logic c0, c1;

  task automatic pl_step(input logic is, input logic sn, input logic [W-1:0] d);
    pl_start = ~pl_start;
    #(P / 2);
    check(pl_out0 == r2, $sformatf("pipeline out=%h expected %h", pl_out0, r2));
    pl_istart = is; pl_stall_n = sn; pl_in0 = d;
    if (sn) begin
      if (c1) r2 = r1 * 3;
      if (c0) r1 = r0 + 10;
      if (is) r0 = d;
      c1 = c0;
      c0 = is;
    end
    #(P - P / 2);
  endtask

  initial begin
    rst = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    np_start = 0; np_cond = 0; np_in0 = 0; np_in1 = 0;
    pl_start = 0; pl_istart = 0; pl_stall_n = 1; pl_in0 = 0;
    r0 = 0; r1 = 0; r2 = 0; c0 = 0; c1 = 0; ndone = 0;
    #2000 rst = 0;   // longer than SD + PD: the delay lines settle under reset
    ndone = 0;   // forget edges seen before reset
    #300;
    np_run(1'b1, 32'd11, 32'd4);
    np_run(1'b0, 32'd11, 32'd4);
    for (int n = 0; n < 20; n++) np_run(1'($urandom), $urandom, $urandom);
    pl_step(1'b1, 1'b1, 32'd1);
    for (int n = 0; n < 100; n++)
      pl_step(($urandom % 4) != 0, ($urandom % 5) != 0, $urandom);
    repeat (3) pl_step(1'b0, 1'b1, 32'd0);
    check(r2 != 0, "pipeline produced results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
