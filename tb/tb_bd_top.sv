// tb_bd_top: system test of bd_top, the two example circuits side by side.
//
// Two copies of the top are driven with the same stimulus:
//   u0  as converted: DFF registers, no isolation, enables on the data path;
//   u1  with every optimisation on: D-latch registers, operand-isolation
//       latches in front of the multiplexer, and the pipeline's register
//       enables folded into the clock gating ("appropriate DFFs").
// The expected values come from the synchronous originals. Each mechanism the
// conversion relies on is counted when it is seen working; one that never
// happens counts as a failure at the end:
//   branch taken (cond = 1) and not taken (cond = 0), the two-phase start/done
//   handshake with its 3 x SD latency, a start request held by the C-element
//   until the feedback returns, operand isolation holding the multiplexer
//   input, D-latch registers giving the right result, and in the pipeline:
//   tokens, bubbles (istart = 0), stalls (stall_n = 0) with gated write clocks,
//   and the first-token latency of 3 x SD.
// The pipeline is stepped every 1000 ps, the target cycle time, for both copies.
`timescale 1ps/1ps
module tb_bd_top;
  localparam int unsigned W = 32, SD = 999, P = 1000;

  int checks = 0, failures = 0;
  int n_branch1 = 0, n_branch0 = 0, n_handshake = 0, n_held = 0, n_isolated = 0;
  int n_latch = 0, n_token = 0, n_bubble = 0, n_stall = 0, n_gated = 0, n_pl_latency = 0;

  logic rst;
  logic np_start, np_cond;
  logic [W-1:0] np_in0, np_in1;
  logic pl_start, pl_istart, pl_stall_n;
  logic [W-1:0] pl_in0;
  logic [W-1:0] np_out0 [2], pl_out0 [2];
  logic [1:0] np_done;
  int unsigned ndone [2];
  time t_done [2];

  bd_top u0 (
    .rst, .np_start, .np_cond, .np_in0, .np_in1, .np_out0(np_out0[0]), .np_done(np_done[0]),
    .pl_start, .pl_istart, .pl_stall_n, .pl_in0, .pl_out0(pl_out0[0]));

  bd_top #(.USE_DLATCH(1'b1), .OP_ISOLATION(1'b1), .GATED_WRITE(1'b1)) u1 (
    .rst, .np_start, .np_cond, .np_in0, .np_in1, .np_out0(np_out0[1]), .np_done(np_done[1]),
    .pl_start, .pl_istart, .pl_stall_n, .pl_in0, .pl_out0(pl_out0[1]));

  for (genvar v = 0; v < 2; v++) begin : g_mon
    always @(posedge np_done[v] or negedge np_done[v]) begin
      ndone[v]++;
      t_done[v] = $time;
    end
  end

  // count pulses of the gated write clock of u1's first pipeline register
  int unsigned n_wclk0;
  always @(posedge u1.u_pl.wclk[0]) n_wclk0++;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #60_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- non-pipelined circuit ----------------
  logic [W-1:0] prev_a;

  task automatic np_run(input logic c, input logic [W-1:0] a, input logic [W-1:0] b);
    time t0;
    int unsigned nd;
    logic [W-1:0] y;
    y = (c ? a : b) * (a + b);
    np_cond = c; np_in0 = a; np_in1 = b;
    #50;
    nd = ndone[0];
    np_start = ~np_start;
    t0 = $time;
    #(SD + 10);
    // state 1: reg1 already holds the new operand, the isolated mux input not yet
    if (a != prev_a) begin
      check(u1.u_np.g_iso.dl0.q == prev_a && u1.u_np.reg1_q == a, "operand isolation in state 1");
      n_isolated++;
    end
    while (ndone[0] == nd && $time - t0 < 10 * SD) #1;
    #20;
    for (int v = 0; v < 2; v++) begin
      check(ndone[v] == nd + 1, $sformatf("copy %0d: one done transition per start", v));
      check(t_done[v] - t0 == 3 * SD, $sformatf("copy %0d: latency %0t", v, t_done[v] - t0));
      check(np_out0[v] == y, $sformatf("copy %0d: cond=%b out=%h expected %h", v, c, np_out0[v], y));
    end
    if (ndone[0] == nd + 1 && t_done[0] - t0 == 3 * SD) n_handshake++;
    if (np_out0[0] == y && np_out0[1] == y) begin
      if (c) n_branch1++; else n_branch0++;
      n_latch++;
    end
    prev_a = a;
    #100;
  endtask

  task automatic np_held();
    time t0;
    int unsigned nd;
    nd = ndone[0];
    np_start = ~np_start; t0 = $time;
    #(SD / 2);
    np_start = ~np_start;
    #(3 * SD - SD / 2 + 5);
    check(ndone[0] == nd + 1 && ndone[1] == nd + 1, "first run done, second still held");
    #(3 * SD);
    check(ndone[0] == nd + 2 && ndone[1] == nd + 2, "held request completed");
    check(t_done[0] == t0 + 6 * SD && t_done[1] == t0 + 6 * SD, "held request ran after the feedback");
    if (ndone[0] == nd + 2 && t_done[0] == t0 + 6 * SD) n_held++;
    #100;
  endtask

  // ---------------- pipelined circuit ----------------
  logic [W-1:0] r0, r1, r2;
  logic c0, c1;

  // One step: toggle start; half a period later the previous window is over,
  // so compare out0 and the stage-0 write clock with the model, then apply
  // this step's inputs (used in the window ending SD after the toggle).
  int unsigned w0_prev;
  bit en_prev;

  task automatic pl_step(input logic is, input logic sn, input logic [W-1:0] d);
    pl_start = ~pl_start;
    #(P / 2);
    for (int v = 0; v < 2; v++)
      check(pl_out0[v] == r2, $sformatf("copy %0d: pipeline out=%h expected %h", v, pl_out0[v], r2));
    check((n_wclk0 != w0_prev) == en_prev, "gated write clock follows the enable");
    if (!en_prev && n_wclk0 == w0_prev) n_gated++;
    pl_istart = is; pl_stall_n = sn; pl_in0 = d;
    if (sn) begin
      if (c1) r2 = r1 * 3;
      if (c0) r1 = r0 + 10;
      if (is) r0 = d;
      c1 = c0;
      c0 = is;
    end
    if (!sn) n_stall++;
    else if (!is) n_bubble++;
    else n_token++;
    w0_prev = n_wclk0;
    en_prev = is && sn;
    #(P - P / 2);
  endtask

  time t_pl;
  initial begin
    logic [W-1:0] prev;
    prev = '0;
    t_pl = 0;
    forever begin
      #1;
      if (pl_out0[0] !== prev) begin
        prev = pl_out0[0];
        t_pl = $time;
      end
    end
  end

  initial begin
    rst = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    np_start = 0; np_cond = 0; np_in0 = 0; np_in1 = 0;
    pl_start = 0; pl_istart = 0; pl_stall_n = 1; pl_in0 = 0;
    r0 = 0; r1 = 0; r2 = 0; c0 = 0; c1 = 0;
    prev_a = 0; ndone[0] = 0; ndone[1] = 0; n_wclk0 = 0;
    #2000 rst = 0;   // longer than SD + PD: the delay lines settle under reset
    ndone[0] = 0; ndone[1] = 0;   // forget edges seen before reset
    #300;

    run_np_part();
    run_pl_part();

    check(n_branch1 > 0, "branch taken with cond = 1");
    check(n_branch0 > 0, "branch taken with cond = 0");
    check(n_handshake > 0, "start/done handshake with 3 x SD latency");
    check(n_held > 0, "start request held by the C-element");
    check(n_isolated > 0, "operand isolation");
    check(n_latch > 0, "D-latch registers");
    check(n_token > 0, "pipeline tokens");
    check(n_bubble > 0, "pipeline bubbles");
    check(n_stall > 0, "pipeline stalls");
    check(n_gated > 0, "gated write clock held off");
    check(n_pl_latency > 0, "pipeline first-token latency");
    $display("branch1 %0d branch0 %0d handshake %0d held %0d isolated %0d latch %0d",
             n_branch1, n_branch0, n_handshake, n_held, n_isolated, n_latch);
    $display("tokens %0d bubbles %0d stalls %0d gated %0d pl_latency %0d",
             n_token, n_bubble, n_stall, n_gated, n_pl_latency);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_np_part();
    np_run(1'b1, 32'd7, 32'd9);
    np_run(1'b0, 32'd7, 32'd9);
    for (int n = 0; n < 30; n++) np_run(1'($urandom), $urandom, $urandom);
    np_held();
    np_run(1'b1, 32'd2, 32'd5);
  endtask

  task automatic run_pl_part();
    time t0;
    w0_prev = n_wclk0; en_prev = 0;
    // first token: out0 changes 3 x SD after its start toggle (the monitor
    // polls every 1 ps, so it may see the edge one step late)
    t0 = $time;
    pl_step(1'b1, 1'b1, 32'd100);
    repeat (3) pl_step(1'b0, 1'b1, 32'd0);
    check(t_pl - t0 >= 3 * SD && t_pl - t0 <= 3 * SD + 1,
          $sformatf("pipeline first-token latency %0t", t_pl - t0));
    check(pl_out0[0] == (32'd100 + 10) * 3, "pipeline first token value");
    if (t_pl - t0 <= 3 * SD + 1 && pl_out0[0] == (32'd100 + 10) * 3) n_pl_latency++;
    for (int n = 0; n < 200; n++)
      pl_step(($urandom % 4) != 0, ($urandom % 5) != 0, $urandom);
    repeat (3) pl_step(1'b0, 1'b1, 32'd0);
  endtask
endmodule
