// tb_bd_sample_np: end-to-end test of the non-pipelined asynchronous example
// in all four optimisation settings at once (plain, D latches, operand
// isolation, both), driven by the same two-phase start requests.
//
// For every run the expected result is computed from the synchronous
// original's behaviour: reg3 = in0 + in1, then reg4 = (cond ? in0 : in1) * reg3.
// Also checked: done toggles exactly once per run, SD x 3 = 2997 ps after
// start (one request delay per visited state); a start transition made before
// done is held back by ctrl0's C-element until the run ends; with operand isolation the
// multiplexer inputs keep the previous run's operands while states 0 and 1
// reload reg1 and reg2.
`timescale 1ps/1ps
module tb_bd_sample_np;
  localparam int unsigned W = 32, SD = 999, NV = 4;

  int checks = 0, failures = 0;
  int n_cond1 = 0, n_cond0 = 0, n_isolated = 0, n_held = 0;

  logic rst, start, cond;
  logic [W-1:0] in0, in1;
  logic [W-1:0] out0 [NV];
  logic [NV-1:0] done;
  int unsigned ndone [NV];
  time t_done [NV];

  for (genvar v = 0; v < NV; v++) begin : g_v
    bd_sample_np #(.USE_DLATCH(v / 2 == 1), .OP_ISOLATION(v % 2 == 1)) dut (
      .rst, .start, .cond, .in0, .in1, .out0(out0[v]), .done(done[v]));
    always @(posedge done[v] or negedge done[v]) begin
      ndone[v]++;
      t_done[v] = $time;
    end
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

  logic [W-1:0] prev_in0, prev_in1;

  task automatic run(input logic c, input logic [W-1:0] a, input logic [W-1:0] b);
    time t0;
    int unsigned nd0;
    logic [W-1:0] expect_y;
    expect_y = (c ? a : b) * (a + b);
    cond = c; in0 = a; in1 = b;
    #50;
    nd0 = ndone[0];
    start = ~start;
    t0 = $time;
    // operand isolation: after state 0 has reloaded reg1, the isolated
    // multiplexer input must still show the previous run's operand
    #(SD + 10);
    if (a != prev_in0) begin
      check(g_v[1].dut.g_iso.dl0.q == prev_in0, "isolation latch holds in state 1");
      check(g_v[1].dut.reg1_q == a, "reg1 reloaded in state 0");
      n_isolated++;
    end
    while (ndone[0] == nd0 && $time - t0 < 10 * SD) #1;
    check(ndone[0] == nd0 + 1, "run completes");
    check(t_done[0] - t0 == 3 * SD, $sformatf("latency %0t ps, expected %0d", t_done[0] - t0, 3 * SD));
    #20;
    for (int v = 0; v < NV; v++) begin
      check(ndone[v] == nd0 + 1, $sformatf("variant %0d done once", v));
      check(out0[v] == expect_y,
            $sformatf("variant %0d cond=%b in0=%h in1=%h out=%h expected %h",
                      v, c, a, b, out0[v], expect_y));
    end
    if (c) n_cond1++; else n_cond0++;
    prev_in0 = a; prev_in1 = b;
    #100;
  endtask

  initial begin
    rst = 0; start = 0; cond = 0; in0 = 0; in1 = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    prev_in0 = 0; prev_in1 = 0;
    for (int v = 0; v < NV; v++) ndone[v] = 0;
    #2000 rst = 0;   // longer than SD + PD: the delay lines settle under reset
    for (int v = 0; v < NV; v++) ndone[v] = 0;   // forget edges seen before reset
    #200;
    for (int v = 0; v < NV; v++) check(out0[v] == 0 && done[v] == 0, "reset state");
    run(1'b1, 32'd3, 32'd4);
    run(1'b0, 32'd3, 32'd4);
    run(1'b1, 32'hFFFF_FFFF, 32'd1);
    for (int n = 0; n < 40; n++) run(1'($urandom), $urandom, $urandom);

    // A start transition that arrives while a run is still going on is held
    // by ctrl0's C-element and only passes when the run's feedback returns,
    // so the second run follows the first without overlapping it.
    begin
      time t0;
      int unsigned nd0;
      nd0 = ndone[0];
      start = ~start; t0 = $time;
      #(SD / 2);
      start = ~start;                   // second request, during the first run
      #(3 * SD - SD / 2 + 5);
      check(ndone[0] == nd0 + 1, "first run done, second held until then");
      check(t_done[0] == t0 + 3 * SD, "first run latency");
      #(3 * SD);
      check(ndone[0] == nd0 + 2, "held request runs after the feedback");
      check(t_done[0] == t0 + 6 * SD, "second run starts when the first ends");
      n_held++;
    end

    check(n_cond1 > 0 && n_cond0 > 0, "both branches taken");
    check(n_isolated > 0, "operand isolation observed");
    $display("runs cond=1: %0d, cond=0: %0d, isolation events: %0d", n_cond1, n_cond0, n_isolated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
