// tb_bd_sample_pl: end-to-end test of the pipelined asynchronous example.
//
// Three copies run side by side: plain (registers with enable), GATED_WRITE
// (enable moved into the local clock) and USE_DLATCH (latch registers).  One
// transition of start is one pipeline step.  A cycle-level model of the
// synchronous original, advanced once per step with the same istart, in0 and
// stall_n, predicts out0; it is compared before each step.  Phase A steps every
// 1000 ps (the target cycle time, where the latch copy depends on its hold
// delays); phase B steps every 1005 ps, so the stages of consecutive steps no
// longer fire together.  Both phases check all three copies.  Also checked: the first token's result appears 3 x 999 ps
// after its start transition, and stalls and empty steps (bubbles) occur.
`timescale 1ps/1ps
module tb_bd_sample_pl;
  localparam int unsigned W = 32, SD = 999, NV = 3;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0, n_token = 0;

  logic rst, start, istart, stall_n;
  logic [W-1:0] in0;
  logic [W-1:0] out0 [NV];
  time t_out [NV];

  for (genvar v = 0; v < NV; v++) begin : g_v
    bd_sample_pl #(.GATED_WRITE(v == 1), .USE_DLATCH(v == 2)) dut (
      .rst, .start, .istart, .stall_n, .in0, .out0(out0[v]));
    initial begin
      logic [W-1:0] prev;
      prev = '0;
      t_out[v] = 0;
      forever begin
        #1;
        if (out0[v] !== prev) begin
          prev = out0[v];
          t_out[v] = $time;
        end
      end
    end
  end

  // reference: the synchronous pipeline
  logic [W-1:0] r0, r1, r2;
  logic c0, c1;

  task automatic ref_step(input logic is, input logic sn, input logic [W-1:0] d);
    if (sn) begin
      if (c1) r2 = r1 * 3;
      if (c0) r1 = r0 + 10;
      if (is) r0 = d;
      c1 = c0;
      c0 = is;
    end
  endtask

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pipeline step: start toggles; half a period later (after the previous
  // step's firing window, before this step's) out0 is compared with the model
  // and this step's istart, stall_n and in0 are applied.  All three stages
  // fire in the window that ends SD_DELAY after the toggle.
  task automatic step(input int unsigned period, input logic is, input logic sn,
                      input logic [W-1:0] d, input int unsigned check_mask);
    start = ~start;
    #(period / 2);
    for (int v = 0; v < NV; v++)
      if (check_mask[v])
        check(out0[v] == r2, $sformatf("variant %0d out0=%h expected %h", v, out0[v], r2));
    istart = is; stall_n = sn; in0 = d;
    ref_step(is, sn, d);
    if (!sn) n_stall++;
    else if (!is) n_bubble++;
    else n_token++;
    #(period - period / 2);
  endtask

  task automatic reset_all();
    rst = 0; start = 0; istart = 0; stall_n = 1; in0 = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    r0 = 0; r1 = 0; r2 = 0; c0 = 0; c1 = 0;
    #2000 rst = 0;   // longer than SD + PD: the delay lines settle under reset
    #500;
  endtask

  initial begin
    // ---- phase A: one step per 1000 ps ----
    reset_all();
    begin
      time t0;
      // first token: latency through the three stages
      t0 = $time;
      step(1000, 1'b1, 1'b1, 32'd5, 3'b111);
      repeat (4) step(1000, 1'b0, 1'b1, 32'd0, 3'b111);
      check(out0[0] == (32'd5 + 10) * 3, "first token result");
      // the monitor polls every 1 ps, so it may see the edge one step late
      check(t_out[0] - t0 >= 3 * SD && t_out[0] - t0 <= 3 * SD + 1, $sformatf("first token latency %0t", t_out[0] - t0));
    end
    for (int n = 0; n < 300; n++)
      step(1000, ($urandom % 4) != 0, ($urandom % 5) != 0, $urandom, 3'b111);
    repeat (4) step(1000, 1'b0, 1'b1, 32'd0, 3'b111);

    // ---- phase B: one step per 1005 ps ----
    reset_all();
    for (int n = 0; n < 300; n++)
      step(1005, ($urandom % 4) != 0, ($urandom % 5) != 0, $urandom, 3'b111);
    repeat (4) step(1005, 1'b0, 1'b1, 32'd0, 3'b111);

    check(n_stall > 0 && n_bubble > 0 && n_token > 0, "stalls, bubbles and tokens all seen");
    $display("steps: tokens %0d, bubbles %0d, stalls %0d", n_token, n_bubble, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
