// tb_bd_ctrl: checks the control module's timing and its three input modes.
//
// For every request the testbench predicts, independently of the module:
// st follows the request at once; lclk rises exactly SD_DELAY (999 ps) later
// and falls PD_DELAY (1 ps) after that; out toggles with the rising lclk; lst
// is high from the request until out toggles.  Modes tested:
//   u_x  XOR merge of two predecessor requests (either may toggle);
//   u_c  C-element of start and the XOR of two feedback requests: a start
//        toggle passes only when the feedback has come back;
//   u_b  branch: a pulse on the predecessor lclk with the matching condition
//        is a request, one with the other condition is ignored.
`timescale 1ps/1ps
module tb_bd_ctrl;
  import bd_pkg::*;
  localparam int unsigned SD = 999, PD = 1;

  int checks = 0, failures = 0;
  logic rst;

  logic [1:0] xi;  logic x_st, x_lclk, x_out, x_lst;
  logic start; logic [1:0] fb; logic c_st, c_lclk, c_out, c_lst;
  logic bl, bc;   logic b_st, b_lclk, b_out, b_lst;

  bd_ctrl #(.W0_MODE(W0_XOR), .N_IN(2)) u_x (
    .rst, .i(xi), .fb(1'b0), .cond(1'b0), .st(x_st), .lclk(x_lclk), .out(x_out), .lst(x_lst));
  bd_ctrl #(.W0_MODE(W0_CELEM), .N_FB(2)) u_c (
    .rst, .i(start), .fb, .cond(1'b0), .st(c_st), .lclk(c_lclk), .out(c_out), .lst(c_lst));
  bd_ctrl #(.W0_MODE(W0_BRANCH), .COND_VAL(1'b0)) u_b (
    .rst, .i(bl), .fb(1'b0), .cond(bc), .st(b_st), .lclk(b_lclk), .out(b_out), .lst(b_lst));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Follow one request of a module from the moment it arrived.  Edge times
  // are recorded by monitors, so same-time-step ordering does not matter.
  task automatic follow(ref logic st, ref logic lst, ref logic out,
                        ref time t_out, ref time t_rise, ref time t_fall,
                        input time t_req, input logic exp_st, input string nm);
    logic out0;
    out0 = out;
    check(st == exp_st, {nm, ": st follows request"});
    check(lst == 1'b1, {nm, ": lst high while active"});
    #(t_req + SD - 1 - $time);
    check(out == out0, {nm, ": nothing before SD"});
    #(PD + 2);
    check(t_rise == t_req + SD, {nm, ": lclk rises SD after the request"});
    check(t_fall == t_rise + PD, {nm, ": lclk pulse is PD wide"});
    check(out == ~out0, {nm, ": out toggled"});
    check(t_out == t_rise, {nm, ": out toggles with the rising lclk"});
    check(lst == 1'b0, {nm, ": lst low once out toggled"});
  endtask

  time x_tout, c_tout, b_tout;
  always @(posedge x_out or negedge x_out) x_tout = $time;
  always @(posedge c_out or negedge c_out) c_tout = $time;
  always @(posedge b_out or negedge b_out) b_tout = $time;
  time x_tr, x_tf, c_tr, c_tf, b_tr, b_tf;
  always @(posedge x_lclk) x_tr = $time;
  always @(negedge x_lclk) x_tf = $time;
  always @(posedge c_lclk) c_tr = $time;
  always @(negedge c_lclk) c_tf = $time;
  always @(posedge b_lclk) b_tr = $time;
  always @(negedge b_lclk) b_tf = $time;

  int lclk_edges_b = 0;
  always @(posedge b_lclk) lclk_edges_b++;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; xi = 0; start = 0; fb = 0; bl = 0; bc = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    #2000 rst = 0;   // longer than SD + PD: the delay lines settle under reset
    #100;
    check(x_lclk == 0 && c_lclk == 0 && b_lclk == 0 && x_out == 0, "idle after reset");

    // ---- XOR merge ----
    for (int n = 0; n < 8; n++) begin
      int k;
      k = int'($urandom % 2);
      xi[k] = ~xi[k];
      #0 follow(x_st, x_lst, x_out, x_tout, x_tr, x_tf, $time, ^xi, "xor");
      #200;
    end

    // ---- C-element join ----
    start = 1;
    #0 follow(c_st, c_lst, c_out, c_tout, c_tr, c_tf, $time, 1'b1, "celem first start");
    #200;
    start = 0;                       // feedback has not come back yet
    #(2 * SD);
    check(c_st == 1'b1 && c_lclk == 0, "celem blocks start until feedback");
    fb[1] = ~fb[1];                  // feedback from one of the last states
    #0 follow(c_st, c_lst, c_out, c_tout, c_tr, c_tf, $time, 1'b0, "celem after feedback");
    #200;
    fb[0] = ~fb[0];                  // completion of the second run
    #(2 * SD);
    check(c_st == 1'b0, "celem holds without a start");
    start = 1;
    #0 follow(c_st, c_lst, c_out, c_tout, c_tr, c_tf, $time, 1'b1, "celem third start");
    #200;

    // ---- branch ----
    for (int n = 0; n < 10; n++) begin
      int e0;
      time t_b;
      logic st_old;
      bc = 1'($urandom);
      st_old = b_st;
      e0 = lclk_edges_b;
      #10 bl = 1;
      t_b = $time;
      #1 bl = 0;
      if (bc == 1'b0) begin
        check(b_st == ~st_old, "branch taken toggles st");
        follow(b_st, b_lst, b_out, b_tout, b_tr, b_tf, t_b, ~st_old, "branch");
        #100;
        check(lclk_edges_b == e0 + 1, "branch one lclk");
      end else begin
        #(SD + 100);
        check(b_st == st_old && lclk_edges_b == e0, "branch not taken");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
