// tb_bd_delay: checks that the delay element reproduces every transition of
// its input exactly DELAY ps later, for the default 999 ps and for 7 ps.
`timescale 1ps/1ps
module tb_bd_delay;
  int checks = 0, failures = 0;
  logic a = 1'b0;
  logic y_def, y_7;

  bd_delay u_def (.in(a), .out(y_def));
  bd_delay #(.DELAY(7)) u_7 (.in(a), .out(y_7));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    repeat (6) begin
      time t0;
      a = ~a; t0 = $time;
      #6;   check(y_7 != a, "7ps element changed early");
      #1;   check(y_7 == a, "7ps element not after 7 ps");
      #991; check(y_def != a, "999ps element changed early");
      #1;   check(y_def == a, "999ps element not after 999 ps");
      check($time - t0 == 999, "time bookkeeping");
      #500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
