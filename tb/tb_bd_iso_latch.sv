// tb_bd_iso_latch: checks that the isolation latch follows its input only
// while its gate is high and otherwise keeps the last value.
`timescale 1ps/1ps
module tb_bd_iso_latch;
  int checks = 0, failures = 0;
  logic rst, g;
  logic [31:0] d, q, m;

  bd_iso_latch dut (.rst, .g, .d, .q);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; g = 0; d = 32'h1234_5678; m = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    #5 checks++; if (q !== 0) failures++;
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      g = ($urandom % 3) == 0;
      d = $urandom;
      if (g) m = d;
      #3;
      checks++;
      if (q !== m) begin failures++; $display("FAIL g=%b d=%h q=%h m=%h", g, d, q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
