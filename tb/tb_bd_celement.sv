// tb_bd_celement: drives all input sequences of a C-element from each state
// and compares with the rule "copy when the inputs agree, else hold".
`timescale 1ps/1ps
module tb_bd_celement;
  int checks = 0, failures = 0;
  logic rst, a, b, c;
  logic model;

  bd_celement dut (.rst, .a, .b, .c);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; a = 0; b = 0; model = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    #10; checks++; if (c !== 1'b0) failures++;
    a = 1; b = 1; #5;
    checks++; if (c !== 1'b0) begin failures++; $display("FAIL reset not dominant"); end
    rst = 0; a = 0; b = 0; #5;
    for (int n = 0; n < 200; n++) begin
      a = 1'($urandom); b = 1'($urandom);
      if (a == b) model = a;
      #5;
      checks++;
      if (c !== model) begin
        failures++; $display("FAIL a=%b b=%b c=%b model=%b", a, b, c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
