// tb_bd_reg: checks the register in flip-flop mode (captures on the rising
// edge only, holds while the clock stays high) and in D-latch mode (follows d
// while the clock is high), with enable and asynchronous reset.
`timescale 1ps/1ps
module tb_bd_reg;
  int checks = 0, failures = 0;
  logic rst, clk, en;
  logic [31:0] d, q_ff, q_lat, m_ff, m_lat;

  bd_reg                  u_ff  (.rst, .clk, .en, .d, .q(q_ff));
  bd_reg #(.LATCH(1'b1))  u_lat (.rst, .clk, .en, .d, .q(q_lat));

  task automatic check(input string what);
    checks++;
    if (q_ff !== m_ff || q_lat !== m_lat) begin
      failures++;
      $display("FAIL %s: ff=%h/%h latch=%h/%h", what, q_ff, m_ff, q_lat, m_lat);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; clk = 0; en = 0; d = '1; m_ff = 0; m_lat = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    #10 check("reset");
    rst = 0;
    for (int n = 0; n < 100; n++) begin
      en = ($urandom % 4) != 0;
      d  = $urandom;
      #5 clk = 1;
      if (en) begin m_ff = d; m_lat = d; end
      #1 check("rising edge");
      d = $urandom;                // changes while clk is high
      if (en) m_lat = d;
      #1 check("clock high");
      clk = 0;
      #1 d = $urandom;             // changes while clk is low
      #1 check("clock low");
    end
    rst = 1; m_ff = 0; m_lat = 0;
    #1 check("asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
