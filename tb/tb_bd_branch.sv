// tb_bd_branch: pulses the predecessor local clock with random conditions and
// checks that only the branch whose condition matches toggles its request.
`timescale 1ps/1ps
module tb_bd_branch;
  int checks = 0, failures = 0;
  logic rst, lclk_p, cond;
  logic w_t, w_f;
  logic m_t, m_f;

  bd_branch #(.COND_VAL(1'b1)) u_t (.rst, .lclk_p, .cond, .w0(w_t));
  bd_branch #(.COND_VAL(1'b0)) u_f (.rst, .lclk_p, .cond, .w0(w_f));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; lclk_p = 0; cond = 0; m_t = 0; m_f = 0;
    #1 rst = 1;   // a real rising edge, whatever rst started at
    #10 rst = 0;
    #10;
    checks++; if (w_t !== 0 || w_f !== 0) failures++;
    for (int n = 0; n < 100; n++) begin
      cond = 1'($urandom);
      #20 lclk_p = 1;
      if (cond) m_t = ~m_t; else m_f = ~m_f;
      #1 lclk_p = 0;
      // condition changes while lclk is low must not toggle anything
      #5 cond = ~cond;
      #20;
      checks++;
      if (w_t !== m_t || w_f !== m_f) begin
        failures++; $display("FAIL n=%0d w_t=%b/%b w_f=%b/%b", n, w_t, m_t, w_f, m_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
