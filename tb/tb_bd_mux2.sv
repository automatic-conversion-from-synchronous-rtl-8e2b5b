// tb_bd_mux2: random and corner operands; compares the unit's output with the
// selected input computed in the testbench with 64-bit arithmetic.
`timescale 1ps/1ps
module tb_bd_mux2;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  logic sel;
  logic [63:0] wide;
  logic [31:0] expect_y;

  bd_mux2 dut (.in0(a), .in1(b), .sel, .y);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      case (n)
        0: begin a = '1; b = '1; end
        1: begin a = '1; b = 32'd1; end
        2: begin a = 32'h8000_0000; b = 32'd2; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      sel = 1'($urandom);
      #1;
      if ("mux2" == "add") wide = {32'd0, a} + {32'd0, b};
      else if ("mux2" == "mul") wide = {32'd0, a} * {32'd0, b};
      else wide = {32'd0, (sel ? b : a)};
      expect_y = wide[31:0];
      checks++;
      if (y !== expect_y) begin
        failures++; $display("FAIL a=%h b=%h sel=%b y=%h expected %h", a, b, sel, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
