// bd_reg: data-path register of a bundled-data circuit.
//
// The register is written by a local clock (the OR of the lclk pulses of the
// states that write it, built outside).  With LATCH = 0 it is a D flip-flop
// that captures d on the rising edge of clk.  With LATCH = 1 it is a D latch
// that is transparent while clk is high: the document's optimisation that
// replaces DFFs with D latches to save area and power, which is safe because
// the local clock is a short pulse issued only once the data are stable.
// en gates the write (tie it to 1 for a register without enable).  rst clears
// the register asynchronously; the document's registers reset to 0 likewise.
//
// Timing: q follows d at the rising clk edge (DFF) or while clk is high (latch).
`timescale 1ps/1ps
module bd_reg #(
  parameter int unsigned WIDTH = bd_pkg::DATA_W,
  parameter bit          LATCH = 1'b0
) (
  input  logic             rst,
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (LATCH) begin : g_latch
    always_latch begin
      if (rst)           q = '0;
      else if (clk & en) q = d;
    end
  end else begin : g_dff
    always_ff @(posedge clk or posedge rst) begin
      if (rst)     q <= '0;
      else if (en) q <= d;
    end
  end

endmodule
