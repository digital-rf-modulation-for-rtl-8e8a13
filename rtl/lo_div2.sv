// Divide-by-2 of the LO: derives the converter clock (2.625 GHz) from the 5.25 GHz LO.
//
// A toggle flip-flop on the rising LO edge. Its output is the clock of the whole
// digital block, so the data handed to the quadrature converter is synchronous to
// the LO the converter mixes with.
//
// Interface: clk_out toggles on every rising edge of lo; rst_n (asynchronous,
// active low) holds it low. clk_out rises on the first LO rising edge after reset is
// released.
//
// From the design: the LO divided by 2 clocking the delta-sigma modulators, and
// the 5.25 GHz LO / 2.625 GHz clock frequencies. The reset is this
// implementation's addition.
module lo_div2 (
  input  logic lo,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge lo or negedge rst_n) begin
    if (!rst_n) clk_out <= 1'b0;
    else        clk_out <= ~clk_out;
  end
endmodule
