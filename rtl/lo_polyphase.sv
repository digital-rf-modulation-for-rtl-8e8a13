// Behavioural model (not synthesizable logic) of the LO input buffer, polyphase
// network and 0/90 degree LO buffers.
//
// The real part is an RF circuit that splits the 5.25 GHz LO into two square
// waves a quarter of a period apart. The model passes the LO to lo_0 and delays it
// by QUARTER_PS picoseconds to form lo_90, which therefore lags lo_0 by 90 degrees
// when QUARTER_PS is a quarter of the LO period (47.619 ps at 5.25 GHz).
//
// Interface: lo is the LO as a logic square wave; lo_0 and lo_90 are the
// in-phase and quadrature LO for the I and Q halves of the digital-RF converter.
//
// From the design: the LO buffer, the polyphase 0/90 split and the 5.25 GHz LO.
// Treating the LO as a logic-level square wave and the ideal delay are model
// choices.
module lo_polyphase #(
  parameter realtime QUARTER_PS = 47.619
) (
  input  logic lo,
  output logic lo_0,
  output logic lo_90
);
  timeunit 1ps;
  timeprecision 1fs;

  assign lo_0 = lo;

  initial lo_90 = 1'b0;
  always @(lo) lo_90 <= #(QUARTER_PS) lo;
endmodule
