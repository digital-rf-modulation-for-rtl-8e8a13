// Shared types and constants of the delta-sigma digital-RF transmitter.
//
// The baseband input is 11-bit two's complement I and Q, sampled at a quarter of
// the converter clock. After the up-sample-by-4 low-pass filter the words are
// 13 bits wide (the filter has a DC gain of 4). The delta-sigma modulators emit a
// 3-bit code c per clock. A code drives seven unit cells of the digital-RF
// converter, c of them steering +1 and 7-c steering -1, so the analog level of a
// code is 2c-7 (odd levels -7..+7). With this offset-binary encoding a sign change
// is a bitwise inversion of the code, which is all the digital IF mixer needs.
// The 11-bit input width and the 3-bit code width follow the design; the code
// encoding and the 13-bit internal width are this implementation's choice.
package dsm_drfc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned IN_W   = 11;        // baseband I/Q word width
  localparam int unsigned FILT_W = IN_W + 2;  // width after the up-sample/low-pass filter
  localparam int unsigned CODE_W = 3;         // delta-sigma quantizer bits
  localparam int unsigned N_CELLS = (1 << CODE_W) - 1;  // unit cells per path (7)

  typedef logic [CODE_W-1:0] dsm_code_t;

  // Analog level of a code in unit-cell currents: 2c-7.
  function automatic int code_level(dsm_code_t c);
    return 2 * int'(c) - int'(N_CELLS);
  endfunction

  // Sign change of a code: -(2c-7) = 2(7-c)-7, i.e. bitwise inversion.
  function automatic dsm_code_t code_neg(dsm_code_t c);
    return ~c;
  endfunction
endpackage
