// Behavioural model (mixed-signal part, not synthesizable logic) of the quadrature
// digital-RF converter (QDRFC) and its data/clock buffers.
//
// Each path (I and Q) has N_CELLS = 7 current-steering unit cells. A unit cell
// latches its digital bit on the data clock and steers its tail current, switched
// by the LO pair, to the + or - output, so its contribution is
// (bit ? +1 : -1) * (LO ? +1 : -1) unit currents. A 3-bit code c turns c cells to
// +1 and 7-c to -1 (thermometer decoding), giving the level 2c-7. The I cells are
// switched by the 0 degree LO, the Q cells by the 90 degree LO, and all cell
// currents sum on the shared load (the LC band-pass filter), which is iout.
// Since lo_90 lags lo_0, the sum is I*LO0 + Q*LO90 = Re{(I - jQ) exp(jwt)}: a signal
// at +f on the complex IF input appears at f_LO - f.
//
// Interface: if_i and if_q are latched on the falling edge of clk, half a clock
// after the digital IF mixer updates them on the rising edge, so the latch never
// samples a changing code. iout_i, iout_q and iout are signed differential output
// currents in unit-cell currents (range -7..7 per path, -14..14 in total); they
// change with the LO and with the latched data.
//
// From the design: current-steering unit cells with a data latch clocked by CLK
// and an LO switching pair, the 0/90 LO split between the I and Q halves and the
// current summation into the filter. The thermometer decoding, the 7 cells per
// path and the falling-edge latch are this model's choices.
module qdrfc
  import dsm_drfc_pkg::*;
(
  input  logic              clk,
  input  logic              lo_0,
  input  logic              lo_90,
  input  dsm_code_t         if_i,
  input  dsm_code_t         if_q,
  output logic signed [4:0] iout_i,
  output logic signed [4:0] iout_q,
  output logic signed [4:0] iout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_CELLS-1:0] cell_i, cell_q;  // latched unit-cell bits

  // Thermometer decoding of the codes into unit-cell bits.
  function automatic logic [N_CELLS-1:0] thermo(dsm_code_t c);
    logic [N_CELLS-1:0] t;
    for (int k = 0; k < int'(N_CELLS); k++) t[k] = (k < int'(c));
    return t;
  endfunction

  initial begin
    cell_i = thermo(dsm_code_t'(4));
    cell_q = thermo(dsm_code_t'(4));
  end

  always @(negedge clk) begin
    cell_i <= thermo(if_i);
    cell_q <= thermo(if_q);
  end

  // Current summation of the cells; the LO pair sets the polarity.
  function automatic logic signed [4:0] path_current(logic [N_CELLS-1:0] cells, logic lo_sw);
    int acc;
    acc = 0;
    for (int k = 0; k < int'(N_CELLS); k++) acc += cells[k] ? 1 : -1;
    return 5'(lo_sw ? acc : -acc);
  endfunction

  always_comb begin
    iout_i = path_current(cell_i, lo_0);
    iout_q = path_current(cell_q, lo_90);
    iout   = iout_i + iout_q;
  end
endmodule
