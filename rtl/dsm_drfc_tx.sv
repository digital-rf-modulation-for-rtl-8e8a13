// Delta-sigma digital-RF transmitter: digital block, LO generation and quadrature
// digital-RF converter.
//
// Baseband I and Q (11-bit, at a quarter of the converter clock) are each
// up-sampled by 4 and low-pass filtered, then noise-shaped to 3 bits by a
// second-order delta-sigma modulator. A digital IF mixer at fCLK/4 rotates the two
// code streams into IF_I and IF_Q, which drive the I and Q unit cells of the
// quadrature digital-RF converter, switched by the 0 and 90 degree LO. The summed
// cell current iout goes to the passive LC band-pass filter, which lies outside
// this description and removes the shaped quantization noise and clock images.
// The converter clock is the LO divided by 2 (5.25 GHz LO, 2.625 GHz clock).
//
// Interface: lo is the LO as a square wave; rst_n is an asynchronous active-low
// reset. dig_clk is the converter clock. The chip samples i_in and q_in on the
// rising dig_clk edge where in_stb = 1, which happens every fourth clock; drive
// them from dig_clk (e.g. a register clocked by dig_clk/4). if_i/if_q are the
// codes sent to the converter (valid after each rising dig_clk edge), if_phase the
// mixer phase n used for them, ovl_i/ovl_q the quantizer clip flags. iout is the
// converter output current in unit-cell currents (iout_i, iout_q: the I and Q halves).
//
// Latency from the in_stb sampling edge to the first effect on if_i/if_q:
// LATENCY_IF clocks (interpolator 10, modulator 1, mixer 1).
//
// From the design: the chain and its block order, the 11-bit inputs, the 3-bit
// converter inputs, the divide-by-2 clock and the 0/90 LO. Widths inside the chain,
// the strobe handshake and the reset are this implementation's choices.
module dsm_drfc_tx
  import dsm_drfc_pkg::*;
(
  input  logic                   lo,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic                   dig_clk,
  output logic                   in_stb,
  output logic                   lo_0,
  output logic                   lo_90,
  output dsm_code_t              if_i,
  output dsm_code_t              if_q,
  output logic [1:0]             if_phase,
  output logic                   ovl_i,
  output logic                   ovl_q,
  output logic signed [4:0]      iout_i,
  output logic signed [4:0]      iout_q,
  output logic signed [4:0]      iout
);
  timeunit 1ps;
  timeprecision 1fs;


  logic [1:0]               stb_cnt;
  logic signed [FILT_W-1:0] fi, fq;
  dsm_code_t                ci, cq;

  // Converter clock from the LO.
  lo_div2 u_div (.lo, .rst_n, .clk_out(dig_clk));

  // Input sample request, one clock in four.
  always_ff @(posedge dig_clk or negedge rst_n) begin
    if (!rst_n) stb_cnt <= 2'd0;
    else        stb_cnt <= stb_cnt + 2'd1;
  end
  assign in_stb = (stb_cnt == 2'd0);

  // Digital block, I and Q paths.
  interp_up4 #(.IN_W(IN_W), .OUT_W(FILT_W)) u_interp_i (
    .clk(dig_clk), .rst_n, .in_stb, .x(i_in), .y(fi)
  );
  interp_up4 #(.IN_W(IN_W), .OUT_W(FILT_W)) u_interp_q (
    .clk(dig_clk), .rst_n, .in_stb, .x(q_in), .y(fq)
  );
  dsm2 #(.X_W(FILT_W)) u_dsm_i (.clk(dig_clk), .rst_n, .x(fi), .code(ci), .ovl(ovl_i));
  dsm2 #(.X_W(FILT_W)) u_dsm_q (.clk(dig_clk), .rst_n, .x(fq), .code(cq), .ovl(ovl_q));

  digif u_digif (
    .clk(dig_clk), .rst_n, .ci, .cq, .if_i, .if_q, .phase(if_phase)
  );

  // LO phases and the quadrature digital-RF converter.
  lo_polyphase u_lo (.lo, .lo_0, .lo_90);

  qdrfc u_qdrfc (
    .clk(dig_clk), .lo_0, .lo_90, .if_i, .if_q, .iout_i, .iout_q, .iout
  );
endmodule
