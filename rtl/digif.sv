// Digital IF quadrature mixer at fIF = fCLK/4.
//
// The I and Q delta-sigma codes are rotated by exp(j*pi*n/2):
//   IF_I = I cos(pi n/2) - Q sin(pi n/2)
//   IF_Q = I sin(pi n/2) + Q cos(pi n/2)
// Because cos and sin of pi n/2 only take the values 0, +1 and -1, each product is
// a selection or a sign change, and one of the two products in each sum is always
// zero. Over n = 0..3 the outputs are (I, Q), (-Q, I), (-I, -Q), (Q, -I). A sign
// change of a code is its bitwise inversion (see dsm_drfc_pkg), so the mixer is a
// 2-bit phase counter and two 3-bit multiplexers with optional inversion.
//
// Interface: ci and cq are sampled on each rising clk edge; if_i and if_q for that
// sample, and the phase n it was rotated by, are valid after the same edge. The
// phase counter starts at 0 after reset and advances every clock.
//
// From the design: the rotation equations, fIF = fCLK/4 and the multiplier-free
// realisation. The code encoding and the output register are this
// implementation's choice.
module digif
  import dsm_drfc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  dsm_code_t  ci,
  input  dsm_code_t  cq,
  output dsm_code_t  if_i,
  output dsm_code_t  if_q,
  output logic [1:0] phase
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [1:0] n;
  dsm_code_t  mi, mq;

  always_comb begin
    unique case (n)
      2'd0: begin mi = ci;           mq = cq;           end
      2'd1: begin mi = code_neg(cq); mq = ci;           end
      2'd2: begin mi = code_neg(ci); mq = code_neg(cq); end
      2'd3: begin mi = cq;           mq = code_neg(ci); end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n     <= 2'd0;
      if_i  <= dsm_code_t'(4);
      if_q  <= dsm_code_t'(4);
      phase <= 2'd0;
    end else begin
      n     <= n + 2'd1;
      if_i  <= mi;
      if_q  <= mq;
      phase <= n;
    end
  end
endmodule
