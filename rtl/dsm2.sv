// Second-order, 3-bit digital delta-sigma modulator (error-feedback form).
//
// Each clock the modulator adds the shaped error of the two previous samples to
// the input, u = x + 2 e[n-1] - e[n-2], quantizes u to one of eight odd levels and
// keeps the quantization error e[n] = u - level. The noise transfer function is
// (1 - z^-1)^2, the signal transfer function 1; the coefficients are a shift and a
// wire, so no multiplier is needed. With input full scale FS = 2^(X_W-1) the
// quantizer step is FS/4 and the levels are (2c-7)*FS/8 for code c = 0..7, matching
// the 2c-7 unit cells the code turns on in the converter. The loop is stable without
// overload for |x| <= 5/8 FS. Larger inputs clip the quantizer (ovl = 1); the stored
// error is then limited to one step so that the loop recovers when the input drops.
//
// Interface: x is sampled on each rising clk edge; code and ovl for that sample are
// valid after the same edge (latency one clock). rst_n clears the error memory.
//
// From the design: second order, 3-bit quantizer, one output per clock. The
// error-feedback structure, level spacing, stable input range and error limiting
// are this implementation's choices.
module dsm2
  import dsm_drfc_pkg::*;
#(
  parameter int unsigned X_W = FILT_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [X_W-1:0] x,
  output dsm_code_t              code,
  output logic                   ovl
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned U_W  = X_W + 3;
  localparam int unsigned QSH  = X_W - 3;              // log2 of the step FS/4
  localparam logic signed [U_W-1:0] STEP = U_W'(1) <<< QSH;
  localparam logic signed [U_W-1:0] HALF_FS = U_W'(1) <<< (X_W - 1);

  logic signed [U_W-1:0] e1, e2;
  logic signed [U_W-1:0] u, idx, lvl, e_raw, e_lim;
  logic [CODE_W-1:0]     c_q;
  logic                  clip;

  always_comb begin
    u   = U_W'(x) + (e1 <<< 1) - e2;
    idx = (u + HALF_FS) >>> QSH;                        // floor((u + FS) / step)
    if (idx < 0) begin
      c_q  = '0;
      clip = 1'b1;
    end else if (idx > 7) begin
      c_q  = '1;
      clip = 1'b1;
    end else begin
      c_q  = idx[CODE_W-1:0];
      clip = 1'b0;
    end
    // level = (2c - 7) * step / 2
    lvl   = (U_W'(c_q) <<< QSH) - ((U_W'(7) <<< QSH) >>> 1);
    e_raw = u - lvl;
    if (e_raw > STEP)       e_lim = STEP;
    else if (e_raw < -STEP) e_lim = -STEP;
    else                    e_lim = e_raw;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e1   <= '0;
      e2   <= '0;
      code <= dsm_code_t'(4);
      ovl  <= 1'b0;
    end else begin
      e1   <= e_lim;
      e2   <= e1;
      code <= c_q;
      ovl  <= clip;
    end
  end
endmodule
