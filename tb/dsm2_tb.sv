// Self-checking testbench of the second-order 3-bit delta-sigma modulator
// (13-bit input, full scale 4096, quantizer step 1024, levels (2c-7)*512).
//
// Three kinds of checks:
//  * every output code is compared with a reference loop written here with real
//    arithmetic (nearest odd level, error memory limited to one step), one clock
//    after the input was applied;
//  * for DC inputs across the stable range, the mean output level over 2048 clocks
//    must equal the input to within 4 steps / 2048 (the bound of a second-order
//    noise-shaping loop);
//  * an input beyond full scale must raise ovl, and afterwards the mean must again
//    track an in-range input (the loop recovers).
module dsm2_tb;
  import dsm_drfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int XW = 13;
  localparam real STEP = 1024.0;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic signed [XW-1:0] x = '0;
  dsm_code_t            code;
  logic                 ovl;
  int checks = 0, failures = 0, n_ovl = 0;
  real e1 = 0.0, e2 = 0.0;

  dsm2 #(.X_W(XW)) dut (.clk, .rst_n, .x, .code, .ovl);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: one modulator step, returns the expected code.
  function automatic int ref_step(real xv, output bit clip);
    real u, lvl, e;
    int  c;
    u = xv + 2.0 * e1 - e2;
    c = int'($floor(u / STEP)) + 4;
    clip = (c < 0) || (c > 7);
    if (c < 0) c = 0;
    if (c > 7) c = 7;
    lvl = (2.0 * c - 7.0) * STEP / 2.0;
    e = u - lvl;
    if (e > STEP) e = STEP;
    if (e < -STEP) e = -STEP;
    e2 = e1;
    e1 = e;
    return c;
  endfunction

  // One clock per call: at the falling edge, check the outputs of the previous
  // input (sampled by the rising edge just passed), then apply the next input.
  int  pend_c = -1;
  bit  pend_clip;
  task automatic step(int xv, output real lvl);
    @(negedge clk);
    if (pend_c >= 0) begin
      checks++;
      if (int'(code) != pend_c || ovl != pend_clip) begin
        failures++;
        if (failures < 10) $display("code %0d ovl %0b, expected %0d %0b", code, ovl, pend_c, pend_clip);
      end
      if (ovl) n_ovl++;
    end
    lvl = real'(code_level(code)) * STEP / 2.0;
    x = XW'(xv);
    pend_c = ref_step(real'(xv), pend_clip);
  endtask

  task automatic dc_mean(int xv, int n);
    real acc, lvl, mean;
    acc = 0.0;
    for (int k = 0; k < 32; k++) step(xv, lvl);   // settle
    for (int k = 0; k < n; k++) begin
      step(xv, lvl);
      acc += lvl;
    end
    mean = acc / n;
    checks++;
    if (mean - xv > 4.0 * STEP / n || xv - mean > 4.0 * STEP / n) begin
      failures++;
      $display("DC %0d: mean %f", xv, mean);
    end
  endtask

  initial begin
    real lvl;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    pend_c = ref_step(0.0, pend_clip);   // the input x = 0 held at release
    // Random in-range input, reference compared every clock.
    for (int k = 0; k < 3000; k++) step($urandom_range(5120) - 2560, lvl);
    // DC accuracy across the stable range.
    for (int v = -2560; v <= 2560; v += 640) dc_mean(v + 37, 2048);
    // Overload and recovery.
    for (int k = 0; k < 50; k++) step(4000, lvl);
    for (int k = 0; k < 50; k++) step(-4096, lvl);
    dc_mean(1234, 2048);
    checks++;
    if (n_ovl == 0) begin
      failures++;
      $display("overload never seen");
    end
    $display("overload clocks: %0d", n_ovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
