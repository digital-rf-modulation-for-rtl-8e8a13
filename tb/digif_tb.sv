// Self-checking testbench of the fCLK/4 digital IF mixer.
//
// Random I and Q codes are applied every clock. For each, the expected analog
// levels of IF_I and IF_Q are computed here with real cos(pi n/2) and sin(pi n/2)
// from the levels 2c-7 of the inputs and compared with the levels of the output
// codes one clock later; the phase n must count 0,1,2,3 from reset. All four
// phases are required to occur.
module digif_tb;
  import dsm_drfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  dsm_code_t  ci = '0, cq = '0, if_i, if_q;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  digif dut (.clk, .rst_n, .ci, .cq, .if_i, .if_q, .phase);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_exp;
    real li, lq, ei, eq, ang;
    dsm_code_t pi_c, pq_c;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    n_exp = 0;
    pi_c = ci;
    pq_c = cq;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      // Outputs now hold the rotation of (pi_c, pq_c) by phase n_exp.
      li  = real'(code_level(pi_c));
      lq  = real'(code_level(pq_c));
      ang = 3.14159265358979 * n_exp / 2.0;
      ei  = li * $cos(ang) - lq * $sin(ang);
      eq  = li * $sin(ang) + lq * $cos(ang);
      checks++;
      if (int'(phase) != n_exp ||
          $rtoi($floor(ei + 0.5)) != code_level(if_i) ||
          $rtoi($floor(eq + 0.5)) != code_level(if_q)) begin
        failures++;
        if (failures < 10)
          $display("n=%0d in (%0d,%0d): got (%0d,%0d) phase %0d, expected (%f,%f)",
                   n_exp, li, lq, code_level(if_i), code_level(if_q), phase, ei, eq);
      end
      seen[phase]++;
      n_exp = (n_exp + 1) % 4;
      ci = dsm_code_t'($urandom);
      cq = dsm_code_t'($urandom);
      pi_c = ci;
      pq_c = cq;
    end
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (seen[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
