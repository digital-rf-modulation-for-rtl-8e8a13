// Self-checking testbench of the quadrature digital-RF converter model.
//
// Codes are changed just after each rising clock edge, as the digital IF mixer
// does. After the falling edge latches them, all four combinations of the two LO
// phases are applied and each path current must equal (2c-7) times the LO sign,
// with iout their sum. A code change before the next falling edge must not reach
// the output (the unit cells hold the latched bits).
module qdrfc_tb;
  import dsm_drfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic              clk = 1'b0;
  logic              lo_0 = 1'b0, lo_90 = 1'b0;
  dsm_code_t         if_i = '0, if_q = '0;
  logic signed [4:0] iout_i, iout_q, iout;
  int checks = 0, failures = 0;

  qdrfc dut (.clk, .lo_0, .lo_90, .if_i, .if_q, .iout_i, .iout_q, .iout);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(int ci, int cq);
    int ei, eq;
    ei = (2 * ci - 7) * (lo_0 ? 1 : -1);
    eq = (2 * cq - 7) * (lo_90 ? 1 : -1);
    checks++;
    if (int'(iout_i) != ei || int'(iout_q) != eq || int'(iout) != ei + eq) begin
      failures++;
      if (failures < 10) $display("codes %0d %0d lo %0b%0b: got %0d %0d %0d", ci, cq, lo_0, lo_90, iout_i, iout_q, iout);
    end
  endtask

  initial begin
    int ci, cq;
    for (int k = 0; k < 3000; k++) begin
      @(posedge clk);
      #10;
      ci = int'($urandom_range(7));
      cq = int'($urandom_range(7));
      if_i = dsm_code_t'(ci);
      if_q = dsm_code_t'(cq);
      @(negedge clk);
      #10;
      for (int l = 0; l < 4; l++) begin
        lo_0  = l[0];
        lo_90 = l[1];
        #10;
        expect_out(ci, cq);
      end
      // Change the codes before the next latch edge: output must hold.
      @(posedge clk);
      #10;
      if_i = ~if_i;
      if_q = ~if_q;
      #10;
      expect_out(ci, cq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
