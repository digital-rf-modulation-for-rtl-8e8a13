// Self-checking testbench of the LO divide-by-2.
//
// A 5.25 GHz LO (period 190.476 ps) is applied. While reset is held the output must
// stay low; afterwards every rising LO edge must toggle it, so its period is two LO
// periods (2.625 GHz) and its duty cycle 50 %.
module lo_div2_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF_LO = 95.238;

  logic lo = 1'b0;
  logic rst_n = 1'b0;
  logic clk_out;
  int checks = 0, failures = 0;

  lo_div2 dut (.lo, .rst_n, .clk_out);

  always #(HALF_LO) lo = ~lo;

  initial begin : watchdog
    #(HALF_LO * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    repeat (5) begin
      @(posedge lo);
      #1;
      checks++;
      if (clk_out !== 1'b0) failures++;
    end
    @(negedge lo);
    rst_n = 1'b1;
    prev = clk_out;
    for (int k = 0; k < 2000; k++) begin
      @(posedge lo);
      #1;
      checks++;
      if (clk_out == prev) failures++;
      prev = clk_out;
      @(negedge lo);
      #1;
      checks++;
      if (clk_out != prev) failures++;   // no change on the falling LO edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
