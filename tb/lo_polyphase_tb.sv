// Self-checking testbench of the LO polyphase model.
//
// A 5.25 GHz square-wave LO is applied. Every edge of lo_0 must coincide with the
// LO edge, and the same edge must reach lo_90 a quarter period (47.619 ps, i.e. 90
// degrees) later, within the 1 fs resolution.
module lo_polyphase_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF_LO = 95.238;
  localparam realtime QUARTER = 47.619;

  logic lo = 1'b0;
  logic lo_0, lo_90;
  int checks = 0, failures = 0;

  lo_polyphase dut (.lo, .lo_0, .lo_90);

  always #(HALF_LO) lo = ~lo;

  initial begin : watchdog
    #(HALF_LO * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t90;
    logic v;
    repeat (4) @(posedge lo);
    for (int k = 0; k < 2000; k++) begin
      @(lo);
      t0 = $realtime;
      v = lo;
      checks++;
      if (lo_0 !== v) failures++;
      @(lo_90);
      t90 = $realtime;
      checks++;
      if (lo_90 !== v || t90 - t0 > QUARTER + 0.002 || t90 - t0 < QUARTER - 0.002) begin
        failures++;
        if (failures < 10) $display("lag %f ps", t90 - t0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
