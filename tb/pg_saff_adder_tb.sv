// Self-checking testbench of the pipelined pass-gate/SAFF adder (12 bits, two
// 6-bit stages). Random and directed operands are applied one per clock; the sum
// and carry of each add are compared with a + b + cin computed here, exactly two
// clocks after the add was applied, which also checks the pipelining factor of 2
// and the throughput of one add per clock. Directed cases make a carry ripple
// from the lower segment into the upper one.
module pg_saff_adder_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W = 12;
  localparam int unsigned NSEG = 2;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0, seg_carries = 0;

  // Expected results, in apply order.
  logic [W:0] exp_q [$];

  pg_saff_adder #(.WIDTH(W), .SEG(6)) dut (.clk, .rst_n, .a, .b, .cin, .sum, .cout);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [W-1:0] av, logic [W-1:0] bv, logic cv);
    a   = av;
    b   = bv;
    cin = cv;
    exp_q.push_back({1'b0, av} + {1'b0, bv} + {{W{1'b0}}, cv});
    if ((({1'b0, av[5:0]} + {1'b0, bv[5:0]} + 7'(cv)) >> 6) != 0) seg_carries++;
  endtask

  initial begin
    logic [W:0] e;
    a = '0; b = '0; cin = 1'b0;
    // Reset with the clock stopped: the outputs must read 0 right away.
    #1 rst_n = 1'b0;
    #1;
    checks++;
    if (sum !== '0 || cout !== 1'b0) failures++;
    @(negedge clk);
    rst_n = 1'b1;
    // Fill the pipeline with known adds.
    for (int k = 0; k < int'(NSEG); k++) begin
      @(negedge clk);
      apply('0, '0, 1'b0);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // Output now belongs to the add applied NSEG negedges ago.
      e = exp_q.pop_front();
      checks++;
      if ({cout, sum} !== e) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: got %0d expected %0d", n, {cout, sum}, e);
      end
      case (n % 8)
        0: apply(12'hFFF, 12'h000, 1'b1);   // ripple through all 12 bits
        1: apply(12'h03F, 12'h001, 1'b0);   // carry out of the low segment only
        2: apply(12'hFC0, 12'h040, 1'b0);   // carry out of the high segment
        default: apply(W'($urandom), W'($urandom), 1'($urandom));
      endcase
    end
    if (seg_carries == 0) failures++;
    $display("segment carries exercised: %0d", seg_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
