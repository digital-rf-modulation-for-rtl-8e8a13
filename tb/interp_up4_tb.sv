// Self-checking testbench of the up-sample-by-4 low-pass filter.
//
// Random 11-bit samples (full range) are applied on a strobe every fourth clock.
// Every output sample is compared with the zero-stuffed input convolved with the
// triangle [1 2 3 4 3 2 1] (linear interpolation with gain 4), computed here from
// the recorded strobe times. The check also fixes the latency: the response to a
// sample taken at edge t starts at the output after edge t + LAT. A first phase
// applies a single impulse so the triangle itself is seen.
module interp_up4_tb;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned IN_W = 11;
  localparam int unsigned OUT_W = 13;
  localparam int LAT = 10;
  localparam int NS = 3000;               // input samples

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     in_stb = 1'b0;
  logic signed [IN_W-1:0]   x = '0;
  logic signed [OUT_W-1:0]  y;
  int checks = 0, failures = 0;
  int xs   [NS];
  int t_of [NS];

  interp_up4 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.clk, .rst_n, .in_stb, .x, .y);

  always #500 clk = ~clk;

  initial begin : watchdog
    repeat (4 * NS + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int h(int k);
    case (k)
      0, 6: return 1;
      1, 5: return 2;
      2, 4: return 3;
      3:    return 4;
      default: return 0;
    endcase
  endfunction

  int cyc = 0;   // index of the rising edge that just happened
  int m_in = 0;  // samples applied so far
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_stb) begin
      t_of[m_in] = cyc;
      m_in = m_in + 1;
    end
  end

  initial begin
    for (int m = 0; m < NS; m++) begin
      if (m == 5)                    xs[m] = 1000;      // isolated impulse
      else if (m < 12)               xs[m] = 0;
      else if (m % 50 == 0)          xs[m] = -1024;     // most negative code
      else if (m % 50 == 1)          xs[m] = 1023;      // full-scale step
      else                           xs[m] = int'($signed(IN_W'($urandom)));
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  // Stimulus: strobe every fourth clock, data changed on the falling edge.
  initial begin
    int ph = 0, m = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      in_stb = (ph == 0) && (m < NS);
      if (in_stb) begin
        x = IN_W'(xs[m]);
        m++;
      end
      ph = (ph + 1) % 4;
    end
  end

  // Checker: after edge n the output holds sample n - LAT of the filtered stream.
  initial begin
    @(posedge rst_n);
    forever begin
      int e;
      @(negedge clk);
      if (cyc > 0 && m_in > 8 && cyc < 4 * (NS - 4)) begin
        int n;
        n = cyc - 1;  // last edge index
        e = 0;
        for (int m = 0; m < m_in; m++) e += xs[m] * h(n - t_of[m] - LAT);
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("edge %0d: y=%0d expected %0d", n, y, e);
        end
      end
      if (cyc >= 4 * (NS - 4)) break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
