// Up-sample-by-4 low-pass interpolation filter for one baseband path (I or Q).
//
// The input word arrives once every four clocks, marked by in_stb. The filter is a
// second-order CIC interpolator with ratio 4: two comb sections run at the input
// rate, a zero-stuffer raises the rate by 4, and two integrators run at the full
// clock. Its impulse response is the triangle [1 2 3 4 3 2 1], i.e. linear
// interpolation between input samples with a DC gain of 4, and it needs no
// multipliers. All arithmetic is modulo 2^OUT_W, which the CIC structure allows as
// long as the output fits (OUT_W = IN_W + 2). The comb subtractions use the
// pipelined pass-gate/SAFF adder; its two-clock latency fits inside the four-clock
// input period.
//
// Interface: x is sampled on the rising edge where in_stb = 1; in_stb must be high
// exactly one clock in four. y carries one output sample per clock. The response to
// an input sample taken at edge t begins at the output after edge t + LATENCY.
//
// From the design: the up-by-4 block followed by a low-pass block on each path.
// The filter type (CIC, order 2) and its widths are this implementation's choice.
module interp_up4 #(
  parameter int unsigned IN_W  = 11,
  parameter int unsigned OUT_W = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_stb,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned HALF    = (OUT_W + 1) / 2;  // two SAFF stages per adder

  logic [OUT_W-1:0] x_r, x_z;      // comb 1 operands
  logic [OUT_W-1:0] d1_r, d1_z;    // comb 2 operands
  logic [OUT_W-1:0] d2_r;          // comb 2 result, input-rate impulse
  logic [OUT_W-1:0] add1_s, add2_s;
  logic             add1_c, add2_c;  // carries unused: CIC arithmetic is modulo 2^OUT_W
  logic             stb_d;
  logic [OUT_W-1:0] integ1, integ2;

  // Comb sections: d = v - v_prev = v + ~v_prev + 1.
  pg_saff_adder #(.WIDTH(OUT_W), .SEG(HALF)) u_comb1 (
    .clk, .rst_n, .a(x_r), .b(~x_z), .cin(1'b1), .sum(add1_s), .cout(add1_c)
  );
  pg_saff_adder #(.WIDTH(OUT_W), .SEG(HALF)) u_comb2 (
    .clk, .rst_n, .a(d1_r), .b(~d1_z), .cin(1'b1), .sum(add2_s), .cout(add2_c)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r   <= '0;
      x_z   <= '0;
      d1_r  <= '0;
      d1_z  <= '0;
      d2_r  <= '0;
      stb_d <= 1'b0;
    end else begin
      stb_d <= in_stb;
      if (in_stb) begin
        x_r  <= OUT_W'(x);       // sign-extended
        x_z  <= x_r;
        d1_r <= add1_s;          // settled: operands changed four clocks ago
        d1_z <= d1_r;
        d2_r <= add2_s;
      end
    end
  end

  // Zero-stuffing and the two integrators at the full rate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ1 <= '0;
      integ2 <= '0;
    end else begin
      integ1 <= integ1 + (stb_d ? d2_r : '0);
      integ2 <= integ2 + integ1;
    end
  end

  assign y = signed'(integ2);

  // The comb adders are given four clocks; the strobe must keep that period.
  logic [1:0] stb_gap;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stb_gap <= 2'd3;
    else if (in_stb) stb_gap <= '0;
    else if (stb_gap != 2'd3) stb_gap <= stb_gap + 2'd1;
  end
  always_ff @(posedge clk) begin
    if (in_stb)
      assert (stb_gap == 2'd3) else $error("interp_up4: in_stb period shorter than 4 clocks");
  end
endmodule
