// Pipelined pass-gate carry-chain adder with sense-amplifier flip-flop (SAFF) registers.
//
// The adder is cut into segments of SEG bits. Inside a segment every bit forms the
// propagate p = a ^ b and a pass-gate selects its carry: the incoming carry when
// p = 1, otherwise a (which equals b then); the sum bit is p ^ carry. At the end of
// each segment the sum bits and the carry out are captured by SAFF registers, so
// one segment is evaluated per clock and a WIDTH-bit add takes NSEG clocks. The
// upper operand segments ride along in skew registers, the finished lower sum
// segments in de-skew registers, so the outputs leave aligned.
//
// Interface: rst_n (asynchronous, active low) clears the pipeline so that no
// stale sum leaves it after reset, which matters when the clock is stopped during
// reset. a, b, cin are sampled on a rising clk edge; sum = a + b + cin (mod
// 2^WIDTH) and cout appear NSEG rising edges after the sampling edge begins, i.e.
// they are valid after edge NSEG-1 counted from the sampling edge 0. One add is
// accepted per clock.
//
// From the design: the carry rule (C = a if p = 0, C = Cin if p = 1), s = p ^ Cin,
// 6-bit segments ending in a SAFF, and a pipelining factor of 2 (12 bits in two
// stages). The SAFF is modelled as a rising-edge flip-flop; the circuit clocks it on
// the inverted clock and carries both rails of the carry, which a logic model does
// not need. The reset is this implementation's addition.
module pg_saff_adder #(
  parameter int unsigned WIDTH = 12,
  parameter int unsigned SEG   = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NSEG = (WIDTH + SEG - 1) / SEG;

  // Stage k inputs come from stage k-1 registers (stage 0 from the ports).
  logic [WIDTH-1:0] a_st [NSEG+1];
  logic [WIDTH-1:0] b_st [NSEG+1];
  logic [WIDTH-1:0] s_st [NSEG+1];
  logic             c_st [NSEG+1];

  assign a_st[0] = a;
  assign b_st[0] = b;
  assign s_st[0] = '0;
  assign c_st[0] = cin;

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    localparam int unsigned LO = k * SEG;
    localparam int unsigned HI = ((k + 1) * SEG > WIDTH) ? WIDTH : (k + 1) * SEG;

    logic [WIDTH-1:0] s_next;
    logic             c_out;

    // Pass-gate carry chain of one segment.
    always_comb begin
      logic c;
      logic p;
      s_next = s_st[k];
      c      = c_st[k];
      for (int unsigned i = LO; i < HI; i++) begin
        p         = a_st[k][i] ^ b_st[k][i];
        s_next[i] = p ^ c;
        c         = p ? c : a_st[k][i];
      end
      c_out = c;
    end

    // SAFF stage registers (sum, carry) plus operand skew registers.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        s_st[k+1] <= '0;
        c_st[k+1] <= 1'b0;
        a_st[k+1] <= '0;
        b_st[k+1] <= '0;
      end else begin
        s_st[k+1] <= s_next;
        c_st[k+1] <= c_out;
        a_st[k+1] <= a_st[k];
        b_st[k+1] <= b_st[k];
      end
    end
  end

  assign sum  = s_st[NSEG];
  assign cout = c_st[NSEG];
endmodule
