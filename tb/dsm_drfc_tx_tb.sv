// End-to-end testbench of the delta-sigma digital-RF transmitter at its default
// size (11-bit I/Q, 5.25 GHz LO, 2.625 GHz converter clock).
//
// The LO is the only clock applied; the converter clock comes from the divide-by-2.
// I/Q samples are handed over on each in_stb. The test runs four phases:
//   1. a complex 12 MHz tone of amplitude 600 (single-tone measurement case),
//   2. a DC input, whose mean output level must equal 4x the input,
//   3. an input beyond the modulator's range, which must clip both quantizers,
//   4. a DC input again, to show that the modulators recover.
// Checks:
//  * if_i/if_q and if_phase every clock against a reference of the whole digital
//    chain written here (linear interpolation by 4, real-valued second-order
//    error-feedback quantizer, rotation by exp(j pi n/2));
//  * the DC mean of the de-rotated codes in phases 2 and 4;
//  * the converter currents against the LO polarity and the latched codes;
//  * the converter clock period (two LO periods), the input strobe period (four
//    converter clocks) and that each mechanism occurred
//    at least once: input strobes, carries between the two SAFF stages of a comb
//    adder, clipping, all four mixer phases, and all four LO states.
module dsm_drfc_tx_tb;
  import dsm_drfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF_LO = 95.238;     // 5.25 GHz
  localparam int      LAT     = 10;         // interpolator latency, clocks
  localparam int      N_TONE  = 2048;       // input samples per phase
  localparam int      N_DC    = 1024;
  localparam int      N_OVL   = 64;
  localparam int      NS      = N_TONE + N_DC + N_OVL + N_DC;
  localparam real     STEP    = 1024.0;

  logic                   lo = 1'b0;
  logic                   rst_n = 1'b1;
  logic signed [IN_W-1:0] i_in = '0, q_in = '0;
  logic                   dig_clk, in_stb, lo_0, lo_90, ovl_i, ovl_q;
  dsm_code_t              if_i, if_q;
  logic [1:0]             if_phase;
  logic signed [4:0]      iout_i, iout_q, iout;

  dsm_drfc_tx dut (.*);

  always #(HALF_LO) lo = ~lo;

  int checks = 0, failures = 0;
  int n_stb = 0, n_seg_carry = 0, n_clip_i = 0, n_clip_q = 0, n_lo_pol = 0;
  int seen_phase [4] = '{0, 0, 0, 0};
  int seen_lo [4] = '{0, 0, 0, 0};

  initial begin : watchdog
    #(HALF_LO * 2.0 * 2.0 * 4.0 * (NS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  int xi [NS];
  int xq [NS];
  initial begin
    for (int m = 0; m < NS; m++) begin
      if (m < N_TONE) begin
        real ph;
        ph = 2.0 * 3.14159265358979 * 12.0e6 / 656.25e6 * m;
        xi[m] = $rtoi($floor(600.0 * $cos(ph) + 0.5));
        xq[m] = $rtoi($floor(600.0 * $sin(ph) + 0.5));
      end else if (m < N_TONE + N_DC) begin
        xi[m] = 300;  xq[m] = -450;
      end else if (m < N_TONE + N_DC + N_OVL) begin
        xi[m] = 1023; xq[m] = -1024;
      end else begin
        xi[m] = -200; xq[m] = 500;
      end
    end
  end

  // ---------------- reference of the digital chain ----------------
  real re1 [2] = '{0.0, 0.0};
  real re2 [2] = '{0.0, 0.0};
  function automatic int ref_dsm(int p, real xv);
    real u, e;
    int c;
    u = xv + 2.0 * re1[p] - re2[p];
    c = int'($floor(u / STEP)) + 4;
    if (c < 0) c = 0;
    if (c > 7) c = 7;
    e = u - (2.0 * c - 7.0) * STEP / 2.0;
    if (e > STEP) e = STEP;
    if (e < -STEP) e = -STEP;
    re2[p] = re1[p];
    re1[p] = e;
    return c;
  endfunction

  function automatic int h(int k);
    case (k)
      0, 6: return 1;
      1, 5: return 2;
      2, 4: return 3;
      3:    return 4;
      default: return 0;
    endcase
  endfunction

  // Filter output after edge n (value that the modulator samples at edge n+1).
  function automatic int filt(int p, int n);
    int acc, m0;
    acc = 0;
    m0 = (n - LAT - 6) / 4 - 1;
    if (m0 < 0) m0 = 0;
    for (int m = m0; m < NS && 4 * m <= n - LAT; m++)
      acc += (p == 0 ? xi[m] : xq[m]) * h(n - 4 * m - LAT);
    return acc;
  endfunction

  function automatic int lvl(int c);
    return 2 * c - 7;
  endfunction

  // Rotation by phase n on levels: returns level pair.
  function automatic void rot(int li, int lq, int n, output int oi, output int oq);
    case (n)
      0: begin oi =  li; oq =  lq; end
      1: begin oi = -lq; oq =  li; end
      2: begin oi = -li; oq = -lq; end
      default: begin oi = lq; oq = -li; end
    endcase
  endfunction

  // ---------------- drive, check ----------------
  int edge_n = -1;
  int m_next = 0;
  int last_stb_edge = -1;
  int code_prev_i = 4, code_prev_q = 4;
  real acc_i, acc_q;
  int  acc_n;

  always @(posedge dig_clk) if (rst_n) edge_n <= edge_n + 1;

  // Converter clock period: two LO periods.
  initial begin
    realtime t1, t2;
    @(posedge rst_n);
    repeat (4) @(posedge dig_clk);
    t1 = $realtime;
    @(posedge dig_clk);
    t2 = $realtime;
    checks++;
    if (t2 - t1 > 4.0 * HALF_LO + 0.01 || t2 - t1 < 4.0 * HALF_LO - 0.01) begin
      failures++;
      $display("converter clock period %f ps", t2 - t1);
    end
  end

  initial begin
    int fi, fq, ci, cq, ei, eq, oi, oq;
    i_in = IN_W'(xi[0]);
    q_in = IN_W'(xq[0]);
    m_next = 0;
    #1 rst_n = 1'b0;      // asynchronous reset pulse
    repeat (10) @(posedge lo);
    @(negedge lo);
    rst_n = 1'b1;
    forever begin
      @(negedge dig_clk);
      // ---- outputs after edge edge_n ----
      if (edge_n >= 0) begin
        // Reference: modulator samples filt(n-1) at edge n; mixer rotates the
        // modulator code of edge n-1 with phase n mod 4.
        fi = (edge_n >= 1) ? filt(0, edge_n - 1) : 0;
        fq = (edge_n >= 1) ? filt(1, edge_n - 1) : 0;
        ci = ref_dsm(0, real'(fi));
        cq = ref_dsm(1, real'(fq));
        rot(lvl(code_prev_i), lvl(code_prev_q), edge_n % 4, ei, eq);
        checks++;
        if (code_level(if_i) != ei || code_level(if_q) != eq || int'(if_phase) != edge_n % 4) begin
          failures++;
          if (failures < 10)
            $display("edge %0d: if (%0d,%0d) phase %0d, expected (%0d,%0d) phase %0d",
                     edge_n, code_level(if_i), code_level(if_q), if_phase, ei, eq, edge_n % 4);
        end
        seen_phase[if_phase]++;
        code_prev_i = ci;
        code_prev_q = cq;
        if (ovl_i) n_clip_i++;
        if (ovl_q) n_clip_q++;
        if (dut.u_interp_i.u_comb1.c_st[1] || dut.u_interp_q.u_comb1.c_st[1] ||
            dut.u_interp_i.u_comb2.c_st[1] || dut.u_interp_q.u_comb2.c_st[1]) n_seg_carry++;

        // De-rotate to modulator levels and average during the DC phases.
        rot(code_level(if_i), code_level(if_q), (4 - int'(if_phase)) % 4, oi, oq);
        if ((edge_n >= 4 * (N_TONE + 64) && edge_n < 4 * (N_TONE + N_DC)) ||
            (edge_n >= 4 * (NS - N_DC + 64) && edge_n < 4 * NS)) begin
          acc_i += oi * STEP / 2.0;
          acc_q += oq * STEP / 2.0;
          acc_n++;
        end
        if (edge_n == 4 * (N_TONE + N_DC) || edge_n == 4 * NS) begin
          int xr_i, xr_q;
          xr_i = (edge_n == 4 * NS) ? xi[NS - 1] : xi[N_TONE];
          xr_q = (edge_n == 4 * NS) ? xq[NS - 1] : xq[N_TONE];
          checks++;
          if (acc_i / acc_n - 4.0 * xr_i > 2.0 || 4.0 * xr_i - acc_i / acc_n > 2.0 ||
              acc_q / acc_n - 4.0 * xr_q > 2.0 || 4.0 * xr_q - acc_q / acc_n > 2.0) begin
            failures++;
            $display("DC mean (%f,%f), expected (%0d,%0d)", acc_i / acc_n, acc_q / acc_n, 4 * xr_i, 4 * xr_q);
          end
          acc_i = 0.0; acc_q = 0.0; acc_n = 0;
        end
      end
      // ---- converter currents: codes were latched on this falling edge ----
      // Sample points 10, 70, 105 and 150 ps after the latch edge cover all four
      // LO states; the codes next change 190 ps after it.
      for (int s = 0; s < 4; s++) begin
        case (s)
          0: #10.0;
          1: #60.0;
          2: #35.0;
          default: #45.0;
        endcase
        checks++;
        if (int'(iout_i) != code_level(if_i) * (lo_0 ? 1 : -1) ||
            int'(iout_q) != code_level(if_q) * (lo_90 ? 1 : -1) ||
            int'(iout) != int'(iout_i) + int'(iout_q)) begin
          failures++;
          if (failures < 10) $display("iout mismatch at edge %0d", edge_n);
        end
        seen_lo[{lo_90, lo_0}]++;
      end
      // ---- next input sample, for the strobe of the coming edge ----
      if (in_stb) begin
        // The sample is taken at edge edge_n + 1; strobes must be 4 clocks apart.
        if (last_stb_edge >= 0) begin
          checks++;
          if (edge_n + 1 - last_stb_edge != 4) begin
            failures++;
            $display("in_stb spacing %0d clocks", edge_n + 1 - last_stb_edge);
          end
        end
        last_stb_edge = edge_n + 1;
        n_stb++;
        m_next++;
        if (m_next < NS) begin
          i_in = IN_W'(xi[m_next]);
          q_in = IN_W'(xq[m_next]);
        end
      end
      if (edge_n >= 4 * NS) break;
    end

    $display("strobes %0d, SAFF stage carries %0d, clips I %0d Q %0d, phases %0d/%0d/%0d/%0d, LO states %0d/%0d/%0d/%0d",
             n_stb, n_seg_carry, n_clip_i, n_clip_q, seen_phase[0], seen_phase[1], seen_phase[2], seen_phase[3],
             seen_lo[0], seen_lo[1], seen_lo[2], seen_lo[3]);
    checks++; if (n_stb < NS) failures++;
    checks++; if (n_seg_carry == 0) failures++;
    checks++; if (n_clip_i == 0 || n_clip_q == 0) failures++;
    for (int p = 0; p < 4; p++) begin
      checks++; if (seen_phase[p] == 0) failures++;
      checks++; if (seen_lo[p] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
