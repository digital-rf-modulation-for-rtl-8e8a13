// Workload testbench of the delta-sigma digital-RF transmitter at its default size.
//
// Two signals of the target application run through the whole top, driven by a
// 5.25 GHz LO (converter clock 2.625 GHz, input rate 656.25 MS/s):
//  A. a complex 12 MHz single tone of amplitude 600 (of 1024). The de-rotated
//     modulator output is analysed over 1 us (2625 clocks, so 12 MHz is exactly
//     bin 12). SNDR = tone power / power of all other bins within +-100 MHz; it must
//     reach 45 dB, the design's SNR target for 256-QAM OFDM at 15 dB PAPR.
//  B. four OFDM symbols of 160 sub-carriers (+-1..+-80 MHz, 1 MHz spacing) carrying
//     random 256-QAM symbols, with a 375-clock cyclic prefix. Two error vector
//     magnitudes are measured per symbol:
//       - modulator EVM: received bins against the same bins of the ideal
//         (unquantized) interpolator output, i.e. the in-band delta-sigma noise; it
//         must reach 45 dB;
//       - end-to-end EVM: received bins against the transmitted QAM points, which
//         also counts the droop of the linear interpolator; it must reach 30 dB.
// The delta-sigma noise far outside the band is 40 dB above the in-band noise, and a
// rectangular 1 us window would leak it into the measured bins. As the LC filter
// does on chip, a receive filter (three cascaded 8-clock moving averages, nulls at
// multiples of 328 MHz) is applied to the levels and, identically, to the ideal
// signal before the SNDR and the modulator EVM are measured.
// The ideal interpolator output is computed here from the input samples with the
// triangle [1 2 3 4 3 2 1]; the de-rotation uses exp(-j pi n/2) with the mixer phase
// reported by the top.
module tx_workloads_tb;
  import dsm_drfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime HALF_LO = 95.238;
  localparam int  LAT    = 10;          // interpolator latency
  localparam int  DLY    = 15;          // input-to-level delay: LAT + 3 (triangle centre) + 2
  localparam int  NFFT   = 2625;        // 1 us at 2.625 GHz
  localparam int  SYM    = 3000;        // OFDM symbol incl. cyclic prefix, clocks
  localparam int  CP     = SYM - NFFT;
  localparam int  NSYM   = 4;
  localparam int  T_EDGES = 6000;       // tone phase length, clocks
  localparam int  NE     = T_EDGES + NSYM * SYM + 200;
  localparam int  NS     = NE / 4 + 8;  // input samples
  localparam int  NSC    = 80;          // sub-carriers per side
  localparam real AMP    = 1.12;        // OFDM scale: ~130 rms per component
  localparam real PI     = 3.14159265358979;

  logic                   lo = 1'b0;
  logic                   rst_n = 1'b1;
  logic signed [IN_W-1:0] i_in = '0, q_in = '0;
  logic                   dig_clk, in_stb, lo_0, lo_90, ovl_i, ovl_q;
  dsm_code_t              if_i, if_q;
  logic [1:0]             if_phase;
  logic signed [4:0]      iout_i, iout_q, iout;

  dsm_drfc_tx dut (.*);

  always #(HALF_LO) lo = ~lo;

  int checks = 0, failures = 0, n_clip = 0;

  initial begin : watchdog
    #(HALF_LO * 4.0 * (NE + 400));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  real xi [NS];
  real xq [NS];
  int  qi [NSYM][-NSC:NSC];
  int  qq [NSYM][-NSC:NSC];
  real cw [NFFT];
  real sw [NFFT];

  initial begin
    for (int j = 0; j < NFFT; j++) begin
      cw[j] = $cos(2.0 * PI * j / NFFT);
      sw[j] = $sin(2.0 * PI * j / NFFT);
    end
    for (int s = 0; s < NSYM; s++)
      for (int k = -NSC; k <= NSC; k++) begin
        qi[s][k] = (k == 0) ? 0 : 2 * int'($urandom_range(15)) - 15;
        qq[s][k] = (k == 0) ? 0 : 2 * int'($urandom_range(15)) - 15;
      end
    for (int m = 0; m < NS; m++) begin
      int t;
      t = 4 * m;                                  // clock index of the sample
      if (t < T_EDGES) begin
        xi[m] = 600.0 * cw[(12 * t) % NFFT];
        xq[m] = 600.0 * sw[(12 * t) % NFFT];
      end else begin
        int s, u;
        s = (t - T_EDGES) / SYM;
        if (s >= NSYM) s = NSYM - 1;
        u = t - T_EDGES - s * SYM - CP;           // negative inside the prefix
        u = ((u % NFFT) + NFFT) % NFFT;
        xi[m] = 0.0;
        xq[m] = 0.0;
        for (int k = -NSC; k <= NSC; k++) begin
          int j;
          j = (((k * u) % NFFT) + NFFT) % NFFT;
          xi[m] += AMP * (qi[s][k] * cw[j] - qq[s][k] * sw[j]);
          xq[m] += AMP * (qi[s][k] * sw[j] + qq[s][k] * cw[j]);
        end
      end
    end
  end

  function automatic int to_in(real v);
    int r;
    r = $rtoi($floor(v + 0.5));
    if (r > 1023) r = 1023;
    if (r < -1024) r = -1024;
    return r;
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

  // Ideal interpolator output after edge n, path p.
  function automatic int filt(int p, int n);
    int acc;
    acc = 0;
    for (int m = (n - LAT - 6) / 4 - 1; 4 * m <= n - LAT; m++)
      if (m >= 0) acc += to_in(p == 0 ? xi[m] : xq[m]) * h(n - 4 * m - LAT);
    return acc;
  endfunction

  // ---------------- capture of the de-rotated levels ----------------
  real li [NE];    // de-rotated level after edge n (units of the 13-bit scale)
  real lq [NE];
  int  edge_n = -1;
  always @(posedge dig_clk) if (rst_n) edge_n <= edge_n + 1;

  initial begin
    int m_next;
    i_in = IN_W'(0);
    q_in = IN_W'(0);
    #1 rst_n = 1'b0;
    repeat (10) @(posedge lo);
    @(negedge lo);
    i_in = IN_W'(to_in(xi[0]));
    q_in = IN_W'(to_in(xq[0]));
    rst_n = 1'b1;
    m_next = 0;
    forever begin
      int a, b, ph;
      @(negedge dig_clk);
      if (edge_n >= 0 && edge_n < NE) begin
        a  = code_level(if_i);
        b  = code_level(if_q);
        ph = int'(if_phase);
        // multiply by exp(-j pi ph/2)
        case (ph)
          0: begin li[edge_n] =  a; lq[edge_n] =  b; end
          1: begin li[edge_n] =  b; lq[edge_n] = -a; end
          2: begin li[edge_n] = -a; lq[edge_n] = -b; end
          default: begin li[edge_n] = -b; lq[edge_n] = a; end
        endcase
        li[edge_n] *= 512.0;
        lq[edge_n] *= 512.0;
        if (ovl_i || ovl_q) n_clip++;
      end
      if (in_stb) begin
        m_next++;
        if (m_next < NS) begin
          i_in = IN_W'(to_in(xi[m_next]));
          q_in = IN_W'(to_in(xq[m_next]));
        end
      end
      if (edge_n >= NE - 1) break;
    end
    analyse();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receive-filtered levels (src 2) and ideal output (src 3).
  real fli [NE];
  real flq [NE];
  real fri [NE];
  real frq [NE];
  task automatic rx_filter();
    real taps [22];
    real ri [NE];
    real rq [NE];
    for (int j = 0; j < 22; j++) taps[j] = 0.0;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++)
        for (int c = 0; c < 8; c++) taps[a + b + c] += 1.0 / 512.0;
    for (int n = 0; n < NE; n++) begin
      ri[n] = (n >= 2) ? real'(filt(0, n - 2)) : 0.0;
      rq[n] = (n >= 2) ? real'(filt(1, n - 2)) : 0.0;
    end
    for (int n = 0; n < NE; n++) begin
      fli[n] = 0.0; flq[n] = 0.0; fri[n] = 0.0; frq[n] = 0.0;
      for (int j = 0; j < 22 && j <= n; j++) begin
        fli[n] += taps[j] * li[n - j];
        flq[n] += taps[j] * lq[n - j];
        fri[n] += taps[j] * ri[n - j];
        frq[n] += taps[j] * rq[n - j];
      end
    end
  endtask

  // DFT bin k of a window of NFFT clocks starting at edge n0, of the levels
  // (src = 0), the ideal interpolator output delayed by 2 (src = 1), or the
  // receive-filtered levels (src = 2) and ideal output (src = 3).
  task automatic bin(int src, int n0, int k, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int j = 0; j < NFFT; j++) begin
      real a, b;
      int  w;
      case (src)
        0: begin a = li[n0 + j];  b = lq[n0 + j];  end
        1: begin a = real'(filt(0, n0 + j - 2)); b = real'(filt(1, n0 + j - 2)); end
        2: begin a = fli[n0 + j]; b = flq[n0 + j]; end
        default: begin a = fri[n0 + j]; b = frq[n0 + j]; end
      endcase
      w = (((-k * j) % NFFT) + NFFT) % NFFT;
      re += a * cw[w] - b * sw[w];
      im += a * sw[w] + b * cw[w];
    end
  endtask

  task automatic analyse();
    real re, im, ps, pn, rr, ri, e_mod, e_e2e, p_ref, p_qam, g, sndr, evm_mod, evm_e2e;
    rx_filter();
    // A: single tone, window aligned to a whole tone period.
    ps = 0.0;
    pn = 0.0;
    for (int k = -100; k <= 100; k++) begin
      bin(2, 3000, k, re, im);
      if (k == 12) ps = re * re + im * im;
      else         pn += re * re + im * im;
    end
    sndr = 10.0 * $log10(ps / pn);
    $display("single tone 12 MHz: in-band SNDR %0.1f dB", sndr);
    checks++;
    if (sndr < 45.0) failures++;
    // B: OFDM symbols.
    g = 4.0 * AMP * NFFT;   // interpolator gain 4, DFT gain NFFT
    for (int s = 0; s < NSYM; s++) begin
      int n0;
      n0 = T_EDGES + s * SYM + CP + DLY;
      e_mod = 0.0; e_e2e = 0.0; p_ref = 0.0; p_qam = 0.0;
      for (int k = -NSC; k <= NSC; k++) begin
        if (k == 0) continue;
        bin(2, n0, k, re, im);
        bin(3, n0, k, rr, ri);
        e_mod += (re - rr) * (re - rr) + (im - ri) * (im - ri);
        p_ref += rr * rr + ri * ri;
        bin(0, n0, k, re, im);
        e_e2e += (re / g - qi[s][k]) * (re / g - qi[s][k]) + (im / g - qq[s][k]) * (im / g - qq[s][k]);
        p_qam += real'(qi[s][k] * qi[s][k] + qq[s][k] * qq[s][k]);
      end
      evm_mod = -10.0 * $log10(e_mod / p_ref);
      evm_e2e = -10.0 * $log10(e_e2e / p_qam);
      $display("OFDM symbol %0d: modulator EVM -%0.1f dB, end-to-end EVM -%0.1f dB", s, evm_mod, evm_e2e);
      checks++;
      if (evm_mod < 45.0) failures++;
      checks++;
      if (evm_e2e < 30.0) failures++;
    end
    $display("quantizer clip clocks: %0d", n_clip);
  endtask
endmodule
