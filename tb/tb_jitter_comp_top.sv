// tb_jitter_comp_top: end-to-end run of both system variants with jittery
// clocks generated in picoseconds (Gaussian-like jitter of 3 ps rms from a
// sum of 12 uniform numbers), a 16-bit ADC model sampling a 0.9 full-scale
// sine at the jittered instants, an exact one-period delay for clk_d, and the
// stochastic TDCs with their comparators.
//
// Bit-exact checks, every clock and for both variants:
//   * the TDC code against the jitter that was applied (absolute jitter for
//     variant 1, cycle jitter eps[k] - eps[k-1] for variant 2);
//   * the corrected word D_c[k] against D_i[k] + (eps_hat[k] / eps_u) D_u[k],
//     computed from the ADC words and the design's own eps_hat[k].
// Mechanisms counted, each a failure if it never happens: table updates and
// nonzero table outputs (both variants), D'_i interpolation with a nonzero
// table value, lossy accumulation (eps_hat different from tau_hat) and
// samples actually changed by the correction (both variants).
//
// Learning checks: N is reduced to 32 and a to 2^-7 so that the tables train
// within the run. The SRF's truncation error is a tone-dependent term that
// only very long averaging removes; the test tone f_i/f_s = 0.2691 is one at
// which the 65-tap SRF built from the 18-bit ROM reconstructs a sine almost
// exactly. Required: both tables rise with the code (count-weighted slope of
// T(m) against the bin centre m - 63.5 ps between 0.3 and 1.5) and variant 1
// lowers the error power of the samples against the ideal sine by at least
// 1 dB over the second half of the run. Variant 2's error power is reported
// only: its accumulator multiplies the remaining table error by about
// 1 / (1 - b^2), so its gain needs far more training than this run gives.
`timescale 1ps/1fs
module tb_jitter_comp_top;
  import tb_ref_pkg::*;
  localparam int  N       = 32;
  localparam int  A_SHIFT = 7;
  localparam int  M       = 7;
  localparam int  L       = 127;
  localparam int  NC      = 150000;
  localparam real TS      = 10000.0;
  localparam real JRMS    = 3.0;
  localparam real OMEGA   = 2.0 * 0.2691 * 3.14159265358979;
  localparam real AMP     = 0.9 * 32767.0;

  logic rst_n = 0;
  logic clk = 0, clk_d = 0, clk_e = 0, clk_i = 0;
  logic s1_di_valid = 0, s2_di_valid = 0;
  logic signed [15:0] s1_di = 0, s2_di = 0;
  logic [6:0] s1_dt, s2_dt;
  logic signed [22:0] s1_eps_hat, s2_eps_hat;
  logic s1_dc_valid, s2_dc_valid;
  logic signed [15:0] s1_dc, s2_dc;

  jitter_comp_top #(.N(N), .A_SHIFT(A_SHIFT)) dut (.*);

  real    J1[NC + 4], J2[NC + 4];
  longint D1[NC + 4], D2[NC + 4], EH1[NC + 4], EH2[NC + 4];
  int checks = 0, failures = 0;
  int n_upd1 = 0, n_upd2 = 0, n_t1 = 0, n_t2 = 0, n_subst = 0, n_leak = 0, n_corr1 = 0, n_corr2 = 0;
  real pe_i1 = 0, pe_c1 = 0, pe_i2 = 0, pe_c2 = 0;
  int  npow = 0;

  initial begin
    #(real'(NC + 200) * TS);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  function automatic int code(real td);
    int c;
    c = 63 + int'($ceil(td));
    return (c < 0) ? 0 : (c > L) ? L : c;
  endfunction

  // clock and ADC stimulus; edge k of clk/clk_i at k T_s + jitter
  initial begin
    foreach (J1[i]) begin
      J1[i] = JRMS * gauss();
      J2[i] = JRMS * gauss();
      D1[i] = longint'($floor(AMP * $sin(OMEGA * (real'(i) + J1[i] / TS)) + 0.5));
      D2[i] = longint'($floor(AMP * $sin(OMEGA * (real'(i) + J2[i] / TS)) + 0.5));
    end
  end

  initial begin : g_clk
    #(TS + J2[1]);
    for (int k = 1; k < NC + 2; k++) begin
      clk = 1;
      #(TS / 2.0);
      clk = 0;
      #(real'(k + 1) * TS + J2[k + 1] - $realtime);
    end
  end
  initial begin : g_clk_d
    #(2.0 * TS + J2[1]);
    for (int k = 1; k < NC + 2; k++) begin
      clk_d = 1;
      #(TS / 2.0);
      clk_d = 0;
      #(real'(k + 2) * TS + J2[k + 1] - $realtime);
    end
  end
  initial begin : g_clk_e
    #(TS);
    for (int k = 1; k < NC + 2; k++) begin
      clk_e = 1;
      #(TS / 2.0);
      clk_e = 0;
      #(TS / 2.0);
    end
  end
  initial begin : g_clk_i
    #(TS + J1[1]);
    for (int k = 1; k < NC + 2; k++) begin
      clk_i = 1;
      #(TS / 2.0);
      clk_i = 0;
      #(real'(k + 1) * TS + J1[k + 1] - $realtime);
    end
  end

  // ADC words: sample k is presented 1 ns after its edge
  int k2 = 0, k1 = 0;
  always @(posedge clk) begin
    k2++;
    #1000;
    s2_di = 16'(D2[k2]);
    s2_di_valid = rst_n;
  end
  always @(posedge clk_i) begin
    k1++;
    #1000;
    s1_di = 16'(D1[k1]);
    s1_di_valid = rst_n;
  end

  initial begin
    #(4.0 * TS + 3000.0);
    rst_n = 1;
  end

  function automatic longint du_at(bit v2, int k);
    longint d[];
    d = new[2 * M + 1];
    for (int j = 0; j <= 2 * M; j++) d[j] = v2 ? D2[k + M - j] : D1[k + M - j];
    return du_ref(M, d);
  endfunction

  // A t_d within the simulator's time step of a comparator offset can round
  // either way; such edges are not checked.
  int n_edge_skip = 0;
  function automatic bit near_step(real td);
    real r;
    r = td - $floor(td + 0.5);
    return (r < 0.01) && (r > -0.01);
  endfunction

  int first_valid2 = -1, first_valid1 = -1;

  // variant 2 checks, 2 ns after edge e (k2 = e)
  always @(posedge clk) begin
    #2000;
    if (rst_n && k2 > 6 && k2 < NC) begin
      int e;
      e = k2;
      if (near_step(J2[e - 1] - J2[e - 2])) n_edge_skip++;
      else checks++;
      if (!near_step(J2[e - 1] - J2[e - 2]) && int'(s2_dt) != code(J2[e - 1] - J2[e - 2])) begin
        failures++;
        $display("v2 edge %0d: code %0d expected %0d", e, s2_dt, code(J2[e - 1] - J2[e - 2]));
      end
      EH2[e - 3] = longint'(s2_eps_hat);
      if (s2_dc_valid) begin
        int k;
        longint ex;
        k = e - M - 3;
        if (first_valid2 < 0) first_valid2 = k;
        if (k >= first_valid2 + 2 * M) begin
          ex = dc_ref(D2[k], du_at(1, k), EH2[k]);
          checks++;
          if (longint'(s2_dc) != ex) begin
            failures++;
            $display("v2 sample %0d: D_c %0d expected %0d", k, s2_dc, ex);
          end
          if (s2_dc != 16'(D2[k])) n_corr2++;
          if (k > NC / 2) begin
            real v;
            v = AMP * $sin(OMEGA * real'(k));
            pe_i2 += (real'(D2[k]) - v) ** 2;
            pe_c2 += (real'(s2_dc) - v) ** 2;
          end
        end
      end
      if (dut.u_s2_jcp.tau_hat != 0) n_t2++;
      if (dut.u_s2_jcp.eps_hat != dut.u_s2_jcp.tau_hat) n_leak++;
      if (dut.u_s2_jcp.upd_valid) n_upd2++;
      if (dut.u_s2_jcp.tap_valid && dut.u_s2_jcp.pos1 == N && dut.u_s2_jcp.aux_data != 0) n_subst++;
    end
  end

  // variant 1 checks
  always @(posedge clk_i) begin
    #2000;
    if (rst_n && k1 > 6 && k1 < NC) begin
      int e;
      e = k1;
      if (near_step(J1[e - 1])) n_edge_skip++;
      else checks++;
      if (!near_step(J1[e - 1]) && int'(s1_dt) != code(J1[e - 1])) begin
        failures++;
        $display("v1 edge %0d: code %0d expected %0d", e, s1_dt, code(J1[e - 1]));
      end
      EH1[e - 2] = longint'(s1_eps_hat);
      if (s1_dc_valid) begin
        int k;
        longint ex;
        k = e - M - 3;
        if (first_valid1 < 0) first_valid1 = k;
        if (k >= first_valid1 + 2 * M) begin
          ex = dc_ref(D1[k], du_at(0, k), EH1[k]);
          checks++;
          if (longint'(s1_dc) != ex) begin
            failures++;
            $display("v1 sample %0d: D_c %0d expected %0d", k, s1_dc, ex);
          end
          if (s1_dc != 16'(D1[k])) n_corr1++;
          if (k > NC / 2) begin
            real v;
            v = AMP * $sin(OMEGA * real'(k));
            pe_i1 += (real'(D1[k]) - v) ** 2;
            pe_c1 += (real'(s1_dc) - v) ** 2;
            npow++;
          end
        end
      end
      if (s1_eps_hat != 0) n_t1++;
      if (dut.u_s1_jcp.upd_valid) n_upd1++;
    end
  end

  // Table learning: slope of T(m) against the centre of code bin m
  // (m - 63.5 ps), weighted by the number of updates the entry received,
  // over entries updated at least 2^A_SHIFT times.
  int nupd1[128], nupd2[128];
  always @(posedge clk_i) if (dut.u_s1_jcp.upd_valid) nupd1[dut.u_s1_jcp.upd_addr]++;
  always @(posedge clk)   if (dut.u_s2_jcp.upd_valid) nupd2[dut.u_s2_jcp.upd_addr]++;

  function automatic real table_slope(bit v2);
    real sxy, sxx, t, x, w;
    sxy = 0.0;
    sxx = 0.0;
    for (int m = 0; m < 128; m++) begin
      w = real'(v2 ? nupd2[m] : nupd1[m]);
      if (w >= real'(2 ** A_SHIFT)) begin
        t = real'(v2 ? dut.u_s2_jcp.u_jmt.tab[m] : dut.u_s1_jcp.u_jmt.tab[m]) * TS / 536870912.0;
        x = real'(m) - 63.5;
        sxy += w * t * x;
        sxx += w * x * x;
      end
    end
    return (sxx > 0.0) ? sxy / sxx : 0.0;
  endfunction

  initial begin
    #(real'(NC + 4) * TS);
    $display("variant 1: updates %0d nonzero eps_hat %0d corrected %0d", n_upd1, n_t1, n_corr1);
    $display("variant 2: updates %0d nonzero tau_hat %0d leaky %0d interpolations %0d corrected %0d",
             n_upd2, n_t2, n_leak, n_subst, n_corr2);
    if (npow > 0)
      $display("error power (LSB^2): v1 D_i %f D_c %f, v2 D_i %f D_c %f",
               pe_i1 / npow, pe_c1 / npow, pe_i2 / npow, pe_c2 / npow);
    $display("table slope: v1 %f v2 %f; TDC edges on an offset, unchecked: %0d",
             table_slope(0), table_slope(1), n_edge_skip);
    checks += 11;
    if (table_slope(0) < 0.3 || table_slope(0) > 1.5) begin failures++; $display("variant-1 table did not learn"); end
    if (table_slope(1) < 0.3 || table_slope(1) > 1.5) begin failures++; $display("variant-2 table did not learn"); end
    if (!(pe_c1 < 0.8 * pe_i1)) begin failures++; $display("variant 1 did not lower the error power"); end
    if (n_upd1 == 0) begin failures++; $display("no variant-1 table update"); end
    if (n_upd2 == 0) begin failures++; $display("no variant-2 table update"); end
    if (n_t1 == 0)   begin failures++; $display("variant-1 table never nonzero"); end
    if (n_t2 == 0)   begin failures++; $display("variant-2 table never nonzero"); end
    if (n_leak == 0) begin failures++; $display("no lossy accumulation"); end
    if (n_subst == 0) begin failures++; $display("no D'_i interpolation"); end
    if (n_corr1 == 0) begin failures++; $display("variant 1 never corrected a sample"); end
    if (n_corr2 == 0) begin failures++; $display("variant 2 never corrected a sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
