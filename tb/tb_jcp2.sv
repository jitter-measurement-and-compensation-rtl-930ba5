// tb_jcp2: drives the calibration processor for a jittery external clock
// (N = 16, a = 2^-2, b = 0.9) with a TDC code stream and the JCF tap streams.
// A model mirrors the mapping table and, for every window, computes what
// JE1 (centred on D_i[k]) and JE2 (centred on D_i[k-1], with D_i[k] replaced
// by D_i[k] + T(m) D_u[k] / eps_u using the table value at that moment)
// must give, then checks the update tau_c = eps_c[k] - eps_c[k-1] and its
// address m = D_t[k]; the first window must not update. Every clock it also
// checks tau_hat = T(D_t) and eps_hat = tau_hat + b eps_hat[k-1].
module tb_jcp2;
  import tb_ref_pkg::*;
  localparam int N = 16, M = 7, W = 2 * N + 1, NW = 60, A = 2;
  localparam int NS = NW * W;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [6:0] dt, upd_addr;
  logic signed [22:0] eps_hat, tau_hat, upd_x;
  logic tap_valid = 0, upd_valid;
  logic signed [15:0] di_tap;
  logic signed [17:0] du_tap;
  longint TD[NS], TU[NS], DT[NS + M + 2];
  longint Tm[128], Tc[NW];
  longint e_model = 0, tau_prev = 0;
  int checks = 0, failures = 0, nupd = 0, cyc = 0, nwin_done = 0, nsubst = 0;
  logic       s_upd;
  logic [6:0] s_addr;
  longint     s_x;

  jcp2 #(.N(N), .M(M), .L(127), .A_SHIFT(A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #1;
    s_upd = upd_valid; s_addr = upd_addr; s_x = longint'(upd_x);
  end

  function automatic longint srf(longint X[], int c);
    longint acc;
    acc = 0;
    for (int n = 1; n <= N; n++) acc += longint'(hr_ref(n)) * (X[c - n] + X[c + n]);
    return (acc + 65536) >>> 17;
  endfunction

  always @(posedge clk) if (rst_n) begin
    longint tv;
    #1;
    if (cyc < NS + M + 1) begin
      tv = Tm[DT[cyc]];
      checks += 2;
      if (longint'(tau_hat) != tv) begin
        failures++;
        $display("cyc %0d tau_hat=%0d expected %0d", cyc, tau_hat, tv);
      end
      if (cyc >= 1) e_model = acc_ref(e_model, tau_prev, 58982);
      if (longint'(eps_hat) != e_model) begin
        failures++;
        $display("cyc %0d eps_hat=%0d expected %0d", cyc, eps_hat, e_model);
      end
      tau_prev = tv;
    end
    // table value seen by the D'_i interpolation of window w (centre tap
    // sample presented before this edge)
    if (cyc >= M + 1 && (cyc - M - 1) % W == N && (cyc - M - 1) / W < NW)
      Tc[(cyc - M - 1) / W] = Tm[DT[cyc - M - 1]];
    if (s_upd) begin
      int w, c;
      longint X[], e1, e2, dp;
      // the first window never updates, so this is window nupd + 1
      w = nupd + 1;
      c = w * W + N;
      X = new[NS];
      foreach (X[i]) X[i] = TD[i];
      e1 = div_ref(srf(X, c) - TD[c], TU[c]);
      dp = dc_ref(TD[c], TU[c], Tc[w]);
      if (dp != TD[c]) nsubst++;
      X[c] = dp;
      e2 = div_ref(srf(X, c - 1) - TD[c - 1], TU[c - 1]);
      checks++;
      if (longint'(s_addr) != DT[c] || s_x != sat(e1 - e2, 23)) begin
        failures++;
        $display("update %0d: addr %0d x %0d, expected %0d %0d", w, s_addr, s_x, DT[c], sat(e1 - e2, 23));
      end
      Tm[DT[c]] = lpf_ref(Tm[DT[c]], sat(e1 - e2, 23), A);
      nupd++;
    end
    cyc++;
  end

  initial begin
    foreach (TD[i]) begin
      TD[i] = longint'(25000.0 * $sin(0.9 * real'(i) + 0.3)) + longint'($urandom_range(0, 40)) - 20;
      TU[i] = longint'($urandom_range(1000, 6000)) * (($urandom_range(0, 1) == 1) ? 1 : -1);
    end
    foreach (DT[i]) DT[i] = longint'($urandom_range(60, 66));
    foreach (Tm[i]) Tm[i] = 0;
    dt = 0; di_tap = 0; du_tap = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NS + M + 1; c++) begin
      in_valid = 1;
      dt = 7'(DT[c]);
      tap_valid = (c >= M + 1);
      di_tap = (c >= M + 1) ? 16'(TD[c - M - 1]) : '0;
      du_tap = (c >= M + 1) ? 18'(TU[c - M - 1]) : '0;
      @(negedge clk);
    end
    tap_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (nupd != NW - 1 || nsubst == 0) begin failures++; $display("updates %0d substitutions %0d", nupd, nsubst); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
