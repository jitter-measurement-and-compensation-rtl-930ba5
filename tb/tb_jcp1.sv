// tb_jcp1: drives the calibration processor for a clean external clock
// (N = 16, a = 2^-2 so the table moves quickly) with a TDC code stream and
// the JCF tap streams it expects (taps M+1 clocks behind the codes). Checks
// every table update (address = code of the window centre, value = eps_c
// from the reference reconstruction and division), and every clock that
// eps_hat equals the table entry of the current code, using a model of the
// table kept with T' = T + round((x - T) / 4).
module tb_jcp1;
  import tb_ref_pkg::*;
  localparam int N = 16, M = 7, W = 2 * N + 1, NW = 60, A = 2;
  localparam int NS = NW * W;
  logic clk = 0, rst_n = 0;
  logic [6:0] dt, upd_addr;
  logic signed [22:0] eps_hat, upd_x;
  logic tap_valid = 0, upd_valid;
  logic signed [15:0] di_tap;
  logic signed [17:0] du_tap;
  longint TD[NS], TU[NS], DT[NS + M + 2];
  longint Tm[128];
  longint exp_addr[$], exp_x[$];
  int checks = 0, failures = 0, nupd = 0, cyc = 0, nnonzero = 0;
  logic       s_upd;
  logic [6:0] s_addr;
  longint     s_x;

  jcp1 #(.N(N), .M(M), .L(127), .A_SHIFT(A)) dut (.*);

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

  always @(posedge clk) if (rst_n) begin
    #1;
    // eps_hat registered at this edge from the code driven before it
    if (cyc < NS + M + 1) begin
      checks++;
      if (longint'(eps_hat) != Tm[DT[cyc]]) begin
        failures++;
        $display("cyc %0d eps_hat=%0d expected %0d", cyc, eps_hat, Tm[DT[cyc]]);
      end
      if (Tm[DT[cyc]] != 0) nnonzero++;
    end
    if (s_upd) begin
      checks++;
      if (exp_addr.size() == 0 || longint'(s_addr) != exp_addr[0] || s_x != exp_x[0]) begin
        failures++;
        $display("update %0d: addr %0d x %0d, expected %0d %0d", nupd, s_addr, s_x,
                 exp_addr.size() ? exp_addr[0] : -1, exp_x.size() ? exp_x[0] : 0);
      end
      if (exp_addr.size()) begin
        Tm[exp_addr[0]] = lpf_ref(Tm[exp_addr[0]], exp_x[0], A);
        void'(exp_addr.pop_front()); void'(exp_x.pop_front());
      end
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
    // expected updates
    for (int w = 0; w < NW; w++) begin
      int c;
      longint acc, dr;
      c = w * W + N;
      acc = 0;
      for (int n = 1; n <= N; n++) acc += longint'(hr_ref(n)) * (TD[c - n] + TD[c + n]);
      dr = (acc + 65536) >>> 17;
      exp_addr.push_back(DT[c]);
      exp_x.push_back(div_ref(dr - TD[c], TU[c]));
    end
    dt = 0; di_tap = 0; du_tap = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NS + M + 1; c++) begin
      dt = 7'(DT[c]);
      tap_valid = (c >= M + 1);
      di_tap = (c >= M + 1) ? 16'(TD[c - M - 1]) : '0;
      du_tap = (c >= M + 1) ? 18'(TU[c - M - 1]) : '0;
      @(negedge clk);
    end
    tap_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (nupd != NW || nnonzero == 0) begin failures++; $display("updates %0d nonzero %0d", nupd, nnonzero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
