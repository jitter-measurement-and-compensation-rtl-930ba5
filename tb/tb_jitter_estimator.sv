// tb_jitter_estimator: runs the jitter estimator (N = 16, its own ROM) on a
// sine-plus-noise sample stream with random D_u values (some zero) and
// random TDC codes, and checks each window's result against the reference
//   D_r = round(sum h_r[n] (D_i[k-n] + D_i[k+n]) / 2^17),
//   eps_c = trunc((D_r - D_i[k]) 2^25 / D_u[k]) (saturated), m_out = m[k],
// plus one result per 2N+1 samples, each within 2N+1 clocks of its window.
module tb_jitter_estimator;
  import tb_ref_pkg::*;
  localparam int N  = 16;
  localparam int W  = 2 * N + 1;
  localparam int NW = 40;
  localparam int DRW = 18 + 16 + $clog2(2 * N) - 17;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] sample;
  logic signed [17:0] du;
  logic [6:0] m, m_out;
  logic [3:0] rom_addr;
  logic signed [17:0] rom_data;
  logic [5:0] pos;
  logic done, ok;
  logic signed [22:0] eps_c;
  longint S[NW * W], DU[NW * W], MM[NW * W];
  int checks = 0, failures = 0, nres = 0, nzero = 0, last_end = 0, cyc = 0;

  jitter_estimator #(.N(N), .M(7), .MW(7)) dut (.*);
  hr_rom #(.N(N)) rom (.addr_a(rom_addr), .data_a(rom_data), .addr_b(4'd0), .data_b());

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    cyc++;
    if (in_valid && pos == 6'(2 * N)) last_end = cyc;
    if (done) begin
      int c;
      longint acc, dr, e;
      c = nres * W + N;
      acc = 0;
      for (int n = 1; n <= N; n++) acc += longint'(hr_ref(n)) * (S[c - n] + S[c + n]);
      dr = (acc + 65536) >>> 17;
      checks++;
      if (DU[c] == 0) begin
        nzero++;
        if (ok != 1'b0) begin failures++; $display("window %0d: ok with D_u = 0", nres); end
      end else begin
        e = div_ref(dr - S[c], DU[c]);
        if (ok != 1'b1 || longint'(eps_c) != e || longint'(m_out) != MM[c]) begin
          failures++;
          $display("window %0d: eps_c=%0d exp %0d m=%0d exp %0d", nres, eps_c, e, m_out, MM[c]);
        end
      end
      checks++;
      if (cyc - last_end > W) begin failures++; $display("late result"); end
      nres++;
    end
  end

  initial begin
    foreach (S[i]) begin
      S[i]  = longint'(25000.0 * $sin(0.9 * real'(i) + 0.3)) + longint'($urandom_range(0, 40)) - 20;
      DU[i] = (i % W == N && (i / W) % 7 == 5) ? 0 : longint'($urandom_range(0, 8000)) - 4000;
      MM[i] = longint'($urandom_range(0, 127));
    end
    sample = 0; du = 0; m = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NW * W; i++) begin
      @(negedge clk);
      in_valid = 1;
      sample = 16'(S[i]); du = 18'(DU[i]); m = 7'(MM[i]);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (nres != NW || nzero == 0) begin failures++; $display("results %0d zero %0d", nres, nzero); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
