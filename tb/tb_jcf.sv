// tb_jcf: streams random ADC words and random jitter values through the
// 15-tap compensation filter (M = 7, EPS_LAT = 2) and checks, sample by
// sample, the D_u tap, the centre-sample tap and the corrected output
// against a model built from sinc(n - 2^-5) evaluated in floating point.
// Also checks the latencies: taps M+1 clocks and D_c M+2 clocks after the
// sample is registered.
module tb_jcf;
  import tb_ref_pkg::*;
  localparam int M  = 7;
  localparam int NS = 600;
  localparam int EL = 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] di;
  logic signed [22:0] eps_in;
  logic tap_valid, dc_valid;
  logic signed [15:0] di_tap, dc;
  logic signed [17:0] du_tap;
  longint DI[NS], EPSV[NS + 8];
  int checks = 0, failures = 0;
  int cyc = 0, first_in = -1, first_tap = -1, first_dc = -1;

  jcf #(.M(M), .EPS_LAT(EL)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint du_of(int s);
    longint d[];
    d = new[2 * M + 1];
    for (int j = 0; j <= 2 * M; j++) begin
      int idx;
      idx = s + M - j;
      d[j] = (idx >= 0 && idx < NS) ? DI[idx] : 0;
    end
    return du_ref(M, d);
  endfunction

  int ntap = 0, ndc = 0, nsat = 0;
  always @(posedge clk) begin
    #1;
    cyc++;
    if (tap_valid) begin
      if (first_tap < 0) first_tap = cyc;
      if (ntap < NS - M) begin
        checks++;
        if (du_tap != du_of(ntap) || di_tap != DI[ntap]) begin
          failures++;
          $display("tap %0d: du=%0d exp %0d di=%0d exp %0d", ntap, du_tap, du_of(ntap), di_tap, DI[ntap]);
        end
      end
      ntap++;
    end
    if (dc_valid) begin
      if (first_dc < 0) first_dc = cyc;
      if (ndc < NS - M) begin
        longint e;
        e = dc_ref(DI[ndc], du_of(ndc), EPSV[ndc + EL + 1]);
        if (e == 32767 || e == -32768) nsat++;
        checks++;
        if (dc != e) begin
          failures++;
          $display("dc %0d: %0d exp %0d", ndc, dc, e);
        end
      end
      ndc++;
    end
  end

  initial begin
    for (int i = 0; i < NS; i++) begin
      // mostly moderate words, some near full scale
      DI[i] = (i % 7 == 3) ? longint'($urandom_range(0, 2000)) + 30767 - ((i % 2) * 63535)
                           : longint'($urandom_range(0, 40000)) - 20000;
    end
    foreach (EPSV[i]) EPSV[i] = longint'($urandom_range(0, 8388607)) - 4194304;
    di = 0; eps_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NS + 8; c++) begin
      @(negedge clk);
      in_valid = (c < NS);
      di = (c < NS) ? 16'(DI[c]) : '0;
      eps_in = 23'(EPSV[c]);
      if (c == 0) first_in = cyc + 1;
    end
    repeat (5) @(posedge clk);
    // latency: taps M+1 clocks and dc M+2 clocks after the sample's edge
    checks++;
    if (first_tap - first_in != M + 1 || first_dc - first_in != M + 2) begin
      failures++;
      $display("latency tap=%0d dc=%0d", first_tap - first_in, first_dc - first_in);
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
