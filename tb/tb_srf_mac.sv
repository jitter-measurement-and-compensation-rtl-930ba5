// tb_srf_mac: runs the cyclic-MAC reconstruction filter (N = 16, with the
// coefficient ROM) on a random sample stream with gaps in the valid signal
// and checks every window's D_r against
//   round( sum_{n=1..N} h_r[n] (D_i[k-n] + D_i[k+n]) / 2^17 )
// and that exactly one D_r appears per 2N+1 valid samples.
module tb_srf_mac;
  import tb_ref_pkg::*;
  localparam int N  = 16;
  localparam int W  = 2 * N + 1;
  localparam int NW = 20;
  localparam int HRDRW = 18 + 16 + $clog2(2 * N) - 17;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] sample;
  logic [3:0] rom_addr;
  logic signed [17:0] rom_data;
  logic [5:0] pos;
  logic dr_valid;
  logic signed [HRDRW-1:0] dr;
  longint S[NW * W];
  int checks = 0, failures = 0, nwin = 0;

  srf_mac #(.N(N)) dut (.*);
  hr_rom #(.N(N)) rom (.addr_a(rom_addr), .data_a(rom_data), .addr_b(4'd0), .data_b());

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dr_ref(int w);
    longint acc;
    int k;
    k = w * W + N;
    acc = 0;
    for (int n = 1; n <= N; n++) acc += longint'(hr_ref(n)) * (S[k - n] + S[k + n]);
    return (acc + 65536) >>> 17;
  endfunction

  int nvalid = 0, last_nvalid = 0;
  always @(posedge clk) begin
    #1;
    if (dr_valid) begin
      checks++;
      if (dr != dr_ref(nwin)) begin
        failures++;
        $display("window %0d: D_r=%0d expected %0d", nwin, dr, dr_ref(nwin));
      end
      checks++;
      if (nvalid - last_nvalid != W) begin
        failures++;
        $display("window %0d after %0d samples", nwin, nvalid - last_nvalid);
      end
      last_nvalid = nvalid;
      nwin++;
    end
  end

  initial begin
    foreach (S[i]) S[i] = (i < W * 4) ? longint'($urandom_range(0, 65535)) - 32768
                                      : longint'(20000.0 * $sin(0.7 * real'(i)));
    sample = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NW * W; ) begin
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin
        in_valid = 0;
        sample = 16'($urandom);
      end else begin
        in_valid = 1;
        sample = 16'(S[i]);
        i++;
        nvalid++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nwin != NW) begin failures++; $display("windows %0d", nwin); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
