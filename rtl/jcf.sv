// jcf: simplified jitter compensation filter (JCF) with 2M+1 taps.
//
// A jittered sample D_i[k] was taken at (k + eps[k]) T_s instead of k T_s.
// Moving it back in time by eps[k] needs an interpolation filter whose taps
// depend on eps[k]; for small eps the filter splits into a fixed part and
// one multiplication:
//   D_u[k] = sum_{n=-M..M, n!=0} h_s[n] * D_i[k-n],  h_s[n] = sinc(n - eps_u)
//   D_c[k] = D_i[k] + (eps_hat[k] / eps_u) * D_u[k]
// D_u is an estimate of eps_u times the signal slope, so the product is the
// sampling error. eps_u = 2^-5 turns the division into a shift. As in the
// document, the taps use only the top 8 bits of D_i and 6-bit coefficients.
//
// Structure: a delay line of 2M+1 samples (newest in sr[0], the centre sample
// D_i[k] in sr[M]), 2M constant-coefficient multipliers and an adder tree
// registered as D_u, then one multiplier and adder registered as D_c.
// The same D_u and centre sample are brought out (du_tap, di_tap, tap_valid)
// so the jitter estimators can share this filter, as the document suggests.
//
// Timing: one sample per clock when in_valid is 1 (the ADC runs
// continuously; in_valid only marks the start after reset). A sample
// registered at edge t appears on the taps after edge t+M+1 and on dc after
// edge t+M+2. eps_in must carry eps_hat of the sample entering the JCF
// EPS_LAT cycles earlier; an internal delay of M+1-EPS_LAT stages lines it up
// with D_u. The correction is rounded to the nearest LSB (plain truncation
// would bias D_c by half an LSB).
// The register stages, EPS_LAT and the valid flags are this design's own.
module jcf
  import jc_pkg::*;
#(
  parameter int M       = 7,
  parameter int EPS_LAT = 2,
  parameter int DUW     = du_width(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DI_W-1:0]  di,
  input  logic signed [EPS_W-1:0] eps_in,
  output logic                    tap_valid,
  output logic signed [DI_W-1:0]  di_tap,
  output logic signed [DUW-1:0]   du_tap,
  output logic                    dc_valid,
  output logic signed [DI_W-1:0]  dc
);

  localparam int EPS_DLY = M + 1 - EPS_LAT;
  localparam int PW      = DUW + EPS_W;

  logic signed [DI_W-1:0] sr [2*M+1];
  logic [M:0]             vld_sr;
  logic signed [DUW-1:0]  du_sum;
  logic signed [EPS_W-1:0] eps_al;
  logic signed [PW-1:0]   corr_full;
  logic signed [DI_W:0]   dc_wide;

  // Delay line of the input samples.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= 2 * M; j++) sr[j] <= '0;
      vld_sr <= '0;
    end else begin
      sr[0] <= di;
      for (int j = 1; j <= 2 * M; j++) sr[j] <= sr[j-1];
      vld_sr <= {vld_sr[M-1:0], in_valid};
    end
  end

  // Fixed taps: sr[j] holds D_i[k-n] with n = j - M.
  always_comb begin
    du_sum = '0;
    for (int j = 0; j <= 2 * M; j++) begin
      if (j != M)
        du_sum = du_sum + DUW'(DU_DI_W'(sr[j] >>> (DI_W - DU_DI_W))) * DUW'(hs_code(j - M));
    end
  end

  // Alignment of eps_hat with the centre sample.
  if (EPS_DLY == 0) begin : g_eps_direct
    assign eps_al = eps_in;
  end else begin : g_eps_delay
    logic signed [EPS_W-1:0] eps_sr [EPS_DLY];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < EPS_DLY; j++) eps_sr[j] <= '0;
      end else begin
        eps_sr[0] <= eps_in;
        for (int j = 1; j < EPS_DLY; j++) eps_sr[j] <= eps_sr[j-1];
      end
    end
    assign eps_al = eps_sr[EPS_DLY-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      du_tap    <= '0;
      di_tap    <= '0;
      tap_valid <= 1'b0;
    end else begin
      du_tap    <= du_sum;
      di_tap    <= sr[M];
      tap_valid <= vld_sr[M];
    end
  end

  // Correction: D_c = D_i + (eps_hat / eps_u) * D_u, saturated to DI_W bits.
  assign corr_full = PW'(du_tap) * PW'(eps_al);
  assign dc_wide   = (DI_W+1)'(di_tap)
                   + (DI_W+1)'((corr_full + PW'(2 ** (CORR_SHIFT - 1))) >>> CORR_SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc       <= '0;
      dc_valid <= 1'b0;
    end else begin
      dc_valid <= tap_valid;
      if (dc_wide > (DI_W+1)'(2**(DI_W-1) - 1))
        dc <= DI_W'(2**(DI_W-1) - 1);
      else if (dc_wide < -(DI_W+1)'(2**(DI_W-1)))
        dc <= DI_W'(-(2**(DI_W-1)));
      else
        dc <= DI_W'(dc_wide);
    end
  end

endmodule
