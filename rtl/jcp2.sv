// jcp2: jitter calibration processor for a jittery external clock.
//
// Without a clean reference the TDC can only compare each sampling edge
// with the previous one (the clock delayed by one period), so its code m
// measures the cycle jitter tau[k] = eps[k] - eps[k-1]. The mapping table
// turns the code into tau_hat[k] = T(m), and a lossy accumulator turns that
// into the absolute jitter eps_hat[k] = tau_hat[k] + b eps_hat[k-1].
//
// Training: two jitter estimators run in lock step over the same window
// positions, JE1 on the sample stream and JE2 on the stream delayed by one
// sample, so their windows are centred on D_i[k] and D_i[k-1]. Their
// difference tau_c[k] = eps_c[k] - eps_c[k-1] trains the entry T(D_t[k]) by
// the table's low-pass update. Because the two reconstructed points are
// always T_s + tau(m) apart for a given code, the sample D_i[k] that JE2 sees
// next to its centre is replaced by an interpolated
//   D'_i[k] = D_i[k] + (T(m) / eps_u) D_u[k],  m = D_t[k],
// i.e. moved back in time by the table's own tau estimate. The two
// estimators share one coefficient ROM (one read port each) and take D_u
// from the system's JCF.
//
// Interface: dt is the TDC code of the sample registered by the JCF at the
// same edge; eps_hat is that sample's absolute jitter estimate two clocks
// later (use the JCF with EPS_LAT = 2); tau_hat is the table value one clock
// later. tap_valid/di_tap/du_tap come from the JCF; the code is delayed by
// M+1 clocks here to line up with them. upd_valid/upd_addr/upd_x show each
// table update. The first window after reset is not used for training
// because JE2's first sample is the reset value of its delay register.
// The structure follows the document; register stages, the waiting for both
// estimates and the rejection of the first window are this design's own.
module jcp2
  import jc_pkg::*;
#(
  parameter int          N       = 1024,
  parameter int          M       = 7,
  parameter int          L       = 127,
  parameter int          A_SHIFT = 13,
  parameter int unsigned B_Q     = 58982,
  parameter int          MW      = $clog2(L + 1),
  parameter int          DUW     = du_width(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [MW-1:0]           dt,
  output logic signed [EPS_W-1:0] tau_hat,
  output logic signed [EPS_W-1:0] eps_hat,
  input  logic                    tap_valid,
  input  logic signed [DI_W-1:0]  di_tap,
  input  logic signed [DUW-1:0]   du_tap,
  output logic                    upd_valid,
  output logic [MW-1:0]           upd_addr,
  output logic signed [EPS_W-1:0] upd_x
);

  localparam int AW = $clog2(N);
  localparam int PW = $clog2(2 * N + 1);
  localparam int PRW = DUW + EPS_W;

  logic signed [EPS_W-1:0] lk_data, aux_data;
  logic [MW-1:0]           dt_sr [M+1];
  logic [MW-1:0]           dt_al;
  logic                    tau_valid, eps_valid;

  // Table lookup and lossy accumulation.
  jmt #(.ENTRIES(2 ** MW), .A_SHIFT(A_SHIFT), .MW(MW)) u_jmt (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_addr  (dt),
    .lk_data  (lk_data),
    .aux_addr (dt_al),
    .aux_data (aux_data),
    .upd_valid(upd_valid),
    .upd_addr (upd_addr),
    .upd_x    (upd_x)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= M; j++) dt_sr[j] <= '0;
      tau_hat   <= '0;
      tau_valid <= 1'b0;
    end else begin
      dt_sr[0] <= dt;
      for (int j = 1; j <= M; j++) dt_sr[j] <= dt_sr[j-1];
      tau_hat   <= lk_data;
      tau_valid <= in_valid;
    end
  end
  assign dt_al = dt_sr[M];

  lossy_acc #(.B_Q(B_Q)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (tau_valid),
    .tau_in   (tau_hat),
    .out_valid(eps_valid),
    .eps_out  (eps_hat)
  );

  // Interpolated sample D'_i[k] for JE2, rounded and saturated like D_c.
  logic signed [PRW-1:0]    corr_full;
  logic signed [DI_W+1:0]   dip_wide;
  logic signed [DI_W-1:0]   di_prime;

  always_comb begin
    corr_full = PRW'(du_tap) * PRW'(aux_data);
    dip_wide  = (DI_W+2)'(di_tap)
              + (DI_W+2)'((corr_full + PRW'(2 ** (CORR_SHIFT - 1))) >>> CORR_SHIFT);
    if (dip_wide > (DI_W+2)'(2 ** (DI_W - 1) - 1))
      di_prime = DI_W'(2 ** (DI_W - 1) - 1);
    else if (dip_wide < -(DI_W+2)'(2 ** (DI_W - 1)))
      di_prime = DI_W'(-(2 ** (DI_W - 1)));
    else
      di_prime = DI_W'(dip_wide);
  end

  // Shared coefficient ROM and the two estimators.
  logic [AW-1:0]           rom_a, rom_b;
  logic signed [HR_W-1:0]  rom_da, rom_db;
  logic [PW-1:0]           pos1;
  logic signed [DI_W-1:0]  je2_sample;
  logic signed [DUW-1:0]   je2_du;
  logic [MW-1:0]           je2_m;
  logic                    done1, ok1, done2, ok2;
  logic signed [EPS_W-1:0] eps1, eps2;
  logic [MW-1:0]           m1, m2;

  hr_rom #(.N(N), .AW(AW)) u_rom (
    .addr_a(rom_a),
    .data_a(rom_da),
    .addr_b(rom_b),
    .data_b(rom_db)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      je2_sample <= '0;
      je2_du     <= '0;
      je2_m      <= '0;
    end else if (tap_valid) begin
      je2_sample <= (pos1 == PW'(N)) ? di_prime : di_tap;
      je2_du     <= du_tap;
      je2_m      <= dt_al;
    end
  end

  jitter_estimator #(.N(N), .M(M), .DUW(DUW), .MW(MW)) u_je1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(tap_valid),
    .sample  (di_tap),
    .du      (du_tap),
    .m       (dt_al),
    .rom_addr(rom_a),
    .rom_data(rom_da),
    .pos     (pos1),
    .done    (done1),
    .ok      (ok1),
    .eps_c   (eps1),
    .m_out   (m1)
  );

  jitter_estimator #(.N(N), .M(M), .DUW(DUW), .MW(MW)) u_je2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(tap_valid),
    .sample  (je2_sample),
    .du      (je2_du),
    .m       (je2_m),
    .rom_addr(rom_b),
    .rom_data(rom_db),
    .pos     (),
    .done    (done2),
    .ok      (ok2),
    .eps_c   (eps2),
    .m_out   (m2)
  );

  // Pair the two estimates of a window and form tau_c = eps_c[k] - eps_c[k-1].
  logic                    got1, got2, good1, good2, primed;
  logic signed [EPS_W-1:0] e1, e2;
  logic [MW-1:0]           m_upd;
  logic signed [EPS_W:0]   tau_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got1   <= 1'b0;
      got2   <= 1'b0;
      good1  <= 1'b0;
      good2  <= 1'b0;
      primed <= 1'b0;
      e1     <= '0;
      e2     <= '0;
      m_upd  <= '0;
    end else begin
      if (done1) begin
        got1  <= 1'b1;
        good1 <= ok1;
        e1    <= eps1;
        m_upd <= m1;
      end
      if (done2) begin
        got2  <= 1'b1;
        good2 <= ok2;
        e2    <= eps2;
      end
      if (got1 && got2) begin
        got1   <= 1'b0;
        got2   <= 1'b0;
        primed <= 1'b1;
      end
    end
  end

  always_comb begin
    tau_c = (EPS_W+1)'(e1) - (EPS_W+1)'(e2);
    if (tau_c > (EPS_W+1)'(2 ** (EPS_W - 1) - 1))
      upd_x = EPS_W'(2 ** (EPS_W - 1) - 1);
    else if (tau_c < -(EPS_W+1)'(2 ** (EPS_W - 1)))
      upd_x = EPS_W'(-(2 ** (EPS_W - 1)));
    else
      upd_x = EPS_W'(tau_c);
  end

  assign upd_valid = got1 && got2 && good1 && good2 && primed;
  assign upd_addr  = m_upd;

  // Each window's pair of estimates is consumed before the next window ends.
  property p_pair_consumed;
    @(posedge clk) disable iff (!rst_n) done1 |-> !got1;
  endproperty
  assert property (p_pair_consumed);

endmodule
