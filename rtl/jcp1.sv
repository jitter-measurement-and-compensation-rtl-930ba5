// jcp1: jitter calibration processor for a clean external clock.
//
// Here the TDC compares the clean external clock with the jittery internal
// sampling clock, so its code m measures the absolute jitter eps[k]
// directly, but with an unknown, process-dependent transfer curve. The
// processor maps every code to a jitter value through the jitter mapping
// table (eps_hat[k] = T(D_t[k])) and trains the table in the background: a
// jitter estimator works out eps_c[k] from the ADC samples alone, once per
// 2N+1 samples, and the entry of that sample's code moves towards it by the
// low-pass update of the table.
//
// Interface: dt is the TDC code of the sample that the JCF registered at the
// same clock edge; eps_hat is that sample's table value one clock later
// (use the JCF with EPS_LAT = 1). tap_valid/di_tap/du_tap are the centre
// sample and D_u from the JCF; the code is delayed by M+1 clocks here to line
// up with them. upd_valid/upd_addr/upd_x show each table update. The
// structure follows the document; the register stages are this design's own.
module jcp1
  import jc_pkg::*;
#(
  parameter int N       = 1024,
  parameter int M       = 7,
  parameter int L       = 127,
  parameter int A_SHIFT = 13,
  parameter int MW      = $clog2(L + 1),
  parameter int DUW     = du_width(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [MW-1:0]           dt,
  output logic signed [EPS_W-1:0] eps_hat,
  input  logic                    tap_valid,
  input  logic signed [DI_W-1:0]  di_tap,
  input  logic signed [DUW-1:0]   du_tap,
  output logic                    upd_valid,
  output logic [MW-1:0]           upd_addr,
  output logic signed [EPS_W-1:0] upd_x
);

  localparam int AW = $clog2(N);

  logic signed [EPS_W-1:0] lk_data;
  logic [MW-1:0]           dt_sr [M+1];
  logic [MW-1:0]           dt_al;
  logic [AW-1:0]           rom_addr;
  logic signed [HR_W-1:0]  rom_data;
  logic                    je_done, je_ok;
  logic signed [EPS_W-1:0] je_eps;
  logic [MW-1:0]           je_m;

  jmt #(.ENTRIES(2 ** MW), .A_SHIFT(A_SHIFT), .MW(MW)) u_jmt (
    .clk      (clk),
    .rst_n    (rst_n),
    .lk_addr  (dt),
    .lk_data  (lk_data),
    .aux_addr (je_m),
    .aux_data (),
    .upd_valid(upd_valid),
    .upd_addr (upd_addr),
    .upd_x    (upd_x)
  );

  // Code of the JCF centre sample.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= M; j++) dt_sr[j] <= '0;
      eps_hat <= '0;
    end else begin
      dt_sr[0] <= dt;
      for (int j = 1; j <= M; j++) dt_sr[j] <= dt_sr[j-1];
      eps_hat <= lk_data;
    end
  end
  assign dt_al = dt_sr[M];

  hr_rom #(.N(N), .AW(AW)) u_rom (
    .addr_a(rom_addr),
    .data_a(rom_data),
    .addr_b(rom_addr),
    .data_b()
  );

  jitter_estimator #(.N(N), .M(M), .DUW(DUW), .MW(MW)) u_je (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(tap_valid),
    .sample  (di_tap),
    .du      (du_tap),
    .m       (dt_al),
    .rom_addr(rom_addr),
    .rom_data(rom_data),
    .pos     (),
    .done    (je_done),
    .ok      (je_ok),
    .eps_c   (je_eps),
    .m_out   (je_m)
  );

  assign upd_valid = je_done && je_ok;
  assign upd_addr  = je_m;
  assign upd_x     = je_eps;

endmodule
