// jitter_comp_top: ADC clock-jitter measurement and compensation, both
// system variants side by side.
//
// Variant 2 (ports s2_*): the external sampling clock clk itself jitters.
// A delay line of one sampling period (outside this module) produces clk_d;
// the stochastic TDC compares each clk edge with the previous edge carried
// by clk_d (v1 = clk_d, v2 = clk) and so measures the cycle jitter. JCP2
// maps the code to a cycle-jitter estimate, trains its table in the
// background and accumulates the absolute jitter eps_hat, and the JCF
// corrects the ADC samples with it. All digital logic runs on clk.
//
// Variant 1 (ports s1_*): the external clock clk_e is clean and a variable
// delay buffer (outside this module, with its delay-control loop) makes the
// jittery ADC clock clk_i from it. The TDC compares clk_e with clk_i
// (v1 = clk_e, v2 = clk_i) and so measures the absolute jitter; JCP1 maps and
// trains; the JCF corrects. All digital logic runs on clk_i.
//
// The ADC is outside this module. Its word for the sample taken at clock
// edge k must be on sX_di, with sX_di_valid = 1, before edge k+1; the TDC code
// of the same edge is sampled at edge k+1 too, so both enter the pipeline
// together. Outputs, for the sample taken at edge k: sX_dt (TDC code) after
// edge k+1, s1_eps_hat after edge k+2, s2_eps_hat after edge k+3, sX_dc
// (corrected word, with sX_dc_valid) after edge k+M+3.
//
// The comparator offsets are simulation-only delays; synthesized, each
// comparator is a flip-flop and the whole module is ordinary logic. Lint
// reports clk_d and clk_e as used both as clocks and as data: that is what a
// timing comparator does (one clock samples the other), not a reset problem. The block structure follows
// the document's two system diagrams; the clock of the digital logic and the
// alignment of ADC and TDC are this design's own choices.
module jitter_comp_top
  import jc_pkg::*;
#(
  parameter int          L       = 127,
  parameter real         STEP_PS = 1.0,
  parameter int          M       = 7,
  parameter int          N       = 1024,
  parameter int          A_SHIFT = 13,
  parameter int unsigned B_Q     = 58982,
  parameter int          MW      = $clog2(L + 1)
) (
  input  logic                    rst_n,
  // variant 2: jittery external clock
  input  logic                    clk,
  input  logic                    clk_d,
  input  logic                    s2_di_valid,
  input  logic signed [DI_W-1:0]  s2_di,
  output logic [MW-1:0]           s2_dt,
  output logic signed [EPS_W-1:0] s2_eps_hat,
  output logic                    s2_dc_valid,
  output logic signed [DI_W-1:0]  s2_dc,
  // variant 1: clean external clock, jittery internal clock
  input  logic                    clk_e,
  input  logic                    clk_i,
  input  logic                    s1_di_valid,
  input  logic signed [DI_W-1:0]  s1_di,
  output logic [MW-1:0]           s1_dt,
  output logic signed [EPS_W-1:0] s1_eps_hat,
  output logic                    s1_dc_valid,
  output logic signed [DI_W-1:0]  s1_dc
);

  localparam int DUW = du_width(M);

  // ---------------- variant 2 ----------------
  logic                   s2_tap_valid;
  logic signed [DI_W-1:0] s2_di_tap;
  logic signed [DUW-1:0]  s2_du_tap;
  logic                   s2_in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_in_valid <= 1'b0;
    else        s2_in_valid <= s2_di_valid;
  end

  stochastic_tdc #(.L(L), .STEP_PS(STEP_PS), .MW(MW)) u_s2_tdc (
    .v1   (clk_d),
    .v2   (clk),
    .clk  (clk),
    .rst_n(rst_n),
    .m    (s2_dt)
  );

  jcp2 #(.N(N), .M(M), .L(L), .A_SHIFT(A_SHIFT), .B_Q(B_Q), .MW(MW), .DUW(DUW)) u_s2_jcp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s2_in_valid),
    .dt       (s2_dt),
    .tau_hat  (),
    .eps_hat  (s2_eps_hat),
    .tap_valid(s2_tap_valid),
    .di_tap   (s2_di_tap),
    .du_tap   (s2_du_tap),
    .upd_valid(),
    .upd_addr (),
    .upd_x    ()
  );

  jcf #(.M(M), .EPS_LAT(2), .DUW(DUW)) u_s2_jcf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s2_di_valid),
    .di       (s2_di),
    .eps_in   (s2_eps_hat),
    .tap_valid(s2_tap_valid),
    .di_tap   (s2_di_tap),
    .du_tap   (s2_du_tap),
    .dc_valid (s2_dc_valid),
    .dc       (s2_dc)
  );

  // ---------------- variant 1 ----------------
  logic                   s1_tap_valid;
  logic signed [DI_W-1:0] s1_di_tap;
  logic signed [DUW-1:0]  s1_du_tap;

  stochastic_tdc #(.L(L), .STEP_PS(STEP_PS), .MW(MW)) u_s1_tdc (
    .v1   (clk_e),
    .v2   (clk_i),
    .clk  (clk_i),
    .rst_n(rst_n),
    .m    (s1_dt)
  );

  jcp1 #(.N(N), .M(M), .L(L), .A_SHIFT(A_SHIFT), .MW(MW), .DUW(DUW)) u_s1_jcp (
    .clk      (clk_i),
    .rst_n    (rst_n),
    .dt       (s1_dt),
    .eps_hat  (s1_eps_hat),
    .tap_valid(s1_tap_valid),
    .di_tap   (s1_di_tap),
    .du_tap   (s1_du_tap),
    .upd_valid(),
    .upd_addr (),
    .upd_x    ()
  );

  jcf #(.M(M), .EPS_LAT(1), .DUW(DUW)) u_s1_jcf (
    .clk      (clk_i),
    .rst_n    (rst_n),
    .in_valid (s1_di_valid),
    .di       (s1_di),
    .eps_in   (s1_eps_hat),
    .tap_valid(s1_tap_valid),
    .di_tap   (s1_di_tap),
    .du_tap   (s1_du_tap),
    .dc_valid (s1_dc_valid),
    .dc       (s1_dc)
  );

endmodule
