// jitter_estimator: jitter estimator (JE) of a jitter calibration processor.
//
// From the ADC samples alone it estimates the jitter eps_c[k] of one sample
// per window: the signal reconstruction filter rebuilds D_r[k] from the 2N
// neighbours of D_i[k] (the neighbours' own jitter averages out), and the
// jitter calculation finds the eps_c that would make the compensation filter
// turn D_i[k] into D_r[k]:
//   eps_c[k] = (D_r[k] - D_i[k]) / D_u[k] * eps_u.
// The compensation-filter part (D_u) is not duplicated here: the estimator
// takes D_u from the system's JCF, aligned with the sample stream.
//
// Interface: in_valid/sample/du/m are aligned streams (sample, its D_u and
// its TDC code). When the window reaches its centre (pos = N) the estimator
// latches the centre sample, its D_u and its code. One clock after the last
// sample of the window the divider starts, and EPS_W clocks later done
// pulses with eps_c, ok (0 when D_u was 0) and m_out, the code of the centre
// sample. One estimate every 2N+1 samples. rom_addr/rom_data connect to a
// read port of hr_rom; pos is the window position of the current sample.
// The structure follows the document; the latching of the centre values is
// this design's own.
module jitter_estimator
  import jc_pkg::*;
#(
  parameter int N    = 1024,
  parameter int M    = 7,
  parameter int DUW  = du_width(M),
  parameter int MW   = 7,
  parameter int AW   = $clog2(N),
  parameter int PW   = $clog2(2 * N + 1),
  parameter int DR_W = HR_W + DI_W + $clog2(2 * N) - HR_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DI_W-1:0]  sample,
  input  logic signed [DUW-1:0]   du,
  input  logic [MW-1:0]           m,
  output logic [AW-1:0]           rom_addr,
  input  logic signed [HR_W-1:0]  rom_data,
  output logic [PW-1:0]           pos,
  output logic                    done,
  output logic                    ok,
  output logic signed [EPS_W-1:0] eps_c,
  output logic [MW-1:0]           m_out
);

  localparam int XW = DR_W + 1;

  logic                    dr_valid;
  logic signed [DR_W-1:0]  dr;
  logic signed [DI_W-1:0]  di_ctr;
  logic signed [DUW-1:0]   du_ctr;
  logic [MW-1:0]           m_ctr;
  logic                    busy;
  logic signed [XW-1:0]    x;

  srf_mac #(.N(N), .AW(AW), .PW(PW), .DR_W(DR_W)) u_srf (
    .clk     (clk),
    .rst_n   (rst_n),
    .in_valid(in_valid),
    .sample  (sample),
    .rom_addr(rom_addr),
    .rom_data(rom_data),
    .pos     (pos),
    .dr_valid(dr_valid),
    .dr      (dr)
  );

  // Centre values of the current window.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      di_ctr <= '0;
      du_ctr <= '0;
      m_ctr  <= '0;
      m_out  <= '0;
    end else begin
      if (in_valid && pos == PW'(N)) begin
        di_ctr <= sample;
        du_ctr <= du;
        m_ctr  <= m;
      end
      if (dr_valid) m_out <= m_ctr;
    end
  end

  assign x = XW'(dr) - XW'(di_ctr);

  jitter_calc #(.XW(XW), .DUW(DUW)) u_calc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(dr_valid),
    .x    (x),
    .du   (du_ctr),
    .busy (busy),
    .done (done),
    .ok   (ok),
    .eps_c(eps_c)
  );

  // The divider must finish within one window.
  initial assert (2 * N + 1 > EPS_W + 1)
    else $error("jitter_estimator: N too small for the serial divider");

  property p_no_start_when_busy;
    @(posedge clk) disable iff (!rst_n) dr_valid |-> !busy;
  endproperty
  assert property (p_no_start_when_busy);

endmodule
