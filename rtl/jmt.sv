// jmt: jitter mapping table (JMT) with its low-pass update.
//
// The table turns the TDC code m into a calibrated jitter value T(m): the
// code is the address, the entry is the estimate. Each entry is trained in
// the background by the estimates that the jitter estimators produce for
// samples whose code was m:
//   T'(m) = (1 - a) T(m) + a x = T(m) + a (x - T(m)),   a = 2^-A_SHIFT,
// a one-pole low-pass filter that keeps the mean of x and removes its noise.
// The multiplications by a and 1 - a are a shift and a subtraction; the
// shifted difference is rounded to nearest.
//
// Interface: lk_addr/lk_data is the lookup port used every clock;
// aux_addr/aux_data is a second read port; upd_valid/upd_addr/upd_x apply
// one update at the next clock edge. Reads are combinational and see the
// old value during the update clock. Entries reset to zero (no correction
// until trained). 128 entries of 23 bits and a = 2^-13 follow the document;
// the zero reset and the rounding are this design's own. The new value lies
// between T(m) and x, so it cannot overflow.
module jmt
  import jc_pkg::*;
#(
  parameter int ENTRIES = 128,
  parameter int A_SHIFT = 13,
  parameter int MW      = $clog2(ENTRIES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [MW-1:0]           lk_addr,
  output logic signed [EPS_W-1:0] lk_data,
  input  logic [MW-1:0]           aux_addr,
  output logic signed [EPS_W-1:0] aux_data,
  input  logic                    upd_valid,
  input  logic [MW-1:0]           upd_addr,
  input  logic signed [EPS_W-1:0] upd_x
);

  logic signed [EPS_W-1:0] tab [ENTRIES];
  logic signed [EPS_W-1:0] t_old;
  logic signed [EPS_W:0]   diff;
  logic signed [EPS_W:0]   step;
  logic signed [EPS_W+1:0] t_new;

  assign lk_data  = tab[lk_addr];
  assign aux_data = tab[aux_addr];

  always_comb begin
    t_old = tab[upd_addr];
    diff  = (EPS_W+1)'(upd_x) - (EPS_W+1)'(t_old);
    step  = (diff + (EPS_W+1)'(2 ** (A_SHIFT - 1))) >>> A_SHIFT;
    t_new = (EPS_W+2)'(t_old) + (EPS_W+2)'(step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (upd_valid) begin
      tab[upd_addr] <= EPS_W'(t_new);
    end
  end

endmodule
