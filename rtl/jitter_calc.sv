// jitter_calc: the "jitter calculation" step of a jitter estimator.
//
// If the compensation filter used eps_c, its output would equal the
// reconstructed sample D_r; solving D_r = D_i + (eps_c / eps_u) * D_u gives
//   eps_c = (D_r - D_i) / D_u * eps_u.
// With the number formats of jc_pkg this is eps_c = x * 2^25 / D_u in
// jitter-code units, x = D_r - D_i in ADC LSBs.
//
// A division is needed only once per reconstruction window (2N+1 clocks), so
// it is a serial restoring divider on magnitudes that produces one quotient
// bit per clock. A quotient that would not fit in EPS_W bits is detected
// before the iterations and saturated to +-(2^(EPS_W-1) - 1); the divider
// then needs only EPS_W-1 = 22 iterations. The quotient is truncated toward
// zero. D_u = 0 gives no estimate (ok = 0).
//
// Interface: start (one clock) with x and du, which are taken at that clock
// and need not be held; busy while iterating; done
// pulses one clock with eps_c and ok. Latency: done follows start by
// EPS_W clocks (1 clock for saturated or D_u = 0 cases). A start while busy
// is ignored. Eq. (34) is from the document; the serial divider, the
// saturation and the rounding are this design's choices.
module jitter_calc
  import jc_pkg::*;
#(
  parameter int XW  = 24,
  parameter int DUW = du_width(7)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [XW-1:0]    x,
  input  logic signed [DUW-1:0]   du,
  output logic                    busy,
  output logic                    done,
  output logic                    ok,
  output logic signed [EPS_W-1:0] eps_c
);

  localparam int QB  = EPS_W - 1;
  localparam int PRE = DIV_SHIFT - QB;
  localparam int RW  = (XW + PRE > DUW + 1) ? XW + PRE : DUW + 1;
  localparam int CW  = $clog2(QB + 1);
  localparam logic signed [EPS_W-1:0] EPS_MAX = EPS_W'(2 ** QB - 1);

  logic [RW-1:0]  ax_sh, ad, ad_q, rem, rem2;
  logic [QB-1:0]  q, q_next;
  logic           bit_q;
  logic [CW-1:0]  cnt;
  logic           neg;
  logic signed [XW-1:0]  x_abs;
  logic signed [DUW-1:0] du_abs;

  always_comb begin
    x_abs  = (x < 0) ? -x : x;
    du_abs = (du < 0) ? -du : du;
    ax_sh  = RW'(unsigned'(x_abs)) << PRE;
    ad     = RW'(unsigned'(du_abs));
    rem2  = {rem[RW-2:0], 1'b0};
    bit_q = (rem2 >= ad_q);
    q_next = {q[QB-2:0], bit_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      ok    <= 1'b0;
      eps_c <= '0;
      rem   <= '0;
      ad_q  <= '0;
      q     <= '0;
      cnt   <= '0;
      neg   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          neg <= (x < 0) ^ (du < 0);
          if (du == '0) begin
            done  <= 1'b1;
            ok    <= 1'b0;
            eps_c <= '0;
          end else if (ax_sh >= ad) begin
            done  <= 1'b1;
            ok    <= 1'b1;
            eps_c <= ((x < 0) ^ (du < 0)) ? -EPS_MAX : EPS_MAX;
          end else begin
            busy <= 1'b1;
            rem  <= ax_sh;
            ad_q <= ad;
            q    <= '0;
            cnt  <= '0;
          end
        end
      end else begin
        rem <= bit_q ? rem2 - ad_q : rem2;
        q   <= q_next;
        cnt <= cnt + CW'(1);
        if (cnt == CW'(QB - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          ok    <= 1'b1;
          eps_c <= neg ? -EPS_W'(q_next) : EPS_W'(q_next);
        end
      end
    end
  end

endmodule
