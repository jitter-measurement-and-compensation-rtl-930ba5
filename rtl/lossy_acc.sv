// lossy_acc: lossy accumulator that turns cycle jitter into absolute jitter.
//
// When the TDC can only compare each clock edge with the previous one, the
// table gives the cycle jitter tau_hat[k] = eps[k] - eps[k-1], and the
// absolute jitter is its running sum. A plain sum would integrate any dc
// left in the TDC's quantization noise and overflow, so the sum leaks:
//   eps_hat[k] = tau_hat[k] + b * eps_hat[k-1],   b < 1.
// b is an unsigned fraction with B_FRAC = 16 bits (B_Q / 2^16); the default
// 58982 is 0.9, the value the document chooses for a 1 ps TDC step (0.97,
// B_Q = 63570, suits a 0.25 ps step). The product is rounded to nearest and
// the sum saturates to the EPS_W-bit range.
//
// Interface: in_valid/tau_in (one value per clock), out_valid/eps_out one
// clock later. Reset clears the state. The recursion and b follow the
// document; the fixed-point b, rounding and saturation are this design's.
module lossy_acc
  import jc_pkg::*;
#(
  parameter int unsigned B_Q = 58982
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [EPS_W-1:0] tau_in,
  output logic                    out_valid,
  output logic signed [EPS_W-1:0] eps_out
);

  localparam int PW = EPS_W + B_FRAC + 2;
  localparam logic signed [EPS_W+1:0] SAT_HI = (EPS_W+2)'(2 ** (EPS_W - 1) - 1);
  localparam logic signed [EPS_W+1:0] SAT_LO = -(EPS_W+2)'(2 ** (EPS_W - 1));

  logic signed [PW-1:0]      prod;
  logic signed [EPS_W+1:0]   leak;
  logic signed [EPS_W+1:0]   sum;

  always_comb begin
    prod = PW'(eps_out) * PW'(signed'({1'b0, B_FRAC'(B_Q)}));
    leak = (EPS_W+2)'((prod + PW'(2 ** (B_FRAC - 1))) >>> B_FRAC);
    sum  = (EPS_W+2)'(tau_in) + leak;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eps_out   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (sum > SAT_HI)      eps_out <= EPS_W'(SAT_HI);
        else if (sum < SAT_LO) eps_out <= EPS_W'(SAT_LO);
        else                   eps_out <= EPS_W'(sum);
      end
    end
  end

  initial assert (B_Q < 2 ** B_FRAC) else $error("lossy_acc: b must be below 1");

endmodule
