// stochastic_tdc: stochastic time-to-digital converter. Behavioural model:
// it wraps L behavioural timing comparators around the synthesizable adder,
// so as a whole it is for simulation only.
//
// All L comparators see the same two clocks v1 and v2 and compare the time
// t_d from the rising edge of v1 to that of v2 against their own offsets.
// The adder counts the comparators that decided t_d > t_os, so the code m
// grows with t_d; like a flash converter it produces one code per clock.
// In silicon the offsets are random (the document reports sigma = 6.36 ps in
// 90 nm CMOS); this model places them evenly, t_os(i) = (i - (L-1)/2) *
// STEP_PS, which gives the uniform 1 ps quantization step that the
// document's own system simulations assume. With L = 127 the code is
// m = 63 + ceil(t_d / 1 ps), limited to 0..127, and m = 63 means
// -1 ps < t_d <= 0.
//
// Interface: v1, v2 the two clocks; clk samples the comparator outputs (the
// code for the pair compared at edge k is valid after edge k+1); rst_n clears
// the code. L = 127 follows the document; the even offset placement is this
// model's choice.
module stochastic_tdc #(
  parameter int  L       = 127,
  parameter real STEP_PS = 1.0,
  parameter int  MW      = $clog2(L + 1)
) (
  input  logic          v1,
  input  logic          v2,
  input  logic          clk,
  input  logic          rst_n,
  output logic [MW-1:0] m
);

  logic [L-1:0] cmp;

  for (genvar i = 0; i < L; i++) begin : g_tcmp
    tcmp #(
      .TOS_PS((real'(i) - real'(L - 1) / 2.0) * STEP_PS)
    ) u_tcmp (
      .v1(v1),
      .v2(v2),
      .vo(cmp[i])
    );
  end

  tdc_adder #(.L(L), .MW(MW)) u_adder (
    .clk  (clk),
    .rst_n(rst_n),
    .cmp  (cmp),
    .m    (m)
  );

endmodule
