// tdc_adder: the summing stage of the stochastic time-to-digital converter.
//
// Every clock cycle it counts how many of the L timing-comparator outputs
// are 1 and registers that count as the TDC code m (0 <= m <= L). A plain
// population count followed by one register; an adder tree is left to
// synthesis. The comparator bits come from latches that settle shortly after
// the clock pair they compare, so they are sampled one clock later: the code
// for the comparison made at clock edge k is valid after edge k+1.
//
// Interface: clk, rst_n (asynchronous, active low, clears m), cmp[L-1:0]
// comparator decisions, m the registered count. L = 127 follows the
// document's implementation example; the output register and reset are this
// design's own choices.
module tdc_adder #(
  parameter int L = 127,
  parameter int MW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [L-1:0]  cmp,
  output logic [MW-1:0] m
);

  logic [MW-1:0] count;

  always_comb begin
    count = '0;
    for (int i = 0; i < L; i++) count = count + MW'(cmp[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) m <= '0;
    else        m <= count;
  end

endmodule
