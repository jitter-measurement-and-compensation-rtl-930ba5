// tb_stochastic_tdc: feeds the full 127-comparator TDC with clock pairs of
// known time difference and checks the code m = clamp(63 + ceil(t_d / 1 ps),
// 0, 127), read one clock after the pair. Time differences that fall
// exactly on a comparator offset (whole picoseconds) are not applied, since
// a comparator at its offset may decide either way. A second instance is the
// finer TDC of the document's comparison (L = 236, 0.25 ps step, 8-bit code):
// m = clamp(ceil(4 t_d / 1 ps + 117.5), 0, 236), checked except where
// 4 t_d + 117.5 is a whole number (again an edge on an offset).
`timescale 1ps/1fs
module tb_stochastic_tdc;
  localparam int L = 127;
  logic v1 = 0, v2 = 0, rst_n = 0;
  logic [6:0] m;
  logic [7:0] mf;
  int checks = 0, failures = 0;

  stochastic_tdc #(.L(L)) dut (.v1(v1), .v2(v2), .clk(v2), .rst_n(rst_n), .m(m));
  stochastic_tdc #(.L(236), .STEP_PS(0.25)) dut_f (.v1(v1), .v2(v2), .clk(v2), .rst_n(rst_n), .m(mf));

  function automatic bit fine_tie(real td);
    real x;
    x = 4.0 * td + 117.5;
    return (x == $floor(x));
  endfunction

  function automatic int expect_fine(real td);
    int c;
    c = int'($ceil(4.0 * td + 117.5));
    return (c < 0) ? 0 : (c > 236) ? 236 : c;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_code(real td);
    int c;
    c = 63 + int'($ceil(td));
    return (c < 0) ? 0 : (c > L) ? L : c;
  endfunction

  // one 10 ns period: v1 rises at the period start, v2 td later
  task automatic period(real td);
    if (td >= 0) begin v1 = 1; #(td); v2 = 1; #(5000.0 - td); end
    else begin v2 = 1; #(-td); v1 = 1; #(5000.0 + td); end
    v1 = 0; v2 = 0; #5000;
  endtask

  initial begin
    real tds[$];
    real prev;
    bit  have_prev;
    tds = '{0.25, 0.5, -0.5, 1.2, -1.2, 62.5, 63.5, 70.5, -62.5, -70.5, 10.25};
    for (int i = 0; i < 300; i++) tds.push_back((real'($urandom_range(0, 15999)) + 0.5) / 100.0 - 80.0);
    period(0.5); period(0.5);
    rst_n = 1;
    have_prev = 0;
    foreach (tds[i]) begin
      period(tds[i]);
      // the code for the previous pair was registered at this pair's v2 edge
      if (have_prev) begin
        checks++;
        if (int'(m) != expect_code(prev)) begin
          failures++;
          $display("t_d=%f m=%0d expected %0d", prev, m, expect_code(prev));
        end
        if (!fine_tie(prev)) begin
          checks++;
          if (int'(mf) != expect_fine(prev)) begin
            failures++;
            $display("fine TDC: t_d=%f m=%0d expected %0d", prev, mf, expect_fine(prev));
          end
        end
      end
      prev = tds[i];
      have_prev = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
