// tb_tcmp: applies rising-edge pairs with known time differences t_d
// (both orders, values just either side of the offset, v1 starting a cycle
// early) to timing comparators with offsets of +3 ps and -4 ps and checks the
// decisions vo = (t_d > t_os) shortly after the later edge.
`timescale 1ps/1fs
module tb_tcmp;
  logic v1 = 0, v2 = 0, vo, von;
  int checks = 0, failures = 0;

  tcmp #(.TOS_PS(3.0))  dut   (.v1(v1), .v2(v2), .vo(vo));
  tcmp #(.TOS_PS(-4.0)) dut_n (.v1(v1), .v2(v2), .vo(von));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pair(real td_ps);
    // rising edges separated by td_ps (v2 - v1), then both fall
    if (td_ps >= 0) begin
      v1 = 1; #(td_ps); v2 = 1;
    end else begin
      v2 = 1; #(-td_ps); v1 = 1;
    end
    #100;
    checks++;
    if (vo != (td_ps > 3.0)) begin
      failures++;
      $display("t_d=%f vo=%b", td_ps, vo);
    end
    checks++;
    if (von != (td_ps > -4.0)) begin
      failures++;
      $display("t_d=%f vo(-4 ps)=%b", td_ps, von);
    end
    #4900; v1 = 0; v2 = 0; #5000;
  endtask

  initial begin
    real tds[] = '{0.0, 2.5, 3.5, -10.0, 50.0, 2.999, 3.001, -0.5, 10.0, 1.0, 20.0, -60.0, -3.999, -4.001};
    #1000;
    foreach (tds[i]) pair(tds[i]);
    for (int i = 0; i < 200; i++) pair((real'($urandom_range(0, 19999)) + 0.5) / 100.0 - 100.0);
    // v1 starts one period before v2: the first lone edge must not pair
    v1 = 1; #5000; v1 = 0; #4990; v1 = 1; #20; v2 = 1; #100;
    checks++;
    if (vo != 1'b1) begin failures++; $display("lead-in pairing wrong"); end
    #4880; v1 = 0; v2 = 0; #5000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
