// tb_jitter_calc: checks the serial divider of eq. (34),
// eps_c = trunc((D_r - D_i) * 2^25 / D_u), on random operands of all sign
// combinations, small quotients, saturating quotients and D_u = 0, and
// checks the latency: EPS_W = 23 clocks from start to done, 1 clock for the
// saturated and D_u = 0 cases.
module tb_jitter_calc;
  import tb_ref_pkg::*;
  localparam int XW = 29;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [XW-1:0] x;
  logic signed [17:0] du;
  logic busy, done, ok;
  logic signed [22:0] eps_c;
  int checks = 0, failures = 0, nsat = 0, nzero = 0, nfull = 0;

  jitter_calc #(.XW(XW), .DUW(18)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(longint xv, longint dv);
    int lat;
    longint e;
    @(negedge clk);
    x = XW'(xv); du = 18'(dv); start = 1;
    @(negedge clk);
    start = 0; x = '0; du = '0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (dv == 0) begin
      nzero++;
      if (ok != 1'b0 || lat != 1) begin failures++; $display("D_u=0: ok=%b lat=%0d", ok, lat); end
    end else begin
      e = div_ref(xv, dv);
      if (e == 4194303 || e == -4194303) begin
        nsat++;
        if (lat != 1 && ((xv < 0 ? -xv : xv) * 8 >= (dv < 0 ? -dv : dv))) begin
          failures++; $display("saturation latency %0d", lat);
        end
      end else begin
        nfull++;
        if (lat != 23) begin failures++; $display("latency %0d", lat); end
      end
      if (ok != 1'b1 || longint'(eps_c) != e) begin
        failures++;
        $display("x=%0d du=%0d eps_c=%0d expected %0d", xv, dv, eps_c, e);
      end
    end
  endtask

  initial begin
    x = 0; du = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 100); run(-1, 100); run(1, -100); run(-7, -1000);
    run(12, 0); run(5000, 3); run(-5000, 3); run(0, 55);
    for (int i = 0; i < 400; i++) begin
      longint xv, dv;
      xv = longint'($urandom_range(0, 400)) - 200;
      dv = longint'($urandom_range(0, 131071)) - 65536;
      if (i % 5 == 0) xv = longint'($urandom_range(0, 20000000)) - 10000000;
      run(xv, dv);
    end
    checks++;
    if (nsat == 0 || nzero == 0 || nfull == 0) begin failures++; $display("case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
