// tb_lossy_acc: drives the lossy accumulator with random cycle jitter, a
// long constant input that drives it into saturation, and gaps in the valid
// signal; checks eps_hat[k] = sat(tau[k] + round(b eps_hat[k-1])) for
// b = 0.9 and b = 0.97, and the one-clock latency.
module tb_lossy_acc;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [22:0] tau_in, eps_out, eps97;
  logic out_valid, ov97;
  longint e9 = 0, e97 = 0;
  int checks = 0, failures = 0, nsat = 0;

  lossy_acc dut (.*);
  lossy_acc #(.B_Q(63570)) dut97 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .tau_in(tau_in),
    .out_valid(ov97), .eps_out(eps97));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tau_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      if (t >= 800 && t < 1000) tau_in = 23'sd2000000;
      else if (t >= 1000 && t < 1100) tau_in = -23'sd2000000;
      else tau_in = 23'(longint'($urandom_range(0, 100000)) - 50000);
      @(posedge clk);
      if (in_valid) begin
        e9  = acc_ref(e9, longint'(tau_in), 58982);
        e97 = acc_ref(e97, longint'(tau_in), 63570);
        if (e9 == 4194303 || e9 == -4194304) nsat++;
      end
      #1;
      checks++;
      if (out_valid != in_valid || longint'(eps_out) != e9 || longint'(eps97) != e97) begin
        failures++;
        $display("t=%0d eps=%0d exp %0d, eps97=%0d exp %0d", t, eps_out, e9, eps97, e97);
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
