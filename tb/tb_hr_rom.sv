// tb_hr_rom: reads all 1024 entries through both ports and compares them
// with 5 sin(4 n pi / 5) / (n pi) evaluated in floating point and rounded to
// 17 fractional bits.
module tb_hr_rom;
  import tb_ref_pkg::*;
  localparam int N = 1024;
  logic [9:0] addr_a, addr_b;
  logic signed [17:0] data_a, data_b;
  int checks = 0, failures = 0;

  hr_rom #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 1; n <= N; n++) begin
      addr_a = 10'(n - 1);
      addr_b = 10'(N - n);
      #1;
      checks += 2;
      if (int'(data_a) != hr_ref(n)) begin
        failures++;
        $display("h_r[%0d]=%0d expected %0d", n, data_a, hr_ref(n));
      end
      if (int'(data_b) != hr_ref(N + 1 - n)) begin
        failures++;
        $display("port b h_r[%0d]=%0d expected %0d", N + 1 - n, data_b, hr_ref(N + 1 - n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
