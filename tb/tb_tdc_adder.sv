// tb_tdc_adder: drives random and extreme comparator patterns into the TDC
// adder (L = 127) and checks that the registered code equals the number of
// ones, one clock after the pattern is applied.
module tb_tdc_adder;
  localparam int L  = 127;
  localparam int MW = 7;
  logic clk = 0, rst_n = 0;
  logic [L-1:0]  cmp;
  logic [MW-1:0] m;
  int checks = 0, failures = 0;

  tdc_adder #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .cmp(cmp), .m(m));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_m;
    cmp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      case (t)
        0: cmp = '0;
        1: cmp = '1;
        default: begin
          // thermometer-like patterns and random ones
          if (t % 2 == 0) begin
            int k;
            k = $urandom_range(0, L);
            cmp = '0;
            for (int i = 0; i < k; i++) cmp[i] = 1'b1;
          end else begin
            for (int i = 0; i < L; i++) cmp[i] = 1'($urandom_range(0, 1));
          end
        end
      endcase
      expect_m = 0;
      for (int i = 0; i < L; i++) expect_m += int'(cmp[i]);
      @(posedge clk); #1;
      checks++;
      if (int'(m) != expect_m) begin
        failures++;
        $display("mismatch t=%0d m=%0d expected %0d", t, m, expect_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
