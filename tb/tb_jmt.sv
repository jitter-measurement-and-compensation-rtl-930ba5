// tb_jmt: random lookups and low-pass updates of the 128-entry mapping table
// (a = 2^-3 to make changes visible, then the default a = 2^-13 in a second
// instance), checked against a model of T' = T + round((x - T) / 2^a).
module tb_jmt;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [6:0] lk_addr, aux_addr, upd_addr;
  logic signed [22:0] lk_data, aux_data, lk13, aux13;
  logic upd_valid;
  logic signed [22:0] upd_x;
  longint T3[128], T13[128];
  int checks = 0, failures = 0;

  jmt #(.ENTRIES(128), .A_SHIFT(3)) dut (.*);
  jmt #(.ENTRIES(128), .A_SHIFT(13)) dut13 (.clk(clk), .rst_n(rst_n), .lk_addr(lk_addr), .lk_data(lk13),
    .aux_addr(aux_addr), .aux_data(aux13), .upd_valid(upd_valid), .upd_addr(upd_addr), .upd_x(upd_x));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (T3[i]) begin T3[i] = 0; T13[i] = 0; end
    upd_valid = 0; upd_addr = 0; upd_x = 0; lk_addr = 0; aux_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      upd_valid = ($urandom_range(0, 1) == 1);
      upd_addr  = 7'($urandom_range(60, 70));
      upd_x     = (t % 3 == 0) ? 23'($urandom) : 23'(longint'($urandom_range(0, 200000)) - 100000);
      lk_addr   = 7'($urandom_range(58, 72));
      aux_addr  = 7'($urandom_range(58, 72));
      #1;
      checks += 4;
      if (lk_data != T3[lk_addr] || aux_data != T3[aux_addr] ||
          lk13 != T13[lk_addr] || aux13 != T13[aux_addr]) begin
        failures++;
        $display("t=%0d read mismatch addr %0d: %0d vs %0d", t, lk_addr, lk_data, T3[lk_addr]);
      end
      @(posedge clk);
      if (upd_valid) begin
        T3[upd_addr]  = lpf_ref(T3[upd_addr], longint'(upd_x), 3);
        T13[upd_addr] = lpf_ref(T13[upd_addr], longint'(upd_x), 13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
