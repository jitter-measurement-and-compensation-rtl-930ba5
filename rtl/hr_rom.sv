// hr_rom: coefficient ROM of the signal reconstruction filters, shared by
// the two reconstruction filters of the calibration processor (one read port
// each).
//
// Entry n-1 holds h_r[n] = 5 sin(4 n pi / 5) / (n pi) for n = 1..N, the
// coefficients of a reconstruction filter whose band reaches 0.4 f_s, as
// 18-bit two's complement numbers with 17 fractional bits. The contents are
// computed when the design is elaborated (jc_pkg::hr_code), so no data file
// is needed. Reads are combinational (address in, coefficient out in the
// same cycle). N = 2^10 and the 18-bit width follow the document; the
// binary point and the rounding to nearest are this design's choice.
module hr_rom
  import jc_pkg::*;
#(
  parameter int N  = 1024,
  parameter int AW = $clog2(N)
) (
  input  logic [AW-1:0]          addr_a,
  output logic signed [HR_W-1:0] data_a,
  input  logic [AW-1:0]          addr_b,
  output logic signed [HR_W-1:0] data_b
);

  logic signed [HR_W-1:0] rom [N];

  initial begin
    for (int i = 0; i < N; i++) rom[i] = HR_W'(hr_code(i + 1));
  end

  assign data_a = rom[addr_a];
  assign data_b = rom[addr_b];

endmodule
