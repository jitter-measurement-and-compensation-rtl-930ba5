// srf_mac: signal reconstruction filter (SRF) built as a cyclic
// multiply-accumulate unit.
//
// It rebuilds the sample at the centre of a window from its 2N neighbours:
//   D_r[k] = sum_{n=1..N} h_r[n] * (D_i[k-n] + D_i[k+n])
// Instead of 2N multipliers it uses one multiplier and one accumulator. The
// samples stream through in order; the window position pos counts
// 0..2N, the centre sample D_i[k] is at pos = N, and each other sample is
// multiplied by h_r[|pos-N|] and added up as it passes. No sample buffer is
// needed, and one D_r is produced every 2N+1 samples; the next window starts
// with the sample after the last one of this window.
//
// Interface: in_valid/sample is the sample stream (one per clock when
// valid); rom_addr/rom_data is a combinational read port of hr_rom
// (rom_addr = |pos-N| - 1); pos tells the enclosing estimator where the
// window stands; dr_valid pulses for one clock after the last sample of a
// window with D_r in dr (in D_i LSBs, rounded to nearest, wide enough for any
// input). Reset clears pos and the accumulator. The MAC architecture and N
// follow the document; the rounding and the exact handshake are this
// design's own.
module srf_mac
  import jc_pkg::*;
#(
  parameter int N     = 1024,
  parameter int AW    = $clog2(N),
  parameter int PW    = $clog2(2 * N + 1),
  parameter int ACC_W = HR_W + DI_W + $clog2(2 * N),
  parameter int DR_W  = ACC_W - HR_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [DI_W-1:0]  sample,
  output logic [AW-1:0]           rom_addr,
  input  logic signed [HR_W-1:0]  rom_data,
  output logic [PW-1:0]           pos,
  output logic                    dr_valid,
  output logic signed [DR_W-1:0]  dr
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] prod;
  logic signed [ACC_W-1:0] acc_next;
  logic [PW-1:0]           offs;

  always_comb begin
    offs     = (pos >= PW'(N)) ? pos - PW'(N) : PW'(N) - pos;
    rom_addr = AW'(offs - PW'(1));
    prod     = (pos == PW'(N)) ? '0 : ACC_W'(rom_data) * ACC_W'(sample);
    acc_next = acc + prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      pos      <= '0;
      dr_valid <= 1'b0;
      dr       <= '0;
    end else begin
      dr_valid <= 1'b0;
      if (in_valid) begin
        if (pos == PW'(2 * N)) begin
          pos      <= '0;
          acc      <= '0;
          dr_valid <= 1'b1;
          dr       <= DR_W'((acc_next + ACC_W'(2 ** (HR_FRAC - 1))) >>> HR_FRAC);
        end else begin
          pos <= pos + PW'(1);
          acc <= acc_next;
        end
      end
    end
  end

endmodule
