// sar_top: the two successive approximation register architectures.
//
// The register can be built with latch trigger cells (sar_latch) or with
// flip-flop trigger cells (sar_ff); both have the same pins and take the same
// number of clocks per conversion. This top carries one of each, side by
// side, each with its own pins (prefix l_ for the latch version, f_ for the
// flip-flop version), so that either can be wired into an ADC.
//
// In an ADC the code out drives a DAC (for a 14-bit converter OUT14..OUT1),
// the DAC voltage and the measured voltage go to a comparator, and the
// comparator output comes back on com; s_out can start a sampling switch.
// The DAC and comparator are analog and are not part of this RTL.
module sar_top
  import sar_pkg::*;
#(
  parameter int unsigned N_BITS = SAR_BITS
) (
  input  logic              l_com,
  input  logic              l_reset_n,
  input  logic              l_s_in,
  output logic [N_BITS-1:0] l_out,
  output logic              l_s_out,
  input  logic              f_com,
  input  logic              f_reset_n,
  input  logic              f_s_in,
  output logic [N_BITS-1:0] f_out,
  output logic              f_s_out
);
  sar_latch #(.N_BITS(N_BITS)) u_sar_latch (
    .com     (l_com),
    .reset_n (l_reset_n),
    .s_in    (l_s_in),
    .out     (l_out),
    .s_out   (l_s_out)
  );

  sar_ff #(.N_BITS(N_BITS)) u_sar_ff (
    .com     (f_com),
    .reset_n (f_reset_n),
    .s_in    (f_s_in),
    .out     (f_out),
    .s_out   (f_s_out)
  );
endmodule
