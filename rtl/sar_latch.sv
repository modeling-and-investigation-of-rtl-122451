// sar_latch: successive approximation register with latch trigger cells.
//
// Pins as on the register's symbol: com (comparator output, high when the
// measured voltage is above the DAC voltage), reset_n (RESET, active low),
// s_in (clock), out (OUT14..OUT0, the code to the DAC) and s_out (high for
// one clock just before the conversion starts, e.g. to prepare a capacitor
// DAC).
//
// The sequencer moves a single token across the bits, most significant
// first, one bit per s_in period. The bit holding the token drives a one on
// its output (a trial), and its latch follows com; when the token moves on at
// the next rising s_in edge the latch keeps com's answer, so the bit stays one
// only if the measured voltage was at or above the trial level. With
// N_BITS = 15: reset_n rises, then the third rising s_in edge starts the trial
// of OUT14, the (N_BITS+2)-th that of OUT0, and after the (N_BITS+3)-th edge
// the code is final and stays until the next reset.
//
// com must settle within one s_in period after each code change: the latch
// closes at the rising edge that ends the bit's period.
module sar_latch
  import sar_pkg::*;
#(
  parameter int unsigned N_BITS = SAR_BITS
) (
  input  logic              com,
  input  logic              reset_n,
  input  logic              s_in,
  output logic [N_BITS-1:0] out,
  output logic              s_out
);
  logic [N_BITS-1:0] ex;

  sar_sequencer #(.N_BITS(N_BITS)) u_seq (
    .s_in    (s_in),
    .reset_n (reset_n),
    .s_out   (s_out),
    .ex      (ex)
  );

  for (genvar k = 0; k < N_BITS; k++) begin : g_bit
    sar_latch_cell u_cell (
      .d     (com),
      .e     (ex[k]),
      .clr_n (reset_n),
      .out   (out[k])
    );
  end
endmodule
