// sar_ff: successive approximation register with flip-flop trigger cells.
//
// Same pins and the same token sequencer as sar_latch (com, reset_n active
// low, s_in, out = OUT14..OUT0, s_out). The difference is the bit cell: each
// bit is a D flip-flop clocked by NAND(s_in, enable), so it samples com on
// the falling s_in edge in the middle of the bit's trial period instead of at
// its end. com must therefore settle within half an s_in period (the high
// phase) after each code change.
//
// Timing with N_BITS = 15: OUT14 is tried after the third rising s_in edge
// once reset_n is high, OUT0 after the (N_BITS+2)-th; OUT0 is decided on the
// following falling edge and the code is final from then on.
module sar_ff
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
    sar_ff_cell u_cell (
      .s_in  (s_in),
      .ex    (ex[k]),
      .com   (com),
      .clr_n (reset_n),
      .out   (out[k])
    );
  end
endmodule
