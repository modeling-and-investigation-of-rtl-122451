// sar_latch_cell: one output bit of the latch-based SAR.
//
// A D latch with an active-low asynchronous clear. While the enable e (the
// bit's token from the sequencer) is high the latch is transparent to d (the
// comparator output); when e falls, at the s_in edge that moves the token on,
// it keeps the comparator's last answer. The output is the OR of e and the
// latch, so the bit reads one while it is being tried and the kept answer
// afterwards. Structure (latch, OR gate, clear from RESET) as in the design's
// schematic.
//
// The latch is intended: it is the storage element of this architecture.
module sar_latch_cell (
  input  logic d,
  input  logic e,
  input  logic clr_n,
  output logic out
);
  logic q;

  always_latch begin
    if (!clr_n)  q = 1'b0;
    else if (e)  q = d;
  end

  assign out = q | e;
endmodule
