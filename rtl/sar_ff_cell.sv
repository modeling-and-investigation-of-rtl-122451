// sar_ff_cell: one output bit of the flip-flop-based SAR.
//
// A D flip-flop whose clock is NAND(s_in, ex): it rises when s_in falls while
// the bit's enable ex is high, so the comparator output com is sampled in the
// middle of the bit's trial period, half a clock after the code changed. An
// active-low clear from RESET empties it. The output is the OR of ex and the
// flip-flop, so the bit reads one while it is being tried and the sampled
// answer afterwards. Gates and connections as in the design's schematic of the
// cell.
//
// The gated clock is the architecture itself. When the token leaves the bit
// (ex falls on a rising s_in edge) the gated clock can rise once more; the
// flip-flop then samples com again while the code is still the one it was
// decided on, so the stored value does not change.
module sar_ff_cell (
  input  logic s_in,
  input  logic ex,
  input  logic com,
  input  logic clr_n,
  output logic out
);
  logic cell_clk;
  logic q;

  assign cell_clk = ~(s_in & ex);

  always_ff @(posedge cell_clk or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= com;
  end

  assign out = q | ex;
endmodule
