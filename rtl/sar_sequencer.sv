// sar_sequencer: one-hot token chain that steps the SAR through its bits.
//
// While reset_n (RESET) is low every stage is cleared and the start
// flip-flop is preset to one. The first rising edge of s_in after reset_n
// goes high loads that one into the first shift stage and clears the start
// flip-flop (its D input is tied to zero), so exactly one token enters the
// chain. The token then moves one stage per rising edge through the storage
// outputs of the cascaded shift/storage registers:
//   edge 2         : s_out (storage Q0 of the first part) is high
//   edge 3         : ex[N_BITS-1] (OUT14) is high
//   ...
//   edge N_BITS+2  : ex[0] (OUT0) is high
//   edge N_BITS+3  : all enables low, the conversion is finished
// Each enable is high for exactly one s_in period. The token passes once and
// the chain stays empty until the next reset.
//
// The start flip-flop, the two 8-bit parts and their shared clocks and
// clears follow the design's schematic. The cascade between the parts uses
// the last shift stage of the first part (Q7'), a choice of this design that
// keeps the token moving one stage per clock.
module sar_sequencer
  import sar_pkg::*;
#(
  parameter int unsigned N_BITS = SAR_BITS
) (
  input  logic              s_in,
  input  logic              reset_n,
  output logic              s_out,
  output logic [N_BITS-1:0] ex
);
  localparam int unsigned STAGES = N_BITS + 1;
  localparam int unsigned NPARTS = (STAGES + SR_WIDTH - 1) / SR_WIDTH;

  // Start flip-flop: preset by RESET, D tied to 0.
  logic start_q;
  always_ff @(posedge s_in or negedge reset_n) begin
    if (!reset_n) start_q <= 1'b1;
    else          start_q <= 1'b0;
  end

  logic [NPARTS*SR_WIDTH-1:0] stage_q;
  logic [NPARTS:0]            cascade;
  assign cascade[0] = start_q;

  for (genvar p = 0; p < NPARTS; p++) begin : g_part
    shift_storage_reg #(.WIDTH(SR_WIDTH)) u_sr (
      .sck    (s_in),
      .rck    (s_in),
      .sclr_n (reset_n),
      .rclr_n (reset_n),
      .ser    (cascade[p]),
      .q      (stage_q[p*SR_WIDTH +: SR_WIDTH]),
      .q7s    (cascade[p+1])
    );
  end

  // Stage 0 is S_OUT; stage k (1..N_BITS) enables bit N_BITS-k.
  assign s_out = stage_q[0];
  for (genvar k = 0; k < N_BITS; k++) begin : g_ex
    assign ex[k] = stage_q[N_BITS - k];
  end

  // Only one bit may be under trial at a time (during reset all are zero).
  a_onehot : assert property (@(posedge s_in) $onehot0({s_out, ex}));
endmodule
