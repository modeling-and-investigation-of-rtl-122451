// shift_storage_reg: serial-in shift register with an output storage register.
//
// Behaves like one 74'594 part as used in the token chain of the SAR. On a
// rising edge of sck the shift stages move up by one position (stage 0 takes
// ser). On a rising edge of rck the storage register q copies the shift stages
// as they were before that edge, so when rck and sck are the same clock the
// outputs q lag the shift stages by one clock. q7s is the last shift stage
// (Q7' on the part), used to cascade a second register. sclr_n and rclr_n are
// asynchronous, active-low clears of the shift and storage stages.
// The pin set follows the part drawn in the design; the storage-register
// behaviour is the standard one of that part.
module shift_storage_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sck,
  input  logic             rck,
  input  logic             sclr_n,
  input  logic             rclr_n,
  input  logic             ser,
  output logic [WIDTH-1:0] q,
  output logic             q7s
);
  logic [WIDTH-1:0] sr;

  always_ff @(posedge sck or negedge sclr_n) begin
    if (!sclr_n) sr <= '0;
    else         sr <= {sr[WIDTH-2:0], ser};
  end

  always_ff @(posedge rck or negedge rclr_n) begin
    if (!rclr_n) q <= '0;
    else         q <= sr;
  end

  assign q7s = sr[WIDTH-1];
endmodule
