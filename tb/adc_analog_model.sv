// adc_analog_model: real-valued model of the analog half of a 14-bit SAR ADC
// built with an ordinary (resistive) DAC. Behavioural model for simulation
// only.
//
// The 14-bit DAC is made of an ideal 12-bit DAC, driven by OUT14..OUT3 with
// reference uref, and an ideal 8-bit DAC whose two top inputs are OUT2 and
// OUT1 (the other six tied low) and whose reference is one quantum of the
// 12-bit DAC, uref/4096; a summing stage adds the two outputs. The 15-bit
// register's OUT0 is not used. The comparator output com is high when the
// measured voltage ux is above the DAC voltage udac and follows a change of
// the code after CMP_DELAY.
`timescale 1ns/1ps
module adc_analog_model #(
  parameter realtime CMP_DELAY = 20ns
) (
  input  logic [14:0] code,
  input  real         ux,
  input  real         uref,
  output real         udac,
  output logic        com
);
  logic [11:0] db12;
  logic [7:0]  db8;
  real u12, u8;

  assign db12 = code[14:3];
  assign db8  = {code[2:1], 6'b000000};

  always_comb begin
    u12  = real'(db12) * uref / 4096.0;
    u8   = real'(db8) * (uref / 4096.0) / 256.0;
    udac = u12 + u8;
  end

  initial com = 1'b0;
  always @(udac or ux) com <= #(CMP_DELAY) (ux > udac);
endmodule
