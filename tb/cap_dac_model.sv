// cap_dac_model: real-valued model of a 14-bit charge-redistribution
// (capacitor) DAC with its comparator. Behavioural model for simulation only.
//
// In steady state the voltage at the comparator's inverting input is
// code * uref / 2^14 - ux, so com (high when that voltage is below zero) is
// high while the trial code is below the measured voltage. After a code
// change the voltage does not jump: it approaches the new steady value as one
// exponential with the time constant of the largest capacitor,
// tau = r_on * c_unit * 2^13, where r_on is the switches' on-resistance. The
// model advances the voltage in steps of STEP. The code is OUT14..OUT1 of the
// register.
`timescale 1ns/1ps
module cap_dac_model #(
  parameter realtime STEP = 1ns
) (
  input  logic [14:0] code,
  input  real         ux,
  input  real         uref,
  input  real         r_on,     // ohm
  input  real         c_unit,   // farad
  output real         vneg,     // voltage at the comparator's inverting input
  output logic        com
);
  real target, tau_ns;

  assign target = real'(code[14:1]) * uref / 16384.0 - ux;
  assign tau_ns = r_on * c_unit * 8192.0 * 1.0e9;
  assign com    = (vneg < 0.0);

  initial begin
    vneg = 0.0;
    forever begin
      #(STEP);
      vneg = target + (vneg - target) * $exp(-(STEP / 1ns) / tau_ns);
    end
  end
endmodule
