// tb_adc_cap_dac: the latch-based SAR in a 14-bit ADC with a capacitor DAC.
//
// The capacitor DAC settles after each code change with the time constant of
// its largest capacitor, tau = R*C*2^13. With R = 1 ohm and C = 3 pF this is
// 24.576 ns, and reaching the final value within a relative error of 2^-14
// takes t = -ln(2^-14) * tau = 238.5 ns. The latch-based register gives the
// DAC and comparator one whole clock period per bit, so:
//  * with a 300 ns clock period every conversion must give the ideal code
//    (the level just below ux, computed from ux directly);
//  * with a 60 ns clock period the DAC has not settled when the latch closes
//    and at least one of the same inputs must convert to a wrong code.
// The test also checks the 238.5 ns value itself, and reports the shortest
// clock period (in 10 ns steps) at which all its inputs convert correctly.
`timescale 1ns/1ps
module tb_adc_cap_dac;
  localparam int N = 15;
  localparam real R_ON = 1.0;
  localparam real C_UNIT = 3.0e-12;
  localparam int  NIN = 12;

  logic com, reset_n = 1, s_in = 0, s_out;
  logic [N-1:0] out;
  real ux = 0.0, uref = 5.12, vneg;
  real r_on = R_ON, c_unit = C_UNIT;
  int checks = 0, failures = 0;
  int n_wrong_fast = 0, n_right_slow = 0;

  sar_latch dut (.com(com), .reset_n(reset_n), .s_in(s_in), .out(out), .s_out(s_out));
  cap_dac_model u_dac (.code(out), .ux(ux), .uref(uref), .r_on(r_on), .c_unit(c_unit),
                       .vneg(vneg), .com(com));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic convert(real v, realtime period, output logic [13:0] code);
    ux = v;
    reset_n = 0;
    #(5 * period);                         // let the DAC discharge to -ux
    reset_n = 1;
    for (int e = 1; e <= N + 3; e++) begin
      #(period / 2) s_in = 1;
      #(period / 2) s_in = 0;
    end
    code = out[14:1];
  endtask

  initial begin
    #50ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real q, tau, t_settle, vin [NIN];
    int k [NIN];
    logic [13:0] code;
    q = uref / 16384.0;
    tau = R_ON * C_UNIT * 8192.0;
    t_settle = -$ln(1.0 / 16384.0) * tau;
    $display("tau = %f ns, settling time = %f ns", tau * 1e9, t_settle * 1e9);
    chk(t_settle > 238.0e-9 && t_settle < 239.0e-9, "settling time 238.5 ns");
    k[0] = 8811;                           // 2.7535 V of the worked example
    for (int i = 1; i < NIN; i++) k[i] = int'($urandom_range(16383, 0));
    for (int i = 0; i < NIN; i++) vin[i] = (real'(k[i]) + 0.5) * q;
    #1ns;
    for (int i = 0; i < NIN; i++) begin
      convert(vin[i], 300ns, code);
      chk(code == 14'(k[i]), $sformatf("300 ns clock: ux=%f code %0d expected %0d", vin[i], code, k[i]));
      if (code == 14'(k[i])) n_right_slow++;
    end
    for (int i = 0; i < NIN; i++) begin
      convert(vin[i], 60ns, code);
      if (code != 14'(k[i])) n_wrong_fast++;
    end
    $display("300 ns clock: %0d of %0d correct; 60 ns clock: %0d of %0d wrong",
             n_right_slow, NIN, n_wrong_fast, NIN);
    chk(n_wrong_fast > 0, "too fast a clock gives a wrong code");
    // Shortest clock period, in 10 ns steps, at which all inputs convert.
    begin
      int shortest;
      bit all_ok;
      shortest = 0;
      for (int p = 300; p >= 100; p -= 10) begin
        all_ok = 1;
        for (int i = 0; i < NIN; i++) begin
          convert(vin[i], p * 1ns, code);
          if (code != 14'(k[i])) all_ok = 0;
        end
        if (!all_ok) break;
        shortest = p;
      end
      $display("shortest clock period with all %0d codes right: %0d ns", NIN, shortest);
      chk(shortest >= 100 && shortest <= 300, "shortest period lies between the two tested ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
