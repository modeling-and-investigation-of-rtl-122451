// tb_sar_top: end-to-end test of both SAR architectures in a 14-bit ADC.
//
// Each register of sar_top (latch version and flip-flop version, default
// parameters) drives its own model of the ordinary 14-bit DAC and
// comparator. Checks:
//  * the worked conversion with uref = 5.12 V, ux = 2.7535 V: the DAC voltage
//    of every trial (2.56, 3.84, 3.20, ... 2.7534375 V), the comparator's
//    answer to it and the final code 10001001101011;
//  * random input voltages placed between two code levels: final code equals
//    the level below ux, computed from ux directly;
//  * both architectures deliver the 14-bit code after the same number of
//    rising clock edges, 17 (the 15th bit, OUT0, is decided one edge later);
//  * a reset in the middle of a conversion restarts it.
// Every mechanism (start marker on s_out, bit kept, bit dropped, restart by
// reset) is counted and must have happened.
`timescale 1ns/1ps
module tb_sar_top;
  localparam int N = 15;
  localparam realtime HALF = 500ns;

  logic l_com, l_reset_n = 1, l_s_in = 0, l_s_out;
  logic f_com, f_reset_n = 1, f_s_in = 0, f_s_out;
  logic [N-1:0] l_out, f_out;
  real l_ux = 0.0, f_ux = 0.0, uref = 5.12, l_udac, f_udac;
  int checks = 0, failures = 0;
  int n_sout = 0, n_kept = 0, n_dropped = 0, n_restart = 0;

  sar_top dut (.*);

  adc_analog_model u_l_ana (.code(l_out), .ux(l_ux), .uref(uref), .udac(l_udac), .com(l_com));
  adc_analog_model u_f_ana (.code(f_out), .ux(f_ux), .uref(uref), .udac(f_udac), .com(f_com));

  // Worked example: DAC voltage of each trial and the comparator's answer.
  localparam real TAB_UDAC [14] = '{2.56, 3.84, 3.20, 2.88, 2.72, 2.80, 2.76, 2.74,
                                    2.75, 2.755, 2.7525, 2.75375, 2.753125, 2.7534375};
  localparam bit  TAB_COM  [14] = '{1, 0, 0, 0, 1, 0, 0, 1, 1, 0, 1, 0, 1, 1};

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL ux=%f/%f %s", l_ux, f_ux, what); end
  endtask

  function automatic bit close(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  // One conversion on both registers together, each with its own input
  // voltage; stop_at > 0 resets both before that clock edge.
  task automatic convert(real vl, real vf, bit table_check, int stop_at);
    l_ux = vl; f_ux = vf;
    l_reset_n = 0; f_reset_n = 0;
    #(HALF);
    chk(l_out == '0 && f_out == '0, "reset clears code");
    l_reset_n = 1; f_reset_n = 1;
    for (int e = 1; e <= N + 5; e++) begin
      if (e == stop_at) begin
        l_reset_n = 0; f_reset_n = 0; #10;
        chk(l_out == '0 && f_out == '0 && !l_s_out && !f_s_out, "reset mid-conversion");
        n_restart++;
        return;
      end
      #(HALF) l_s_in = 1; f_s_in = 1;
      #(HALF - 1ns);                       // just before the falling edge
      if (e == 2) begin
        chk(l_s_out && f_s_out, "s_out marker");
        if (l_s_out) n_sout++;
      end
      if (table_check && e >= 3 && e <= 16) begin
        chk(close(l_udac, TAB_UDAC[e-3]) && close(f_udac, TAB_UDAC[e-3]), $sformatf("trial %0d DAC voltage %f", e - 2, l_udac));
        chk(l_com == TAB_COM[e-3] && f_com == TAB_COM[e-3], $sformatf("trial %0d comparator", e - 2));
      end
      if (e >= 3 && e <= 16) begin
        if (l_com) n_kept++; else n_dropped++;
      end
      l_s_in = 0; f_s_in = 0;
      #1ns;
    end
  endtask

  task automatic edge_count(real v, output int l_done, output int f_done);
    // Count rising edges until the 14-bit code reaches its final value.
    logic [13:0] expect_code;
    expect_code = 14'($floor(v / (uref / 16384.0)));
    l_ux = v; f_ux = v;
    l_reset_n = 0; f_reset_n = 0; #(HALF);
    l_reset_n = 1; f_reset_n = 1;
    l_done = -1; f_done = -1;
    for (int e = 1; e <= N + 5; e++) begin
      #(HALF) l_s_in = 1; f_s_in = 1;
      #(HALF) l_s_in = 0; f_s_in = 0;
      #1ns;
      if (l_done < 0 && l_out[14:1] == expect_code && e > 2 && dut.u_sar_latch.u_seq.ex[14:1] == '0) l_done = e;
      if (f_done < 0 && f_out[14:1] == expect_code && e > 2 && dut.u_sar_ff.u_seq.ex[14:1] == '0) f_done = e;
    end
    chk(l_out[14:1] == expect_code && f_out[14:1] == expect_code, "final code");
  endtask

  initial begin
    #100ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ld, fd, k, k2;
    real q;
    q = uref / 16384.0;
    #1ns;
    // Worked example.
    convert(2.7535, 2.7535, 1, 0);
    chk(l_out[14:1] == 14'b10001001101011, $sformatf("worked example latch code %b", l_out[14:1]));
    chk(f_out[14:1] == 14'b10001001101011, $sformatf("worked example flip-flop code %b", f_out[14:1]));
    // Reset part-way through, then a full conversion.
    convert(1.0, 1.0, 0, 9);
    convert(3200.5 * q, 3200.5 * q, 0, 0);
    chk(l_out[14:1] == 14'd3200 && f_out[14:1] == 14'd3200, "after restart");
    // Random voltages half a step above a code level.
    for (int i = 0; i < 30; i++) begin
      k  = int'($urandom_range(16383, 0));
      k2 = int'($urandom_range(16383, 0));
      convert((real'(k) + 0.5) * q, (real'(k2) + 0.5) * q, 0, 0);
      chk(l_out[14:1] == 14'(k), $sformatf("latch random code %0d got %0d", k, l_out[14:1]));
      chk(f_out[14:1] == 14'(k2), $sformatf("flip-flop random code %0d got %0d", k2, f_out[14:1]));
    end
    // Conversion time in clock edges, the same for both.
    edge_count(2.7535, ld, fd);
    chk(ld == 17 && fd == 17, $sformatf("14-bit code final after edge 17: latch %0d flip-flop %0d", ld, fd));
    $display("mechanisms: s_out=%0d kept=%0d dropped=%0d restart=%0d", n_sout, n_kept, n_dropped, n_restart);
    chk(n_sout > 0, "s_out marker seen");
    chk(n_kept > 0, "bit kept seen");
    chk(n_dropped > 0, "bit dropped seen");
    chk(n_restart > 0, "restart seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
