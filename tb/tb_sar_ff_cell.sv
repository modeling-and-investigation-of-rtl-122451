// tb_sar_ff_cell: self-checking test of one flip-flop-based SAR bit.
//
// Runs a clock and an enable that, like the sequencer's, changes right after
// rising clock edges. Checks that the bit reads one while enabled, samples
// com on the falling clock edge inside the enabled period, ignores com
// changes after that edge and while disabled, and clears on clr_n.
`timescale 1ns/1ps
module tb_sar_ff_cell;
  logic s_in = 0, ex = 0, com = 0, clr_n = 1, out;
  int checks = 0, failures = 0;
  logic kept, sampled;

  sar_ff_cell dut (.*);

  task automatic expect_out(logic v, string what);
    #1 checks++;
    if (out !== v) begin failures++; $display("FAIL %s: out=%b exp %b", what, out, v); end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr_n = 0;
    expect_out(0, "cleared");
    clr_n = 1;
    kept = 0;
    for (int i = 0; i < 100; i++) begin
      // Rising edge, enable rises with it.
      s_in = 1; ex = 1; com = 1'($urandom);
      expect_out(1, "trial reads one");
      #3 sampled = 1'($urandom); com = sampled;
      #5 s_in = 0;                      // falling edge: sample
      #1 com = ~sampled;                // later change must not be taken
      expect_out(1, "still trial");
      #8 s_in = 1; ex = 0;              // token leaves on the next rising edge
      com = sampled;                    // comparator still shows the trial result
      expect_out(sampled, "sampled on falling edge");
      kept = sampled;
      // Disabled clock periods: com toggles, value holds.
      repeat (2) begin
        #9 s_in = 0; com = 1'($urandom);
        expect_out(kept, "holds while disabled (low)");
        #9 s_in = 1; com = 1'($urandom);
        expect_out(kept, "holds while disabled (high)");
      end
      if ((i % 10) == 9) begin
        clr_n = 0; expect_out(0, "clear");
        clr_n = 1; kept = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
