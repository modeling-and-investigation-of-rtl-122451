// tb_sar_latch_cell: self-checking test of one latch-based SAR bit.
//
// Checks that the output is one while enabled, that the latch follows d
// while enabled and keeps the last value when the enable falls, that d is
// ignored while disabled, and that the clear empties it.
`timescale 1ns/1ps
module tb_sar_latch_cell;
  logic d = 0, e = 0, clr_n = 1, out;
  int checks = 0, failures = 0;
  logic kept;

  sar_latch_cell dut (.*);

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
    e = 1; d = 1; expect_out(1, "enable during clear still reads one");
    e = 0; expect_out(0, "clear wins");
    clr_n = 1;
    for (int i = 0; i < 100; i++) begin
      e = 1;
      repeat (3) begin d = 1'($urandom); expect_out(1, "trial reads one"); end
      kept = 1'($urandom);
      d = kept; #1;
      e = 0; expect_out(kept, "kept after enable falls");
      repeat (3) begin d = 1'($urandom); expect_out(kept, "holds while disabled"); end
      if ((i % 10) == 9) begin
        clr_n = 0; expect_out(0, "clear");
        clr_n = 1; kept = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
