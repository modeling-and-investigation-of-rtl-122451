// tb_shift_storage_reg: self-checking test of the shift/storage register.
//
// Drives random serial data with a shared shift/storage clock, keeps an
// independent reference of the shift stages and the storage register, and
// compares q and q7s after every rising edge. Also checks both clears and a
// storage clock that runs apart from the shift clock.
`timescale 1ns/1ps
module tb_shift_storage_reg;
  localparam int W = 8;
  logic sck = 0, rck = 0, sclr_n = 1, rclr_n = 1, ser = 0;
  logic [W-1:0] q;
  logic q7s;
  int checks = 0, failures = 0;

  shift_storage_reg dut (.*);

  logic [W-1:0] ref_sr = '0, ref_q = '0;

  task automatic check(string what);
    checks++;
    if (q !== ref_q || q7s !== ref_sr[W-1]) begin
      failures++;
      $display("FAIL %s: q=%b exp %b q7s=%b exp %b", what, q, ref_q, q7s, ref_sr[W-1]);
    end
  endtask

  // Both clocks together, as in the token chain.
  task automatic tick_both(logic s);
    ser = s;
    #5 sck = 1; rck = 1;
    ref_q  = ref_sr;
    ref_sr = {ref_sr[W-2:0], s};
    #5 sck = 0; rck = 0;
    check("shared clock");
  endtask

  initial begin
    #200000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 sclr_n = 0; rclr_n = 0;
    #10 check("reset");
    sclr_n = 1; rclr_n = 1;
    for (int i = 0; i < 200; i++) tick_both(1'($urandom));
    // A single one travels: appears on q[0] one clock after entering.
    for (int i = 0; i < W; i++) tick_both(1'b0);
    tick_both(1'b1);
    checks++; if (q != '0) begin failures++; $display("FAIL token visible too early"); end
    for (int i = 0; i < W; i++) begin
      tick_both(1'b0);
      checks++;
      if (q != W'(1) << i) begin failures++; $display("FAIL token at %0d: q=%b", i, q); end
    end
    // Shift clock alone: q holds.
    ser = 1;
    #5 sck = 1; ref_sr = {ref_sr[W-2:0], 1'b1}; #5 sck = 0;
    check("shift only");
    // Storage clock alone: q takes the shift stages.
    #5 rck = 1; ref_q = ref_sr; #5 rck = 0;
    check("store only");
    // Clear of the storage stages only.
    for (int i = 0; i < 4; i++) tick_both(1'b1);
    #2 rclr_n = 0; #1 ref_q = '0; check("storage clear"); rclr_n = 1;
    // Clear of the shift stages only.
    #2 sclr_n = 0; #1 ref_sr = '0; check("shift clear"); sclr_n = 1;
    tick_both(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
