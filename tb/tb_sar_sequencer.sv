// tb_sar_sequencer: self-checking test of the SAR token chain.
//
// After each reset, counts rising clock edges and checks that s_out is high
// only after edge 2, that enable ex[N-1-j] is the only one high after edge
// 3+j, and that nothing is high from edge N+3 on. Repeats the sequence, once
// with a reset in the middle of a conversion.
`timescale 1ns/1ps
module tb_sar_sequencer;
  localparam int N = 15;
  logic s_in = 0, reset_n = 0, s_out;
  logic [N-1:0] ex;
  int checks = 0, failures = 0;

  sar_sequencer dut (.*);

  task automatic check_edge(int edge_no);
    logic exp_sout;
    logic [N-1:0] exp_ex;
    exp_sout = (edge_no == 2);
    exp_ex = '0;
    if (edge_no >= 3 && edge_no <= N + 2) exp_ex[N + 2 - edge_no] = 1'b1;
    checks++;
    if (s_out !== exp_sout || ex !== exp_ex) begin
      failures++;
      $display("FAIL edge %0d: s_out=%b exp %b ex=%b exp %b", edge_no, s_out, exp_sout, ex, exp_ex);
    end
  endtask

  task automatic run(int edges);
    for (int e = 1; e <= edges; e++) begin
      #50 s_in = 1;
      #1 check_edge(e);
      #49 s_in = 0;
    end
  endtask

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Clock runs during reset: nothing moves.
    repeat (3) begin #50 s_in = 1; #1 check_edge(0); #49 s_in = 0; end
    reset_n = 1;
    run(N + 8);
    reset_n = 0; #10 check_edge(0); reset_n = 1;
    run(7);
    reset_n = 0; #10 check_edge(0); reset_n = 1;   // reset mid-conversion
    run(N + 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
