// tb_sar_ff: self-checking test of the flip-flop-based SAR.
//
// Closes the conversion loop with an ideal digital comparator: com is high
// when the register's code is at or below the input value x, and follows a
// code change after CMP_DELAY. For random and corner inputs it checks after
// every rising clock edge that the code holds exactly the bits decided so far
// plus the bit under trial, that s_out marks the edge before the first trial,
// and that the final code equals x after N+3 rising edges and stays there.
`timescale 1ns/1ps
module tb_sar_ff;
  localparam int N = 15;
  localparam realtime HALF = 50ns;
  localparam realtime CMP_DELAY = 20ns;
  logic com = 0, reset_n = 1, s_in = 0, s_out;
  logic [N-1:0] out;
  logic [N-1:0] x;
  int checks = 0, failures = 0;

  sar_ff dut (.*);

  always @(out or x) com <= #(CMP_DELAY) (out <= x);

  task automatic chk(bit ok, string what, int edge_no);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL x=%h edge %0d %s: out=%b s_out=%b", x, edge_no, what, out, s_out);
    end
  endtask

  task automatic convert(logic [N-1:0] value);
    logic [N-1:0] decided, trial;
    x = value;
    reset_n = 0;
    #(HALF) chk(out == '0 && s_out == 0, "reset", 0);
    reset_n = 1;
    decided = '0;
    for (int e = 1; e <= N + 5; e++) begin
      #(HALF) s_in = 1;
      #1;
      if (e == 2) chk(s_out == 1 && out == '0, "s_out marker", e);
      else        chk(s_out == 0, "no s_out", e);
      if (e >= 3 && e <= N + 2) begin
        trial = '0; trial[N + 2 - e] = 1'b1;
        chk(out == (decided | trial), "trial code", e);
        if ((decided | trial) <= value) decided = decided | trial;
      end
      if (e == N + 3) chk(out == value, "final code after N+3 edges", e);
      if (e > N + 3)  chk(out == value, "code holds", e);
      #(HALF - 1) s_in = 0;
    end
  endtask

  initial begin
    #10ms failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 convert('0);
    convert('1);
    convert(15'h4000);
    convert(15'h3fff);
    convert(15'h2AAA);
    for (int i = 0; i < 40; i++) convert(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
