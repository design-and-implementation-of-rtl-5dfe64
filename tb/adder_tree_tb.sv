`timescale 1ns/1ps
// Testbench of adder_tree: two trees (9 and 5 operands, i.e. padded and
// non-power-of-two) get random operands and a random clock enable; each
// output is compared with the sum of the operands given LAT enabled cycles
// earlier, which also checks the latency of clog2(N) cycles.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module adder_tree_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N1 = 9, IW1 = 35, OW1 = IW1 + 4, L1 = 4;
  localparam int N2 = 5, IW2 = 12, OW2 = IW2 + 3, L2 = 3;

  logic ce;
  logic [N1-1:0][IW1-1:0] d1;
  logic [N2-1:0][IW2-1:0] d2;
  logic [OW1-1:0] s1;
  logic [OW2-1:0] s2;

  adder_tree #(.N(N1), .IW(IW1), .OW(OW1)) u1 (.clk(clk), .ce(ce), .din(d1), .sum(s1));
  adder_tree #(.N(N2), .IW(IW2), .OW(OW2)) u2 (.clk(clk), .ce(ce), .din(d2), .sum(s2));

  longint q1[$], q2[$];

  always @(posedge clk) begin
    longint t1, t2;
    if (ce) begin
      t1 = 0; t2 = 0;
      for (int i = 0; i < N1; i++) t1 += longint'(d1[i]);
      for (int i = 0; i < N2; i++) t2 += longint'(d2[i]);
      q1.push_back(t1); q2.push_back(t2);
      if (q1.size() > L1) void'(q1.pop_front());
      if (q2.size() > L2) void'(q2.pop_front());
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; d1 = '0; d2 = '0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      if (q1.size() == L1) begin
        checks++;
        if (longint'(s1) != q1[0]) begin
          failures++;
          if (failures < 5) $display("FAIL N=9 got %0d exp %0d", s1, q1[0]);
        end
      end
      if (q2.size() == L2) begin
        checks++;
        if (longint'(s2) != q2[0]) begin
          failures++;
          if (failures < 5) $display("FAIL N=5 got %0d exp %0d", s2, q2[0]);
        end
      end
      ce = (cyc < 20) ? 1'b1 : ($urandom_range(0, 3) != 0);
      for (int i = 0; i < N1; i++) d1[i] = (cyc % 97 == 5) ? '1 : {$urandom, $urandom};
      for (int i = 0; i < N2; i++) d2[i] = IW2'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
