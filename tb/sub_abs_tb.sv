`timescale 1ns/1ps
// Testbench of sub_abs: random pixel pairs (and the extremes 0 / 65535) in
// all three operations; every result is checked one enabled cycle later
// against a - b, |a - b| or b computed here, with valid/last tracking and
// a stalled clock enable in between.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module sub_abs_tb;
  import nuc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ce, in_valid, in_last, out_valid, out_last;
  denu_op_e op;
  logic [15:0] a, b;
  logic [31:0] out_data;

  sub_abs dut (.*);

  int exp_data; bit exp_valid, exp_last;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1; in_valid = 0; in_last = 0; a = 0; b = 0; op = DENU_SUB;
    exp_valid = 0;
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (ce) begin
        checks++;
        if (out_valid != exp_valid || (exp_valid && (int'(out_data) != exp_data || out_last != exp_last))) begin
          failures++;
          if (failures < 6) $display("FAIL op=%0d got %0d exp %0d", op, $signed(out_data), exp_data);
        end
      end
      ce = ($urandom_range(0, 5) != 0);
      in_valid = $urandom_range(0, 1);
      in_last = $urandom_range(0, 1);
      op = denu_op_e'($urandom_range(0, 2));
      a = (i % 50 == 1) ? 16'hFFFF : 16'($urandom);
      b = (i % 50 == 1) ? 16'h0000 : (i % 50 == 2) ? 16'hFFFF : 16'($urandom);
      if (i % 50 == 2) a = 0;
      if (ce) begin
        exp_valid = in_valid;
        exp_last = in_valid && in_last;
        case (op)
          DENU_SUB: exp_data = int'(a) - int'(b);
          DENU_ABS: exp_data = (int'(a) > int'(b)) ? int'(a) - int'(b) : int'(b) - int'(a);
          default:  exp_data = int'(b);
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
