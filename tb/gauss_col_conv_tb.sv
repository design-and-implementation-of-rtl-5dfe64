`timescale 1ns/1ps
// Testbench of gauss_col_conv (ksize 7): frames of random row-pass words are
// streamed in raster order and every output is compared with the direct
// vertical convolution (reflect-101 border) of blur_ref_pkg. The source
// waits while flush_busy is high; the test checks that the bottom-row replay
// lasts exactly R*W cycles, and the sof/last flags.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module gauss_col_conv_tb;
  import nuc_pkg::*;
  import blur_ref_pkg::*;
  localparam int KSIZE = 7, R = 3, NT = 4, MAX_W = 24, MAX_H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ce, in_valid, in_sof, out_valid, out_sof, out_last, flush_busy;
  logic [5:0] width;
  logic [4:0] height;
  logic [NT-1:0][WGT_W-1:0] weights;
  logic [19:0] in_data;
  logic [15:0] out_data;

  gauss_col_conv #(.KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  int img[], exp_o[], wt[];
  int W, H, n_out, flush_cycles;

  always @(posedge clk) if (rst_n && ce && flush_busy) flush_cycles++;

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    checks++;
    if (n_out >= W * H || int'(out_data) != exp_o[n_out] ||
        out_sof != (n_out == 0) || out_last != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 8) $display("FAIL out %0d got %0d exp %0d", n_out, out_data, exp_o[n_out]);
    end
    n_out++;
  end

  task automatic frame(int w, int h, bit gaps);
    W = w; H = h;
    img = new[W * H];
    foreach (img[i]) img[i] = $urandom_range(0, (1 << 20) - 1);
    gauss_weights(wt, R, 0.5 + $urandom_range(0, 30) / 10.0);
    for (int j = 0; j < NT; j++) weights[j] = WGT_W'(wt[j]);
    width = 6'(W); height = 5'(H);
    col_pass(img, exp_o, W, H, R, wt);
    n_out = 0; flush_cycles = 0;
    for (int i = 0; i < W * H; i++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sof = (i == 0); in_data = 20'(img[i]);
      @(negedge clk);
    end
    in_valid = 0; in_sof = 0;
    while (n_out < W * H) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (flush_cycles != R * W) begin failures++; $display("FAIL flush %0d", flush_cycles); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1; in_valid = 0; in_sof = 0; in_data = 0; width = 20; height = 10; weights = '0;
    #12 rst_n = 1;
    @(negedge clk);
    frame(20, 10, 0);
    frame(20, 10, 1);
    frame(7, 7, 0);
    frame(24, 16, 1);
    frame(9, 12, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
