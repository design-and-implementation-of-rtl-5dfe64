`timescale 1ns/1ps
// Testbench of gauss_row_conv (ksize 7): frames of random rows are streamed,
// back to back or with random gaps, and every output is compared with the
// direct horizontal convolution (reflect-101 border) of blur_ref_pkg. It also
// checks the sof/eol flags and that a gapless frame produces its last output
// within the fixed latency after its last input (one pixel per clock with no
// gap between rows).
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module gauss_row_conv_tb;
  import nuc_pkg::*;
  import blur_ref_pkg::*;
  localparam int KSIZE = 7, R = 3, NT = 4, MAX_W = 40;
  localparam int LAT = 3 + 2;     // 3 + clog2(NT)
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ce, in_valid, in_sof, out_valid, out_sof, out_eol;
  logic [5:0] width;
  logic [NT-1:0][WGT_W-1:0] weights;
  logic [15:0] in_data;
  logic [19:0] out_data;

  gauss_row_conv #(.KSIZE(KSIZE), .MAX_W(MAX_W)) dut (.*);

  int img[], exp_o[], wt[];
  int W, H, n_out, last_in_t, last_out_t, cyc;

  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && ce && out_valid) begin
    checks++;
    if (n_out >= W * H || int'(out_data) != exp_o[n_out] ||
        out_sof != (n_out == 0) || out_eol != (n_out % W == W - 1)) begin
      failures++;
      if (failures < 8) $display("FAIL out %0d got %0d exp %0d", n_out, out_data, exp_o[n_out]);
    end
    n_out++;
    last_out_t = cyc;
  end

  task automatic frame(int w, int h, bit gaps);
    W = w; H = h;
    img = new[W * H];
    foreach (img[i]) img[i] = $urandom_range(0, 65535);
    gauss_weights(wt, R, 0.5 + $urandom_range(0, 30) / 10.0);
    for (int j = 0; j < NT; j++) weights[j] = WGT_W'(wt[j]);
    width = 6'(W);
    row_pass(img, exp_o, W, H, R, wt);
    n_out = 0;
    for (int i = 0; i < W * H; i++) begin
      while (gaps && $urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sof = (i == 0); in_data = 16'(img[i]);
      @(negedge clk);
    end
    in_valid = 0; in_sof = 0;
    last_in_t = cyc;
    repeat (R + LAT + 4) @(negedge clk);
    checks++;
    if (n_out != W * H) begin failures++; $display("FAIL count %0d", n_out); end
    if (!gaps) begin
      checks++;
      if (last_out_t - last_in_t > R + LAT + 1) begin
        failures++; $display("FAIL latency %0d", last_out_t - last_in_t);
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 1; in_valid = 0; in_sof = 0; in_data = 0; width = 20; weights = '0;
    cyc = 0;
    #12 rst_n = 1;
    @(negedge clk);
    frame(20, 6, 0);
    frame(20, 6, 1);
    frame(8, 5, 0);
    frame(40, 3, 1);
    frame(33, 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
