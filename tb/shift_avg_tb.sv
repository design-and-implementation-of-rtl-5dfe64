`timescale 1ns/1ps
// Testbench of shift_avg: frames of random pixels with various shifts and
// sizes; checks every output word (pixel << shift), m_last, and the frame
// average (floor of sum / (width*height)) with the cycles from the last
// pixel to mean_done (the divider takes one cycle per sum bit).
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module shift_avg_tb;
  import nuc_pkg::*;
  localparam int MAX_W = 32, MAX_H = 16;
  localparam int SUMW = 16 + $clog2(MAX_W * MAX_H + 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] width;
  logic [4:0] height;
  logic [4:0] shift;
  logic s_valid, s_ready, m_valid, m_ready, m_last, mean_done, idle;
  logic [15:0] s_data, mean;
  logic [31:0] m_data;

  shift_avg #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  int img[];
  int W, H, n_out, done_cnt;
  longint sum;
  bit stalls;

  always @(posedge clk) m_ready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && mean_done) done_cnt++;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    checks++;
    if (m_data != (32'(img[n_out]) << shift) || m_last != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 8) $display("FAIL %0d got %0h", n_out, m_data);
    end
    n_out++;
  end

  task automatic frame(int w, int h, int sh, bit st, int maxv);
    int t0;
    W = w; H = h; stalls = st;
    width = 6'(W); height = 5'(H); shift = 5'(sh);
    img = new[W * H];
    sum = 0;
    foreach (img[i]) begin img[i] = $urandom_range(0, maxv); sum += img[i]; end
    n_out = 0; done_cnt = 0;
    for (int i = 0; i < W * H; i++) begin
      s_valid = 1; s_data = 16'(img[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    t0 = $time;
    while (done_cnt == 0 && ($time - t0) < 2000) @(negedge clk);
    checks++;
    if (done_cnt != 1 || int'(mean) != int'(sum / (W * H))) begin
      failures++; $display("FAIL mean %0d exp %0d", mean, sum / (W * H));
    end
    checks++;
    if (($time - t0) / 10 > SUMW + 2) begin failures++; $display("FAIL divider time"); end
    while (n_out < W * H) @(negedge clk);
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; width = 16; height = 8; shift = 0; stalls = 0; m_ready = 1;
    #12 rst_n = 1;
    @(negedge clk);
    frame(16, 8, 0, 0, 65535);
    frame(32, 16, 4, 1, 65535);
    frame(7, 3, 16, 0, 65535);
    frame(32, 16, 2, 0, 65535);
    frame(10, 10, 1, 1, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
