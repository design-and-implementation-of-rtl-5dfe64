`timescale 1ns/1ps
// Testbench of strip_correct: loads random signed column and row vectors
// (including large ones that drive the sum below 0 and above 65535), streams
// frames of random pixels with random back-pressure, and checks every output
// against in + col[x] + row[y] saturated to 0..65535, plus m_last and the
// two-cycle latency of a gapless stream.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module strip_correct_tb;
  import nuc_pkg::*;
  localparam int MAX_W = 32, MAX_H = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [5:0] width;
  logic [4:0] height;
  logic col_we, row_we;
  logic [4:0] col_addr;
  logic [3:0] row_addr;
  logic [15:0] col_wdata, row_wdata;
  logic s_valid, s_ready, m_valid, m_ready, m_last, idle;
  logic [15:0] s_data, m_data;

  strip_correct #(.MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  int colv[MAX_W], rowv[MAX_H];
  int img[], expv[];
  int W, H, n_out, n_sat;
  bit stalls;

  always @(posedge clk) m_ready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    checks++;
    if (int'(m_data) != expv[n_out] || m_last != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 8) $display("FAIL %0d got %0d exp %0d", n_out, m_data, expv[n_out]);
    end
    n_out++;
  end

  task automatic frame(int w, int h, bit st, int range_);
    int t, t0;
    W = w; H = h; stalls = st;
    for (int x = 0; x < MAX_W; x++) begin
      colv[x] = $urandom_range(0, 2 * range_) - range_;
      @(negedge clk); col_we = 1; col_addr = 5'(x); col_wdata = 16'(colv[x]);
    end
    for (int y = 0; y < MAX_H; y++) begin
      rowv[y] = $urandom_range(0, 2 * range_) - range_;
      @(negedge clk); col_we = 0; row_we = 1; row_addr = 4'(y); row_wdata = 16'(rowv[y]);
    end
    @(negedge clk); row_we = 0; col_we = 0;
    width = 6'(W); height = 5'(H);
    img = new[W * H]; expv = new[W * H];
    foreach (img[i]) begin
      img[i] = $urandom_range(0, 65535);
      t = img[i] + colv[i % W] + rowv[i / W];
      if (t < 0 || t > 65535) n_sat++;
      expv[i] = (t < 0) ? 0 : (t > 65535) ? 65535 : t;
    end
    n_out = 0;
    t0 = $time;
    for (int i = 0; i < W * H; i++) begin
      s_valid = 1; s_data = 16'(img[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    while (n_out < W * H) @(negedge clk);
    if (!st) begin
      checks++;
      if (($time - t0) / 10 > W * H + 2) begin failures++; $display("FAIL rate"); end
    end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; width = 16; height = 8; col_we = 0; row_we = 0;
    col_addr = 0; row_addr = 0; col_wdata = 0; row_wdata = 0; stalls = 0; m_ready = 1; n_sat = 0;
    #12 rst_n = 1;
    frame(16, 8, 0, 500);
    frame(32, 16, 1, 30000);
    frame(5, 3, 0, 32767);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
