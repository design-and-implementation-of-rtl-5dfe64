`timescale 1ns/1ps
// Testbench of denu_accel (ksize 5, images up to 24 x 12): frames of random
// pixels in each operation (blur, pixel - blur, |pixel - blur|) with random
// output back-pressure; every output word is compared with the result of
// blur_ref_pkg and the subtraction done here, and the frame's last word
// must carry m_last.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module denu_accel_tb;
  import nuc_pkg::*;
  import blur_ref_pkg::*;
  localparam int KSIZE = 5, R = 2, NT = 3, MAX_W = 24, MAX_H = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] width;
  logic [3:0] height;
  logic [NT-1:0][WGT_W-1:0] weights;
  denu_op_e op;
  logic s_valid, s_ready, m_valid, m_ready, m_last, idle;
  logic [15:0] s_data;
  logic [31:0] m_data;

  denu_accel #(.KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  int img[], bl[], wt[], expv[];
  int W, H, n_out;
  bit stalls;

  always @(posedge clk) m_ready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    checks++;
    if (n_out >= W * H || m_data != 32'(expv[n_out]) || m_last != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 8) $display("FAIL op=%0d out %0d got %0d exp %0d", op, n_out, $signed(m_data), expv[n_out]);
    end
    n_out++;
  end

  task automatic frame(int w, int h, denu_op_e o, bit st);
    W = w; H = h; stalls = st;
    img = new[W * H];
    foreach (img[i]) img[i] = $urandom_range(0, 65535);
    gauss_weights(wt, R, 1.0);
    while (!idle) @(negedge clk);
    for (int j = 0; j < NT; j++) weights[j] = WGT_W'(wt[j]);
    width = 5'(W); height = 4'(H); op = o;
    blur(img, bl, W, H, R, wt);
    expv = new[W * H];
    foreach (expv[i])
      expv[i] = (o == DENU_BLUR) ? bl[i] : (o == DENU_SUB) ? img[i] - bl[i]
              : ((img[i] > bl[i]) ? img[i] - bl[i] : bl[i] - img[i]);
    n_out = 0;
    for (int i = 0; i < W * H; i++) begin
      s_valid = 1; s_data = 16'(img[i]);
      while (!s_ready) @(negedge clk);
      @(negedge clk);
    end
    s_valid = 0;
    while (n_out < W * H) @(negedge clk);
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; width = 16; height = 8; weights = '0; op = DENU_BLUR;
    stalls = 0; m_ready = 1;
    #12 rst_n = 1;
    @(negedge clk);
    frame(16, 8, DENU_BLUR, 0);
    frame(16, 8, DENU_SUB, 1);
    frame(24, 12, DENU_ABS, 0);
    frame(7, 5, DENU_SUB, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
