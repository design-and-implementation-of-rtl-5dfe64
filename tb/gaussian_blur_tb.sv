`timescale 1ns/1ps
// Self-checking testbench of gaussian_blur.
// Sends several frames of random pixels of different sizes through the blur,
// with random input gaps and random output back-pressure, and compares every
// output pixel with a direct two-pass convolution computed here (reflect-101
// border, same rounding: row sums rounded to GUARD extra fraction bits, column
// sums rounded to integers). One frame is sent without gaps or stalls to
// check the rate: one pixel per clock plus the R-row bottom replay. Two
// frames are also sent back to back, the second one offered right after the
// last pixel of the first, so the input must be held during the replay.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module gaussian_blur_tb;
  import nuc_pkg::*;
  localparam int KSIZE = 5;
  localparam int MAX_W = 32;
  localparam int MAX_H = 16;
  localparam int R  = (KSIZE - 1) / 2;
  localparam int NT = R + 1;
  localparam int XW = $clog2(MAX_W + 1);
  localparam int YW = $clog2(MAX_H + R + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [XW-1:0] width;
  logic [YW-1:0] height;
  logic [NT-1:0][WGT_W-1:0] weights;
  logic s_valid, s_ready, m_valid, m_ready, m_sof, m_last, idle;
  logic [15:0] s_data, m_data;

  gaussian_blur #(.KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H)) dut (.*);

  int checks = 0, failures = 0;
  int img [MAX_H][MAX_W];
  int ref_img [MAX_H][MAX_W];
  int W, H;
  bit gaps, stalls;
  int ref_next [MAX_H][MAX_W];
  int img_next [MAX_H][MAX_W];
  bit have_next = 0;

  function automatic int mir(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  task automatic make_ref();
    longint s;
    longint tmp [MAX_H][MAX_W];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        s = 0;
        for (int d = -R; d <= R; d++)
          s += longint'(img[y][mir(x + d, W)]) * longint'(weights[d < 0 ? -d : d]);
        s = (s + (64'sd1 << (WFRAC - GUARD - 1))) >>> (WFRAC - GUARD);
        if (s > (1 << (16 + GUARD)) - 1) s = (1 << (16 + GUARD)) - 1;
        tmp[y][x] = s;
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        s = 0;
        for (int d = -R; d <= R; d++)
          s += tmp[mir(y + d, H)][x] * longint'(weights[d < 0 ? -d : d]);
        s = (s + (64'sd1 << (WFRAC + GUARD - 1))) >>> (WFRAC + GUARD);
        if (s > 65535) s = 65535;
        ref_img[y][x] = int'(s);
      end
  endtask

  // Gaussian-like weights with a random spread; sum of all taps <= 1.0
  task automatic make_weights(int kind);
    int rest;
    if (kind == 0) begin
      // sigma ~ 1: 0.4026, 0.2442, 0.0545 (sum 1.0 within rounding)
      weights[0] = 18'd26386; weights[1] = 18'd16004; if (NT > 2) weights[2] = 18'd3571;
    end else begin
      rest = 65536;
      for (int j = NT - 1; j >= 1; j--) begin
        weights[j] = 18'($urandom_range(0, rest / 4));
        rest -= 2 * int'(weights[j]);
      end
      weights[0] = 18'(rest);
    end
  endtask

  int ox, oy, frame_cycles;
  bit sending;

  // Inputs change at the falling edge; s_ready is stable then, because the
  // blur and m_ready only change at the rising edge.
  task automatic send_frame();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        while (gaps && ($urandom_range(0, 3) == 0)) begin
          s_valid = 1'b0;
          @(negedge clk);
        end
        s_valid = 1'b1;
        s_data  = 16'(img[y][x]);
        while (!s_ready) @(negedge clk);
        @(negedge clk);
      end
    s_valid = 1'b0;
  endtask

  task automatic run_frame(int w, int h, int kind, bit g, bit st);
    W = w; H = h; gaps = g; stalls = st;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (kind == 2) ? 65535 : int'($urandom_range(0, 65535));
    while (!idle) @(negedge clk);
    width  = XW'(W);
    height = YW'(H);
    make_weights(kind == 2 ? 0 : kind);
    @(negedge clk);
    make_ref();
    ox = 0; oy = 0; frame_cycles = 0;
    sending = 1;
    fork
      send_frame();
      begin
        while (oy != H) begin
          @(negedge clk);
          frame_cycles++;
        end
      end
    join
    sending = 0;
    checks++;
    if (ox != 0 || oy != H) begin
      failures++;
      $display("FAIL frame size: got %0d rows", oy);
    end
  endtask

  // Two frames of the same size, the second one queued behind the first.
  task automatic run_pair(int w, int h);
    W = w; H = h; gaps = 0; stalls = 1;
    while (!idle) @(negedge clk);
    width  = XW'(W);
    height = YW'(H);
    make_weights(1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = int'($urandom_range(0, 65535));
    make_ref();
    ref_next = ref_img; img_next = img;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = int'($urandom_range(0, 65535));
    make_ref();
    @(negedge clk);
    ox = 0; oy = 0; have_next = 1;
    fork
      begin send_frame(); img = img_next; s_valid = 1'b1; send_frame(); end
      while (oy != H) @(negedge clk);
    join
    checks++;
    if (have_next || ox != 0 || oy != H) begin
      failures++;
      $display("FAIL back-to-back frames");
    end
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && m_valid && m_ready) begin
      checks++;
      if (int'(m_data) != ref_img[oy][ox]) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %0d exp %0d", oy, ox, m_data, ref_img[oy][ox]);
      end
      checks++;
      if (m_sof != (ox == 0 && oy == 0) || m_last != (ox == W - 1 && oy == H - 1)) begin
        failures++;
        $display("FAIL flags at (%0d,%0d)", oy, ox);
      end
      if (ox == W - 1 && oy == H - 1 && have_next) begin
        ref_img = ref_next; ox = 0; oy = 0; have_next = 0;
      end else if (ox == W - 1) begin ox = 0; oy++; end else ox++;
    end
  end

  always @(posedge clk) m_ready <= stalls ? ($urandom_range(0, 4) != 0) : 1'b1;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_data = 0; m_ready = 1; width = 20; height = 12;
    weights = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run_frame(20, 12, 0, 0, 0);
    // rate: W*H input cycles + R replayed rows + pipeline latency
    checks++;
    if (frame_cycles > (12 + R) * 20 + 20) begin
      failures++;
      $display("FAIL rate: %0d cycles", frame_cycles);
    end
    run_frame(20, 12, 1, 1, 1);
    run_frame(12, 8, 1, 1, 0);
    run_frame(32, 16, 2, 0, 1);
    run_frame(5, 5, 0, 0, 0);
    run_frame(31, 15, 1, 0, 0);
    run_pair(24, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
