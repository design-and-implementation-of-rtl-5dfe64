`timescale 1ns/1ps
// End-to-end testbench of nuc_accel_top at reduced size (images up to
// 32 x 16, ksize 5). A processor model configures the accelerator over
// AXI4-Lite and a DMA model streams frames in and collects them. Every mode
// is run and every output word is compared with a model computed here:
// blur, pixel - blur and |pixel - blur| (blur_ref_pkg), DeStrip restore with
// saturation, shift with frame average, and the route through the external
// DeNoise core (a stand-in that adds sigmaN to each pixel after a delay).
// Mechanisms that must each occur at least once, counted and reported:
// mode switch written during a frame (takes effect on the next frame),
// output back-pressure stalls, bottom-row replay of the blur, weight update
// deferred to the end of a frame, strip saturation, interrupt, and the
// frame-average result.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module nuc_accel_top_tb;
  import nuc_pkg::*;
  import blur_ref_pkg::*;
  localparam int MAX_W = 32, MAX_H = 16, KSIZE = 5, R = 2, NT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata;
  logic [3:0] s_axil_wstrb;
  logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [31:0] s_axis_tdata, m_axis_tdata;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast, m_axis_tvalid, m_axis_tready, m_axis_tlast;
  logic irq;
  logic [15:0] dn_m_tdata;
  logic dn_m_tvalid, dn_m_tready, dn_s_tvalid, dn_s_tready, dn_s_tlast;
  logic [31:0] dn_s_tdata, dn_sigma_n;

  nuc_accel_top #(.MAX_W(MAX_W), .MAX_H(MAX_H), .KSIZE(KSIZE)) dut (.*);

  // ---------------- external DeNoise stand-in ----------------
  // Adds sigmaN to each pixel; a 4-deep pipeline that honours back-pressure.
  logic [31:0] dq [$];
  int dn_cnt, dn_W, dn_H;
  assign dn_m_tready = dq.size() < 4;
  assign dn_s_tvalid = dq.size() > 0;
  assign dn_s_tdata  = (dq.size() > 0) ? dq[0] : 32'd0;
  assign dn_s_tlast  = (dq.size() > 0) && (dn_cnt == dn_W * dn_H - 1);
  always @(posedge clk) begin
    if (dn_s_tvalid && dn_s_tready) begin
      void'(dq.pop_front());
      dn_cnt = (dn_cnt == dn_W * dn_H - 1) ? 0 : dn_cnt + 1;
    end
    if (dn_m_tvalid && dn_m_tready) dq.push_back(32'(dn_m_tdata) + dn_sigma_n);
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic wr(logic [15:0] a, logic [31:0] dat);
    s_axil_awaddr = a; s_axil_wdata = dat; s_axil_awvalid = 1; s_axil_wvalid = 1; s_axil_wstrb = 4'hF;
    #1;
    while (!(s_axil_awready && s_axil_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_awvalid = 0; s_axil_wvalid = 0;
    s_axil_bready = 1;
    while (!s_axil_bvalid) @(negedge clk);
    @(negedge clk);
    s_axil_bready = 0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] dat);
    s_axil_araddr = a; s_axil_arvalid = 1;
    #1;
    while (!s_axil_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axil_arvalid = 0;
    s_axil_rready = 1;
    while (!s_axil_rvalid) @(negedge clk);
    dat = s_axil_rdata;
    @(negedge clk);
    s_axil_rready = 0;
  endtask

  // ---------------- DMA model and checker ----------------
  int img[], wt[], bl[], expv[], colv[MAX_W], rowv[MAX_H];
  int W, H, n_out, shift_v;
  mode_e fmode;
  bit stalls;
  int n_stall, n_replay, n_switch, n_wdefer, n_sat, n_irq, n_mean;
  int mode_seen [6];

  always @(posedge clk) m_axis_tready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && m_axis_tvalid && !m_axis_tready) n_stall++;
  always @(posedge clk) if (rst_n && dut.u_denu.u_blur.u_col.flush_busy) n_replay++;
  always @(posedge clk) if (rst_n && irq) n_irq++;

  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    checks++;
    if (n_out >= W * H || m_axis_tdata != 32'(expv[n_out]) || m_axis_tlast != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL mode %0d word %0d got %0d exp %0d", fmode, n_out,
                                  $signed(m_axis_tdata), expv[n_out]);
    end
    n_out++;
  end

  function automatic void model(mode_e m);
    int t;
    blur(img, bl, W, H, R, wt);
    expv = new[W * H];
    foreach (expv[i]) begin
      case (m)
        MODE_BLUR:    expv[i] = bl[i];
        MODE_DENU:    expv[i] = img[i] - bl[i];
        MODE_DENU_AB: expv[i] = (img[i] > bl[i]) ? img[i] - bl[i] : bl[i] - img[i];
        MODE_STRIP: begin
          t = img[i] + colv[i % W] + rowv[i / W];
          if (t < 0 || t > 65535) n_sat++;
          expv[i] = (t < 0) ? 0 : (t > 65535) ? 65535 : t;
        end
        MODE_SHIFT:   expv[i] = img[i] << shift_v;
        default:      expv[i] = img[i] + int'(dn_sigma_n);
      endcase
    end
  endfunction

  // Send one frame. If switch_to is a valid mode, CTRL is rewritten while
  // the frame is half sent: this frame must still use fmode.
  task automatic frame(mode_e m, bit st, int switch_to = -1, bit new_w = 0);
    logic [31:0] d;
    longint sum;
    stalls = st; fmode = m;
    img = new[W * H];
    sum = 0;
    foreach (img[i]) begin img[i] = $urandom_range(0, 65535); sum += img[i]; end
    wr(REG_CTRL, 32'(m));
    dn_W = W; dn_H = H; dn_cnt = 0;
    model(m);
    mode_seen[m]++;
    n_out = 0;
    for (int i = 0; i < W * H; i++) begin
      s_axis_tvalid = 1; s_axis_tdata = 32'(img[i]); s_axis_tlast = (i == W * H - 1);
      #1;
      while (!s_axis_tready) begin @(negedge clk); #1; end
      @(negedge clk);
      if (i == W * H / 2 && switch_to >= 0) begin
        s_axis_tvalid = 0;
        wr(REG_CTRL, 32'(switch_to));
        n_switch++;
      end
      if (i == W * H / 2 && new_w) begin
        // new weights during the frame: they must wait for the frame's end
        s_axis_tvalid = 0;
        gauss_weights(wt, R, 2.0);
        for (int j = 0; j < NT; j++) wr(BASE_WGT + 16'(4 * j), 32'(wt[j]));
        if (dut.wgt_pending) n_wdefer++;
      end
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    while (n_out < W * H) @(negedge clk);
    if (new_w) model(m);   // not used for this frame; next frame uses new weights
    if (m == MODE_SHIFT) begin
      repeat (40) @(negedge clk);
      rd(REG_MEAN, d);
      checks++;
      if (d != 32'(sum / (W * H))) begin failures++; $display("FAIL mean %0d", d); end
      else n_mean++;
    end
    rd(REG_STATUS, d);
    checks++;
    if (d[0] != 1'b1) begin failures++; $display("FAIL irq pending not set"); end
    wr(REG_STATUS, 32'd1);
  endtask

  initial begin
    #20000000; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tlast = 0; m_axis_tready = 1; stalls = 0;
    n_stall = 0; n_replay = 0; n_switch = 0; n_wdefer = 0; n_sat = 0; n_irq = 0; n_mean = 0;
    dn_cnt = 0; dn_W = 1; dn_H = 1;
    #12 rst_n = 1;
    @(negedge clk);
    // configuration
    W = 24; H = 12; shift_v = 3;
    wr(REG_WIDTH, 32'(W)); wr(REG_HEIGHT, 32'(H)); wr(REG_SHIFT, 32'(shift_v));
    wr(REG_SIGMA, 32'd7); wr(REG_IRQ_EN, 32'd1);
    gauss_weights(wt, R, 1.0);
    for (int j = 0; j < NT; j++) wr(BASE_WGT + 16'(4 * j), 32'(wt[j]));
    for (int x = 0; x < MAX_W; x++) begin
      colv[x] = $urandom_range(0, 40000) - 20000;
      wr(BASE_COL + 16'(4 * x), 32'(colv[x]));
    end
    for (int y = 0; y < MAX_H; y++) begin
      rowv[y] = $urandom_range(0, 40000) - 20000;
      wr(BASE_ROW + 16'(4 * y), 32'(rowv[y]));
    end
    // frames in every mode
    frame(MODE_BLUR, 0);
    frame(MODE_DENU, 1);
    frame(MODE_DENU_AB, 0, -1, 1);     // weights rewritten mid-frame
    frame(MODE_DENU_AB, 1);            // uses the new weights
    frame(MODE_STRIP, 1);
    frame(MODE_SHIFT, 0, int'(MODE_DENOISE));  // CTRL rewritten mid-frame
    frame(MODE_DENOISE, 1);            // switched mode now active
    W = 32; H = 16;
    wr(REG_WIDTH, 32'(W)); wr(REG_HEIGHT, 32'(H));
    frame(MODE_DENU, 0);
    W = 9; H = 6;
    wr(REG_WIDTH, 32'(W)); wr(REG_HEIGHT, 32'(H));
    frame(MODE_SHIFT, 1);
    frame(MODE_BLUR, 1);
    rd(REG_FRAMES, d);
    checks++;
    if (d != 10) begin failures++; $display("FAIL frame count %0d", d); end
    $display("mechanisms: stalls=%0d replay_cycles=%0d mode_switches=%0d deferred_weights=%0d saturations=%0d irq_cycles=%0d means=%0d",
             n_stall, n_replay, n_switch, n_wdefer, n_sat, n_irq, n_mean);
    foreach (mode_seen[m]) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("FAIL mode %0d never run", m); end
    end
    checks++;
    if (n_stall == 0 || n_replay == 0 || n_switch == 0 || n_wdefer == 0 || n_sat == 0 ||
        n_irq == 0 || n_mean == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
