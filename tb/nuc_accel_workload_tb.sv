`timescale 1ns/1ps
// Workload testbench of nuc_accel_top with its default parameters: the two
// other image sizes the accelerator is rated for, 640 x 640 and 1280 x 1024
// (the largest it holds), each as one frame of |pixel - blur| with ksize 17.
// Every output word is compared with blur_ref_pkg, and the frame time is
// checked against one pixel per clock plus the 8-row bottom replay and a
// small pipeline allowance: (H + 8) * W + 200 cycles.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module nuc_accel_workload_tb;
  import nuc_pkg::*;
  import blur_ref_pkg::*;
  localparam int R = 8, NT = 9;
  int W, H;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = ~clk;                // 200 MHz
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

  nuc_accel_top dut (.*);

  assign dn_m_tready = 1'b0;
  assign dn_s_tvalid = 1'b0;
  assign dn_s_tdata  = '0;
  assign dn_s_tlast  = 1'b0;

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

  int img[], wt[], bl[], expv[];
  int n_out, cycles;
  bit counting;

  always @(posedge clk) if (counting) cycles++;

  always @(posedge clk) if (rst_n && m_axis_tvalid && m_axis_tready) begin
    checks++;
    if (n_out >= W * H || m_axis_tdata != 32'(expv[n_out]) || m_axis_tlast != (n_out == W * H - 1)) begin
      failures++;
      if (failures < 10) $display("FAIL word %0d got %0d exp %0d", n_out, m_axis_tdata, expv[n_out]);
    end
    n_out++;
  end

  task automatic send();
    n_out = 0;
    cycles = 0;
    counting = 1;
    for (int i = 0; i < W * H; i++) begin
      s_axis_tvalid = 1; s_axis_tdata = 32'(img[i]); s_axis_tlast = (i == W * H - 1);
      #0.1;
      while (!s_axis_tready) begin @(negedge clk); #0.1; end
      @(negedge clk);
    end
    s_axis_tvalid = 0; s_axis_tlast = 0;
    while (n_out < W * H) @(negedge clk);
    counting = 0;
  endtask

  initial begin
    #40ms; failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int w, int h);
    W = w; H = h;
    wr(REG_WIDTH, 32'(W));
    wr(REG_HEIGHT, 32'(H));
    img = new[W * H];
    foreach (img[i]) img[i] = 20000 + ((i % W) * 10) + ((i / W) * 5) + $urandom_range(0, 4000);
    blur(img, bl, W, H, R, wt);
    expv = new[W * H];
    foreach (expv[i]) expv[i] = (img[i] > bl[i]) ? img[i] - bl[i] : bl[i] - img[i];
    send();
    $display("DeNU frame %0dx%0d: %0d cycles (%0.3f ms at 200 MHz)", W, H, cycles, cycles * 5.0e-6);
    checks++;
    if (cycles > (H + R) * W + 200) begin failures++; $display("FAIL frame time"); end
  endtask

  initial begin
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0;
    s_axil_arvalid = 0; s_axil_rready = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    s_axis_tvalid = 0; s_axis_tdata = 0; s_axis_tlast = 0; m_axis_tready = 1; counting = 0;
    W = 1; H = 1;
    #12 rst_n = 1;
    @(negedge clk);
    gauss_weights(wt, R, 3.0);
    for (int j = 0; j < NT; j++) wr(BASE_WGT + 16'(4 * j), 32'(wt[j]));
    wr(REG_CTRL, 32'(MODE_DENU_AB));
    run(640, 640);
    run(1280, 1024);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
