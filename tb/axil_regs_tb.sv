`timescale 1ns/1ps
// Testbench of axil_regs: AXI4-Lite writes and read-backs of every
// read/write register, table writes that must appear as one-cycle strobes
// with the right index and data, writes beyond a table that must be
// dropped, read-only status registers, and the interrupt pending / enable /
// clear sequence. The bus master holds bready/rready low for a while to
// check that responses wait.
// The expected values are computed in the testbench itself; the stimulus and
// the sizes are this testbench's own choice.
module axil_regs_tb;
  import nuc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [15:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  mode_e mode;
  logic [11:0] width;
  logic [10:0] height;
  logic [4:0] shift;
  logic [31:0] sigma_n, frames;
  logic wgt_we, col_we, row_we, busy, irq_set, irq;
  logic [3:0] wgt_idx;
  logic [WGT_W-1:0] wgt_data;
  logic [10:0] col_addr;
  logic [9:0] row_addr;
  logic [15:0] ofs_data, mean;

  axil_regs dut (.*);

  int n_wgt, n_col, n_row, last_idx, last_data;
  always @(posedge clk) if (rst_n) begin
    if (wgt_we) begin n_wgt++; last_idx = int'(wgt_idx); last_data = int'(wgt_data); end
    if (col_we) begin n_col++; last_idx = int'(col_addr); last_data = int'(ofs_data); end
    if (row_we) begin n_row++; last_idx = int'(row_addr); last_data = int'(ofs_data); end
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic wr(logic [15:0] a, logic [31:0] dat);
    awaddr = a; wdata = dat; awvalid = 1; wvalid = 1; wstrb = 4'hF;
    #1;
    while (!(awready && wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    repeat ($urandom_range(0, 2)) begin chk(bvalid, "bvalid held"); @(negedge clk); end
    bready = 1;
    while (!bvalid) @(negedge clk);
    chk(bresp == 2'b00, "bresp");
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] dat);
    araddr = a; arvalid = 1;
    #1;
    while (!arready) begin @(negedge clk); #1; end
    @(negedge clk);
    arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    rready = 1;
    while (!rvalid) @(negedge clk);
    dat = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  logic [31:0] d;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    awaddr = 0; araddr = 0; awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    wdata = 0; wstrb = 0; busy = 0; irq_set = 0; mean = 16'd1234; frames = 32'd77;
    n_wgt = 0; n_col = 0; n_row = 0;
    #12 rst_n = 1;
    @(negedge clk);
    rd(REG_WIDTH, d);  chk(d == 640, "reset width");
    rd(REG_HEIGHT, d); chk(d == 512, "reset height");
    wr(REG_CTRL, 32'd3);      rd(REG_CTRL, d);   chk(d == 3 && mode == MODE_STRIP, "mode");
    wr(REG_WIDTH, 32'd1280);  rd(REG_WIDTH, d);  chk(d == 1280 && width == 1280, "width");
    wr(REG_HEIGHT, 32'd1024); rd(REG_HEIGHT, d); chk(d == 1024 && height == 1024, "height");
    wr(REG_SHIFT, 32'd7);     rd(REG_SHIFT, d);  chk(d == 7 && shift == 7, "shift");
    wr(REG_SIGMA, 32'hCAFE0123); rd(REG_SIGMA, d); chk(d == 32'hCAFE0123 && sigma_n == d, "sigma");
    rd(REG_MEAN, d);   chk(d == 1234, "mean");
    rd(REG_FRAMES, d); chk(d == 77, "frames");
    wr(BASE_WGT + 16'd12, 32'd4321);
    chk(n_wgt == 1 && last_idx == 3 && last_data == 4321, "weight strobe");
    wr(BASE_WGT + 16'd36, 32'd1);           // index 9: beyond the table
    chk(n_wgt == 1, "weight out of range dropped");
    wr(BASE_COL + 16'd4 * 16'd1279, 32'hFFF6);
    chk(n_col == 1 && last_idx == 1279 && last_data == 32'hFFF6, "column strobe");
    wr(BASE_COL + 16'd4 * 16'd1280, 32'd5);
    chk(n_col == 1, "column out of range dropped");
    wr(BASE_ROW + 16'd8, 32'd99);
    chk(n_row == 1 && last_idx == 2 && last_data == 99, "row strobe");
    // random register traffic: every write must read back and reach its output
    for (int i = 0; i < 40; i++) begin
      logic [31:0] v;
      case ($urandom_range(0, 4))
        0: begin v = 32'($urandom_range(0, 5));    wr(REG_CTRL, v);   rd(REG_CTRL, d);   chk(d == v && 32'(mode) == v, "random mode"); end
        1: begin v = 32'($urandom_range(1, 1280)); wr(REG_WIDTH, v);  rd(REG_WIDTH, d);  chk(d == v && 32'(width) == v, "random width"); end
        2: begin v = 32'($urandom_range(1, 1024)); wr(REG_HEIGHT, v); rd(REG_HEIGHT, d); chk(d == v && 32'(height) == v, "random height"); end
        3: begin v = 32'($urandom_range(0, 31));   wr(REG_SHIFT, v);  rd(REG_SHIFT, d);  chk(d == v && 32'(shift) == v, "random shift"); end
        default: begin v = $urandom; wr(REG_SIGMA, v); rd(REG_SIGMA, d); chk(d == v && sigma_n == v, "random sigma"); end
      endcase
    end
    for (int i = 0; i < 20; i++) begin
      int a, v;
      int nr;
      nr = n_row;
      a = $urandom_range(0, 1023); v = $urandom_range(0, 65535);
      wr(BASE_ROW + 16'(4 * a), 32'(v));
      chk(n_row == nr + 1 && last_idx == a && last_data == v, "random row strobe");
    end
    // interrupt
    chk(!irq, "irq idle");
    @(negedge clk); irq_set = 1; @(negedge clk); irq_set = 0;
    rd(REG_STATUS, d); chk(d[0] == 1, "pending");
    chk(!irq, "masked");
    wr(REG_IRQ_EN, 32'd1);
    chk(irq, "irq enabled");
    busy = 1;
    rd(REG_STATUS, d); chk(d[1] == 1, "busy");
    wr(REG_STATUS, 32'd1);
    chk(!irq, "irq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
