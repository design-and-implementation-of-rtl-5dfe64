// AXI4-Lite configuration port of the accelerator.
// The processor configures the engines through the AXI interconnect: engine
// mode, image size, the shift of the average stage, sigmaN for the DeNoise
// core, the interrupt enable, and the tables (Gaussian weights, DeStrip
// column and row vectors). Register addresses are in nuc_pkg. Table writes
// are forwarded as one-cycle write strobes with an index; tables are not
// readable. Status, frame average and frame count are read-only inputs.
// The interrupt pending bit is set by irq_set and cleared by writing 1 to bit
// 0 of STATUS; irq = pending & enable.
// Protocol: a write is taken when address and data are both valid (one
// cycle with awready = wready = 1), answered with OKAY on B; a read is
// answered on the cycle after arvalid. Byte strobes are ignored: registers
// are written as whole words. Reset values: mode 0, 640 x 512 image.
// Taken from the source design: configuration reaches the accelerator over an
// AXI bus from the processor, and an interrupt tells the main core a frame is
// done. Own choices: the whole register map, reset values (640 x 512), the
// write-1-to-clear status bit, and ignoring byte strobes.
module axil_regs
  import nuc_pkg::*;
#(
  parameter int unsigned NT    = 9,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + 1),
  localparam int unsigned TW   = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned CAW  = $clog2(MAX_W),
  localparam int unsigned RAW  = $clog2(MAX_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [15:0]       awaddr,
  input  logic              awvalid,
  output logic              awready,
  input  logic [31:0]       wdata,
  input  logic [3:0]        wstrb,
  input  logic              wvalid,
  output logic              wready,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready,
  input  logic [15:0]       araddr,
  input  logic              arvalid,
  output logic              arready,
  output logic [31:0]       rdata,
  output logic [1:0]        rresp,
  output logic              rvalid,
  input  logic              rready,
  // configuration
  output mode_e             mode,
  output logic [XW-1:0]     width,
  output logic [YW-1:0]     height,
  output logic [4:0]        shift,
  output logic [31:0]       sigma_n,
  output logic              wgt_we,
  output logic [TW-1:0]     wgt_idx,
  output logic [WGT_W-1:0]  wgt_data,
  output logic              col_we,
  output logic [CAW-1:0]    col_addr,
  output logic              row_we,
  output logic [RAW-1:0]    row_addr,
  output logic [OFS_W-1:0]  ofs_data,
  // status
  input  logic              busy,
  input  logic              irq_set,
  input  logic [15:0]       mean,
  input  logic [31:0]       frames,
  output logic              irq
);
  logic wr, irq_en, irq_pend;
  logic [15:0] wa;

  assign wr      = awvalid && wvalid && !bvalid;
  assign awready = wr;
  assign wready  = wr;
  assign bresp   = 2'b00;
  assign rresp   = 2'b00;
  assign arready = !rvalid;
  assign wa      = awaddr;
  assign irq     = irq_pend && irq_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid   <= 1'b0;
      mode     <= MODE_BLUR;
      width    <= XW'(640);
      height   <= YW'(512);
      shift    <= '0;
      sigma_n  <= '0;
      irq_en   <= 1'b0;
      irq_pend <= 1'b0;
      wgt_we   <= 1'b0;
      col_we   <= 1'b0;
      row_we   <= 1'b0;
      wgt_idx  <= '0;
      wgt_data <= '0;
      col_addr <= '0;
      row_addr <= '0;
      ofs_data <= '0;
    end else begin
      wgt_we <= 1'b0;
      col_we <= 1'b0;
      row_we <= 1'b0;
      if (bvalid && bready) bvalid <= 1'b0;
      if (irq_set) irq_pend <= 1'b1;
      if (wr) begin
        bvalid <= 1'b1;
        if (wa >= BASE_WGT && wa < BASE_WGT + 16'(4 * NT)) begin
          wgt_we   <= 1'b1;
          wgt_idx  <= TW'((wa - BASE_WGT) >> 2);
          wgt_data <= wdata[WGT_W-1:0];
        end else if (wa >= BASE_COL && wa < BASE_ROW) begin
          col_we   <= ((wa - BASE_COL) >> 2) < 16'(MAX_W);
          col_addr <= CAW'((wa - BASE_COL) >> 2);
          ofs_data <= wdata[OFS_W-1:0];
        end else if (wa >= BASE_ROW && wa < BASE_END) begin
          row_we   <= ((wa - BASE_ROW) >> 2) < 16'(MAX_H);
          row_addr <= RAW'((wa - BASE_ROW) >> 2);
          ofs_data <= wdata[OFS_W-1:0];
        end else begin
          unique case (wa)
            REG_CTRL:   mode    <= mode_e'(wdata[2:0]);
            REG_WIDTH:  width   <= wdata[XW-1:0];
            REG_HEIGHT: height  <= wdata[YW-1:0];
            REG_SHIFT:  shift   <= wdata[4:0];
            REG_SIGMA:  sigma_n <= wdata;
            REG_STATUS: if (wdata[0]) irq_pend <= irq_set;
            REG_IRQ_EN: irq_en  <= wdata[0];
            default: ;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      if (rvalid && rready) rvalid <= 1'b0;
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        unique case (araddr)
          REG_CTRL:   rdata <= 32'(mode);
          REG_WIDTH:  rdata <= 32'(width);
          REG_HEIGHT: rdata <= 32'(height);
          REG_SHIFT:  rdata <= 32'(shift);
          REG_SIGMA:  rdata <= sigma_n;
          REG_STATUS: rdata <= {30'd0, busy, irq_pend};
          REG_IRQ_EN: rdata <= {31'd0, irq_en};
          REG_MEAN:   rdata <= 32'(mean);
          REG_FRAMES: rdata <= frames;
          default:    rdata <= '0;
        endcase
      end
    end
  end

  // AXI rule: a response stays valid until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n) bvalid && !bready |=> bvalid);
  assert property (@(posedge clk) disable iff (!rst_n) rvalid && !rready |=> rvalid && $stable(rdata));
endmodule
