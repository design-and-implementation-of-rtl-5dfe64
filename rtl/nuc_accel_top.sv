// Programmable-logic side of the infrared non-uniformity-correction (NUC)
// accelerator.
// The processor keeps the frame-count-driven parameter updates in software
// and offloads the pixel-rate work to this block. Frames arrive from DDR on
// an AXI4-Stream port (the DMA's memory-to-stream channel, pixel in bits
// 15:0), pass through one engine, and return on a second AXI4-Stream port
// (the DMA's stream-to-memory channel, 32-bit results). An AXI4-Lite port
// carries the configuration. Engines, selected per frame by CTRL.mode:
//   MODE_BLUR / MODE_DENU / MODE_DENU_AB  denu_accel: ksize-17 Gaussian blur,
//                 optionally followed by pixel - blur and |pixel - blur|
//   MODE_STRIP    strip_correct: DeStrip column/row vectors added back
//   MODE_SHIFT    shift_avg: left shift + frame average, interrupt when done
//   MODE_DENOISE  the frame is routed out on the dn_* ports to the DeNoise
//                 core and its result routed back to the output
// The mode is taken from the register when no frame is in flight, so a
// change written during a frame applies from the next frame. A frame is in
// flight from its first accepted input pixel until its last output pixel
// (tlast) has been accepted. The input's tlast is not used: frame length
// comes from WIDTH x HEIGHT. The interrupt fires at the end of every output
// frame, and for MODE_SHIFT when the frame average is ready.
// All engines process one pixel per clock; back-pressure on m_axis stalls
// the selected engine.
// Taken from the source design: DMA streams in and out, AXI configuration,
// the blur / sub / abs offload of DeNU, the strip vector restore, the left
// shift with frame average and its interrupt, and a DeNoise core fed by the
// DMA. Own choices: one engine per frame selected by a mode register, the
// external DeNoise ports and the busy / interrupt rules.
module nuc_accel_top
  import nuc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  parameter int unsigned KSIZE = 17,
  localparam int unsigned R    = (KSIZE - 1) / 2,
  localparam int unsigned NT   = R + 1,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + 1),
  localparam int unsigned TW   = (NT > 1) ? $clog2(NT) : 1,
  localparam int unsigned DYW  = $clog2(MAX_H + R + 1)
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite configuration slave
  input  logic [15:0] s_axil_awaddr,
  input  logic        s_axil_awvalid,
  output logic        s_axil_awready,
  input  logic [31:0] s_axil_wdata,
  input  logic [3:0]  s_axil_wstrb,
  input  logic        s_axil_wvalid,
  output logic        s_axil_wready,
  output logic [1:0]  s_axil_bresp,
  output logic        s_axil_bvalid,
  input  logic        s_axil_bready,
  input  logic [15:0] s_axil_araddr,
  input  logic        s_axil_arvalid,
  output logic        s_axil_arready,
  output logic [31:0] s_axil_rdata,
  output logic [1:0]  s_axil_rresp,
  output logic        s_axil_rvalid,
  input  logic        s_axil_rready,
  // AXI4-Stream from the DMA (MM2S)
  input  logic [31:0] s_axis_tdata,
  input  logic        s_axis_tvalid,
  output logic        s_axis_tready,
  input  logic        s_axis_tlast,
  // AXI4-Stream to the DMA (S2MM)
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // interrupt to the processor
  output logic        irq,
  // DeNoise core (external to this block)
  output logic [15:0] dn_m_tdata,
  output logic        dn_m_tvalid,
  input  logic        dn_m_tready,
  input  logic [31:0] dn_s_tdata,
  input  logic        dn_s_tvalid,
  output logic        dn_s_tready,
  input  logic        dn_s_tlast,
  output logic [31:0] dn_sigma_n
);
  // ---------------- configuration ----------------
  mode_e              reg_mode, cur_mode;
  logic [XW-1:0]      width;
  logic [YW-1:0]      height;
  logic [4:0]         shift;
  logic               wgt_we, col_we, row_we;
  logic [TW-1:0]      wgt_idx;
  logic [WGT_W-1:0]   wgt_data;
  logic [$clog2(MAX_W)-1:0] col_addr;
  logic [$clog2(MAX_H)-1:0] row_addr;
  logic [OFS_W-1:0]   ofs_data;
  logic               in_flight, irq_set, mean_done;
  logic [15:0]        mean;
  logic [31:0]        frames;
  logic               blur_idle, wgt_pending, st_idle, sa_idle;

  axil_regs #(.NT(NT), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .awaddr(s_axil_awaddr), .awvalid(s_axil_awvalid), .awready(s_axil_awready),
    .wdata(s_axil_wdata), .wstrb(s_axil_wstrb), .wvalid(s_axil_wvalid), .wready(s_axil_wready),
    .bresp(s_axil_bresp), .bvalid(s_axil_bvalid), .bready(s_axil_bready),
    .araddr(s_axil_araddr), .arvalid(s_axil_arvalid), .arready(s_axil_arready),
    .rdata(s_axil_rdata), .rresp(s_axil_rresp), .rvalid(s_axil_rvalid), .rready(s_axil_rready),
    .mode(reg_mode), .width(width), .height(height), .shift(shift), .sigma_n(dn_sigma_n),
    .wgt_we(wgt_we), .wgt_idx(wgt_idx), .wgt_data(wgt_data),
    .col_we(col_we), .col_addr(col_addr), .row_we(row_we), .row_addr(row_addr),
    .ofs_data(ofs_data),
    .busy(in_flight || wgt_pending || !blur_idle || !st_idle || !sa_idle), .irq_set(irq_set), .mean(mean), .frames(frames), .irq(irq)
  );

  // ---------------- engine selection ----------------
  typedef enum logic [1:0] {ENG_DENU, ENG_STRIP, ENG_SHIFT, ENG_EXT} engine_e;
  engine_e eng;
  always_comb begin
    unique case (cur_mode)
      MODE_STRIP:   eng = ENG_STRIP;
      MODE_SHIFT:   eng = ENG_SHIFT;
      MODE_DENOISE: eng = ENG_EXT;
      default:      eng = ENG_DENU;
    endcase
  end

  denu_op_e op;
  always_comb begin
    unique case (cur_mode)
      MODE_DENU:    op = DENU_SUB;
      MODE_DENU_AB: op = DENU_ABS;
      default:      op = DENU_BLUR;
    endcase
  end

  logic        out_hs, in_hs;
  assign in_hs  = s_axis_tvalid && s_axis_tready;
  assign out_hs = m_axis_tvalid && m_axis_tready && m_axis_tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_mode  <= MODE_BLUR;
      in_flight <= 1'b0;
      frames    <= '0;
    end else begin
      if (!in_flight && !in_hs) cur_mode <= reg_mode;
      if (in_hs) in_flight <= 1'b1;
      if (out_hs) begin
        in_flight <= 1'b0;
        frames    <= frames + 1'b1;
      end
    end
  end

  assign irq_set = (out_hs && cur_mode != MODE_SHIFT) || mean_done;

  // ---------------- DeNU / blur engine ----------------
  logic [NT-1:0][WGT_W-1:0] weights;
  logic d_s_ready, d_m_valid, d_m_last;
  logic [31:0] d_m_data;

  weight_loader #(.NT(NT)) u_wl (
    .clk(clk), .rst_n(rst_n), .wr_en(wgt_we), .wr_idx(wgt_idx), .wr_data(wgt_data),
    .idle(blur_idle), .weights(weights), .pending(wgt_pending)
  );

  denu_accel #(.KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_denu (
    .clk(clk), .rst_n(rst_n), .width(width), .height(DYW'(height)),
    .weights(weights), .op(op),
    .s_valid(s_axis_tvalid && eng == ENG_DENU), .s_ready(d_s_ready),
    .s_data(s_axis_tdata[15:0]),
    .m_valid(d_m_valid), .m_ready(m_axis_tready && eng == ENG_DENU),
    .m_data(d_m_data), .m_last(d_m_last), .idle(blur_idle)
  );

  // ---------------- DeStrip restore ----------------
  logic st_s_ready, st_m_valid, st_m_last;
  logic [15:0] st_m_data;
  strip_correct #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_strip (
    .clk(clk), .rst_n(rst_n), .width(width), .height(height),
    .col_we(col_we), .col_addr(col_addr), .col_wdata(ofs_data),
    .row_we(row_we), .row_addr(row_addr), .row_wdata(ofs_data),
    .s_valid(s_axis_tvalid && eng == ENG_STRIP), .s_ready(st_s_ready),
    .s_data(s_axis_tdata[15:0]),
    .m_valid(st_m_valid), .m_ready(m_axis_tready && eng == ENG_STRIP),
    .m_data(st_m_data), .m_last(st_m_last), .idle(st_idle)
  );

  // ---------------- shift and average ----------------
  logic sa_s_ready, sa_m_valid, sa_m_last;
  logic [31:0] sa_m_data;
  shift_avg #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_shift (
    .clk(clk), .rst_n(rst_n), .width(width), .height(height), .shift(shift),
    .s_valid(s_axis_tvalid && eng == ENG_SHIFT), .s_ready(sa_s_ready),
    .s_data(s_axis_tdata[15:0]),
    .m_valid(sa_m_valid), .m_ready(m_axis_tready && eng == ENG_SHIFT),
    .m_data(sa_m_data), .m_last(sa_m_last),
    .mean(mean), .mean_done(mean_done), .idle(sa_idle)
  );

  // ---------------- DeNoise core route ----------------
  assign dn_m_tdata  = s_axis_tdata[15:0];
  assign dn_m_tvalid = s_axis_tvalid && eng == ENG_EXT;
  assign dn_s_tready = m_axis_tready && eng == ENG_EXT;

  // ---------------- stream multiplexers ----------------
  always_comb begin
    unique case (eng)
      ENG_STRIP: begin
        s_axis_tready = st_s_ready;
        m_axis_tvalid = st_m_valid;
        m_axis_tdata  = 32'(st_m_data);
        m_axis_tlast  = st_m_last;
      end
      ENG_SHIFT: begin
        s_axis_tready = sa_s_ready;
        m_axis_tvalid = sa_m_valid;
        m_axis_tdata  = sa_m_data;
        m_axis_tlast  = sa_m_last;
      end
      ENG_EXT: begin
        s_axis_tready = dn_m_tready;
        m_axis_tvalid = dn_s_tvalid;
        m_axis_tdata  = dn_s_tdata;
        m_axis_tlast  = dn_s_tlast;
      end
      default: begin
        s_axis_tready = d_s_ready;
        m_axis_tvalid = d_m_valid;
        m_axis_tdata  = d_m_data;
        m_axis_tlast  = d_m_last;
      end
    endcase
  end

  // The engine only changes between frames, when the old engine is empty.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (cur_mode != $past(cur_mode)) |-> ($past(!in_flight)));
  // Stream rule: an output word is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (m_axis_tvalid && !m_axis_tready && eng != ENG_EXT) |=> m_axis_tvalid);
endmodule
