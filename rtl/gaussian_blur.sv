// Separable Gaussian blur engine, one pixel per clock.
// A frame of width x height unsigned pixels enters on a valid/ready stream
// in raster order and leaves blurred in the same order on a second stream.
// gauss_row_conv filters each row, gauss_col_conv filters the columns over
// line buffers; both mirror the image border (reflect-101), so the output has
// the input's size. The kernel is symmetric with KSIZE taps; its R+1 distinct
// weights (unsigned, WF fraction bits, weights[0] = centre) come from
// weight_loader and must stay constant while a frame is in flight (idle
// tells when they may change). A smaller kernel than KSIZE is obtained by
// loading zeros into the outer weights: the result is the same as that of a
// narrower kernel with the same border rule.
// Flow control: the whole pipeline advances when m_ready is high. After the
// last pixel of a frame the input is held (s_ready low) while the column pass
// replays its last R rows, until the last output of the frame has left; so a
// frame of W x H pixels takes about (H + R) * W cycles back to back.
// Pixel count and last-pixel flags come from the width/height settings, not
// from the input stream's side band.
// Taken from the source design: one pixel per clock at 200 MHz, ksize 17,
// row pass then column pass. Own choices: the clock-enable stall scheme, the
// input hold during the bottom replay, and sizing from registers instead of
// tlast.
module gaussian_blur
  import nuc_pkg::*;
#(
  parameter int unsigned DW    = PIX_W,
  parameter int unsigned KSIZE = 17,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  parameter int unsigned WW    = WGT_W,
  localparam int unsigned R    = (KSIZE - 1) / 2,
  localparam int unsigned NT   = R + 1,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + R + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [XW-1:0]         width,
  input  logic [YW-1:0]         height,
  input  logic [NT-1:0][WW-1:0] weights,
  input  logic                  s_valid,
  output logic                  s_ready,
  input  logic [DW-1:0]         s_data,
  output logic                  m_valid,
  input  logic                  m_ready,
  output logic [DW-1:0]         m_data,
  output logic                  m_sof,
  output logic                  m_last,
  output logic                  idle      // no frame in flight
);
  localparam int unsigned IW = DW + GUARD;

  logic          ce, hold, acc;
  logic [XW-1:0] ix;
  logic [YW-1:0] iy;

  assign ce      = m_ready;
  assign s_ready = ce && !hold;
  assign acc     = s_valid && s_ready;
  assign idle    = !hold && (ix == '0) && (iy == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix   <= '0;
      iy   <= '0;
      hold <= 1'b0;
    end else begin
      if (acc) begin
        if (ix == width - 1'b1) begin
          ix <= '0;
          if (iy == height - 1'b1) begin
            iy   <= '0;
            hold <= 1'b1;
          end else begin
            iy <= iy + 1'b1;
          end
        end else begin
          ix <= ix + 1'b1;
        end
      end
      if (ce && m_valid && m_last) hold <= 1'b0;
    end
  end

  logic          r_valid, r_sof;
  logic [IW-1:0] r_data;

  gauss_row_conv #(.DW(DW), .KSIZE(KSIZE), .MAX_W(MAX_W), .WW(WW)) u_row (
    .clk(clk), .rst_n(rst_n), .ce(ce), .width(width), .weights(weights),
    .in_valid(acc), .in_sof(acc && ix == '0 && iy == '0), .in_data(s_data),
    .out_valid(r_valid), .out_sof(r_sof), .out_eol(), .out_data(r_data)
  );

  logic flush_busy;
  gauss_col_conv #(.DW(DW), .KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H), .WW(WW)) u_col (
    .clk(clk), .rst_n(rst_n), .ce(ce), .width(width), .height(height), .weights(weights),
    .in_valid(r_valid), .in_sof(r_sof), .in_data(r_data), .flush_busy(flush_busy),
    .out_valid(m_valid), .out_sof(m_sof), .out_last(m_last), .out_data(m_data)
  );

  // The bottom-row replay only happens while the input is held.
  assert property (@(posedge clk) disable iff (!rst_n) flush_busy |-> hold);
endmodule
