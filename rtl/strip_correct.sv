// DeStrip restore stage.
// The stripe-noise update reduces the image to one value per column (from
// the column medians) and one value per row (from the row medians); the
// processor sends these vectors, and this stage expands them back to the
// image size on the fly: out(y,x) = in(y,x) + col_ofs[x] + row_ofs[y],
// saturated to the unsigned pixel range. Offsets are signed OW-bit words, so
// a correction that is subtracted is written as a negative value.
// The vectors live in two RAMs (MAX_W and MAX_H words) written through
// col_we/row_we; they must not be rewritten while a frame is streaming.
// Stream: valid/ready, one pixel per clock, raster order, the position is
// counted from width/height. Two pipeline stages (RAM read, add/saturate);
// everything advances with m_ready.
// Taken from the source design: the processor sends one value per column and
// one per row, and the hardware expands them to the image size and adds them
// in a pipeline. Own choices: signed 16-bit offsets, saturation, and the two
// small RAMs written over the register port.
module strip_correct
  import nuc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  parameter int unsigned OW    = OFS_W,
  localparam int unsigned DW   = PIX_W,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + 1),
  localparam int unsigned CAW  = $clog2(MAX_W),
  localparam int unsigned RAW  = $clog2(MAX_H)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XW-1:0]   width,
  input  logic [YW-1:0]   height,
  input  logic            col_we,
  input  logic [CAW-1:0]  col_addr,
  input  logic [OW-1:0]   col_wdata,
  input  logic            row_we,
  input  logic [RAW-1:0]  row_addr,
  input  logic [OW-1:0]   row_wdata,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [DW-1:0]   s_data,
  output logic            m_valid,
  input  logic            m_ready,
  output logic [DW-1:0]   m_data,
  output logic            m_last,
  output logic            idle
);
  logic [OW-1:0] col_mem [MAX_W];
  logic [OW-1:0] row_mem [MAX_H];

  logic          ce, acc;
  logic [XW-1:0] ix;
  logic [YW-1:0] iy;
  assign ce      = m_ready;
  assign s_ready = ce;
  assign acc     = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix <= '0;
      iy <= '0;
    end else if (acc) begin
      if (ix == width - 1'b1) begin
        ix <= '0;
        iy <= (iy == height - 1'b1) ? '0 : iy + 1'b1;
      end else begin
        ix <= ix + 1'b1;
      end
    end
  end

  // stage 1: table read
  logic signed [OW-1:0] c_ofs, r_ofs;
  logic [DW-1:0]        d1;
  logic                 v1, l1;
  always_ff @(posedge clk) begin
    if (col_we) col_mem[col_addr] <= col_wdata;
    if (ce) c_ofs <= col_mem[ix[CAW-1:0]];
  end
  always_ff @(posedge clk) begin
    if (row_we) row_mem[row_addr] <= row_wdata;
    if (ce) r_ofs <= row_mem[iy[RAW-1:0]];
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      l1 <= 1'b0;
      d1 <= '0;
    end else if (ce) begin
      v1 <= acc;
      l1 <= acc && (ix == width - 1'b1) && (iy == height - 1'b1);
      d1 <= s_data;
    end
  end

  // stage 2: add and saturate
  localparam int unsigned SW = ((DW > OW) ? DW : OW) + 3;
  logic signed [SW-1:0] s;
  assign s = $signed({{(SW-DW){1'b0}}, d1}) + SW'(c_ofs) + SW'(r_ofs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else if (ce) begin
      m_valid <= v1;
      m_last  <= l1;
      if (s < 0)                             m_data <= '0;
      else if (s > $signed(SW'({DW{1'b1}}))) m_data <= '1;
      else                                   m_data <= s[DW-1:0];
    end
  end

  assign idle = (ix == '0) && (iy == '0) && !v1 && !m_valid;
endmodule
