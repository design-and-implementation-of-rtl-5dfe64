// DeNU offload engine: Gaussian blur followed by subtraction and absolute
// value, as one stream pipeline.
// Each incoming pixel goes both into gaussian_blur (ksize 17 by default, the
// kernel of the DeNU update) and into a FIFO that holds it until its blurred
// value comes out; the pair is then combined by sub_abs. op selects the
// result: the blurred image, pixel - blur (signed, sign-extended to 32 bits)
// or |pixel - blur|. The FIFO covers the blur's image delay of R rows plus
// its pipeline, so it never fills (DEPTH = (R+1)*MAX_W + 64 rounded up to a
// power of two).
// Flow control is that of the blur: everything advances with m_ready; the
// output is one cycle behind the blur output. m_last marks the frame's last
// pixel. idle and the weight interface are the blur's.
// Taken from the source design: the ksize-17 blur of the DeNU update, the FIFO
// that holds the data needed later, and pipelined sub / abs after the blur.
// Own choices: the three selectable results, the FIFO depth and the 32-bit
// signed output format.
module denu_accel
  import nuc_pkg::*;
#(
  parameter int unsigned KSIZE = 17,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  localparam int unsigned DW   = PIX_W,
  localparam int unsigned R    = (KSIZE - 1) / 2,
  localparam int unsigned NT   = R + 1,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + R + 1),
  localparam int unsigned FD   = 1 << $clog2((R + 1) * MAX_W + 64)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [XW-1:0]            width,
  input  logic [YW-1:0]            height,
  input  logic [NT-1:0][WGT_W-1:0] weights,
  input  denu_op_e                 op,
  input  logic                     s_valid,
  output logic                     s_ready,
  input  logic [DW-1:0]            s_data,
  output logic                     m_valid,
  input  logic                     m_ready,
  output logic [AXIS_W-1:0]        m_data,
  output logic                     m_last,
  output logic                     idle
);
  logic          b_valid, b_sof, b_last;
  logic [DW-1:0] b_data, orig;
  logic [$clog2(FD):0] fill;

  gaussian_blur #(.DW(DW), .KSIZE(KSIZE), .MAX_W(MAX_W), .MAX_H(MAX_H)) u_blur (
    .clk(clk), .rst_n(rst_n), .width(width), .height(height), .weights(weights),
    .s_valid(s_valid), .s_ready(s_ready), .s_data(s_data),
    .m_valid(b_valid), .m_ready(m_ready), .m_data(b_data),
    .m_sof(b_sof), .m_last(b_last), .idle(idle)
  );

  sync_fifo #(.W(DW), .DEPTH(FD)) u_fifo (
    .clk(clk), .rst_n(rst_n),
    .push(s_valid && s_ready), .wdata(s_data),
    .pop(b_valid && m_ready), .rdata(orig), .count(fill)
  );

  sub_abs #(.DW(DW), .OW(AXIS_W)) u_sub (
    .clk(clk), .rst_n(rst_n), .ce(m_ready), .op(op),
    .in_valid(b_valid), .in_last(b_last), .a(orig), .b(b_data),
    .out_valid(m_valid), .out_last(m_last), .out_data(m_data)
  );

  // The first blurred pixel of a frame must meet the first original pixel.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (b_valid && b_sof && m_ready) |-> (fill <= ($clog2(FD)+1)'((R + 1) * MAX_W + 64)));
endmodule
