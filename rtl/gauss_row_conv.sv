// Horizontal pass of the separable Gaussian blur.
// A stream of unsigned DW-bit pixels, one per enabled clock, row after row
// of a WIDTH-pixel image, is convolved with a symmetric KSIZE-tap kernel.
// The border is mirrored (reflect-101: x = -1 reads x = 1) without storing
// padded data: every output column picks its KSIZE operands from a shift
// register that holds the last KSIZE pixels of the row, through a multiplexer
// whose selection depends on the column. This is the "padding by changing the
// data path" of the blur hardware.
// An output is produced R = (KSIZE-1)/2 pixels after its input. The last R
// outputs of a row are taken from a snapshot of the shift register made when
// the last pixel of the row arrived; they leave during the next row's first R
// pixels, which produce no output themselves, so one pixel per clock is kept
// without gaps between rows (needs WIDTH > KSIZE).
// Because the kernel is symmetric, mirrored operand pairs are added first and
// only R+1 multipliers are used (weights[0] is the centre tap). The products
// go through a pipelined adder tree; the result keeps GUARD extra fraction
// bits for the vertical pass (scale up first, scale down at the end).
// Latency from a pixel to the output that completes with it: 3 + clog2(R+1)
// enabled cycles. All registers advance only when ce is high.
// Taken from the source design: row pass of a separable blur whose border
// padding is made by changing the data path, parallel pipelined
// multiply-accumulate, configurable ksize. Own choices: reflect-101 border, the
// tail snapshot that avoids gaps between rows, symmetric pre-addition, and the
// fixed-point widths and rounding.
module gauss_row_conv
  import nuc_pkg::*;
#(
  parameter int unsigned DW    = PIX_W,
  parameter int unsigned KSIZE = 17,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned WW    = WGT_W,
  parameter int unsigned WF    = WFRAC,
  parameter int unsigned GB    = GUARD,
  parameter int unsigned OW    = DW + GB,
  localparam int unsigned R    = (KSIZE - 1) / 2,
  localparam int unsigned NT   = R + 1,
  localparam int unsigned XW   = $clog2(MAX_W + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ce,
  input  logic [XW-1:0]        width,
  input  logic [NT-1:0][WW-1:0] weights,
  input  logic                 in_valid,
  input  logic                 in_sof,     // first pixel of a frame
  input  logic [DW-1:0]        in_data,
  output logic                 out_valid,
  output logic                 out_sof,
  output logic                 out_eol,    // last pixel of a row
  output logic [OW-1:0]        out_data
);
  localparam int unsigned PW  = DW + 1;            // pre-added pair
  localparam int unsigned MW  = PW + WW;           // product
  localparam int unsigned LEV = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned TW  = MW + LEV;          // tree sum
  localparam int unsigned SH  = WF - GB;

  // ---------------- input position and shift register ----------------
  logic [XW-1:0] x_next;
  logic          y_zero_next;       // the next pixel belongs to row 0
  logic [XW-1:0] col;
  logic          row0;

  assign col  = in_sof ? '0 : x_next;
  assign row0 = in_sof ? 1'b1 : y_zero_next;

  logic [DW-1:0] win  [KSIZE];
  logic [DW-1:0] snap [KSIZE];
  logic          a_valid;
  logic [XW-1:0] a_c;
  logic          a_row0;
  logic [$clog2(R+1)-1:0] tail_cnt;

  logic norm_emit, tail_emit;
  assign norm_emit = a_valid && (a_c >= XW'(R));
  assign tail_emit = !norm_emit && (tail_cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_next      <= '0;
      y_zero_next <= 1'b1;
      a_valid     <= 1'b0;
      a_c         <= '0;
      a_row0      <= 1'b0;
      tail_cnt    <= '0;
    end else if (ce) begin
      a_valid <= in_valid;
      if (tail_emit) tail_cnt <= tail_cnt - 1'b1;
      if (in_valid) begin
        a_c    <= col;
        a_row0 <= row0;
        if (col == width - 1'b1) begin
          x_next      <= '0;
          y_zero_next <= 1'b0;
          tail_cnt    <= R[$clog2(R+1)-1:0];
        end else begin
          x_next      <= col + 1'b1;
          y_zero_next <= row0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ce && in_valid) begin
      win[0] <= in_data;
      for (int k = 1; k < KSIZE; k++) win[k] <= win[k-1];
      if (col == width - 1'b1) begin
        snap[0] <= in_data;
        for (int k = 1; k < KSIZE; k++) snap[k] <= win[k-1];
      end
    end
  end

  // ---------------- mirrored tap selection ----------------
  int          ox, cref;
  logic [DW-1:0] tap [KSIZE];

  always_comb begin
    int m, idx;
    if (norm_emit) begin
      ox   = int'(a_c) - int'(R);
      cref = int'(a_c);
    end else begin
      ox   = int'(width) - int'(tail_cnt);
      cref = int'(width) - 1;
    end
    for (int d = 0; d < KSIZE; d++) begin
      m   = mirror_idx(ox + d - int'(R), int'(width));
      idx = cref - m;
      if (idx < 0) idx = 0;
      if (idx > int'(KSIZE) - 1) idx = int'(KSIZE) - 1;
      tap[d] = norm_emit ? win[idx] : snap[idx];
    end
  end

  // ---------------- stage B: symmetric pre-add ----------------
  logic [NT-1:0][PW-1:0] pa;
  logic                  b_valid, b_sof, b_eol;

  always_ff @(posedge clk) begin
    if (ce) begin
      pa[0] <= PW'(tap[R]);
      for (int j = 1; j < NT; j++) pa[j] <= PW'(tap[R-j]) + PW'(tap[R+j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_sof   <= 1'b0;
      b_eol   <= 1'b0;
    end else if (ce) begin
      b_valid <= norm_emit || tail_emit;
      b_sof   <= norm_emit && (ox == 0) && a_row0;
      b_eol   <= (ox == int'(width) - 1);
    end
  end

  // ---------------- stage C: multiply ----------------
  logic [NT-1:0][MW-1:0] prod;
  always_ff @(posedge clk) begin
    if (ce)
      for (int j = 0; j < NT; j++) prod[j] <= MW'(pa[j]) * MW'(weights[j]);
  end

  // ---------------- adder tree + rounding ----------------
  logic [TW-1:0] sum;
  adder_tree #(.N(NT), .IW(MW), .OW(TW)) u_tree (
    .clk(clk), .ce(ce), .din(prod), .sum(sum)
  );

  logic [TW-1:0] rnd;
  assign rnd = (sum + (TW'(1) << (SH - 1))) >> SH;

  always_ff @(posedge clk) begin
    if (ce) out_data <= (rnd > TW'({OW{1'b1}})) ? {OW{1'b1}} : rnd[OW-1:0];
  end

  logic [2:0] sb_out;
  pipe_delay #(.W(3), .DEPTH(LEV + 2)) u_sb (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .din({b_valid, b_sof, b_eol}), .dout(sb_out)
  );
  assign {out_valid, out_sof, out_eol} = sb_out;

  // A tail output and a regular output never compete for the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ce && norm_emit && a_c == XW'(R)) |-> (tail_cnt == 0));
endmodule
