// Vertical pass of the separable Gaussian blur.
// Input is the horizontally filtered stream of gauss_row_conv (IW bits with
// GUARD extra fraction bits), one pixel per enabled clock. KSIZE-1 line
// buffers (line_ram, one row each, used as a ring) hold the previous rows, so
// the column of KSIZE vertical neighbours of the incoming pixel is available
// in one read. Output row y is produced while row y+R arrives. The top and
// bottom borders are mirrored (reflect-101) by the operand multiplexer, as in
// the horizontal pass.
// After the last pixel of a frame the module replays the last R rows on its
// own ("flush", flush_busy high, R*WIDTH cycles): it reads the line buffers
// without writing them and emits the bottom R output rows. The source must
// not send the next frame during the flush; gaussian_blur holds its input.
// Arithmetic: symmetric pre-add, R+1 multipliers, pipelined adder tree, then
// rounding by WF+GB bits and saturation to DW bits.
// Latency from an input pixel to the output completing with it:
// 5 + clog2(R+1) enabled cycles (plus R rows of image delay).
// Taken from the source design: row/column separation, mirrored padding done
// by the data path, pipelined multiply-accumulate. Own choices: reflect-101
// border, the line-buffer ring, the end-of-frame replay for the bottom border,
// and the rounding.
module gauss_col_conv
  import nuc_pkg::*;
#(
  parameter int unsigned DW    = PIX_W,
  parameter int unsigned KSIZE = 17,
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  parameter int unsigned WW    = WGT_W,
  parameter int unsigned WF    = WFRAC,
  parameter int unsigned GB    = GUARD,
  parameter int unsigned IW    = DW + GB,
  localparam int unsigned R    = (KSIZE - 1) / 2,
  localparam int unsigned NT   = R + 1,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + R + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic [XW-1:0]         width,
  input  logic [YW-1:0]         height,
  input  logic [NT-1:0][WW-1:0] weights,
  input  logic                  in_valid,
  input  logic                  in_sof,
  input  logic [IW-1:0]         in_data,
  output logic                  flush_busy,
  output logic                  out_valid,
  output logic                  out_sof,
  output logic                  out_last,   // last pixel of the frame
  output logic [DW-1:0]         out_data
);
  localparam int unsigned NB  = KSIZE - 1;          // line buffers
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned AW  = (MAX_W > 1) ? $clog2(MAX_W) : 1;
  localparam int unsigned PW  = IW + 1;
  localparam int unsigned MW  = PW + WW;
  localparam int unsigned LEV = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned TW  = MW + LEV;
  localparam int unsigned SH  = WF + GB;

  // ---------------- stage 0: position of the incoming / replayed pixel ----
  logic [XW-1:0] x_next, fx;
  logic [YW-1:0] y_next, fy;
  logic [BW-1:0] b_next, fb;
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [BW-1:0] bank;

  assign col  = in_sof ? '0 : x_next;
  assign row  = in_sof ? '0 : y_next;
  assign bank = in_sof ? '0 : b_next;

  function automatic logic [BW-1:0] bank_inc(input logic [BW-1:0] b);
    return (b == BW'(NB - 1)) ? '0 : b + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_next     <= '0;
      y_next     <= '0;
      b_next     <= '0;
      flush_busy <= 1'b0;
      fx         <= '0;
      fy         <= '0;
      fb         <= '0;
    end else if (ce) begin
      if (in_valid) begin
        if (col == width - 1'b1) begin
          x_next <= '0;
          y_next <= row + 1'b1;
          b_next <= bank_inc(bank);
          if (row == height - 1'b1) begin
            flush_busy <= 1'b1;
            fx <= '0;
            fy <= row + 1'b1;
            fb <= bank_inc(bank);
          end
        end else begin
          x_next <= col + 1'b1;
          y_next <= row;
          b_next <= bank;
        end
      end else if (flush_busy) begin
        if (fx == width - 1'b1) begin
          fx <= '0;
          fy <= fy + 1'b1;
          fb <= bank_inc(fb);
          if (fy == height + YW'(R) - 1'b1) flush_busy <= 1'b0;
        end else begin
          fx <= fx + 1'b1;
        end
      end
    end
  end

  logic          g_valid;
  logic [XW-1:0] g_x;
  logic [YW-1:0] g_c;
  logic [BW-1:0] g_b;
  assign g_valid = in_valid || flush_busy;
  assign g_x     = in_valid ? col  : fx;
  assign g_c     = in_valid ? row  : fy;
  assign g_b     = in_valid ? bank : fb;

  // ---------------- line buffers ----------------
  logic [IW-1:0] rd [NB];
  for (genvar b = 0; b < NB; b++) begin : g_lb
    line_ram #(.DW(IW), .DEPTH(MAX_W)) u_lb (
      .clk(clk), .ce(ce), .addr(g_x[AW-1:0]),
      .we(in_valid && (bank == BW'(b))),
      .wdata(in_data), .rdata(rd[b])
    );
  end

  // ---------------- stage 1: align with the RAM output ----------------
  logic          s1_valid;
  logic [XW-1:0] s1_x;
  logic [YW-1:0] s1_c;
  logic [BW-1:0] s1_b;
  logic [IW-1:0] s1_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else if (ce) s1_valid <= g_valid;
  end
  always_ff @(posedge clk) begin
    if (ce) begin
      s1_x <= g_x;
      s1_c <= g_c;
      s1_b <= g_b;
      s1_d <= in_data;
    end
  end

  // ---------------- stage 2: vertical window, win[k] = row c-k ----------
  logic [IW-1:0] win [KSIZE];
  logic          s2_valid;
  logic [XW-1:0] s2_x;
  logic [YW-1:0] s2_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else if (ce) s2_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    if (ce) begin
      s2_x   <= s1_x;
      s2_c   <= s1_c;
      win[0] <= s1_d;
      for (int k = 1; k < KSIZE; k++)
        win[k] <= rd[(int'(s1_b) - k + 2 * int'(NB)) % int'(NB)];
    end
  end

  // ---------------- mirrored tap selection ----------------
  logic          emit;
  int            oy;
  logic [IW-1:0] tap [KSIZE];
  assign emit = s2_valid && (s2_c >= YW'(R));
  assign oy   = int'(s2_c) - int'(R);

  always_comb begin
    int m, idx;
    for (int d = 0; d < KSIZE; d++) begin
      m   = mirror_idx(oy + d - int'(R), int'(height));
      idx = int'(s2_c) - m;
      if (idx < 0) idx = 0;
      if (idx > int'(KSIZE) - 1) idx = int'(KSIZE) - 1;
      tap[d] = win[idx];
    end
  end

  // ---------------- stage 3: pre-add ----------------
  logic [NT-1:0][PW-1:0] pa;
  logic                  p_valid, p_sof, p_last;
  always_ff @(posedge clk) begin
    if (ce) begin
      pa[0] <= PW'(tap[R]);
      for (int j = 1; j < NT; j++) pa[j] <= PW'(tap[R-j]) + PW'(tap[R+j]);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_sof   <= 1'b0;
      p_last  <= 1'b0;
    end else if (ce) begin
      p_valid <= emit;
      p_sof   <= emit && (oy == 0) && (s2_x == '0);
      p_last  <= emit && (oy == int'(height) - 1) && (s2_x == width - 1'b1);
    end
  end

  // ---------------- stage 4: multiply, tree, round ----------------
  logic [NT-1:0][MW-1:0] prod;
  always_ff @(posedge clk) begin
    if (ce)
      for (int j = 0; j < NT; j++) prod[j] <= MW'(pa[j]) * MW'(weights[j]);
  end

  logic [TW-1:0] sum;
  adder_tree #(.N(NT), .IW(MW), .OW(TW)) u_tree (
    .clk(clk), .ce(ce), .din(prod), .sum(sum)
  );

  logic [TW-1:0] rnd;
  assign rnd = (sum + (TW'(1) << (SH - 1))) >> SH;
  always_ff @(posedge clk) begin
    if (ce) out_data <= (rnd > TW'({DW{1'b1}})) ? {DW{1'b1}} : rnd[DW-1:0];
  end

  logic [2:0] sb_out;
  pipe_delay #(.W(3), .DEPTH(LEV + 2)) u_sb (
    .clk(clk), .rst_n(rst_n), .ce(ce),
    .din({p_valid, p_sof, p_last}), .dout(sb_out)
  );
  assign {out_valid, out_sof, out_last} = sb_out;

  // No new input may arrive while the bottom rows are replayed.
  assert property (@(posedge clk) disable iff (!rst_n) ce && flush_busy |-> !in_valid);
endmodule
