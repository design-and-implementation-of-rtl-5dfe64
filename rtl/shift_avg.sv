// Shift-and-average stage of the non-parameter-update path.
// Every incoming pixel is passed on shifted left by `shift` bits (the
// fixed-point "scale up first" step, 32-bit output) while the unshifted
// pixels of the frame are summed. After the frame's last pixel a sequential
// restoring divider (one quotient bit per clock, SUMW clocks) divides the sum
// by width*height; the rounded-down average then appears on `mean` and
// `mean_done` pulses, which the top turns into the interrupt to the
// processor. Stream: valid/ready, one pixel per clock, one register stage,
// advancing with m_ready; m_last marks the last pixel of the frame.
// Taken from the source design: pixels are shifted left on the way through
// and their average is computed, followed by an interrupt. Own choices: the
// average is of the unshifted pixels, truncated, and computed by a sequential
// divider after the frame.
module shift_avg
  import nuc_pkg::*;
#(
  parameter int unsigned MAX_W = 1280,
  parameter int unsigned MAX_H = 1024,
  localparam int unsigned DW   = PIX_W,
  localparam int unsigned XW   = $clog2(MAX_W + 1),
  localparam int unsigned YW   = $clog2(MAX_H + 1),
  localparam int unsigned NW   = XW + YW,                 // pixel count width
  localparam int unsigned SUMW = DW + $clog2(MAX_W * MAX_H + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [XW-1:0]     width,
  input  logic [YW-1:0]     height,
  input  logic [4:0]        shift,
  input  logic              s_valid,
  output logic              s_ready,
  input  logic [DW-1:0]     s_data,
  output logic              m_valid,
  input  logic              m_ready,
  output logic [AXIS_W-1:0] m_data,
  output logic              m_last,
  output logic [DW-1:0]     mean,
  output logic              mean_done,
  output logic              idle
);
  logic          acc, last_px;
  logic [XW-1:0] ix;
  logic [YW-1:0] iy;
  logic [SUMW-1:0] sum;

  assign s_ready = m_ready;
  assign acc     = s_valid && s_ready;
  assign last_px = (ix == width - 1'b1) && (iy == height - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix      <= '0;
      iy      <= '0;
      sum     <= '0;
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else begin
      if (m_ready) begin
        m_valid <= acc;
        m_last  <= acc && last_px;
        m_data  <= AXIS_W'(s_data) << shift;
      end
      if (acc) begin
        if (ix == width - 1'b1) begin
          ix <= '0;
          iy <= (iy == height - 1'b1) ? '0 : iy + 1'b1;
        end else begin
          ix <= ix + 1'b1;
        end
        sum <= ((ix == '0) && (iy == '0)) ? SUMW'(s_data) : sum + SUMW'(s_data);
      end
    end
  end

  // ---------------- sequential divider: sum / (width*height) -------------
  logic [SUMW-1:0] dividend, quo;
  logic [SUMW:0]   rem;
  logic [NW-1:0]   divisor;
  logic [$clog2(SUMW+1)-1:0] bitn;
  logic            div_busy;
  logic [SUMW:0]   trial;

  logic            qbit;
  logic [SUMW-1:0] qnext;
  assign trial = {rem[SUMW-1:0], dividend[SUMW-1]};
  assign qbit  = (trial >= (SUMW+1)'(divisor));
  assign qnext = {quo[SUMW-2:0], qbit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_busy  <= 1'b0;
      mean_done <= 1'b0;
      mean      <= '0;
      dividend  <= '0;
      quo       <= '0;
      rem       <= '0;
      divisor   <= '0;
      bitn      <= '0;
    end else begin
      mean_done <= 1'b0;
      if (acc && last_px) begin
        div_busy <= 1'b1;
        dividend <= sum + SUMW'(s_data);
        divisor  <= NW'(width) * NW'(height);
        quo      <= '0;
        rem      <= '0;
        bitn     <= ($clog2(SUMW+1))'(SUMW);
      end else if (div_busy) begin
        dividend <= dividend << 1;
        rem      <= qbit ? trial - (SUMW+1)'(divisor) : trial;
        quo      <= qnext;
        bitn     <= bitn - 1'b1;
        if (bitn == 1) begin
          div_busy  <= 1'b0;
          mean_done <= 1'b1;
          mean      <= qnext[DW-1:0];
        end
      end
    end
  end

  assign idle = (ix == '0) && (iy == '0) && !m_valid && !div_busy;
endmodule
