// Gaussian weight loader.
// The Gaussian kernel depends only on fixed parameters, so its weights are
// computed once by the processor and written here, one weight per register
// write (index 0 = centre tap, index j = taps at distance j). Writes go to a
// shadow bank; the active bank that feeds the blur is replaced by the shadow
// bank only while the blur reports idle (no frame in flight), so a frame is
// never filtered with a mix of old and new weights. After reset the active
// kernel is the identity (centre 1.0, others 0).
// Interface: wr_en/wr_idx/wr_data from the register file; idle from the blur;
// weights to the blur; pending is high while written weights wait for idle.
// Timing: new weights are active on the clock after the first idle cycle.
// Taken from the source design: a weight loading module; the weights are
// precomputed, not calculated in hardware. Own choices: shadow and active
// banks, commit when the blur is idle, identity kernel at reset.
module weight_loader
  import nuc_pkg::*;
#(
  parameter int unsigned NT = 9,          // distinct weights = (ksize+1)/2
  parameter int unsigned WW = WGT_W,
  parameter int unsigned WF = WFRAC,
  localparam int unsigned IW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [IW-1:0]         wr_idx,
  input  logic [WW-1:0]         wr_data,
  input  logic                  idle,
  output logic [NT-1:0][WW-1:0] weights,
  output logic                  pending
);
  logic [NT-1:0][WW-1:0] shadow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NT; j++) begin
        shadow[j]  <= (j == 0) ? WW'(1 << WF) : '0;
        weights[j] <= (j == 0) ? WW'(1 << WF) : '0;
      end
      pending <= 1'b0;
    end else begin
      if (idle && pending) begin
        weights <= shadow;
        pending <= 1'b0;
      end
      if (wr_en && (int'(wr_idx) < int'(NT))) begin
        shadow[wr_idx] <= wr_data;
        pending        <= 1'b1;
      end
    end
  end
endmodule
