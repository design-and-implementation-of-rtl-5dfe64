// Delay line of DEPTH enabled clock cycles for a W-bit side-band word (valid
// flags, coordinates). It runs in lock step with the arithmetic pipelines,
// which share the same clock enable. DEPTH = 0 is a plain wire. The stages are
// reset so that no stale valid bit appears after reset.
// Own choice: helper register chain for side-band signals that must follow a
// pipelined data path.
module pipe_delay #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ce,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_reg
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else if (ce) begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end
endmodule
