// Element-wise subtraction and absolute value, one pixel pair per clock.
// For aligned pixel pairs (a, b) it returns the signed difference a - b
// (DW+1 bits) and, per the op input, either the difference, its absolute
// value, or operand b unchanged (bypass). These are the small "sub" and
// "abs" stream operations that the offloaded DeNU update chains behind its
// Gaussian blur. One register stage; it advances when ce is high.
// Taken from the source design: pipelined sub and abs after the blur. Own
// choices: operand order, pass-through mode, one register stage.
module sub_abs
  import nuc_pkg::*;
#(
  parameter int unsigned DW = PIX_W,
  parameter int unsigned OW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ce,
  input  denu_op_e      op,
  input  logic          in_valid,
  input  logic          in_last,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic          out_valid,
  output logic          out_last,
  output logic [OW-1:0] out_data
);
  logic signed [DW:0] diff;
  logic        [DW:0] mag;
  assign diff = $signed({1'b0, a}) - $signed({1'b0, b});
  assign mag  = diff[DW] ? (DW+1)'(-diff) : (DW+1)'(diff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else if (ce) begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      unique case (op)
        DENU_SUB: out_data <= OW'(diff);              // sign-extended
        DENU_ABS: out_data <= OW'(mag);
        default:  out_data <= OW'(b);
      endcase
    end
  end
endmodule
