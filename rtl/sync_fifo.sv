// Synchronous FIFO of DEPTH (power of two) words, used to keep the original
// pixels while their blurred counterpart is computed. Write when push, read
// when pop; rdata shows the oldest word combinationally (first-word
// fall-through), count gives the fill level. Pushing into a full or popping
// an empty FIFO is a usage error and is caught by assertions.
// Taken from the source design: a FIFO holds the data needed later. Own
// choices: first-word-fall-through with an asynchronous read port and the
// depth set by the instantiating block.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) if (push) mem[wp] <= wdata;
  assign rdata = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> (count < (AW+1)'(DEPTH) || pop));
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> (count != '0));
endmodule
