// One line buffer of the vertical convolution: a single-port RAM of DEPTH
// words with a registered, read-before-write output. In the cycle a new pixel
// is written at column x, the word that was stored there (the same column of
// an older row) appears on rdata at the next enabled clock. This is the
// read-first mode of FPGA block RAM, so the array maps onto BRAM.
// Own choice: a plain single-port read-first RAM that synthesis maps to block
// RAM; the source design only says that BRAM holds the intermediate data.
module line_ram #(
  parameter int unsigned DW    = 20,
  parameter int unsigned DEPTH = 1280,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          ce,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end
endmodule
