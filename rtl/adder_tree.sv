// Pipelined binary addition tree.
// Sums N unsigned operands of IW bits. The operands are padded with zeros to
// the next power of two and added pairwise, one tree level per clock, so the
// result appears LAT = clog2(N) enabled cycles after the operands, in OW bits
// (wide enough that no sum can overflow). All registers advance only when ce
// is high, which lets a downstream stall freeze the whole tree.
// The convolutions of the Gaussian blur end in such a tree; its depth follows
// from the kernel size, as the generator-based blur hardware requires.
// Taken from the source design: a pipelined addition tree after the multipliers.
// Own choices: pairwise tree with one register per level, unsigned operands,
// full-growth output width.
module adder_tree #(
  parameter int unsigned N  = 9,
  parameter int unsigned IW = 35,
  parameter int unsigned OW = IW + ((N > 1) ? $clog2(N) : 1)
) (
  input  logic                 clk,
  input  logic                 ce,
  input  logic [N-1:0][IW-1:0] din,
  output logic [OW-1:0]        sum
);
  localparam int unsigned LEV = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP  = 1 << LEV;

  logic [OW-1:0] lvl [LEV+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++)
      lvl[0][i] = (i < N) ? OW'(din[i]) : '0;
  end

  for (genvar l = 0; l < LEV; l++) begin : g_lvl
    for (genvar i = 0; i < (NP >> (l + 1)); i++) begin : g_add
      always_ff @(posedge clk)
        if (ce) lvl[l+1][i] <= lvl[l][2*i] + lvl[l][2*i+1];
    end
    // upper entries of a level beyond its used width stay zero
    for (genvar i = (NP >> (l + 1)); i < NP; i++) begin : g_zero
      assign lvl[l+1][i] = '0;
    end
  end

  assign sum = lvl[LEV][0];
endmodule
