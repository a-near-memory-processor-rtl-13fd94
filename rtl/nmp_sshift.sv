// nmp_sshift: block shift unit (the Sshift instruction).
//
// Shifts a block of BLK_WORDS 64-bit words (16 words = 128 bytes by default)
// left or right by 0..BLK_WORDS*64-1 bit positions, either rotating the bits
// that leave the block back in at the other end, or filling with zeros. The
// block is taken as one wide number with word 0 (lowest scratchpad address)
// as its most significant word, so a left shift moves bits toward lower
// addresses, as a bit stream read from the start of the block. The
// operation follows the architecture; the bit order is this design's choice.
//
// Interface: combinational. dir_left selects left, rotate selects rotation.
// Timing: result valid in the same cycle.
module nmp_sshift #(
  parameter int unsigned BLK_WORDS = 16
) (
  input  logic [BLK_WORDS-1:0][63:0] blk,   // blk[0] is word 0
  input  logic [$clog2(BLK_WORDS*64)-1:0] amount,
  input  logic                       dir_left,
  input  logic                       rotate,
  output logic [BLK_WORDS-1:0][63:0] result
);
  localparam int unsigned NB = BLK_WORDS * 64;

  logic [NB-1:0]   flat, shl, shr, res;
  logic [2*NB-1:0] dbl;

  always_comb begin
    // word 0 to the top bits
    for (int w = 0; w < BLK_WORDS; w++)
      flat[NB-1-64*w -: 64] = blk[w];
    shl = flat << amount;
    shr = flat >> amount;
    dbl = {flat, flat};
    if (rotate) begin
      if (dir_left) res = NB'((dbl << amount) >> NB);
      else          res = NB'(dbl >> amount);
    end else begin
      res = dir_left ? shl : shr;
    end
    for (int w = 0; w < BLK_WORDS; w++)
      result[w] = res[NB-1-64*w -: 64];
  end
endmodule
