// nmp_bitmanip: scalar bit-manipulation unit of the NMP.
//
// Implements three of the bit-manipulation instructions of the NMP on 64-bit
// words: Leadz (count leading zeros), Popcnt (count ones) and Mix (bit
// interleave of the upper or lower halves of two words). The functions are
// those of the architecture; the bit order of Mix is this design's choice:
// result bit 2i+1 comes from a, bit 2i from b, taking bit i of the selected
// 32-bit half of each word.
//
// Interface: purely combinational; op selects the result.
//   op = 0 Leadz(a), 1 Popcnt(a), 2 Mix high halves, 3 Mix low halves.
// Timing: result is valid in the same cycle as the inputs.
module nmp_bitmanip #(
  parameter int unsigned W = 64
) (
  input  logic [1:0]   op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result
);
  localparam int unsigned H = W / 2;

  logic [W-1:0] lz, pc, mixed;
  logic [H-1:0] ha, hb;

  always_comb begin
    // Leadz: scan from the least significant end, the last one seen wins
    lz = W'(W);
    for (int unsigned i = 0; i < W; i++)
      if (a[i]) lz = W'(W - 1) - W'(i);
    pc = '0;
    for (int i = 0; i < W; i++)
      pc = pc + a[i];
    ha = op[0] ? a[H-1:0] : a[W-1:H];
    hb = op[0] ? b[H-1:0] : b[W-1:H];
    for (int i = 0; i < H; i++) begin
      mixed[2*i+1] = ha[i];
      mixed[2*i]   = hb[i];
    end
    unique case (op)
      2'd0:    result = lz;
      2'd1:    result = pc;
      default: result = mixed;
    endcase
  end
endmodule
