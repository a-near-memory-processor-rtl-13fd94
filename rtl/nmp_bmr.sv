// nmp_bmr: the NMP's single Bit Matrix Register (BMR) and bit matrix multiply.
//
// The BMR holds a 64x64 bit matrix, one 64-bit row per word. Bmm_load fills
// it from the scratchpad (LANES rows per write here, matching the width of a
// scratchpad access) and tags it with the loading thread. Bmm(s) produces a
// 64-bit word whose bit j, counted from the most significant bit down, is the
// parity of (s AND row j). The BMR is not saved on a context switch: a Bmm
// from a thread whose ID differs from the tag (or before any load) raises
// tag_fault instead of computing, so that system software can swap the
// matrix. Multiply and tag check follow the architecture; the row load width
// and the registered result are this design's choices.
//
// Interface:
//   ld_en, ld_row (first row index), ld_rows (LDW rows), ld_mask (row enable),
//   ld_tid: load rows; the tag is set to ld_tid.
//   mul_en, mul_src, mul_tid: start a multiply.
// Timing: mul_res / mul_valid / tag_fault appear one cycle after mul_en.
module nmp_bmr #(
  parameter int unsigned N    = 64,
  parameter int unsigned LDW  = 16,
  parameter int unsigned TIDW = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld_en,
  input  logic [$clog2(N)-1:0] ld_row,
  input  logic [LDW-1:0][N-1:0] ld_rows,
  input  logic [LDW-1:0]      ld_mask,
  input  logic [TIDW-1:0]     ld_tid,
  input  logic                mul_en,
  input  logic [N-1:0]        mul_src,
  input  logic [TIDW-1:0]     mul_tid,
  output logic                mul_valid,
  output logic [N-1:0]        mul_res,
  output logic                tag_fault,
  output logic [TIDW-1:0]     owner,
  output logic                owned
);
  logic [N-1:0] rows [N];
  logic [N-1:0] prod;

  always_comb begin
    for (int j = 0; j < N; j++)
      prod[N-1-j] = ^(mul_src & rows[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owned     <= 1'b0;
      owner     <= '0;
      mul_valid <= 1'b0;
      tag_fault <= 1'b0;
      mul_res   <= '0;
    end else begin
      mul_valid <= 1'b0;
      tag_fault <= 1'b0;
      if (ld_en) begin
        owned <= 1'b1;
        owner <= ld_tid;
      end
      if (mul_en) begin
        if (owned && owner == mul_tid) begin
          mul_valid <= 1'b1;
          mul_res   <= prod;
        end else begin
          tag_fault <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (ld_en)
      for (int i = 0; i < LDW; i++)
        if (ld_mask[i] && (int'(ld_row) + i) < N)
          rows[int'(ld_row) + i] <= ld_rows[i];
  end
endmodule
