// nmp_vector_unit: the NMP's lane-parallel integer vector functional units.
//
// NLANES lanes (16 by default) each process one 64-bit scratchpad word per
// cycle, split into elements of 1, 2, 4 or 8 bytes (the element size is part
// of the operation). Operations: add, subtract, and, or, xor, multiply and
// signed compare-less-than. Following the architecture's rules for vector
// operations, the mask bits of the input operands are honoured and the
// error and mask bits of the destination are produced:
//   - an element whose bytes carry a mask bit in either source is masked
//     off: its destination takes the first source's value and keeps its mask
//     bit set, and no exception is recorded for it;
//   - an arithmetic exception (signed overflow of add, subtract or
//     multiply) does not stop the operation: the wrapped result is written
//     and the element's error bits are set, to be handled once the vector
//     instruction completes;
//   - compare writes all ones (true) or zero and sets the destination mask
//     where the comparison is false, so that later operations skip those
//     elements.
// Which input mask wins, what a masked element holds and the compare
// convention are this design's choices. Floating-point vector units are
// not included.
//
// Interface: combinational; a, b, their per-byte mask bits, op, esize in;
//   d with per-byte err and mask bits out.
// Timing: same cycle (the controller registers the result).
module nmp_vector_unit
  import nmp_pkg::*;
#(
  parameter int unsigned NLANES = nmp_pkg::LANES
) (
  input  vu_op_e                      op,
  input  esize_t                      esize,
  input  logic [NLANES-1:0][63:0]     a,
  input  logic [NLANES-1:0][63:0]     b,
  input  logic [NLANES-1:0][7:0]      a_mask,
  input  logic [NLANES-1:0][7:0]      b_mask,
  output logic [NLANES-1:0][63:0]     d,
  output logic [NLANES-1:0][7:0]      d_err,
  output logic [NLANES-1:0][7:0]      d_mask
);
  always_comb begin
    for (int l = 0; l < NLANES; l++) begin
      d[l]      = '0;
      d_err[l]  = '0;
      d_mask[l] = '0;
      for (int e = 0; e < 8; e++) begin
        int unsigned nb, bits;
        logic [63:0] emask, av, bv;
        logic signed [127:0] as, bs, full, trunc;
        logic [7:0] bytes, mk;
        logic [63:0] r;
        logic ovf;
        nb    = 1 << esize;
        bits  = 8 * nb;
        emask = '0; av = '0; bv = '0; as = '0; bs = '0; full = '0; trunc = '0;
        bytes = '0; mk = '0; r = '0; ovf = 1'b0;
        if (e < (8 >> esize)) begin
          emask = (bits == 64) ? '1 : ((64'd1 << bits) - 64'd1);
          av    = (a[l] >> (e * bits)) & emask;
          bv    = (b[l] >> (e * bits)) & emask;
          as    = $signed({64'd0, av} << (128 - bits)) >>> (128 - bits);
          bs    = $signed({64'd0, bv} << (128 - bits)) >>> (128 - bits);
          bytes = 8'(((16'd1 << nb) - 16'd1) << (e * nb));
          mk    = (a_mask[l] | b_mask[l]) & bytes;
          unique case (op)
            VU_ADD:   full = as + bs;
            VU_SUB:   full = as - bs;
            VU_AND:   full = as & bs;
            VU_OR:    full = as | bs;
            VU_XOR:   full = as ^ bs;
            VU_MUL:   full = as * bs;
            VU_CMPLT: full = (as < bs) ? -128'sd1 : 128'sd0;
            default:  full = '0;
          endcase
          trunc = $signed(full << (128 - bits)) >>> (128 - bits);
          ovf   = (op == VU_ADD || op == VU_SUB || op == VU_MUL) && (trunc != full);
          r     = full[63:0] & emask;
          if (mk != '0) begin
            d[l]      = d[l] | (av << (e * bits));
            d_mask[l] = d_mask[l] | bytes;
          end else begin
            d[l]     = d[l] | (r << (e * bits));
            if (ovf) d_err[l] = d_err[l] | bytes;
            if (op == VU_CMPLT && full == 0) d_mask[l] = d_mask[l] | bytes;
          end
        end
      end
    end
  end
endmodule
