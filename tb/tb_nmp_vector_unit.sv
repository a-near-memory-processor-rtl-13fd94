// tb_nmp_vector_unit: self-checking test of the 16-lane vector unit.
// Random operands and masks for every operation and element size; the
// reference works element by element with fixed-width signed types.
module tb_nmp_vector_unit;
  import nmp_pkg::*;
  vu_op_e op;
  esize_t esize;
  logic [15:0][63:0] a, b, d;
  logic [15:0][7:0] a_mask, b_mask, d_err, d_mask;
  int checks = 0, failures = 0;

  nmp_vector_unit #(.NLANES(16)) dut (.*);

  function automatic longint sext(logic [63:0] v, int bits);
    return (bits == 64) ? longint'(v) : longint'(v << (64 - bits)) >>> (64 - bits);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 400; it++) begin
      op = vu_op_e'($urandom_range(0, 6));
      esize = 2'($urandom_range(0, 3));
      for (int l = 0; l < 16; l++) begin
        a[l] = {$urandom, $urandom};
        b[l] = (it % 3 == 0) ? a[l] ^ 64'(1 << $urandom_range(0, 7)) : {$urandom, $urandom};
        a_mask[l] = ($urandom_range(0, 7) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
        b_mask[l] = ($urandom_range(0, 7) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h00;
      end
      #1;
      for (int l = 0; l < 16; l++) begin
        int nb, bits;
        nb = 1 << esize;
        bits = 8 * nb;
        for (int e = 0; e < 8 / nb; e++) begin
          logic [63:0] av, bv, got, exp_v;
          longint sa, sb, r;
          bit ovf, masked, exp_mask;
          logic [7:0] eb;
          av = 64'(a[l] >> (e * bits));
          bv = 64'(b[l] >> (e * bits));
          if (bits < 64) begin av &= (64'd1 << bits) - 1; bv &= (64'd1 << bits) - 1; end
          sa = sext(av, bits); sb = sext(bv, bits);
          eb = 8'(((1 << nb) - 1) << (e * nb));
          masked = ((a_mask[l] | b_mask[l]) & eb) != 0;
          ovf = 0;
          unique case (op)
            VU_ADD: begin r = sa + sb; ovf = (bits == 64) ? ((sa < 0) == (sb < 0) && (r < 0) != (sa < 0)) : (r != sext(64'(r), bits)); end
            VU_SUB: begin r = sa - sb; ovf = (bits == 64) ? ((sa < 0) != (sb < 0) && (r < 0) != (sa < 0)) : (r != sext(64'(r), bits)); end
            VU_AND: r = sa & sb;
            VU_OR:  r = sa | sb;
            VU_XOR: r = sa ^ sb;
            VU_MUL: begin
              logic signed [127:0] p;
              p = 128'(sa) * 128'(sb);
              r = longint'(p[63:0]);
              ovf = (p != 128'(sext(64'(p[63:0]), bits)));
            end
            default: r = (sa < sb) ? -1 : 0;
          endcase
          exp_v = masked ? av : (64'(r) & ((bits == 64) ? '1 : ((64'd1 << bits) - 1)));
          exp_mask = masked || (op == VU_CMPLT && r == 0);
          got = 64'(d[l] >> (e * bits));
          if (bits < 64) got &= (64'd1 << bits) - 1;
          checks++;
          if (got != exp_v || ((d_mask[l] & eb) != (exp_mask ? eb : 8'h00)) ||
              ((d_err[l] & eb) != ((ovf && !masked) ? eb : 8'h00))) begin
            failures++;
            $display("FAIL op=%s es=%0d lane %0d el %0d a=%h b=%h got %h exp %h mask %b err %b",
                     op.name(), esize, l, e, av, bv, got, exp_v, d_mask[l], d_err[l]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
