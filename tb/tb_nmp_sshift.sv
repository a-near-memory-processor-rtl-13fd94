// tb_nmp_sshift: self-checking test of the 128-byte block shifter.
// Every direction and mode is applied with random blocks and amounts; the
// reference moves bits one by one, numbering them from the most
// significant bit of word 0.
module tb_nmp_sshift;
  logic [15:0][63:0] blk, result;
  logic [9:0] amount;
  logic dir_left, rotate;
  int checks = 0, failures = 0;

  nmp_sshift #(.BLK_WORDS(16)) dut (.blk, .amount, .dir_left, .rotate, .result);

  function automatic bit getb(logic [15:0][63:0] x, int p);
    return x[p / 64][63 - (p % 64)];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      logic [15:0][63:0] exp_r;
      for (int w = 0; w < 16; w++) blk[w] = {$urandom, $urandom};
      amount   = (it < 8) ? 10'(it * 64) : 10'($urandom_range(0, 1023));
      dir_left = it[0];
      rotate   = it[1];
      #1;
      for (int p = 0; p < 1024; p++) begin
        int src;
        bit v;
        src = dir_left ? p + int'(amount) : p - int'(amount);
        if (src >= 0 && src < 1024) v = getb(blk, src);
        else if (rotate) v = getb(blk, (src + 1024) % 1024);
        else v = 0;
        exp_r[p / 64][63 - (p % 64)] = v;
      end
      checks++;
      if (result !== exp_r) begin
        failures++;
        $display("FAIL left=%0d rot=%0d amount=%0d", dir_left, rotate, amount);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
