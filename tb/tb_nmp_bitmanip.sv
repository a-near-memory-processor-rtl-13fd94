// tb_nmp_bitmanip: self-checking test of the Leadz / Popcnt / Mix unit.
// Random and corner-case words are applied to every operation and compared
// with reference values computed bit by bit in the testbench.
module tb_nmp_bitmanip;
  logic [1:0]  op;
  logic [63:0] a, b, result;
  int checks = 0, failures = 0;

  nmp_bitmanip #(.W(64)) dut (.op, .a, .b, .result);

  function automatic logic [63:0] ref_model(logic [1:0] o, logic [63:0] x, logic [63:0] y);
    logic [63:0] r;
    int n;
    r = '0;
    if (o == 0) begin
      n = 0;
      while (n < 64 && x[63-n] == 1'b0) n++;
      r = 64'(n);
    end else if (o == 1) begin
      n = 0;
      for (int i = 0; i < 64; i++) if (x[i]) n++;
      r = 64'(n);
    end else begin
      int base;
      base = (o == 2) ? 32 : 0;
      for (int i = 0; i < 32; i++) begin
        r[2*i+1] = x[base+i];
        r[2*i]   = y[base+i];
      end
    end
    return r;
  endfunction

  task automatic apply(logic [1:0] o, logic [63:0] x, logic [63:0] y);
    op = o; a = x; b = y;
    #1;
    checks++;
    if (result !== ref_model(o, x, y)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h exp %h", o, x, y, result, ref_model(o, x, y));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++) begin
      apply(2'(o), 64'd0, 64'd0);
      apply(2'(o), '1, 64'd0);
      apply(2'(o), 64'd1, '1);
      apply(2'(o), 64'h8000_0000_0000_0000, 64'h5555_5555_AAAA_AAAA);
    end
    for (int i = 0; i < 400; i++)
      apply(2'($urandom_range(0, 3)), {$urandom, $urandom} >> $urandom_range(0, 63), {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
