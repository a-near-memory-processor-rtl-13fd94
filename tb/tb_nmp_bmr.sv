// tb_nmp_bmr: self-checking test of the Bit Matrix Register.
// Loads a random 64x64 matrix in 16-row slices, multiplies random words and
// compares with a parity reference; checks the one-cycle result latency,
// that a multiply before any load or by another thread faults, and that an
// identity-like matrix transposes as expected.
module tb_nmp_bmr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_en = 0, mul_en = 0;
  logic [5:0] ld_row = 0;
  logic [15:0][63:0] ld_rows = '0;
  logic [1:0] ld_tid = 0, mul_tid = 0;
  logic [63:0] mul_src = 0, mul_res;
  logic mul_valid, tag_fault, owned;
  logic [1:0] owner;
  logic [63:0] m [64];
  int checks = 0, failures = 0;

  nmp_bmr #(.N(64), .LDW(16), .TIDW(2)) dut (
    .clk, .rst_n, .ld_en, .ld_row, .ld_rows, .ld_mask('1), .ld_tid,
    .mul_en, .mul_src, .mul_tid, .mul_valid, .mul_res, .tag_fault, .owner, .owned);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_matrix(logic [1:0] t);
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      ld_en = 1; ld_row = 6'(16 * s); ld_tid = t;
      for (int i = 0; i < 16; i++) ld_rows[i] = m[16*s+i];
    end
    @(negedge clk) ld_en = 0;
  endtask

  task automatic multiply(logic [63:0] s, logic [1:0] t, output logic [63:0] r, output logic f);
    @(negedge clk);
    mul_en = 1; mul_src = s; mul_tid = t;
    @(negedge clk);
    mul_en = 0;
    r = mul_res;
    f = tag_fault;
    chk(mul_valid == !f, "mul_valid one cycle after mul_en");
  endtask

  function automatic logic [63:0] ref_bmm(logic [63:0] s);
    logic [63:0] r;
    for (int j = 0; j < 64; j++) begin
      int n = 0;
      for (int k = 0; k < 64; k++) if (s[k] && m[j][k]) n++;
      r[63-j] = n[0];
    end
    return r;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r; logic f;
    repeat (2) @(negedge clk);
    rst_n = 1;
    multiply(64'h1234, 0, r, f);
    chk(f, "fault before any load");
    for (int j = 0; j < 64; j++) m[j] = {$urandom, $urandom};
    load_matrix(2'd1);
    chk(owned && owner == 2'd1, "owner tag set by load");
    for (int i = 0; i < 50; i++) begin
      logic [63:0] s;
      s = {$urandom, $urandom};
      multiply(s, 2'd1, r, f);
      chk(!f && r == ref_bmm(s), $sformatf("bmm %h got %h exp %h", s, r, ref_bmm(s)));
    end
    multiply(64'hffff, 2'd2, r, f);
    chk(f, "fault for another thread");
    // row j = unit vector picking bit 63-j: multiply reproduces the source
    for (int j = 0; j < 64; j++) m[j] = 64'd1 << (63 - j);
    load_matrix(2'd3);
    multiply(64'hdead_beef_0123_4567, 2'd3, r, f);
    chk(!f && r == 64'hdead_beef_0123_4567, "identity matrix");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
