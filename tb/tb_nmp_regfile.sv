// tb_nmp_regfile: self-checking test of the per-context register file:
// random writes on the three write ports, reads from every context, r0
// reading as zero and contexts kept apart, and the write-through bypass (a
// write presented in a cycle is seen by a read of the same register and
// context in that cycle, with port C over B over A).
module tb_nmp_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] rd_ctx = 0;
  logic [2:0][4:0] raddr = '0;
  logic [2:0][63:0] rdata;
  logic wa_en = 0, wb_en = 0, wc_en = 0;
  logic [1:0] wa_ctx = 0, wb_ctx = 0, wc_ctx = 0;
  logic [4:0] wa_addr = 0, wb_addr = 0, wc_addr = 0;
  logic [63:0] wa_data = 0, wb_data = 0, wc_data = 0;
  logic [63:0] model [4][32];
  int checks = 0, failures = 0;

  nmp_regfile #(.NCTX(4), .NR(32), .W(64)) dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 4; c++) for (int r = 0; r < 32; r++) model[c][r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      @(negedge clk);
      wa_en = $urandom_range(0, 1); wa_ctx = 2'($urandom); wa_addr = 5'($urandom); wa_data = {$urandom, $urandom};
      wb_en = $urandom_range(0, 1); wb_ctx = 2'($urandom); wb_addr = 5'($urandom); wb_data = {$urandom, $urandom};
      wc_en = $urandom_range(0, 1); wc_ctx = 2'($urandom); wc_addr = 5'($urandom); wc_data = {$urandom, $urandom};
      if (wa_en) model[wa_ctx][wa_addr] = wa_data;
      if (wb_en) model[wb_ctx][wb_addr] = wb_data;
      if (wc_en) model[wc_ctx][wc_addr] = wc_data;
      @(negedge clk);
      wa_en = 0; wb_en = 0; wc_en = 0;
      rd_ctx = 2'($urandom);
      for (int p = 0; p < 3; p++) raddr[p] = 5'($urandom);
      #1;
      for (int p = 0; p < 3; p++) begin
        logic [63:0] e;
        e = (raddr[p] == 0) ? 64'd0 : model[rd_ctx][raddr[p]];
        checks++;
        if (rdata[p] !== e) begin
          failures++;
          $display("FAIL ctx %0d r%0d got %h exp %h", rd_ctx, raddr[p], rdata[p], e);
        end
      end
    end
    // bypass: read the register being written in the same cycle
    for (int it = 0; it < 200; it++) begin
      logic [63:0] e;
      @(negedge clk);
      rd_ctx = 2'($urandom);
      raddr[0] = 5'($urandom_range(1, 31)); raddr[1] = raddr[0]; raddr[2] = 5'($urandom);
      wa_en = $urandom_range(0, 1); wa_ctx = ($urandom_range(0, 3) == 0) ? 2'($urandom) : rd_ctx;
      wa_addr = raddr[0]; wa_data = {$urandom, $urandom};
      wb_en = $urandom_range(0, 1); wb_ctx = ($urandom_range(0, 3) == 0) ? 2'($urandom) : rd_ctx;
      wb_addr = ($urandom_range(0, 1) == 1) ? raddr[0] : 5'($urandom); wb_data = {$urandom, $urandom};
      wc_en = ($urandom_range(0, 3) == 0); wc_ctx = rd_ctx; wc_addr = raddr[0]; wc_data = {$urandom, $urandom};
      #1;
      e = model[rd_ctx][raddr[0]];
      if (wa_en && wa_ctx == rd_ctx && wa_addr == raddr[0]) e = wa_data;
      if (wb_en && wb_ctx == rd_ctx && wb_addr == raddr[0]) e = wb_data;
      if (wc_en && wc_ctx == rd_ctx && wc_addr == raddr[0]) e = wc_data;
      checks++;
      if (rdata[0] !== e || rdata[1] !== e) begin
        failures++;
        $display("FAIL bypass ctx %0d r%0d got %h exp %h", rd_ctx, raddr[0], rdata[0], e);
      end
      if (wa_en) model[wa_ctx][wa_addr] = wa_data;
      if (wb_en) model[wb_ctx][wb_addr] = wb_data;
      if (wc_en) model[wc_ctx][wc_addr] = wc_data;
      @(posedge clk); #1;
      wa_en = 0; wb_en = 0; wc_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
