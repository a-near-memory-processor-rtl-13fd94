// tb_nmp_tlb: self-checking test of the fully associative TLB in its
// scratchpad configuration (20-bit virtual, 16-bit physical, 4 KB pages,
// 16 entries): fills, hits with offset pass-through, misses, invalidation
// by page and overwrite of an entry.
module tb_nmp_tlb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [19:0] lk_va;
  logic lk_hit;
  logic [15:0] lk_pa;
  logic wr_en = 0, wr_valid = 0, inv_en = 0;
  logic [3:0] wr_idx = 0;
  logic [7:0] wr_vpn = 0, inv_vpn = 0;
  logic [3:0] wr_ppn = 0;
  logic [7:0] map [16];
  int checks = 0, failures = 0;

  nmp_tlb #(.ENTRIES(16), .VA_W(20), .PA_W(16), .PAGE_W(12)) dut (
    .clk, .rst_n, .lk_va, .lk_hit, .lk_pa, .wr_en, .wr_idx, .wr_valid, .wr_vpn, .wr_ppn,
    .inv_en, .inv_vpn);

  task automatic look(logic [19:0] v, bit hit, logic [3:0] frame);
    lk_va = v;
    #1;
    checks++;
    if (lk_hit !== hit || (hit && lk_pa !== {frame, v[11:0]})) begin
      failures++;
      $display("FAIL va=%h hit=%0d pa=%h exp hit=%0d frame=%0d", v, lk_hit, lk_pa, hit, frame);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_va = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(20'h01234, 0, 0);
    for (int f = 0; f < 16; f++) begin
      map[f] = 8'(f * 7 + 3);
      @(negedge clk);
      wr_en = 1; wr_idx = 4'(f); wr_valid = 1; wr_vpn = map[f]; wr_ppn = 4'(15 - f);
    end
    @(negedge clk) wr_en = 0;
    for (int f = 0; f < 16; f++) look({map[f], 12'($urandom)}, 1, 4'(15 - f));
    look({8'd1, 12'h0}, 0, 0);
    @(negedge clk); inv_en = 1; inv_vpn = map[5];
    @(negedge clk); inv_en = 0;
    look({map[5], 12'h10}, 0, 0);
    look({map[6], 12'h10}, 1, 4'(9));
    @(negedge clk); wr_en = 1; wr_idx = 4'd5; wr_valid = 1; wr_vpn = 8'hee; wr_ppn = 4'd2;
    @(negedge clk); wr_en = 0;
    look(20'hee777, 1, 4'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
