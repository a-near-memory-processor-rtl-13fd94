// tb_nmp_exec_ctrl: self-checking test of the operation sequencer with the
// real scratchpad, scratchpad TLB and register file around it. The
// testbench plays the instruction front end (registers are set through the
// register file's port B) and uses scratchpad port 1 to place and inspect
// data. Covered: direct and scalar-indirect bit operations, Bmm_load/Bmm
// and the BMR tag exception, Sshift, vector-vector and vector-scalar
// arithmetic over several chunks with masks and overflow flags, stream
// enqueue/dequeue/peek including a refused (blocking) access and pointer
// wrap, the wake-up a dequeue sends to blocked threads, scalar scratchpad
// load/store, the scratchpad page-miss exception,
// hand-off of a vector load to the load/store unit and thread exit.
module tb_nmp_exec_ctrl;
  import nmp_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_valid = 0, op_ready, op_done, op_blocked, op_exc;
  nmp_op_t op;
  logic [1:0] tid = 0;
  exc_e exc_cause; logic [19:0] exc_va;
  logic blk_sync, blk_mem, exit_req, wake_sync;
  logic [2:0][4:0] rf_raddr; logic [2:0][63:0] rf_rdata;
  logic rf_we; logic [1:0] rf_wctx; logic [4:0] rf_waddr; logic [63:0] rf_wdata;
  logic wb_en = 0; logic [4:0] wb_addr = 0; logic [63:0] wb_data = 0;
  logic [19:0] xl_va; logic xl_hit; logic [15:0] xl_pa;
  logic stlb_wr = 0; logic [3:0] stlb_idx = 0; logic [7:0] stlb_vpn = 0; logic [3:0] stlb_ppn = 0;
  logic   [1:0] req, ok, rvalid;
  sp_op_e [1:0] spop;
  logic   [1:0][12:0] waddr;
  logic   [1:0][L-1:0][7:0] be, werr, wmask, rfe, rerr, rmask;
  logic   [1:0][L-1:0][63:0] wdata, rdata;
  logic vls_valid, vls_ready, vls_store; logic [63:0] vls_va, vls_stride;
  logic [12:0] vls_waddr; logic [15:0] vls_nwords;
  logic [1:0] bmr_owner; logic bmr_owned;

  nmp_exec_ctrl #(.NCTX(4), .NLANES(L), .SP_AW(13)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .tid, .op_done, .op_blocked, .op_exc,
    .exc_cause, .exc_va, .blk_sync, .blk_mem, .exit_req, .wake_sync,
    .rf_raddr, .rf_rdata, .rf_we, .rf_wctx, .rf_waddr, .rf_wdata,
    .xl_va, .xl_hit, .xl_pa,
    .sp_req(req[0]), .sp_op(spop[0]), .sp_waddr(waddr[0]), .sp_be(be[0]), .sp_wdata(wdata[0]),
    .sp_werr(werr[0]), .sp_wmask(wmask[0]), .sp_ok(ok[0]), .sp_rvalid(rvalid[0]),
    .sp_rdata(rdata[0]), .sp_rmask(rmask[0]),
    .vls_valid, .vls_ready, .vls_store, .vls_va, .vls_stride, .vls_waddr, .vls_nwords,
    .bmr_owner, .bmr_owned);
  nmp_regfile #(.NCTX(4), .NR(32), .W(64)) u_rf (
    .clk, .rst_n, .rd_ctx(tid), .raddr(rf_raddr), .rdata(rf_rdata),
    .wa_en(rf_we), .wa_ctx(rf_wctx), .wa_addr(rf_waddr), .wa_data(rf_wdata),
    .wb_en, .wb_ctx(tid), .wb_addr, .wb_data, .wc_en(1'b0), .wc_ctx(2'd0), .wc_addr(5'd0), .wc_data(64'd0));
  nmp_tlb #(.ENTRIES(16), .VA_W(20), .PA_W(16), .PAGE_W(12)) u_tlb (
    .clk, .rst_n, .lk_va(xl_va), .lk_hit(xl_hit), .lk_pa(xl_pa), .wr_en(stlb_wr), .wr_idx(stlb_idx),
    .wr_valid(1'b1), .wr_vpn(stlb_vpn), .wr_ppn(stlb_ppn), .inv_en(1'b0), .inv_vpn(8'd0));
  nmp_scratchpad #(.BYTES(65536), .NLANES(L), .LAT(6), .NPORTS(2)) u_sp (
    .clk, .rst_n, .req, .op(spop), .waddr, .be, .wdata, .werr, .wmask, .ok, .rvalid, .rdata,
    .rfe, .rerr, .rmask, .busy());
  assign vls_ready = 1'b1;

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic setreg(int r, logic [63:0] v);
    @(negedge clk); wb_en = 1; wb_addr = 5'(r); wb_data = v;
    @(negedge clk); wb_en = 0;
  endtask
  task automatic getreg(int r, output logic [63:0] v);
    @(negedge clk);
    op.rd = 5'(r);
    #1 v = rf_rdata[0];
  endtask

  // issue one operation; result 0 done, 1 blocked, 2 exception
  int vls_seen, exit_seen, blkmem_seen, wake_seen;
  always @(posedge clk) begin
    if (wake_sync && rst_n) wake_seen++;
    if (vls_valid && rst_n) vls_seen++;
    if (exit_req && rst_n) exit_seen++;
    if (blk_mem && rst_n) blkmem_seen++;
  end
  task automatic issue(opcode_e c, amode_e m, esize_t es, int rd, int rs, int rt, output int res);
    int n;
    @(negedge clk);
    while (!op_ready) @(negedge clk);
    op_valid = 1; op.op = c; op.mode = m; op.esize = es;
    op.rd = 5'(rd); op.rs = 5'(rs); op.rt = 5'(rt);
    @(negedge clk) op_valid = 0;
    n = 0;
    while (!(op_done || op_blocked || op_exc) && n < 2000) begin @(negedge clk); n++; end
    res = op_done ? 0 : op_blocked ? 1 : 2;
    if (n >= 2000) res = 3;
  endtask

  task automatic sp1_write(logic [12:0] a, logic [L-1:0][63:0] d, logic [L-1:0][7:0] m);
    @(negedge clk); req[1] = 1; spop[1] = SP_WRITE; waddr[1] = a; be[1] = '1; wdata[1] = d; wmask[1] = m;
    @(negedge clk); req[1] = 0; wmask[1] = '0;
  endtask
  task automatic sp1_read(logic [12:0] a, output logic [L-1:0][63:0] d,
                          output logic [L-1:0][7:0] m, output logic [L-1:0][7:0] e);
    @(negedge clk); req[1] = 1; spop[1] = SP_READ; waddr[1] = a; be[1] = '1;
    @(negedge clk); req[1] = 0;
    while (!rvalid[1]) @(negedge clk);
    d = rdata[1]; m = rmask[1]; e = rerr[1];
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int res;
    logic [63:0] v, x, y;
    logic [L-1:0][63:0] d, d2;
    logic [L-1:0][7:0] m, e;
    op = '0; req[1] = 0; spop[1] = SP_READ; waddr[1] = 0; be[1] = 0; wdata[1] = 0;
    werr[1] = 0; wmask[1] = 0;
    vls_seen = 0; exit_seen = 0; blkmem_seen = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (u_sp.busy) @(negedge clk);
    // scratchpad pages: virtual page p -> frame p for p < 15; page 15 unmapped
    for (int p = 0; p < 15; p++) begin
      @(negedge clk); stlb_wr = 1; stlb_idx = 4'(p); stlb_vpn = 8'(p); stlb_ppn = 4'(p);
    end
    @(negedge clk) stlb_wr = 0;

    // ---- direct bit operations
    x = 64'h00f0_1234_8000_0001; y = 64'hffff_0000_aaaa_5555;
    setreg(1, x); setreg(2, y);
    issue(OP_POPCNT, AM_DIRECT, 3, 3, 1, 0, res); getreg(3, v);
    chk(res == 0 && v == 64'(($countones(x))), "popcnt");
    issue(OP_LEADZ, AM_DIRECT, 3, 3, 1, 0, res); getreg(3, v);
    chk(v == 64'd8, "leadz");
    issue(OP_MIXL, AM_DIRECT, 3, 3, 1, 2, res); getreg(3, v);
    chk(v[1] == x[0] && v[0] == y[0] && v[63] == x[31] && v[62] == y[31], "mix low");
    // ---- scalar store / load and scalar-indirect popcnt
    setreg(4, 64'h100);                  // scratchpad address 0x100
    issue(OP_STS, AM_SCALAR, 3, 4, 1, 0, res);
    setreg(5, 64'h108);
    issue(OP_POPCNT, AM_SCALAR, 3, 5, 4, 0, res);   // spad[0x108] = popcnt(spad[0x100])
    issue(OP_LDS, AM_SCALAR, 3, 6, 5, 0, res); getreg(6, v);
    chk(res == 0 && v == 64'(($countones(x))), "scalar-indirect popcnt via scratchpad");
    setreg(7, 64'h10b);                  // byte store/load at an odd address
    setreg(8, 64'h5a);
    issue(OP_STS, AM_SCALAR, 0, 7, 8, 0, res);
    issue(OP_LDS, AM_SCALAR, 0, 9, 7, 0, res); getreg(9, v);
    chk(v == 64'h5a, "byte load/store");
    issue(OP_LDS, AM_SCALAR, 3, 9, 5, 0, res); getreg(9, v);
    chk(v[31:24] == 8'h5a && v[23:0] == 24'(($countones(x))), "byte store merged into word");

    // ---- Bmm_load / Bmm: matrix at 0x2000 (rows j = x rotated by j)
    for (int c = 0; c < 4; c++) begin
      for (int i = 0; i < L; i++) d[i] = (x << (16 * c + i)) | (x >> (64 - (16 * c + i)));
      sp1_write(13'((16'h2000 >> 3) + 16 * c), d, '0);
    end
    setreg(10, 64'h2000);
    issue(OP_BMMLD, AM_SCALAR, 3, 0, 10, 0, res);
    chk(res == 0 && bmr_owned && bmr_owner == 0, "bmm_load sets owner");
    issue(OP_BMM, AM_DIRECT, 3, 11, 2, 0, res); getreg(11, v);
    begin
      logic [63:0] ex;
      for (int j = 0; j < 64; j++) begin
        logic [63:0] row;
        row = (j == 0) ? x : ((x << j) | (x >> (64 - j)));
        ex[63 - j] = ^(y & row);
      end
      chk(res == 0 && v == ex, $sformatf("bmm got %h exp %h", v, ex));
    end
    tid = 2'd1;
    issue(OP_BMM, AM_DIRECT, 3, 11, 2, 0, res);
    chk(res == 2 && exc_cause == EX_BMR_TAG, "bmm of another thread raises the tag exception");
    tid = 2'd0;

    // ---- Sshift left by 68 of a block at 0x3000 into 0x3080
    for (int i = 0; i < L; i++) d[i] = {$urandom, $urandom};
    sp1_write(13'(16'h3000 >> 3), d, '0);
    setreg(12, 64'h3000); setreg(13, 64'h3080); setreg(14, 64'd68);
    issue(OP_SSHL, AM_SCALAR, 3, 13, 12, 14, res);
    sp1_read(13'(16'h3080 >> 3), d2, m, e);
    begin
      bit good = 1;
      for (int i = 0; i < L; i++) begin
        logic [63:0] ex;
        ex = (i < 14) ? {d[i+1][59:0], d[i+2][63:60]} : (i == 14 ? {d[15][59:0], 4'h0} : 64'd0);
        if (d2[i] != ex) good = 0;
      end
      chk(res == 0 && good, "sshift left 68");
    end

    // ---- vector add, 32-bit elements, length 40 (two chunks), with a mask
    // A at 0x4000, B at 0x4100, D at 0x4200
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < L; i++) d[i] = {32'(100 * (16 * c + i) + 1), 32'(100 * (16 * c + i))};
      m = '0;
      if (c == 0) m[3] = 8'hf0;           // element 7 masked
      sp1_write(13'((16'h4000 >> 3) + 16 * c), d, m);
      for (int i = 0; i < L; i++) d[i] = {32'h7fff_ffff, 32'd5};
      sp1_write(13'((16'h4100 >> 3) + 16 * c), d, '0);
    end
    setreg(15, {28'd0, 16'd40, 20'h4000});
    setreg(16, {28'd0, 16'd40, 20'h4100});
    setreg(17, {28'd0, 16'd40, 20'h4200});
    issue(OP_VADD, AM_VECTOR, 2, 17, 15, 16, res);
    chk(res == 0, "vector add done");
    for (int c = 0; c < 2; c++) begin
      sp1_read(13'((16'h4200 >> 3) + 16 * c), d2, m, e);
      for (int i = 0; i < L; i++)
        for (int h = 0; h < 2; h++) begin
          int el;
          el = 2 * (16 * c + i) + h;
          if (el < 40) begin
            logic [31:0] a32, got;
            a32 = (h == 0) ? 32'(100 * (16 * c + i)) : 32'(100 * (16 * c + i) + 1);
            got = d2[i][32 * h +: 32];
            if (el == 7)
              chk(got == a32 && m[i][7:4] == 4'hf && e[i][7:4] == 0, "masked element kept");
            else if (h == 0)
              chk(got == a32 + 5 && m[i][3:0] == 0 && e[i][3:0] == 0, $sformatf("element %0d", el));
            else
              chk(got == a32 + 32'h7fff_ffff && e[i][7:4] == 4'hf, $sformatf("overflow element %0d", el));
          end
        end
    end
    // vector-scalar multiply, 16-bit elements, length 8, direct mode
    setreg(18, 64'd3);
    setreg(19, {28'd0, 16'd8, 20'h4300});
    issue(OP_VMUL, AM_DIRECT, 1, 19, 16, 18, res);
    sp1_read(13'(16'h4300 >> 3), d2, m, e);
    // B words are {32'h7fff_ffff, 32'd5}: 16-bit elements 5, 0, -1, 0x7fff
    chk(res == 0 && d2[0] == 64'h7ffd_fffd_0000_000f && e[0] == 8'hc0 && d2[1] == d2[0],
        $sformatf("vector-scalar multiply %h err %b", d2[0], e[0]));

    // ---- streams: 16-bit elements, buffer of 3 at 0x5000
    setreg(20, {12'd0, 16'd0, 16'd3, 20'h5000});   // tail spec
    setreg(21, {12'd0, 16'd0, 16'd3, 20'h5000});   // head spec
    issue(OP_SDEQ, AM_STREAM, 1, 22, 21, 0, res);
    chk(res == 1, "dequeue from an empty stream blocks");
    for (int k = 0; k < 3; k++) begin
      setreg(23, 64'(16'h1110 + k));
      issue(OP_SENQ, AM_STREAM, 1, 20, 23, 0, res);
      chk(res == 0, "enqueue");
    end
    issue(OP_SENQ, AM_STREAM, 1, 20, 23, 0, res);
    chk(res == 1, "enqueue into a full stream blocks");
    getreg(20, v);
    chk(v[51:36] == 16'd0, "tail pointer wrapped");
    issue(OP_SPEEK, AM_STREAM, 1, 22, 21, 0, res); getreg(22, v);
    chk(res == 0 && v == 64'h1110, "peek");
    for (int k = 0; k < 3; k++) begin
      wake_seen = 0;
      issue(OP_SDEQ, AM_STREAM, 1, 22, 21, 0, res); getreg(22, v);
      chk(res == 0 && v == 64'(16'h1110 + k), $sformatf("dequeue %0d got %h", k, v));
      chk(wake_seen == 1, "a dequeue wakes threads waiting on full/empty");
    end
    wake_seen = 0;
    issue(OP_SPEEK, AM_STREAM, 1, 22, 21, 0, res);
    chk(res == 1 && wake_seen == 0, "peek at an empty stream blocks and wakes nobody");
    getreg(21, v);
    chk(v[51:36] == 16'd0, "head pointer wrapped");
    issue(OP_SENQ, AM_STREAM, 1, 20, 23, 0, res);
    chk(res == 0, "enqueue after the buffer drained");

    // ---- page miss on unmapped page 15
    setreg(24, 64'hf010);
    issue(OP_LDS, AM_SCALAR, 3, 25, 24, 0, res);
    chk(res == 2 && exc_cause == EX_SPAD_MISS && exc_va == 20'hf010, "scratchpad page miss");

    // ---- vector load hand-off and exit
    setreg(26, 64'h1_0000_0000);
    setreg(27, 64'd16);
    issue(OP_VLOAD, AM_VECTOR, 3, 17, 26, 27, res);
    @(negedge clk);
    chk(res == 0 && vls_seen == 1 && blkmem_seen == 1 && vls_nwords == 16'd40 &&
        vls_waddr == 13'(16'h4200 >> 3) && vls_va == 64'h1_0000_0000 && vls_stride == 64'd16 &&
        !vls_store, $sformatf("vector load passed on, thread blocks on memory %0d %0d %0d %h %h %0d",
        vls_seen, blkmem_seen, vls_nwords, vls_waddr, vls_va, vls_stride));
    issue(OP_EXIT, AM_DIRECT, 0, 0, 0, 0, res);
    @(negedge clk);
    chk(res == 0 && exit_seen == 1, $sformatf("exit res=%0d seen=%0d", res, exit_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
