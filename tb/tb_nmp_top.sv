// tb_nmp_top: end-to-end test of the NMP at its default sizes (64 KB
// scratchpad, 16 lanes, 4 contexts, 128 pending memory operations).
//
// The main processor, the instruction front end, system software (page-miss
// and BMR handlers, TLB refills) and main memory are modelled here. Main
// memory answers after 470..500 cycles, out of order. Three threads are
// invoked through the invocation register sets and form a streaming
// pipeline, in the style of the convolutional encoder and bit-stream
// kernels the NMP targets:
//   producer: vector-loads N input words into the scratchpad and feeds them
//             one by one into stream buffer S1 (4 entries);
//   worker:   vector-loads its bit matrix, Bmm_loads it, then for each word
//             of S1 computes Bmm(word) and writes it to stream buffer S2;
//   consumer: vector-loads its own bit matrix, collects S2 into a vector,
//             appends Bmm of the last word with its own matrix, doubles the
//             vector with a vector add, rotates the 128-byte block with
//             Sshift and vector-stores it to memory.
// The results in memory and the completion flags are compared with values
// computed here. Each mechanism must occur at least once: context switches,
// blocking on a stream buffer, blocking on main memory, overlapping memory
// requests, a BMR tag exception (two threads share the BMR) serviced by
// reloading the matrix, a scratchpad page miss serviced by mapping the
// page, stream pointer wrap-around and completion-flag stores.
module tb_nmp_top;
  import nmp_pkg::*;
  localparam int N       = 15;     // words through the pipeline
  localparam int MEM_LAT = 470;    // NMP-to-memory latency in cycles

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic h_req = 0, h_we = 0; logic [7:0] h_addr = 0; logic [63:0] h_wdata = 0, h_rdata;
  logic cur_valid; logic [1:0] cur_tid; logic [63:0] cur_func;
  logic fe_op_valid = 0; nmp_op_t fe_op; logic fe_op_ready, fe_op_done, fe_op_blocked, fe_op_exc;
  exc_e fe_exc_cause; logic [19:0] fe_exc_va;
  logic fe_rf_we = 0; logic [4:0] fe_rf_addr = 0; logic [63:0] fe_rf_wdata = 0;
  logic stlb_wr = 0; logic [3:0] stlb_idx = 0; logic stlb_valid = 0; logic [7:0] stlb_vpn = 0; logic [3:0] stlb_ppn = 0;
  logic mtlb_wr = 0; logic [4:0] mtlb_idx = 0; logic mtlb_valid = 0; logic [51:0] mtlb_vpn = 0; logic [35:0] mtlb_ppn = 0;
  logic mtlb_inv = 0; logic [51:0] mtlb_inv_vpn = 0;
  logic m_valid, m_ready, m_we; logic [47:0] m_addr; logic [63:0] m_wdata; logic [7:0] m_tag;
  logic mr_valid = 0; logic [7:0] mr_tag = 0; logic [63:0] mr_rdata = 0;
  logic vls_exc; logic [1:0] vls_exc_tid; logic [15:0] vls_exc_index; logic [63:0] vls_exc_va;
  logic [31:0] n_switches; logic [7:0] n_pending; logic [1:0] bmr_owner; logic bmr_owned; logic sp_busy;

  nmp_top dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- main memory ----------------
  logic [63:0] mem [int];
  function automatic logic [63:0] rdmem(logic [47:0] a);
    return mem.exists(int'(a >> 3)) ? mem[int'(a >> 3)] : 64'd0;
  endfunction
  typedef struct { int due; logic [7:0] tag; logic [63:0] data; } rsp_t;
  rsp_t inflight [$];
  int cyc = 0, max_pend = 0, n_flag_wr = 0;
  always @(negedge clk) m_ready <= ($urandom_range(0, 7) != 0);
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && int'(n_pending) > max_pend) max_pend = int'(n_pending);
    if (rst_n && m_valid && m_ready) begin
      rsp_t r;
      r.due = cyc + MEM_LAT + $urandom_range(0, 30);
      r.tag = m_tag;
      r.data = rdmem(m_addr);
      if (m_we) mem[int'(m_addr >> 3)] = m_wdata;
      if (m_tag == 8'h80) n_flag_wr++;
      inflight.push_back(r);
    end
    mr_valid <= 1'b0;
    for (int i = 0; i < inflight.size(); i++)
      if (inflight[i].due <= cyc) begin
        mr_valid <= 1'b1; mr_tag <= inflight[i].tag; mr_rdata <= inflight[i].data;
        inflight.delete(i);
        break;
      end
  end

  // ---------------- programs ----------------
  typedef struct {
    bit li; int rd; logic [63:0] imm;
    opcode_e op; amode_e mode; int es; int rs; int rt;
  } instr_t;
  instr_t prog [3][$];

  function automatic logic [63:0] vspec(int len, int addr);
    return {28'd0, 16'(len), 20'(addr)};
  endfunction
  function automatic instr_t li(int rd, logic [63:0] v);
    instr_t i; i.li = 1; i.rd = rd; i.imm = v; i.op = OP_NOP; i.mode = AM_DIRECT; i.es = 3; i.rs = 0; i.rt = 0;
    return i;
  endfunction
  function automatic instr_t ins(opcode_e o, amode_e m, int es, int rd, int rs, int rt);
    instr_t i; i.li = 0; i.rd = rd; i.imm = 0; i.op = o; i.mode = m; i.es = es; i.rs = rs; i.rt = rt;
    return i;
  endfunction

  localparam logic [63:0] IN_VA = 64'h10000, MW_VA = 64'h11000, MC_VA = 64'h12000,
                          OUT_VA = 64'h20000, FLAG_PA = 64'h30000;

  initial begin
    // producer (function 0x100)
    prog[0].push_back(li(1, IN_VA));
    prog[0].push_back(li(2, 64'd8));
    prog[0].push_back(li(3, vspec(N, 'h1000)));
    prog[0].push_back(ins(OP_VLOAD, AM_VECTOR, 3, 3, 1, 2));
    prog[0].push_back(li(5, vspec(4, 'h2000)));            // S1 tail
    for (int k = 0; k < N; k++) begin
      prog[0].push_back(li(6, 64'h1000 + 64'(8 * k)));
      prog[0].push_back(ins(OP_LDS, AM_SCALAR, 3, 7, 6, 0));
      prog[0].push_back(ins(OP_SENQ, AM_STREAM, 3, 5, 7, 0));
    end
    prog[0].push_back(ins(OP_EXIT, AM_DIRECT, 0, 0, 0, 0));
    // worker (function 0x200)
    prog[1].push_back(li(1, MW_VA));
    prog[1].push_back(li(3, vspec(64, 'h4000)));
    prog[1].push_back(ins(OP_VLOAD, AM_VECTOR, 3, 3, 1, 0));
    prog[1].push_back(li(31, 64'h4000));                   // own matrix, for the BMR handler
    prog[1].push_back(ins(OP_BMMLD, AM_SCALAR, 3, 0, 31, 0));
    prog[1].push_back(li(5, vspec(4, 'h2000)));            // S1 head
    prog[1].push_back(li(8, vspec(4, 'h3000)));            // S2 tail
    for (int k = 0; k < N; k++) begin
      prog[1].push_back(ins(OP_SDEQ, AM_STREAM, 3, 7, 5, 0));
      prog[1].push_back(ins(OP_BMM, AM_DIRECT, 3, 9, 7, 0));
      prog[1].push_back(ins(OP_SENQ, AM_STREAM, 3, 8, 9, 0));
    end
    prog[1].push_back(ins(OP_EXIT, AM_DIRECT, 0, 0, 0, 0));
    // consumer (function 0x300)
    prog[2].push_back(li(1, MC_VA));
    prog[2].push_back(li(3, vspec(64, 'h4200)));
    prog[2].push_back(ins(OP_VLOAD, AM_VECTOR, 3, 3, 1, 0));
    prog[2].push_back(li(31, 64'h4200));
    prog[2].push_back(li(5, vspec(4, 'h3000)));            // S2 head
    for (int k = 0; k < N; k++) begin
      prog[2].push_back(ins(OP_SDEQ, AM_STREAM, 3, 7, 5, 0));
      prog[2].push_back(li(6, 64'h5000 + 64'(8 * k)));
      prog[2].push_back(ins(OP_STS, AM_SCALAR, 3, 6, 7, 0));
    end
    prog[2].push_back(li(10, 64'hF008));                   // page 15 starts unmapped
    prog[2].push_back(ins(OP_LDS, AM_SCALAR, 3, 11, 6, 0));  // r11 = last word
    prog[2].push_back(ins(OP_STS, AM_SCALAR, 3, 10, 11, 0)); // page miss first time
    prog[2].push_back(ins(OP_BMM, AM_DIRECT, 3, 12, 11, 0)); // BMR tag exception first
    prog[2].push_back(li(6, 64'h5000 + 64'(8 * N)));
    prog[2].push_back(ins(OP_STS, AM_SCALAR, 3, 6, 12, 0));
    prog[2].push_back(li(13, vspec(16, 'h5000)));
    prog[2].push_back(li(14, vspec(16, 'h5100)));
    prog[2].push_back(ins(OP_VADD, AM_VECTOR, 3, 14, 13, 13));
    prog[2].push_back(li(15, 64'h5100));
    prog[2].push_back(li(16, 64'h5180));
    prog[2].push_back(li(17, 64'd4));
    prog[2].push_back(ins(OP_SROL, AM_SCALAR, 3, 16, 15, 17));
    prog[2].push_back(li(18, vspec(16, 'h5180)));
    prog[2].push_back(li(19, OUT_VA));
    prog[2].push_back(ins(OP_VSTORE, AM_VECTOR, 3, 18, 19, 0));
    prog[2].push_back(ins(OP_EXIT, AM_DIRECT, 0, 0, 0, 0));
  end

  // ---------------- front end and system software ----------------
  int pcs [4];
  int pidx [4];
  bit started [4];
  bit busy = 0, sw_init_done = 0;
  bit handler_pending [4];
  int itid = 0;   // thread of the operation in flight
  instr_t curi;
  int n_blocked = 0, n_bmr_exc = 0, n_miss = 0, n_memblk = 0, n_done_ops = 0;
  int n_wrap = 0;

  always @(posedge clk)
    if (rst_n && dut.blk_mem) n_memblk++;
  always @(posedge clk)
    if (rst_n && dut.rf_we && dut.rf_waddr == 5 && dut.rf_wdata[51:36] == 16'd0) n_wrap++;

  // the operation was taken by the execution controller
  bit acc_seen = 0;
  always @(posedge clk)
    if (rst_n && dut.u_ex.op_valid && fe_op_ready) acc_seen = 1;


  // decide what to issue at each negedge
  always @(negedge clk) begin
    fe_rf_we    <= 1'b0;
    if (!rst_n) begin
      fe_op_valid <= 1'b0;
    end else begin
      // outcome of an issued operation
      if (fe_op_done || fe_op_blocked || fe_op_exc) begin
        busy = 0;
        if (fe_op_done) begin
          n_done_ops++;
          if (handler_pending[itid]) handler_pending[itid] = 0;   // BMR reloaded; retry the Bmm
          else pcs[itid]++;
        end else if (fe_op_blocked) begin
          n_blocked++;
        end else if (fe_exc_cause == EX_SPAD_MISS) begin
          n_miss++;
          // page-miss handler: map virtual page 15 to frame 15, then retry
          stlb_wr <= 1; stlb_idx <= 4'd15; stlb_valid <= 1; stlb_vpn <= 8'h0f; stlb_ppn <= 4'd15;
        end else if (fe_exc_cause == EX_BMR_TAG) begin
          // BMR handler: load this thread's own matrix, then retry
          n_bmr_exc++;
          handler_pending[itid] = 1;
        end
      end else if (sw_init_done) begin
        stlb_wr <= 0;
      end
      // issue
      if (acc_seen) begin fe_op_valid <= 1'b0; acc_seen = 0; end
      if (cur_valid && !busy && !acc_seen && fe_op_ready && !dut.ending) begin
        if (!started[cur_tid]) begin
          started[cur_tid] = 1;
          pidx[cur_tid] = int'((cur_func >> 8) - 1);
          pcs[cur_tid] = 0;
        end
        if (handler_pending[cur_tid])
          curi = ins(OP_BMMLD, AM_SCALAR, 3, 0, 31, 0);
        else
          curi = prog[pidx[cur_tid]][pcs[cur_tid]];
        if (curi.li) begin
          fe_rf_we <= 1'b1; fe_rf_addr <= 5'(curi.rd); fe_rf_wdata <= curi.imm;
          pcs[cur_tid]++;
        end else begin
          fe_op_valid <= 1'b1;
          fe_op.op <= curi.op; fe_op.mode <= curi.mode; fe_op.esize <= 2'(curi.es);
          fe_op.rd <= 5'(curi.rd); fe_op.rs <= 5'(curi.rs); fe_op.rt <= 5'(curi.rt);
          busy = 1;
          itid = int'(cur_tid);
        end
      end
    end
  end

  // scratchpad word at physical byte address a (for diagnostics)
  function automatic logic [63:0] spw(int a);
    logic [87:0] e; int w, row;
    w = a >> 3; row = w >> 4;
    case (w % 16)
      0: e = dut.u_sp.g_bank[0].ram[row];
      1: e = dut.u_sp.g_bank[1].ram[row];
      2: e = dut.u_sp.g_bank[2].ram[row];
      3: e = dut.u_sp.g_bank[3].ram[row];
      4: e = dut.u_sp.g_bank[4].ram[row];
      5: e = dut.u_sp.g_bank[5].ram[row];
      6: e = dut.u_sp.g_bank[6].ram[row];
      7: e = dut.u_sp.g_bank[7].ram[row];
      8: e = dut.u_sp.g_bank[8].ram[row];
      9: e = dut.u_sp.g_bank[9].ram[row];
      10: e = dut.u_sp.g_bank[10].ram[row];
      11: e = dut.u_sp.g_bank[11].ram[row];
      12: e = dut.u_sp.g_bank[12].ram[row];
      13: e = dut.u_sp.g_bank[13].ram[row];
      14: e = dut.u_sp.g_bank[14].ram[row];
      15: e = dut.u_sp.g_bank[15].ram[row];
      default: e = '0;
    endcase
    return e[87:24];
  endfunction

  // ---------------- host ----------------
  task automatic hwr(int a, logic [63:0] v);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = 8'(a); h_wdata = v;
    @(negedge clk); h_req = 0; h_we = 0;
  endtask
  task automatic map_mem(int idx, logic [63:0] va);
    @(negedge clk); mtlb_wr = 1; mtlb_idx = 5'(idx); mtlb_valid = 1; mtlb_vpn = va[63:12]; mtlb_ppn = 36'(va[47:12]);
    @(negedge clk); mtlb_wr = 0;
  endtask

  function automatic logic [63:0] bmm(logic [63:0] s, logic [63:0] base_word);
    logic [63:0] r;
    for (int j = 0; j < 64; j++) r[63 - j] = ^(s & rdmem(48'(base_word + 64'(8 * j))));
    return r;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] words [16];
    logic [1023:0] blk, rot;
    fe_op = '0;
    for (int i = 0; i < N; i++) mem[int'(IN_VA >> 3) + i] = {$urandom, $urandom};
    for (int i = 0; i < 64; i++) begin
      mem[int'(MW_VA >> 3) + i] = {$urandom, $urandom};
      mem[int'(MC_VA >> 3) + i] = {$urandom, $urandom};
    end
    for (int i = 0; i < 3; i++) mem[int'(FLAG_PA >> 3) + i] = 64'd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sp_busy) @(negedge clk);
    // system software: scratchpad pages 0..14 resident, main-memory pages mapped
    for (int p = 0; p < 15; p++) begin
      @(negedge clk); stlb_wr = 1; stlb_idx = 4'(p); stlb_valid = 1; stlb_vpn = 8'(p); stlb_ppn = 4'(p);
    end
    @(negedge clk) stlb_wr = 0;
    sw_init_done = 1;
    map_mem(0, IN_VA); map_mem(1, MW_VA); map_mem(2, MC_VA); map_mem(3, OUT_VA);
    // main processor: three invocations
    for (int t = 0; t < 3; t++) begin
      hwr(32 * t + 0, 64'(256 * (t + 1)));
      hwr(32 * t + 8, 64'h9000 + 64'(t));
      hwr(32 * t + 16, FLAG_PA + 64'(8 * t));
      hwr(32 * t + 24, 64'd1);
    end
    // wait for the three completion flags
    while (n_flag_wr < 3 && cyc < 100000) @(negedge clk);
    repeat (4) @(negedge clk);
    for (int t = 0; t < 3; t++)
      chk(rdmem(48'(FLAG_PA + 64'(8 * t))) == 64'd1, $sformatf("completion flag of thread %0d set", t));
    // expected output
    for (int k = 0; k < N; k++)
      words[k] = 64'(2) * bmm(rdmem(48'(IN_VA + 64'(8 * k))), MW_VA);
    words[N] = 64'(2) * bmm(bmm(rdmem(48'(IN_VA + 64'(8 * (N - 1)))), MW_VA), MC_VA);
    for (int w = 0; w < 16; w++) blk[1023 - 64 * w -: 64] = words[w];
    for (int w = 0; w < 16; w++)
      chk(spw('h5100 + 8 * w) == words[w], $sformatf("vector add result word %0d in the scratchpad", w));
    rot = (blk << 4) | (blk >> 1020);
    for (int w = 0; w < 16; w++)
      chk(rdmem(48'(OUT_VA + 64'(8 * w))) == rot[1023 - 64 * w -: 64],
          $sformatf("output word %0d got %h exp %h", w, rdmem(48'(OUT_VA + 64'(8 * w))), rot[1023 - 64 * w -: 64]));
    chk(n_flag_wr == 3, "three completion flag stores");
    // mechanisms
    $display("switches=%0d sync_blocks=%0d mem_blocks=%0d max_pending=%0d bmr_exc=%0d page_miss=%0d wraps=%0d cycles=%0d",
             n_switches, n_blocked, n_memblk, max_pend, n_bmr_exc, n_miss, n_wrap, cyc);
    chk(n_switches > 3, "context switches");
    chk(n_blocked > 0, "stream synchronization blocked a thread");
    chk(n_memblk >= 4, "threads blocked on main memory");
    chk(max_pend > 16, "overlapping memory requests");
    chk(n_bmr_exc > 0, "BMR tag exception");
    chk(n_miss == 1, "scratchpad page miss");
    chk(n_wrap > 0, "stream pointer wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
