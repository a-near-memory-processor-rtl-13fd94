// tb_nmp_vls: self-checking test of the vector load/store unit.
// The unit is connected to a real scratchpad (its port 1; the testbench
// uses port 0 to set up and inspect data), to a TLB model that maps
// virtual to physical addresses one to one except for one unmapped page,
// and to a memory model that answers after a random 20..60 cycles, out of
// order. Checks strided loads and stores word by word, that many requests
// are in flight at once, the done pulse and thread ID, and the restartable
// exception on an unmapped page.
module tb_nmp_vls;
  import nmp_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, cmd_store = 0;
  logic [1:0] cmd_tid = 0;
  logic [63:0] cmd_va = 0, cmd_stride = 0;
  logic [12:0] cmd_spad_waddr = 0;
  logic [15:0] cmd_nwords = 0;
  logic [63:0] tlb_va; logic tlb_hit; logic [47:0] tlb_pa;
  logic m_valid, m_ready, m_we; logic [47:0] m_addr; logic [63:0] m_wdata; logic [6:0] m_tag;
  logic mr_valid = 0; logic [6:0] mr_tag = 0; logic [63:0] mr_rdata = 0;
  logic done; logic [1:0] done_tid;
  logic exc_valid; logic [1:0] exc_tid; logic [15:0] exc_index; logic [63:0] exc_va;
  logic [7:0] n_pending;

  logic   [1:0] req, ok, rvalid;
  sp_op_e [1:0] op;
  logic   [1:0][12:0] waddr;
  logic   [1:0][L-1:0][7:0] be, werr, wmask, rfe, rerr, rmask;
  logic busy;
  logic   [1:0][L-1:0][63:0] wdata, rdata;

  nmp_scratchpad #(.BYTES(65536), .NLANES(L), .LAT(6), .NPORTS(2)) u_sp (.*);
  nmp_vls #(.NCTX(4), .MAXP(128), .NLANES(L), .SP_AW(13), .PA_W(48)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_store, .cmd_tid, .cmd_va, .cmd_stride,
    .cmd_spad_waddr, .cmd_nwords, .tlb_va, .tlb_hit, .tlb_pa,
    .sp_req(req[1]), .sp_op(op[1]), .sp_waddr(waddr[1]), .sp_be(be[1]), .sp_wdata(wdata[1]),
    .sp_ok(ok[1]), .sp_rvalid(rvalid[1]), .sp_rdata(rdata[1]),
    .m_valid, .m_ready, .m_we, .m_addr, .m_wdata, .m_tag, .mr_valid, .mr_tag, .mr_rdata,
    .done, .done_tid, .exc_valid, .exc_tid, .exc_index, .exc_va, .n_pending);
  assign werr[1] = '0;
  assign wmask[1] = '0;

  // TLB model: identity, page 0x7 unmapped
  assign tlb_hit = (tlb_va[63:12] != 52'h7);
  assign tlb_pa  = tlb_va[47:0];

  // memory model: 64K words, random latency, out of order
  logic [63:0] mem [65536];
  typedef struct { int due; logic [6:0] tag; logic [63:0] data; } rsp_t;
  rsp_t inflight [$];
  int cyc = 0, max_pend = 0, n_done = 0, n_exc = 0;
  logic [1:0] last_done_tid;
  always @(negedge clk) m_ready <= ($urandom_range(0, 9) != 0);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (done) begin n_done++; last_done_tid = done_tid; end
    if (exc_valid) n_exc++;
    if (int'(n_pending) > max_pend) max_pend = int'(n_pending);
    if (m_valid && m_ready) begin
      rsp_t r;
      r.due = cyc + $urandom_range(20, 60);
      r.tag = m_tag;
      r.data = mem[m_addr[18:3]];
      if (m_we) mem[m_addr[18:3]] = m_wdata;
      inflight.push_back(r);
    end
    mr_valid <= 1'b0;
    for (int i = 0; i < inflight.size(); i++)
      if (inflight[i].due <= cyc) begin
        mr_valid <= 1'b1;
        mr_tag   <= inflight[i].tag;
        mr_rdata <= inflight[i].data;
        inflight.delete(i);
        break;
      end
  end

  int checks = 0, failures = 0;
  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_cmd(bit st, logic [1:0] t, logic [63:0] va, logic [63:0] stride,
                         logic [12:0] wa, logic [15:0] n);
    int n_before;
    n_before = n_done;
    @(negedge clk);
    cmd_valid = 1; cmd_store = st; cmd_tid = t; cmd_va = va; cmd_stride = stride;
    cmd_spad_waddr = wa; cmd_nwords = n;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk) cmd_valid = 0;
    while (n_done == n_before) @(negedge clk);
    chk(last_done_tid == t, "done carries the thread");
  endtask

  task automatic sp_read(logic [12:0] a, output logic [L-1:0][63:0] d);
    @(negedge clk); req[0] = 1; op[0] = SP_READ; waddr[0] = a; be[0] = '1;
    @(negedge clk); req[0] = 0;
    while (!rvalid[0]) @(negedge clk);
    d = rdata[0];
  endtask
  task automatic sp_write(logic [12:0] a, logic [L-1:0][63:0] d);
    @(negedge clk); req[0] = 1; op[0] = SP_WRITE; waddr[0] = a; be[0] = '1; wdata[0] = d;
    @(negedge clk); req[0] = 0;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0][63:0] d;
    req[0] = 0; op[0] = SP_READ; waddr[0] = 0; be[0] = '0; wdata[0] = '0; werr[0] = '0; wmask[0] = '0;
    for (int i = 0; i < 65536; i++) mem[i] = {32'(i), 32'hc0de0000 ^ 32'(i * 7)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (u_sp.busy) @(negedge clk);
    // unit-stride load of 200 words from 0x10000 into scratchpad word 64
    run_cmd(0, 2'd1, 64'h10000, 64'd8, 13'd64, 16'd200);
    for (int c = 0; c < 13; c++) begin
      sp_read(13'(64 + 16 * c), d);
      for (int i = 0; i < L; i++)
        if (16 * c + i < 200)
          chk(d[i] == mem[(64'h10000 >> 3) + 16 * c + i], $sformatf("load word %0d", 16 * c + i));
    end
    chk(max_pend > 16, $sformatf("requests overlap (max %0d in flight)", max_pend));
    // strided load: every 5th word
    run_cmd(0, 2'd2, 64'h20000, 64'd40, 13'd1000, 16'd37);
    for (int c = 0; c < 3; c++) begin
      sp_read(13'(1000 + 16 * c), d);
      for (int i = 0; i < L; i++)
        if (16 * c + i < 37)
          chk(d[i] == mem[(64'h20000 >> 3) + 5 * (16 * c + i)], "strided load word");
    end
    // store 40 words from scratchpad word 3000 to 0x30000 with stride 16
    for (int c = 0; c < 3; c++) begin
      for (int i = 0; i < L; i++) d[i] = {$urandom, $urandom};
      sp_write(13'(3000 + 16 * c), d);
    end
    run_cmd(1, 2'd3, 64'h30000, 64'd16, 13'd3000, 16'd40);
    for (int c = 0; c < 3; c++) begin
      sp_read(13'(3000 + 16 * c), d);
      for (int i = 0; i < L; i++)
        if (16 * c + i < 40)
          chk(mem[(64'h30000 >> 3) + 2 * (16 * c + i)] == d[i], "store word");
    end
    // a load running into the unmapped page 0x7000 stops there
    run_cmd(0, 2'd0, 64'h6fe0, 64'd8, 13'd5000, 16'd10);
    chk(n_exc == 1 && exc_tid == 0 && exc_index == 16'd4 && exc_va == 64'h7000,
        $sformatf("page fault reported at element %0d va %h", exc_index, exc_va));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
