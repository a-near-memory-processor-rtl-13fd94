// nmp_top: the Near-Memory Processor (NMP).
//
// A coprocessor that sits by a memory controller and runs threads that the
// main processor off-loads to it: vector, streaming and bit-manipulation
// kernels. It has no caches. Its working storage is a 64 KB scratchpad
// shared by all threads, with a full/empty bit per byte for cheap
// producer/consumer synchronization between threads, plus error and mask
// bits per byte for vector operations. It is blocked-multithreaded: one of
// up to 4 threads runs, and it is preempted (4-cycle switch) whenever it
// would wait for main memory or for a stream buffer, so that memory latency
// and producer/consumer imbalance are hidden by the other threads.
//
// Blocks and their wiring:
//   host bus -> invocation register sets -> thread manager (job queue,
//     contexts, blocked multithreading, completion flags)
//   thread manager + instruction front end -> execution controller, which
//     drives the bit-manipulation unit, the Bit Matrix Register, the block
//     shifter, the 16-lane vector unit and stream pointer logic, and
//     reaches the scratchpad (port 0) through the scratchpad TLB
//   vector load/store unit: main memory <-> scratchpad (port 1), through the
//     main-memory TLB, up to 128 requests in flight
//   per-context register file
// The instruction fetch/decode pipeline and the scalar integer and
// floating-point units of the MIPS-like base instruction set are outside
// this RTL: decoded operations enter on fe_op_*, and the front end may
// write the running thread's registers on fe_rf_*. The page-miss handler,
// TLB refills and TLB shootdowns are system software: their ports are
// brought out (stlb_*, mtlb_*). The memory controller is reached through
// m_*/mr_*: tags with bit 7 clear belong to vector loads/stores, tag 8'h80
// is the completion-flag store of an ending thread (data 1), which has
// priority.
//
// After reset the scratchpad clears its flags for 512 cycles (sp_busy);
// invocations should be issued after that.
//
// Timing: see the blocks. A new thread starts running 4 cycles after its
// invocation is accepted by a free context when the core is idle.
module nmp_top
  import nmp_pkg::*;
#(
  parameter int unsigned SPAD_SIZE = nmp_pkg::SPAD_BYTES,
  parameter int unsigned NCTX      = nmp_pkg::CONTEXTS,
  parameter int unsigned NLANES    = nmp_pkg::LANES,
  parameter int unsigned NSETS     = 4,
  parameter int unsigned MTLB_N    = 32,
  localparam int unsigned CW       = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned SP_AW    = $clog2(SPAD_SIZE / 8),
  localparam int unsigned FRAMES   = SPAD_SIZE >> SPAD_PAGE_W,
  localparam int unsigned SPA_W    = $clog2(SPAD_SIZE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // main processor: invocation register sets
  input  logic              h_req,
  input  logic              h_we,
  input  logic [7:0]        h_addr,
  input  logic [63:0]       h_wdata,
  output logic [63:0]       h_rdata,
  // instruction front end
  output logic              cur_valid,
  output logic [CW-1:0]     cur_tid,
  output logic [63:0]       cur_func,
  input  logic              fe_op_valid,
  input  nmp_op_t           fe_op,
  output logic              fe_op_ready,
  output logic              fe_op_done,
  output logic              fe_op_blocked,
  output logic              fe_op_exc,
  output exc_e              fe_exc_cause,
  output logic [SPAD_VA_W-1:0] fe_exc_va,
  input  logic              fe_rf_we,
  input  logic [4:0]        fe_rf_addr,
  input  logic [63:0]       fe_rf_wdata,
  // scratchpad TLB refill (page-miss handler)
  input  logic              stlb_wr,
  input  logic [$clog2(FRAMES)-1:0] stlb_idx,
  input  logic              stlb_valid,
  input  logic [SPAD_VA_W-SPAD_PAGE_W-1:0] stlb_vpn,
  input  logic [SPA_W-SPAD_PAGE_W-1:0]     stlb_ppn,
  // main-memory TLB refill and shootdown
  input  logic              mtlb_wr,
  input  logic [$clog2(MTLB_N)-1:0] mtlb_idx,
  input  logic              mtlb_valid,
  input  logic [63-SPAD_PAGE_W:0]         mtlb_vpn,
  input  logic [MEM_PA_W-SPAD_PAGE_W-1:0] mtlb_ppn,
  input  logic              mtlb_inv,
  input  logic [63-SPAD_PAGE_W:0]         mtlb_inv_vpn,
  // memory controller
  output logic              m_valid,
  input  logic              m_ready,
  output logic              m_we,
  output logic [MEM_PA_W-1:0] m_addr,
  output logic [63:0]       m_wdata,
  output logic [7:0]        m_tag,
  input  logic              mr_valid,
  input  logic [7:0]        mr_tag,
  input  logic [63:0]       mr_rdata,
  // vector load/store exceptions
  output logic              vls_exc,
  output logic [CW-1:0]     vls_exc_tid,
  output logic [15:0]       vls_exc_index,
  output logic [63:0]       vls_exc_va,
  // status
  output logic [31:0]       n_switches,
  output logic [7:0]        n_pending,
  output logic [CW-1:0]     bmr_owner,
  output logic              bmr_owned,
  output logic              sp_busy     // scratchpad flag clearing after reset
);
  // ---------------- invocation and threads ----------------
  logic inv_valid, inv_ready;
  logic [$clog2(NSETS)-1:0] inv_set;
  logic [63:0] inv_func, inv_args, inv_flag;

  nmp_invocation_regs #(.NSETS(NSETS), .AW(8)) u_inv (
    .clk, .rst_n, .h_req, .h_we, .h_addr, .h_wdata, .h_rdata,
    .inv_valid, .inv_ready, .inv_set, .inv_func, .inv_args, .inv_flag);

  logic blk_sync, blk_mem, exit_req, wake_sync, vls_done;
  logic [CW-1:0] vls_done_tid;
  logic init_en; logic [CW-1:0] init_ctx; logic [4:0] init_reg; logic [63:0] init_data;
  logic cw_valid, cw_ready; logic [63:0] cw_addr;

  nmp_thread_mgr #(.NCTX(NCTX), .SWITCH_CYC(SWITCH_CYC)) u_tm (
    .clk, .rst_n,
    .inv_valid, .inv_ready, .inv_func, .inv_args, .inv_flag,
    .cur_valid, .cur_tid, .cur_func,
    .blk_sync, .blk_mem, .exit_req, .wake_sync,
    .wake_mem(vls_done), .wake_mem_tid(vls_done_tid),
    .init_en, .init_ctx, .init_reg, .init_data,
    .cw_valid, .cw_ready, .cw_addr, .n_switches);

  // ---------------- registers ----------------
  logic [2:0][4:0]  rf_raddr;
  logic [2:0][63:0] rf_rdata;
  logic rf_we; logic [CW-1:0] rf_wctx; logic [4:0] rf_waddr; logic [63:0] rf_wdata;

  nmp_regfile #(.NCTX(NCTX), .NR(NREGS), .W(XLEN)) u_rf (
    .clk, .rst_n, .rd_ctx(cur_tid), .raddr(rf_raddr), .rdata(rf_rdata),
    .wa_en(rf_we), .wa_ctx(rf_wctx), .wa_addr(rf_waddr), .wa_data(rf_wdata),
    .wb_en(fe_rf_we && cur_valid), .wb_ctx(cur_tid), .wb_addr(fe_rf_addr), .wb_data(fe_rf_wdata),
    .wc_en(init_en), .wc_ctx(init_ctx), .wc_addr(init_reg), .wc_data(init_data));

  // ---------------- scratchpad and its TLB ----------------
  logic [SPAD_VA_W-1:0] xl_va;
  logic xl_hit;
  logic [SPA_W-1:0] xl_pa;

  nmp_tlb #(.ENTRIES(FRAMES), .VA_W(SPAD_VA_W), .PA_W(SPA_W), .PAGE_W(SPAD_PAGE_W)) u_stlb (
    .clk, .rst_n, .lk_va(xl_va), .lk_hit(xl_hit), .lk_pa(xl_pa),
    .wr_en(stlb_wr), .wr_idx(stlb_idx), .wr_valid(stlb_valid), .wr_vpn(stlb_vpn), .wr_ppn(stlb_ppn),
    .inv_en(1'b0), .inv_vpn('0));

  logic   [1:0]                   sp_req, sp_ok, sp_rvalid;
  sp_op_e [1:0]                   sp_op;
  logic   [1:0][SP_AW-1:0]        sp_waddr;
  logic   [1:0][NLANES-1:0][7:0]  sp_be, sp_werr, sp_wmask, sp_rfe, sp_rerr, sp_rmask;
  logic   [1:0][NLANES-1:0][63:0] sp_wdata, sp_rdata;

  nmp_scratchpad #(.BYTES(SPAD_SIZE), .NLANES(NLANES), .LAT(SPAD_LAT), .NPORTS(2)) u_sp (
    .clk, .rst_n, .req(sp_req), .op(sp_op), .waddr(sp_waddr), .be(sp_be), .wdata(sp_wdata),
    .werr(sp_werr), .wmask(sp_wmask), .ok(sp_ok), .rvalid(sp_rvalid), .rdata(sp_rdata),
    .rfe(sp_rfe), .rerr(sp_rerr), .rmask(sp_rmask), .busy(sp_busy));

  // ---------------- execution controller ----------------
  logic vls_valid, vls_ready, vls_store;
  logic [63:0] vls_va, vls_stride;
  logic [SP_AW-1:0] vls_waddr;
  logic [15:0] vls_nwords;
  logic [15:0] xl_pa16;
  logic ending;   // the running thread is being switched out this cycle

  assign xl_pa16 = 16'(xl_pa);
  assign ending  = blk_sync || blk_mem || exit_req;

  nmp_exec_ctrl #(.NCTX(NCTX), .NLANES(NLANES), .SP_AW(SP_AW)) u_ex (
    .clk, .rst_n,
    .op_valid(fe_op_valid && cur_valid && !ending), .op_ready(fe_op_ready), .op(fe_op),
    .tid(cur_tid),
    .op_done(fe_op_done), .op_blocked(fe_op_blocked), .op_exc(fe_op_exc),
    .exc_cause(fe_exc_cause), .exc_va(fe_exc_va),
    .blk_sync, .blk_mem, .exit_req, .wake_sync,
    .rf_raddr, .rf_rdata, .rf_we, .rf_wctx, .rf_waddr, .rf_wdata,
    .xl_va, .xl_hit, .xl_pa(xl_pa16),
    .sp_req(sp_req[0]), .sp_op(sp_op[0]), .sp_waddr(sp_waddr[0]), .sp_be(sp_be[0]),
    .sp_wdata(sp_wdata[0]), .sp_werr(sp_werr[0]), .sp_wmask(sp_wmask[0]),
    .sp_ok(sp_ok[0]), .sp_rvalid(sp_rvalid[0]), .sp_rdata(sp_rdata[0]), .sp_rmask(sp_rmask[0]),
    .vls_valid, .vls_ready, .vls_store, .vls_va, .vls_stride, .vls_waddr, .vls_nwords,
    .bmr_owner, .bmr_owned);

  // ---------------- vector load/store and main-memory TLB ----------------
  logic [63:0] mt_va;
  logic mt_hit;
  logic [MEM_PA_W-1:0] mt_pa;

  nmp_tlb #(.ENTRIES(MTLB_N), .VA_W(64), .PA_W(MEM_PA_W), .PAGE_W(SPAD_PAGE_W)) u_mtlb (
    .clk, .rst_n, .lk_va(mt_va), .lk_hit(mt_hit), .lk_pa(mt_pa),
    .wr_en(mtlb_wr), .wr_idx(mtlb_idx), .wr_valid(mtlb_valid), .wr_vpn(mtlb_vpn), .wr_ppn(mtlb_ppn),
    .inv_en(mtlb_inv), .inv_vpn(mtlb_inv_vpn));

  logic v_m_valid, v_m_ready, v_m_we;
  logic [MEM_PA_W-1:0] v_m_addr;
  logic [63:0] v_m_wdata;
  logic [6:0] v_m_tag;
  logic [7:0] v_pending;

  assign sp_werr[1]  = '0;
  assign sp_wmask[1] = '0;

  nmp_vls #(.NCTX(NCTX), .MAXP(MAX_PENDING), .NLANES(NLANES), .SP_AW(SP_AW), .PA_W(MEM_PA_W)) u_vls (
    .clk, .rst_n,
    .cmd_valid(vls_valid), .cmd_ready(vls_ready), .cmd_store(vls_store), .cmd_tid(cur_tid),
    .cmd_va(vls_va), .cmd_stride(vls_stride), .cmd_spad_waddr(vls_waddr), .cmd_nwords(vls_nwords),
    .tlb_va(mt_va), .tlb_hit(mt_hit), .tlb_pa(mt_pa),
    .sp_req(sp_req[1]), .sp_op(sp_op[1]), .sp_waddr(sp_waddr[1]), .sp_be(sp_be[1]),
    .sp_wdata(sp_wdata[1]), .sp_ok(sp_ok[1]), .sp_rvalid(sp_rvalid[1]), .sp_rdata(sp_rdata[1]),
    .m_valid(v_m_valid), .m_ready(v_m_ready), .m_we(v_m_we), .m_addr(v_m_addr),
    .m_wdata(v_m_wdata), .m_tag(v_m_tag),
    .mr_valid(mr_valid && !mr_tag[7]), .mr_tag(mr_tag[6:0]), .mr_rdata,
    .done(vls_done), .done_tid(vls_done_tid),
    .exc_valid(vls_exc), .exc_tid(vls_exc_tid), .exc_index(vls_exc_index), .exc_va(vls_exc_va),
    .n_pending(v_pending));

  assign n_pending = v_pending;

  // ---------------- memory port: completion flags first ----------------
  always_comb begin
    if (cw_valid) begin
      m_valid = 1'b1;
      m_we    = 1'b1;
      m_addr  = MEM_PA_W'(cw_addr);
      m_wdata = 64'd1;
      m_tag   = 8'h80;
    end else begin
      m_valid = v_m_valid;
      m_we    = v_m_we;
      m_addr  = v_m_addr;
      m_wdata = v_m_wdata;
      m_tag   = {1'b0, v_m_tag};
    end
  end
  assign cw_ready  = m_ready;
  assign v_m_ready = m_ready && !cw_valid;
endmodule
