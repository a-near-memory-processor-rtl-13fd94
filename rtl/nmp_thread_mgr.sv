// nmp_thread_mgr: Thread Management Unit and blocked-multithreading control.
//
// Turns accepted invocation packets into threads and decides which thread
// runs. There are NCTX hardware contexts (4 by default). A free context
// takes a new packet: the function pointer becomes the thread's start
// address, the argument pointer is written into its argument register
// (ARG_REG, r4 as in the MIPS calling convention) and the thread joins the
// job queue. One thread runs at a time and keeps the core until it hits a
// long-latency event: a scratchpad synchronization that must wait (blk_sync)
// or a vector load/store to main memory (blk_mem). It is then preempted and,
// after a context switch of SWITCH_CYC cycles (4 by default), the next ready
// thread runs. A thread blocked on synchronization becomes ready again on
// any change of full/empty state (wake_sync), after which it retries the
// access; one blocked on memory becomes ready when its transfer completes
// (wake_mem). An exiting thread has its completion flag set in memory
// (cw_* write of 1 to the flag address) and its context freed.
// Blocked multithreading, the context count, switch time, job queue and
// completion flag follow the architecture. The job queue is kept as ready
// bits served round-robin, which is this design's choice, as are the wake
// rules and the register used for the argument pointer.
//
// Interface:
//   inv_valid/inv_ready/inv_func/inv_args/inv_flag: new threads.
//   cur_valid, cur_tid, cur_func: the running thread (none while switching).
//   blk_sync, blk_mem, exit_req: events of the running thread (one cycle).
//   wake_sync, wake_mem/wake_mem_tid: wake-up events.
//   init_en/init_ctx/init_reg/init_data: register write at thread creation.
//   cw_valid/cw_ready/cw_addr: completion flag store.
// Timing: when the running thread leaves in cycle t and another is ready,
//   the next one runs from cycle t+SWITCH_CYC+1, i.e. SWITCH_CYC idle
//   cycles; a thread made ready while the core idles runs SWITCH_CYC+1
//   cycles after its wake-up or creation.
module nmp_thread_mgr #(
  parameter int unsigned NCTX       = 4,
  parameter int unsigned SWITCH_CYC = 4,
  parameter int unsigned ARG_REG    = 4,
  localparam int unsigned CW        = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inv_valid,
  output logic            inv_ready,
  input  logic [63:0]     inv_func,
  input  logic [63:0]     inv_args,
  input  logic [63:0]     inv_flag,
  output logic            cur_valid,
  output logic [CW-1:0]   cur_tid,
  output logic [63:0]     cur_func,
  input  logic            blk_sync,
  input  logic            blk_mem,
  input  logic            exit_req,
  input  logic            wake_sync,
  input  logic            wake_mem,
  input  logic [CW-1:0]   wake_mem_tid,
  output logic            init_en,
  output logic [CW-1:0]   init_ctx,
  output logic [4:0]      init_reg,
  output logic [63:0]     init_data,
  output logic            cw_valid,
  input  logic            cw_ready,
  output logic [63:0]     cw_addr,
  output logic [31:0]     n_switches
);
  typedef enum logic [2:0] {
    T_FREE, T_READY, T_RUN, T_BLK_SYNC, T_BLK_MEM, T_EXIT
  } tstate_e;

  tstate_e     st   [NCTX];
  logic [63:0] func [NCTX];
  logic [63:0] flag [NCTX];

  logic          switching;
  logic [7:0]    sw_cnt;
  logic [CW-1:0] sw_tid;
  logic [CW-1:0] rr;          // round-robin start point of the job queue

  // free context for a new thread, ready context to run, exiting context
  logic          have_free, have_ready, have_exit;
  logic [CW-1:0] free_idx, ready_idx, exit_idx;

  always_comb begin
    have_free = 1'b0; free_idx = '0;
    have_exit = 1'b0; exit_idx = '0;
    for (int c = NCTX - 1; c >= 0; c--) begin
      if (st[c] == T_FREE) begin have_free = 1'b1; free_idx = CW'(c); end
      if (st[c] == T_EXIT) begin have_exit = 1'b1; exit_idx = CW'(c); end
    end
    have_ready = 1'b0; ready_idx = '0;
    for (int k = NCTX; k >= 1; k--) begin
      int unsigned c;
      c = (int'(rr) + k) % NCTX;
      if (st[c] == T_READY) begin have_ready = 1'b1; ready_idx = CW'(c); end
    end
  end

  assign inv_ready = have_free;
  assign init_en   = inv_valid && have_free;
  assign init_ctx  = free_idx;
  assign init_reg  = 5'(ARG_REG);
  assign init_data = inv_args;
  assign cw_valid  = have_exit;
  assign cw_addr   = flag[exit_idx];
  assign cur_func  = func[cur_tid];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++) begin
        st[c] <= T_FREE; func[c] <= '0; flag[c] <= '0;
      end
      cur_valid <= 1'b0;
      cur_tid   <= '0;
      switching <= 1'b0;
      sw_cnt    <= '0;
      sw_tid    <= '0;
      rr        <= CW'(NCTX - 1);
      n_switches <= '0;
    end else begin
      // wake-ups
      for (int c = 0; c < NCTX; c++) begin
        if (wake_sync && st[c] == T_BLK_SYNC) st[c] <= T_READY;
        if (wake_mem && wake_mem_tid == CW'(c) && st[c] == T_BLK_MEM) st[c] <= T_READY;
      end
      // thread creation
      if (inv_valid && have_free) begin
        st[free_idx]   <= T_READY;
        func[free_idx] <= inv_func;
        flag[free_idx] <= inv_flag;
      end
      // completion flag written: context is free again
      if (have_exit && cw_ready) st[exit_idx] <= T_FREE;
      // events of the running thread
      if (cur_valid && (blk_sync || blk_mem || exit_req)) begin
        cur_valid <= 1'b0;
        if (exit_req)
          st[cur_tid] <= T_EXIT;
        else if (blk_sync)
          st[cur_tid] <= wake_sync ? T_READY : T_BLK_SYNC;
        else
          st[cur_tid] <= (wake_mem && wake_mem_tid == cur_tid) ? T_READY : T_BLK_MEM;
      end
      // context switch: pick a ready thread, load it in SWITCH_CYC cycles
      // (starts in the very cycle the running thread leaves)
      if ((!cur_valid || (blk_sync || blk_mem || exit_req)) && !switching && have_ready) begin
        switching     <= 1'b1;
        sw_cnt        <= 8'(SWITCH_CYC - 1);
        sw_tid        <= ready_idx;
        st[ready_idx] <= T_RUN;
        rr            <= ready_idx;
        n_switches    <= n_switches + 1;
      end else if (switching) begin
        if (sw_cnt == 0) begin
          switching <= 1'b0;
          cur_valid <= 1'b1;
          cur_tid   <= sw_tid;
        end else begin
          sw_cnt <= sw_cnt - 1;
        end
      end
    end
  end

  // a thread may report only one of its events at a time
  assert property (@(posedge clk) disable iff (!rst_n)
                   cur_valid |-> $onehot0({blk_sync, blk_mem, exit_req}));
endmodule
