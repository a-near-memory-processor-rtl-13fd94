// nmp_vls: vector load/store unit between main memory and the scratchpad.
//
// A vector load copies NWORDS 64-bit words from main memory, starting at a
// virtual address and advancing by a byte stride, into consecutive words of
// the scratchpad; a vector store copies the other way. Each element's
// virtual address is translated by the main-memory TLB as it is issued.
// Requests go out one per cycle with a tag, up to MAXP (128) loads and
// stores in flight, and responses may come back in any order: the tag
// says which scratchpad word a load response is written to. Stores read
// the scratchpad a LANES-word chunk at a time and then send the words.
// Commands are queued (one per thread at most, since the issuing thread is
// blocked until its transfer ends) and issued in order; several may be in
// flight. When all of a command's responses are back, done pulses with its
// thread, which wakes the thread. A TLB miss stops the command where it is:
// exc_* reports the thread, element index and address, and the command
// still completes, so that software can map the page and restart the rest
// (the exception is restartable, not precise). Bulk memory/scratchpad
// transfer, the 128 pending operations and restartable exceptions follow
// the architecture; the command format, tagging and chunked store reads are
// this design's choices. Gather and scatter are not included.
//
// Interface: cmd_* (valid/ready), TLB lookup tlb_va -> tlb_hit/tlb_pa,
//   scratchpad port sp_* (see nmp_scratchpad), memory request m_* with
//   m_tag, responses mr_* (a store is acknowledged by a response too),
//   done/done_tid, exc_*.
module nmp_vls
  import nmp_pkg::*;
#(
  parameter int unsigned NCTX   = nmp_pkg::CONTEXTS,
  parameter int unsigned MAXP   = nmp_pkg::MAX_PENDING,
  parameter int unsigned NLANES = nmp_pkg::LANES,
  parameter int unsigned SP_AW  = 13,
  parameter int unsigned PA_W   = nmp_pkg::MEM_PA_W,
  localparam int unsigned CW    = (NCTX > 1) ? $clog2(NCTX) : 1,
  localparam int unsigned TW    = $clog2(MAXP),
  localparam int unsigned LW    = $clog2(NLANES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic                 cmd_store,
  input  logic [CW-1:0]        cmd_tid,
  input  logic [63:0]          cmd_va,
  input  logic [63:0]          cmd_stride,
  input  logic [SP_AW-1:0]     cmd_spad_waddr,
  input  logic [15:0]          cmd_nwords,
  // main-memory TLB
  output logic [63:0]          tlb_va,
  input  logic                 tlb_hit,
  input  logic [PA_W-1:0]      tlb_pa,
  // scratchpad port
  output logic                 sp_req,
  output sp_op_e               sp_op,
  output logic [SP_AW-1:0]     sp_waddr,
  output logic [NLANES-1:0][7:0]  sp_be,
  output logic [NLANES-1:0][63:0] sp_wdata,
  input  logic                 sp_ok,
  input  logic                 sp_rvalid,
  input  logic [NLANES-1:0][63:0] sp_rdata,
  // memory
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic                 m_we,
  output logic [PA_W-1:0]      m_addr,
  output logic [63:0]          m_wdata,
  output logic [TW-1:0]        m_tag,
  input  logic                 mr_valid,
  input  logic [TW-1:0]        mr_tag,
  input  logic [63:0]          mr_rdata,
  // completion and exceptions
  output logic                 done,
  output logic [CW-1:0]        done_tid,
  output logic                 exc_valid,
  output logic [CW-1:0]        exc_tid,
  output logic [15:0]          exc_index,
  output logic [63:0]          exc_va,
  output logic [$clog2(MAXP+1)-1:0] n_pending
);
  typedef struct packed {
    logic              store;
    logic [CW-1:0]     tid;
    logic [63:0]       va;
    logic [63:0]       stride;
    logic [SP_AW-1:0]  waddr;
    logic [15:0]       nwords;
  } cmd_t;

  // command queue
  cmd_t          q [NCTX];
  logic [CW:0]   q_cnt;
  logic [CW-1:0] q_head, q_tail;

  // per-thread progress
  logic          act    [NCTX];
  logic          issued [NCTX];
  logic [TW:0]   outst  [NCTX];

  // tags
  logic [MAXP-1:0]    busy_tag;
  logic [CW-1:0]      t_tid   [MAXP];
  logic [SP_AW-1:0]   t_waddr [MAXP];
  logic               t_store [MAXP];
  logic               have_tag;
  logic [TW-1:0]      free_tag;

  // issuer
  typedef enum logic [2:0] {I_IDLE, I_LOAD, I_SRD, I_SWAIT, I_SSEND} istate_e;
  istate_e     ist;
  cmd_t        cur;
  logic [15:0] idx;        // element being issued
  logic [LW:0] cidx;       // word within the store chunk
  logic [LW:0] clen;       // words in the store chunk
  logic [NLANES-1:0][63:0] chunk;
  logic [63:0] cur_va;

  always_comb begin
    have_tag = 1'b0;
    free_tag = '0;
    for (int t = MAXP - 1; t >= 0; t--)
      if (!busy_tag[t]) begin have_tag = 1'b1; free_tag = TW'(t); end
  end

  assign cmd_ready = (q_cnt != (CW+1)'(NCTX));
  assign cur_va    = cur.va + 64'(idx) * cur.stride;
  assign tlb_va    = cur_va;

  // a response of a load is written to the scratchpad; otherwise the store
  // side may read a chunk
  logic rsp_wr;
  assign rsp_wr = mr_valid && !t_store[mr_tag];

  always_comb begin
    sp_req   = 1'b0;
    sp_op    = SP_READ;
    sp_waddr = '0;
    sp_be    = '0;
    sp_wdata = '0;
    if (rsp_wr) begin
      sp_req      = 1'b1;
      sp_op       = SP_WRITE;
      sp_waddr    = t_waddr[mr_tag];
      sp_be[0]    = 8'hff;
      sp_wdata[0] = mr_rdata;
    end else if (ist == I_SRD) begin
      sp_req   = 1'b1;
      sp_op    = SP_READ;
      sp_waddr = cur.waddr + SP_AW'(idx);
      for (int i = 0; i < NLANES; i++)
        if (i < int'(clen)) sp_be[i] = 8'hff;
    end
  end

  // memory request
  logic issue_ok;
  always_comb begin
    m_valid = 1'b0;
    m_we    = 1'b0;
    m_addr  = tlb_pa;
    m_wdata = '0;
    m_tag   = free_tag;
    if ((ist == I_LOAD || ist == I_SSEND) && tlb_hit && have_tag) begin
      m_valid = 1'b1;
      m_we    = (ist == I_SSEND);
      m_wdata = chunk[cidx[LW-1:0]];
    end
    issue_ok = m_valid && m_ready;
  end

  // completion: lowest thread whose transfer is over
  always_comb begin
    done = 1'b0;
    done_tid = '0;
    for (int c = NCTX - 1; c >= 0; c--)
      if (act[c] && issued[c] && outst[c] == '0) begin
        done = 1'b1;
        done_tid = CW'(c);
      end
  end

  always_comb begin
    n_pending = '0;
    for (int t = 0; t < MAXP; t++) n_pending = n_pending + busy_tag[t];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0; q_head <= '0; q_tail <= '0;
      for (int c = 0; c < NCTX; c++) begin
        q[c] <= '0; act[c] <= 1'b0; issued[c] <= 1'b0; outst[c] <= '0;
      end
      busy_tag <= '0;
      for (int t = 0; t < MAXP; t++) begin
        t_tid[t] <= '0; t_waddr[t] <= '0; t_store[t] <= 1'b0;
      end
      ist <= I_IDLE; cur <= '0; idx <= '0; cidx <= '0; clen <= '0; chunk <= '0;
      exc_valid <= 1'b0; exc_tid <= '0; exc_index <= '0; exc_va <= '0;
    end else begin
      logic pop;
      pop = 1'b0;
      exc_valid <= 1'b0;
      // enqueue a command
      if (cmd_valid && cmd_ready) begin
        q[q_tail] <= '{store: cmd_store, tid: cmd_tid, va: cmd_va, stride: cmd_stride,
                       waddr: cmd_spad_waddr, nwords: cmd_nwords};
        q_tail <= q_tail + 1'b1;
        act[cmd_tid]    <= 1'b1;
        issued[cmd_tid] <= 1'b0;
      end
      if (done) act[done_tid] <= 1'b0;

      // per-thread outstanding counts
      for (int c = 0; c < NCTX; c++) begin
        logic inc, dec;
        inc = issue_ok && cur.tid == CW'(c);
        dec = mr_valid && t_tid[mr_tag] == CW'(c);
        outst[c] <= outst[c] + (TW+1)'(inc) - (TW+1)'(dec);
      end
      if (mr_valid) busy_tag[mr_tag] <= 1'b0;
      if (issue_ok) begin
        busy_tag[free_tag] <= 1'b1;
        t_tid[free_tag]    <= cur.tid;
        t_waddr[free_tag]  <= cur.waddr + SP_AW'(idx);
        t_store[free_tag]  <= (ist == I_SSEND);
      end

      unique case (ist)
        I_IDLE: if (q_cnt != 0) begin
          cur <= q[q_head];
          q_head <= q_head + 1'b1;
          pop = 1'b1;
          idx <= '0;
          if (q[q_head].nwords == 0) begin
            issued[q[q_head].tid] <= 1'b1;
          end else begin
            ist <= q[q_head].store ? I_SRD : I_LOAD;
            clen <= (q[q_head].nwords < 16'(NLANES)) ? (LW+1)'(q[q_head].nwords) : (LW+1)'(NLANES);
          end
        end
        I_LOAD, I_SSEND: begin
          if (!tlb_hit) begin
            // page not mapped: stop here and report a restartable exception
            exc_valid <= 1'b1;
            exc_tid   <= cur.tid;
            exc_index <= idx;
            exc_va    <= cur_va;
            issued[cur.tid] <= 1'b1;
            ist <= I_IDLE;
          end else if (issue_ok) begin
            idx <= idx + 1'b1;
            if (ist == I_SSEND) cidx <= cidx + 1'b1;
            if (idx + 1'b1 == cur.nwords) begin
              issued[cur.tid] <= 1'b1;
              ist <= I_IDLE;
            end else if (ist == I_SSEND && cidx + 1'b1 == clen) begin
              ist  <= I_SRD;
              clen <= ((cur.nwords - idx - 16'd1) < 16'(NLANES)) ?
                      (LW+1)'(cur.nwords - idx - 16'd1) : (LW+1)'(NLANES);
            end
          end
        end
        I_SRD: if (!rsp_wr && sp_ok) ist <= I_SWAIT;
        I_SWAIT: if (sp_rvalid) begin
          chunk <= sp_rdata;
          cidx  <= '0;
          ist   <= I_SSEND;
        end
        default: ist <= I_IDLE;
      endcase
      q_cnt <= q_cnt + (CW+1)'(cmd_valid && cmd_ready) - (CW+1)'(pop);
    end
  end
endmodule
