// nmp_regfile: per-context scalar register file of the NMP.
//
// A thread's context is only its small set of scalar and control
// registers (vectors and stream buffers live in the shared scratchpad), so
// every hardware context has its own NREGS x 64-bit bank here and a context
// switch needs no register save. Register 0 reads as zero, as in the
// MIPS-like base instruction set. Registers hold scalars or scratchpad
// specifiers (scalar, vector or stream buffer). Three read ports serve the
// operands of the running thread; port A writes results of the execution
// controller, port B serves the instruction front end, port C initialises a
// context when the thread manager creates a thread.
// The count of 32 registers and the port arrangement are this design's
// choices.
//
// Interface: rd_ctx with raddr[3] -> rdata[3] combinational.
//   wa_en/wa_ctx/wa_addr/wa_data, wb_* and wc_*: writes; on a clash to the
//   same register the later port in the order A, B, C wins.
// Timing: writes are stored at the clock edge; the read ports bypass a
//   write presented in the same cycle (same order of precedence), so an
//   operation accepted in the cycle its producer completes sees the result.
module nmp_regfile #(
  parameter int unsigned NCTX = 4,
  parameter int unsigned NR   = 32,
  parameter int unsigned W    = 64,
  localparam int unsigned CW  = $clog2(NCTX),
  localparam int unsigned RW  = $clog2(NR)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [CW-1:0]          rd_ctx,
  input  logic [2:0][RW-1:0]     raddr,
  output logic [2:0][W-1:0]      rdata,
  input  logic                   wa_en,
  input  logic [CW-1:0]          wa_ctx,
  input  logic [RW-1:0]          wa_addr,
  input  logic [W-1:0]           wa_data,
  input  logic                   wb_en,
  input  logic [CW-1:0]          wb_ctx,
  input  logic [RW-1:0]          wb_addr,
  input  logic [W-1:0]           wb_data,
  input  logic                   wc_en,
  input  logic [CW-1:0]          wc_ctx,
  input  logic [RW-1:0]          wc_addr,
  input  logic [W-1:0]           wc_data
);
  logic [W-1:0] regs [NCTX][NR];

  // write-through: a write presented this cycle is seen by the readers
  always_comb
    for (int p = 0; p < 3; p++) begin
      if (raddr[p] == '0)                                       rdata[p] = '0;
      else if (wc_en && wc_ctx == rd_ctx && wc_addr == raddr[p]) rdata[p] = wc_data;
      else if (wb_en && wb_ctx == rd_ctx && wb_addr == raddr[p]) rdata[p] = wb_data;
      else if (wa_en && wa_ctx == rd_ctx && wa_addr == raddr[p]) rdata[p] = wa_data;
      else                                                      rdata[p] = regs[rd_ctx][raddr[p]];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCTX; c++)
        for (int r = 0; r < NR; r++)
          regs[c][r] <= '0;
    end else begin
      if (wa_en) regs[wa_ctx][wa_addr] <= wa_data;
      if (wb_en) regs[wb_ctx][wb_addr] <= wb_data;
      if (wc_en) regs[wc_ctx][wc_addr] <= wc_data;
    end
  end
endmodule
