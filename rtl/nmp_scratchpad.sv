// nmp_scratchpad: the NMP's multi-bank scratchpad with per-byte flags.
//
// BYTES of storage organised as LANES banks of 64-bit words, word w sitting
// in bank w mod LANES. One access on a port touches LANES consecutive words
// starting at any word address, so every lane falls in a different bank and
// a vector access moves LANES*8 bytes (128 bytes by default) per cycle.
// Every byte carries three flags: full/empty (producer/consumer
// synchronization), error (element faulted in a vector operation) and mask
// (element masked off). Synchronized operations test the full/empty bit of
// every enabled byte in the same cycle as the request: a consuming read
// needs them all full and empties them, a peek needs them full, a
// synchronized write needs them all empty and fills them. When the test
// fails the access is refused (ok = 0) without side effects, and the
// requester stalls or blocks its thread. Size, lane count, the flags and
// their meaning and the 6-cycle latency follow the architecture; the port
// layout and the refuse-and-retry handshake are this design's choices.
//
// Each bank is a plain one-entry-wide array (data plus flag bytes) that is
// written with read-modify-write of whole entries, so it maps onto a RAM.
//
// Interface (per port p): req, op (sp_op_e), waddr (physical word address),
//   be (byte enables per lane), wdata, werr, wmask (flags written by plain
//   and synchronized writes), ok (combinational accept).
//   Read data, with the flags of each byte, comes back on rvalid/rdata/rfe/
//   rerr/rmask LAT cycles after an accepted read-type request.
// Ports are served in the same cycle; where two ports write the same word in
// one cycle the higher-numbered port wins. After reset the flags of all
// locations are cleared (empty, no error, unmasked) by a sweep of one row
// per bank per cycle, WORDS/NLANES cycles (512 by default); busy is high and
// every access is refused meanwhile. Data is not cleared.
module nmp_scratchpad
  import nmp_pkg::*;
#(
  parameter int unsigned BYTES  = nmp_pkg::SPAD_BYTES,
  parameter int unsigned NLANES = nmp_pkg::LANES,
  parameter int unsigned LAT    = nmp_pkg::SPAD_LAT,
  parameter int unsigned NPORTS = 2,
  localparam int unsigned WORDS = BYTES / 8,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic   [NPORTS-1:0]                     req,
  input  sp_op_e [NPORTS-1:0]                     op,
  input  logic   [NPORTS-1:0][AW-1:0]             waddr,
  input  logic   [NPORTS-1:0][NLANES-1:0][7:0]    be,
  input  logic   [NPORTS-1:0][NLANES-1:0][63:0]   wdata,
  input  logic   [NPORTS-1:0][NLANES-1:0][7:0]    werr,
  input  logic   [NPORTS-1:0][NLANES-1:0][7:0]    wmask,
  output logic   [NPORTS-1:0]                     ok,
  output logic   [NPORTS-1:0]                     rvalid,
  output logic   [NPORTS-1:0][NLANES-1:0][63:0]   rdata,
  output logic   [NPORTS-1:0][NLANES-1:0][7:0]    rfe,
  output logic   [NPORTS-1:0][NLANES-1:0][7:0]    rerr,
  output logic   [NPORTS-1:0][NLANES-1:0][7:0]    rmask,
  output logic                                    busy
);
  localparam int unsigned DEPTH = WORDS / NLANES;
  localparam int unsigned LW    = $clog2(NLANES);
  localparam int unsigned RW    = AW - LW;

  // one bank entry: data and the three flag bytes
  typedef struct packed {
    logic [63:0] d;
    logic [7:0]  fe;
    logic [7:0]  er;
    logic [7:0]  mk;
  } entry_t;

  typedef struct packed {
    logic                        v;
    logic [NLANES-1:0][63:0]     d;
    logic [NLANES-1:0][7:0]      fe;
    logic [NLANES-1:0][7:0]      er;
    logic [NLANES-1:0][7:0]      mk;
  } rd_t;

  // flag clearing after reset: one row of every bank per cycle
  logic          clr_busy;
  logic [RW-1:0] clr_row;

  // per port, per bank: the lane that falls in the bank, its row, and the
  // entry read there
  logic   [NPORTS-1:0][NLANES-1:0][LW-1:0] blane;
  logic   [NPORTS-1:0][NLANES-1:0][RW-1:0] brow;
  entry_t [NPORTS-1:0][NLANES-1:0]         bent;
  logic   [NPORTS-1:0]                     acc_ok;
  rd_t    [NPORTS-1:0]                     rnow;
  rd_t    [NPORTS-1:0][LAT-1:0]            pipe;

  always_comb begin
    for (int p = 0; p < NPORTS; p++)
      for (int b = 0; b < NLANES; b++) begin
        logic [AW-1:0] w;
        blane[p][b] = LW'(b) - waddr[p][LW-1:0];
        w           = waddr[p] + AW'(blane[p][b]);
        brow[p][b]  = w[AW-1:LW];
      end
  end

  for (genvar b = 0; b < NLANES; b++) begin : g_bank
    entry_t ram [DEPTH];

    always_comb
      for (int p = 0; p < NPORTS; p++)
        bent[p][b] = ram[brow[p][b]];

    always_ff @(posedge clk) begin
      if (clr_busy) begin
        ram[clr_row].fe <= '0;
        ram[clr_row].er <= '0;
        ram[clr_row].mk <= '0;
      end else begin
        for (int p = 0; p < NPORTS; p++)
          if (acc_ok[p] && be[p][blane[p][b]] != '0 && op[p] != SP_READ && op[p] != SP_PEEK)
            ram[brow[p][b]] <= merge(bent[p][b], op[p], be[p][blane[p][b]],
                                     wdata[p][blane[p][b]], werr[p][blane[p][b]],
                                     wmask[p][blane[p][b]]);
      end
    end
  end

  // new contents of one entry after an access
  function automatic entry_t merge(entry_t old, sp_op_e o, logic [7:0] e, logic [63:0] d,
                                   logic [7:0] er, logic [7:0] mk);
    entry_t n;
    n = old;
    for (int k = 0; k < 8; k++)
      if (e[k]) begin
        unique case (o)
          SP_WRITE:   begin n.d[8*k +: 8] = d[8*k +: 8]; n.er[k] = er[k]; n.mk[k] = mk[k]; end
          SP_SYNC_WR: begin n.d[8*k +: 8] = d[8*k +: 8]; n.er[k] = er[k]; n.mk[k] = mk[k];
                            n.fe[k] = 1'b1; end
          SP_SYNC_RD: n.fe[k] = 1'b0;
          SP_SETFE:   n.fe[k] = d[8*k];
          default: ;
        endcase
      end
    return n;
  endfunction

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      logic all_full, all_empty;
      all_full  = 1'b1;
      all_empty = 1'b1;
      for (int i = 0; i < NLANES; i++) begin
        logic [AW-1:0] w;
        entry_t en;
        w  = waddr[p] + AW'(i);
        en = bent[p][w[LW-1:0]];
        rnow[p].d[i]  = en.d;
        rnow[p].fe[i] = en.fe;
        rnow[p].er[i] = en.er;
        rnow[p].mk[i] = en.mk;
        if ((be[p][i] & ~en.fe) != '0) all_full  = 1'b0;
        if ((be[p][i] &  en.fe) != '0) all_empty = 1'b0;
      end
      unique case (op[p])
        SP_SYNC_RD, SP_PEEK: acc_ok[p] = req[p] && !clr_busy && all_full;
        SP_SYNC_WR:          acc_ok[p] = req[p] && !clr_busy && all_empty;
        default:             acc_ok[p] = req[p] && !clr_busy;
      endcase
      rnow[p].v = acc_ok[p] && (op[p] == SP_READ || op[p] == SP_SYNC_RD || op[p] == SP_PEEK);
    end
  end
  assign ok = acc_ok;
  assign busy = clr_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_busy <= 1'b1;
      clr_row  <= '0;
    end else if (clr_busy) begin
      clr_row <= clr_row + 1'b1;
      if (clr_row == RW'(DEPTH - 1)) clr_busy <= 1'b0;
    end
  end

  // read latency pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        pipe[p][0] <= rnow[p];
        for (int s = 1; s < LAT; s++)
          pipe[p][s] <= pipe[p][s-1];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      rvalid[p] = pipe[p][LAT-1].v;
      rdata[p]  = pipe[p][LAT-1].d;
      rfe[p]    = pipe[p][LAT-1].fe;
      rerr[p]   = pipe[p][LAT-1].er;
      rmask[p]  = pipe[p][LAT-1].mk;
    end
  end
endmodule
