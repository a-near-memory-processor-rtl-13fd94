// nmp_tlb: fully associative address translation buffer.
//
// Used twice in the NMP. As the scratchpad TLB it maps the 20-bit scratchpad
// virtual addresses of NMP threads onto scratchpad page frames, with one
// entry per frame, so a lookup can only miss when the page is not resident
// (a scratchpad page miss, handled by software that pages against main
// memory). As the main-memory TLB it maps 64-bit virtual addresses of vector
// loads and stores onto physical addresses; its invalidate port lets the
// system keep it coherent with the other TLBs (shootdown by page). A miss
// is reported, never serviced, here: page-table walks and paging are done by
// system software, which refills entries through the write port. Function
// follows the architecture; the organisation, entry count and page size are
// this design's choices.
//
// Interface: lk_va -> lk_hit, lk_pa, combinational (same-cycle lookup).
//   wr_en writes entry wr_idx {wr_valid, wr_vpn, wr_ppn}.
//   inv_en clears every entry holding inv_vpn.
// Timing: writes and invalidates take effect on the next clock edge.
module nmp_tlb #(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned VA_W    = 20,
  parameter int unsigned PA_W    = 16,
  parameter int unsigned PAGE_W  = 12,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [VA_W-1:0]       lk_va,
  output logic                  lk_hit,
  output logic [PA_W-1:0]       lk_pa,
  input  logic                  wr_en,
  input  logic [IW-1:0]         wr_idx,
  input  logic                  wr_valid,
  input  logic [VA_W-PAGE_W-1:0] wr_vpn,
  input  logic [PA_W-PAGE_W-1:0] wr_ppn,
  input  logic                  inv_en,
  input  logic [VA_W-PAGE_W-1:0] inv_vpn
);
  logic                   valid [ENTRIES];
  logic [VA_W-PAGE_W-1:0] vpn   [ENTRIES];
  logic [PA_W-PAGE_W-1:0] ppn   [ENTRIES];

  always_comb begin
    lk_hit = 1'b0;
    lk_pa  = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (valid[e] && vpn[e] == lk_va[VA_W-1:PAGE_W]) begin
        lk_hit = 1'b1;
        lk_pa  = {ppn[e], lk_va[PAGE_W-1:0]};
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        valid[e] <= 1'b0;
        vpn[e]   <= '0;
        ppn[e]   <= '0;
      end
    end else begin
      for (int e = 0; e < ENTRIES; e++)
        if (inv_en && vpn[e] == inv_vpn) valid[e] <= 1'b0;
      if (wr_en) begin
        valid[wr_idx] <= wr_valid;
        vpn[wr_idx]   <= wr_vpn;
        ppn[wr_idx]   <= wr_ppn;
      end
    end
  end
endmodule
