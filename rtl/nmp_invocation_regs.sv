// nmp_invocation_regs: the Invocation Register Sets of the NMP.
//
// The main processor starts an NMP thread from user mode by storing an
// invocation packet into one of NSETS memory-mapped register sets: a
// pointer to the function to run, a pointer to its arguments and a pointer
// to a completion flag. Writing the control register of the set rings the
// doorbell: the packet becomes pending and is handed to the thread
// manager, which accepts it as soon as a hardware context is free. A
// doorbell rung while the set still holds an unaccepted packet is refused;
// the status register tells the caller whether its last invocation was
// taken. Completion is not signalled here: the NMP sets the completion flag
// in memory, which the caller polls. Packet contents and the user-mode,
// asynchronous handshake follow the architecture; the register map, the
// number of sets and the refuse-when-pending rule are this design's choices.
//
// Register map (byte offsets, 64-bit registers), set s at s*32:
//   +0 FUNC, +8 ARGS, +16 FLAG (read/write); +24 CTRL: write = doorbell,
//   read = {62'b0, last_ok, pending}.
// Interface: h_req/h_we/h_addr/h_wdata, h_rdata valid the cycle after a read.
//   inv_valid/inv_ready/inv_* towards the thread manager, lowest set first.
module nmp_invocation_regs #(
  parameter int unsigned NSETS = 4,
  parameter int unsigned AW    = 8,
  localparam int unsigned SW   = (NSETS > 1) ? $clog2(NSETS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            h_req,
  input  logic            h_we,
  input  logic [AW-1:0]   h_addr,
  input  logic [63:0]     h_wdata,
  output logic [63:0]     h_rdata,
  output logic            inv_valid,
  input  logic            inv_ready,
  output logic [SW-1:0]   inv_set,
  output logic [63:0]     inv_func,
  output logic [63:0]     inv_args,
  output logic [63:0]     inv_flag
);
  logic [63:0] func [NSETS];
  logic [63:0] args [NSETS];
  logic [63:0] flag [NSETS];
  logic        pend [NSETS];
  logic        lastok [NSETS];

  logic [AW-6:0] hs;     // set index from the address
  logic [1:0]    hr;     // register within the set
  assign hs = h_addr[AW-1:5];
  assign hr = h_addr[4:3];
  logic [SW-1:0] si;     // set index, in range when hs < NSETS
  assign si = SW'(hs);

  always_comb begin
    inv_valid = 1'b0;
    inv_set   = '0;
    for (int s = NSETS - 1; s >= 0; s--)
      if (pend[s]) begin
        inv_valid = 1'b1;
        inv_set   = SW'(s);
      end
    inv_func = func[inv_set];
    inv_args = args[inv_set];
    inv_flag = flag[inv_set];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSETS; s++) begin
        func[s] <= '0; args[s] <= '0; flag[s] <= '0;
        pend[s] <= 1'b0; lastok[s] <= 1'b0;
      end
      h_rdata <= '0;
    end else begin
      if (inv_valid && inv_ready) pend[inv_set] <= 1'b0;
      if (h_req && int'(hs) < NSETS) begin
        if (h_we) begin
          unique case (hr)
            2'd0: func[si] <= h_wdata;
            2'd1: args[si] <= h_wdata;
            2'd2: flag[si] <= h_wdata;
            default: begin
              // doorbell: refused while the previous packet is still pending
              if (pend[si] && !(inv_valid && inv_ready && inv_set == si)) begin
                lastok[si] <= 1'b0;
              end else begin
                pend[si]   <= 1'b1;
                lastok[si] <= 1'b1;
              end
            end
          endcase
        end else begin
          unique case (hr)
            2'd0: h_rdata <= func[si];
            2'd1: h_rdata <= args[si];
            2'd2: h_rdata <= flag[si];
            default: h_rdata <= {62'd0, lastok[si], pend[si]};
          endcase
        end
      end
    end
  end
endmodule
