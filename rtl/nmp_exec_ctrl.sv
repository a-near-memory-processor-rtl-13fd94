// nmp_exec_ctrl: operation sequencer for the NMP's vector, stream and bit
// manipulation operations.
//
// Takes one decoded operation at a time from the instruction front end for
// the running thread and carries it out on the functional units and the
// scratchpad (port 0). An operation names up to three registers (rd, rs,
// rt) and one addressing mode:
//   direct  - the registers hold scalar operands;
//   scalar  - the registers hold scratchpad addresses of scalar operands;
//   vector  - the registers hold vector specifiers (start, length);
//   stream  - the register holds a stream buffer specifier (start, length,
//             head or tail index).
// Every scratchpad operand is translated by the scratchpad TLB once, at the
// start of the operation, so a vector or stream buffer must sit in one
// page; a miss ends the operation with a scratchpad page-miss exception
// (exc_*), after which software pages the data in and the operation is
// issued again. Vectors are processed LANES words (128 bytes) per chunk:
// read the first source, read the second source (or broadcast the scalar
// register in the vector-scalar form, selected by direct mode), compute in
// the vector unit, write the result with its error and mask bits.
// Stream reads and writes are synchronized accesses; when the full/empty
// bits refuse one, the operation ends with op_blocked and blk_sync, the
// thread is preempted, and the front end re-issues the same operation when
// the thread runs again. An accepted synchronized access pulses wake_sync.
// Vector loads and stores are passed to the vector load/store unit; the
// operation then completes and the thread blocks (blk_mem) until the
// transfer is over. Bmm_load fills the Bit Matrix Register; Bmm raises a
// BMR-tag exception when another thread owns it. The operations and
// addressing modes follow the architecture; the operation encoding, the
// register layout of specifiers, the vector-scalar form and the
// retry-on-resume rule for blocked accesses are this design's choices.
//
// Interface: op_valid/op_ready/op with tid; exactly one of op_done,
//   op_blocked, op_exc pulses when the operation ends.
// Timing: a direct bit operation takes 2 cycles; each scratchpad read adds
//   the scratchpad latency (6 cycles); a vector operation of C chunks takes
//   about C*(2*LAT+5) cycles after translation.
module nmp_exec_ctrl
  import nmp_pkg::*;
#(
  parameter int unsigned NCTX   = nmp_pkg::CONTEXTS,
  parameter int unsigned NLANES = nmp_pkg::LANES,
  parameter int unsigned SP_AW  = 13,
  localparam int unsigned CW    = (NCTX > 1) ? $clog2(NCTX) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // operations
  input  logic              op_valid,
  output logic              op_ready,
  input  nmp_op_t           op,
  input  logic [CW-1:0]     tid,
  output logic              op_done,
  output logic              op_blocked,
  output logic              op_exc,
  output exc_e              exc_cause,
  output logic [SPAD_VA_W-1:0] exc_va,
  // thread control
  output logic              blk_sync,
  output logic              blk_mem,
  output logic              exit_req,
  output logic              wake_sync,
  // register file of the running thread
  output logic [2:0][4:0]   rf_raddr,
  input  logic [2:0][63:0]  rf_rdata,
  output logic              rf_we,
  output logic [CW-1:0]     rf_wctx,
  output logic [4:0]        rf_waddr,
  output logic [63:0]       rf_wdata,
  // scratchpad TLB
  output logic [SPAD_VA_W-1:0] xl_va,
  input  logic              xl_hit,
  input  logic [15:0]       xl_pa,
  // scratchpad port
  output logic              sp_req,
  output sp_op_e            sp_op,
  output logic [SP_AW-1:0]  sp_waddr,
  output logic [NLANES-1:0][7:0]  sp_be,
  output logic [NLANES-1:0][63:0] sp_wdata,
  output logic [NLANES-1:0][7:0]  sp_werr,
  output logic [NLANES-1:0][7:0]  sp_wmask,
  input  logic              sp_ok,
  input  logic              sp_rvalid,
  input  logic [NLANES-1:0][63:0] sp_rdata,
  input  logic [NLANES-1:0][7:0]  sp_rmask,
  // vector load/store unit
  output logic              vls_valid,
  input  logic              vls_ready,
  output logic              vls_store,
  output logic [63:0]       vls_va,
  output logic [63:0]       vls_stride,
  output logic [SP_AW-1:0]  vls_waddr,
  output logic [15:0]       vls_nwords,
  // BMR ownership, for system software
  output logic [CW-1:0]     bmr_owner,
  output logic              bmr_owned
);
  localparam int unsigned CHUNK_B = NLANES * 8;

  typedef enum logic [2:0] {
    K_BIT, K_BMMLD, K_SSH, K_VEC, K_STRM, K_LDST, K_VLS, K_EXIT
  } kind_e;

  typedef enum logic [3:0] {
    S_IDLE, S_XA, S_XB, S_XD, S_RDA, S_WA, S_RDB, S_WB, S_EXEC, S_BMMW,
    S_WRD, S_SYNC, S_SWAIT, S_REG2, S_VLS
  } state_e;

  state_e      st;
  nmp_op_t     o;
  kind_e       kind;
  logic [CW-1:0] otid;
  logic [63:0] va, vb;                       // register values rs, rt
  logic [SPAD_VA_W-1:0] va_a, va_b, va_d;    // scratchpad virtual addresses
  logic        need_a, need_b, need_d;
  logic [15:0] pa_a, pa_b, pa_d;             // scratchpad byte addresses
  logic [15:0] chunk;
  logic [19:0] total_b;                      // bytes of a vector operand
  logic [NLANES-1:0][63:0] bufa, bufb, res;
  logic [NLANES-1:0][7:0]  ma, mb, res_err, res_mask;
  logic [63:0] new_spec;

  // ---------------- functional units ----------------
  logic [1:0]  bm_op;
  logic [63:0] bm_res;
  nmp_bitmanip #(.W(64)) u_bit (.op(bm_op), .a(bufa[0]), .b(bufb[0]), .result(bm_res));

  logic        bmr_mul_valid, bmr_fault, bmr_ld, bmr_mul;
  logic [63:0] bmr_res;
  nmp_bmr #(.N(BMR_N), .LDW(NLANES), .TIDW(CW)) u_bmr (
    .clk, .rst_n,
    .ld_en(bmr_ld), .ld_row(6'(chunk * 16'(NLANES))), .ld_rows(sp_rdata), .ld_mask('1),
    .ld_tid(otid),
    .mul_en(bmr_mul), .mul_src(bufa[0]), .mul_tid(otid),
    .mul_valid(bmr_mul_valid), .mul_res(bmr_res), .tag_fault(bmr_fault),
    .owner(bmr_owner), .owned(bmr_owned));

  logic [NLANES-1:0][63:0] ssh_res;
  nmp_sshift #(.BLK_WORDS(NLANES)) u_ssh (
    .blk(bufa), .amount(vb[$clog2(NLANES*64)-1:0]),
    .dir_left(o.op == OP_SSHL || o.op == OP_SROL),
    .rotate(o.op == OP_SROL || o.op == OP_SROR), .result(ssh_res));

  vu_op_e vu_op;
  logic [NLANES-1:0][63:0] vu_d;
  logic [NLANES-1:0][7:0]  vu_err, vu_mask;
  nmp_vector_unit #(.NLANES(NLANES)) u_vu (
    .op(vu_op), .esize(o.esize), .a(bufa), .b(bufb), .a_mask(ma), .b_mask(mb),
    .d(vu_d), .d_err(vu_err), .d_mask(vu_mask));

  // stream pointer arithmetic on the incoming operation's specifier
  logic [SPAD_VA_W-1:0] st_addr;
  logic [63:0]          st_spec_in, st_spec_out;
  nmp_stream_addr u_sa (.spec(st_spec_in), .esize(op.esize),
                        .advance(op.op != OP_SPEEK),
                        .addr(st_addr), .new_spec(st_spec_out));

  // ---------------- decode ----------------
  function automatic kind_e kind_of(opcode_e c);
    unique case (c)
      OP_LEADZ, OP_POPCNT, OP_MIXH, OP_MIXL, OP_BMM: return K_BIT;
      OP_BMMLD: return K_BMMLD;
      OP_SSHL, OP_SSHR, OP_SROL, OP_SROR: return K_SSH;
      OP_VADD, OP_VSUB, OP_VAND, OP_VOR, OP_VXOR, OP_VMUL, OP_VCMPLT: return K_VEC;
      OP_SENQ, OP_SDEQ, OP_SPEEK: return K_STRM;
      OP_LDS, OP_STS: return K_LDST;
      OP_VLOAD, OP_VSTORE: return K_VLS;
      default: return K_EXIT;
    endcase
  endfunction

  always_comb begin
    unique case (o.op)
      OP_VSUB:   vu_op = VU_SUB;
      OP_VAND:   vu_op = VU_AND;
      OP_VOR:    vu_op = VU_OR;
      OP_VXOR:   vu_op = VU_XOR;
      OP_VMUL:   vu_op = VU_MUL;
      OP_VCMPLT: vu_op = VU_CMPLT;
      default:   vu_op = VU_ADD;
    endcase
    unique case (o.op)
      OP_LEADZ:  bm_op = 2'd0;
      OP_POPCNT: bm_op = 2'd1;
      OP_MIXH:   bm_op = 2'd2;
      default:   bm_op = 2'd3;
    endcase
  end

  assign rf_raddr   = '{op.rt, op.rs, op.rd};   // [2]=rt [1]=rs [0]=rd
  assign st_spec_in = (op.op == OP_SENQ) ? rf_rdata[0] : rf_rdata[1];
  assign op_ready   = (st == S_IDLE);
  assign rf_wctx    = otid;

  // scratchpad addresses of the incoming operation and which are needed
  logic [SPAD_VA_W-1:0] n_va_a, n_va_b, n_va_d;
  logic n_need_a, n_need_b, n_need_d;
  always_comb begin
    kind_e k;
    k = kind_of(op.op);
    n_va_a = rf_rdata[1][SPAD_VA_W-1:0];
    n_va_b = rf_rdata[2][SPAD_VA_W-1:0];
    n_va_d = rf_rdata[0][SPAD_VA_W-1:0];
    n_need_a = 1'b0; n_need_b = 1'b0; n_need_d = 1'b0;
    unique case (k)
      K_BIT: if (op.mode == AM_SCALAR) begin
        n_need_a = 1'b1;
        n_need_b = (op.op == OP_MIXH || op.op == OP_MIXL);
        n_need_d = 1'b1;
      end
      K_BMMLD: n_need_a = 1'b1;
      K_SSH:   begin n_need_a = 1'b1; n_need_d = 1'b1; end
      K_VEC:   begin n_need_a = 1'b1; n_need_b = (op.mode == AM_VECTOR); n_need_d = 1'b1; end
      K_STRM:  begin
        if (op.op == OP_SENQ) begin n_need_d = 1'b1; n_va_d = st_addr; end
        else                  begin n_need_a = 1'b1; n_va_a = st_addr; end
      end
      K_LDST:  begin n_need_a = (op.op == OP_LDS); n_need_d = (op.op == OP_STS); end
      K_VLS:   n_need_d = 1'b1;
      default: ;
    endcase
  end

  // ---------------- byte enables ----------------
  logic [19:0] rem_b;
  logic [NLANES-1:0][7:0] be_chunk, be_elem;
  logic [NLANES-1:0][7:0] be_w0;             // one whole word in lane 0
  logic [7:0]  elem_be0;
  logic [2:0]  off;
  always_comb begin
    rem_b = total_b - 20'(chunk) * 20'(CHUNK_B);
    for (int i = 0; i < NLANES; i++)
      for (int k = 0; k < 8; k++)
        be_chunk[i][k] = (20'(i * 8 + k) < rem_b);
    off      = (o.op == OP_STS || (o.op == OP_SENQ)) ? pa_d[2:0] : pa_a[2:0];
    elem_be0 = 8'(((9'd1 << (9'd1 << o.esize)) - 9'd1) << off);
    be_elem  = '0;
    be_elem[0] = elem_be0;
    be_w0    = '0;
    be_w0[0] = 8'hff;
  end

  // element read back from a scalar access, zero-extended
  logic [63:0] elem_rd;
  always_comb begin
    logic [63:0] sh;
    sh = sp_rdata[0] >> (8 * off);
    unique case (o.esize)
      2'd0: elem_rd = {56'd0, sh[7:0]};
      2'd1: elem_rd = {48'd0, sh[15:0]};
      2'd2: elem_rd = {32'd0, sh[31:0]};
      default: elem_rd = sh;
    endcase
  end

  // ---------------- scratchpad, TLB and VLS drive ----------------
  always_comb begin
    sp_req   = 1'b0;
    sp_op    = SP_READ;
    sp_waddr = '0;
    sp_be    = '0;
    sp_wdata = '0;
    sp_werr  = '0;
    sp_wmask = '0;
    xl_va    = va_a;
    unique case (st)
      S_XB: xl_va = va_b;
      S_XD: xl_va = va_d;
      default: ;
    endcase
    unique case (st)
      S_RDA: begin
        sp_req   = 1'b1;
        sp_waddr = SP_AW'(pa_a >> 3) + SP_AW'(chunk * 16'(NLANES));
        sp_be    = (kind == K_VEC) ? be_chunk :
                   (kind == K_LDST) ? be_elem :
                   (kind == K_BIT) ? be_w0 : '1;
      end
      S_RDB: begin
        sp_req   = 1'b1;
        sp_waddr = SP_AW'(pa_b >> 3) + SP_AW'(chunk * 16'(NLANES));
        sp_be    = (kind == K_VEC) ? be_chunk : be_w0;
      end
      S_WRD: begin
        sp_req   = 1'b1;
        sp_op    = SP_WRITE;
        sp_waddr = SP_AW'(pa_d >> 3) + SP_AW'(chunk * 16'(NLANES));
        sp_wdata = res;
        unique case (kind)
          K_VEC: begin sp_be = be_chunk; sp_werr = res_err; sp_wmask = res_mask; end
          K_SSH: sp_be = '1;
          K_BIT: sp_be = be_w0;
          default: begin
            sp_be = be_elem;
            sp_wdata[0] = res[0] << (8 * off);
          end
        endcase
      end
      S_SYNC: begin
        sp_req = 1'b1;
        unique case (o.op)
          OP_SENQ: begin
            sp_op       = SP_SYNC_WR;
            sp_waddr    = SP_AW'(pa_d >> 3);
            sp_wdata[0] = va << (8 * off);
          end
          OP_SDEQ: begin sp_op = SP_SYNC_RD; sp_waddr = SP_AW'(pa_a >> 3); end
          default: begin sp_op = SP_PEEK;    sp_waddr = SP_AW'(pa_a >> 3); end
        endcase
        sp_be = be_elem;
      end
      default: ;
    endcase
  end

  assign vls_valid  = (st == S_VLS);
  assign vls_store  = (o.op == OP_VSTORE);
  assign vls_va     = va;
  assign vls_stride = (vb == 64'd0) ? 64'd8 : vb;
  assign vls_waddr  = SP_AW'(pa_d >> 3);
  assign vls_nwords = 16'((total_b + 20'd7) >> 3);
  assign bmr_ld     = (st == S_WA) && sp_rvalid && (kind == K_BMMLD);
  assign bmr_mul    = (st == S_EXEC) && (o.op == OP_BMM);

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      o <= '0; kind <= K_EXIT; otid <= '0;
      va <= '0; vb <= '0;
      va_a <= '0; va_b <= '0; va_d <= '0;
      need_a <= 1'b0; need_b <= 1'b0; need_d <= 1'b0;
      pa_a <= '0; pa_b <= '0; pa_d <= '0;
      chunk <= '0; total_b <= '0;
      bufa <= '0; bufb <= '0; res <= '0; ma <= '0; mb <= '0;
      res_err <= '0; res_mask <= '0; new_spec <= '0;
      op_done <= 1'b0; op_blocked <= 1'b0; op_exc <= 1'b0;
      exc_cause <= EX_NONE; exc_va <= '0;
      blk_sync <= 1'b0; blk_mem <= 1'b0; exit_req <= 1'b0; wake_sync <= 1'b0;
      rf_we <= 1'b0; rf_waddr <= '0; rf_wdata <= '0;
    end else begin
      op_done <= 1'b0; op_blocked <= 1'b0; op_exc <= 1'b0;
      blk_sync <= 1'b0; blk_mem <= 1'b0; exit_req <= 1'b0; wake_sync <= 1'b0;
      rf_we <= 1'b0;
      unique case (st)
        S_IDLE: if (op_valid) begin
          kind_e k;
          k = kind_of(op.op);
          o <= op; kind <= k; otid <= tid;
          va <= rf_rdata[1]; vb <= rf_rdata[2];
          va_a <= n_va_a; va_b <= n_va_b; va_d <= n_va_d;
          need_a <= n_need_a; need_b <= n_need_b; need_d <= n_need_d;
          new_spec <= st_spec_out;
          chunk <= '0;
          // operand length in bytes (vector length from the destination)
          total_b <= (k == K_VEC || k == K_VLS) ? 20'(spec_len(rf_rdata[0])) << op.esize : 20'd8;
          bufa <= '0; bufb <= '0; ma <= '0; mb <= '0;
          bufa[0] <= rf_rdata[1];
          bufb[0] <= rf_rdata[2];
          if (k == K_EXIT) begin
            op_done  <= 1'b1;
            exit_req <= (op.op == OP_EXIT);
          end else if (n_need_a) st <= S_XA;
          else if (n_need_b)     st <= S_XB;
          else if (n_need_d)     st <= S_XD;
          else                   st <= S_EXEC;
        end
        S_XA, S_XB, S_XD: begin
          if (!xl_hit) begin
            op_exc    <= 1'b1;
            exc_cause <= EX_SPAD_MISS;
            exc_va    <= xl_va;
            st        <= S_IDLE;
          end else begin
            if (st == S_XA) pa_a <= xl_pa;
            if (st == S_XB) pa_b <= xl_pa;
            if (st == S_XD) pa_d <= xl_pa;
            if (st == S_XA && need_b)                 st <= S_XB;
            else if ((st == S_XA || st == S_XB) && need_d) st <= S_XD;
            else if (kind == K_STRM)                  st <= S_SYNC;
            else if (kind == K_VLS)                   st <= S_VLS;
            else if (kind == K_LDST && o.op == OP_STS) begin
              res[0] <= va;
              st     <= S_WRD;
            end
            else if (need_a)                          st <= S_RDA;
            else                                      st <= S_EXEC;
          end
        end
        S_RDA: if (sp_ok) st <= S_WA;
        S_WA: if (sp_rvalid) begin
          bufa <= sp_rdata;
          ma   <= sp_rmask;
          if (kind == K_BMMLD) begin
            if (chunk + 16'd1 == 16'(BMR_N / NLANES)) begin
              op_done <= 1'b1;
              st      <= S_IDLE;
            end else begin
              chunk <= chunk + 16'd1;
              st    <= S_RDA;
            end
          end else if (kind == K_LDST) begin
            rf_we    <= 1'b1;
            rf_waddr <= o.rd;
            rf_wdata <= elem_rd;
            op_done  <= 1'b1;
            st       <= S_IDLE;
          end else if (need_b) st <= S_RDB;
          else begin
            // vector-scalar form: broadcast the scalar register to all lanes
            if (kind == K_VEC)
              for (int i = 0; i < NLANES; i++) begin
                logic [63:0] rep;
                rep = vb;
                unique case (o.esize)
                  2'd0: rep = {8{vb[7:0]}};
                  2'd1: rep = {4{vb[15:0]}};
                  2'd2: rep = {2{vb[31:0]}};
                  default: ;
                endcase
                bufb[i] <= rep;
                mb[i]   <= '0;
              end
            st <= S_EXEC;
          end
        end
        S_RDB: if (sp_ok) st <= S_WB;
        S_WB: if (sp_rvalid) begin
          bufb <= sp_rdata;
          mb   <= sp_rmask;
          st   <= S_EXEC;
        end
        S_EXEC: begin
          unique case (kind)
            K_VEC: begin
              res <= vu_d; res_err <= vu_err; res_mask <= vu_mask;
              st  <= S_WRD;
            end
            K_SSH: begin
              res <= ssh_res;
              st  <= S_WRD;
            end
            default: begin   // K_BIT
              if (o.op == OP_BMM) st <= S_BMMW;
              else if (o.mode == AM_SCALAR) begin
                res[0] <= bm_res;
                st     <= S_WRD;
              end else begin
                rf_we    <= 1'b1;
                rf_waddr <= o.rd;
                rf_wdata <= bm_res;
                op_done  <= 1'b1;
                st       <= S_IDLE;
              end
            end
          endcase
        end
        S_BMMW: begin
          if (bmr_fault) begin
            op_exc    <= 1'b1;
            exc_cause <= EX_BMR_TAG;
            exc_va    <= '0;
            st        <= S_IDLE;
          end else if (o.mode == AM_SCALAR) begin
            res[0] <= bmr_res;
            st     <= S_WRD;
          end else begin
            rf_we    <= 1'b1;
            rf_waddr <= o.rd;
            rf_wdata <= bmr_res;
            op_done  <= 1'b1;
            st       <= S_IDLE;
          end
        end
        S_WRD: if (sp_ok) begin
          if (kind == K_VEC && (20'(chunk) + 20'd1) * 20'(CHUNK_B) < total_b) begin
            chunk <= chunk + 16'd1;
            st    <= S_RDA;
          end else begin
            op_done <= 1'b1;
            st      <= S_IDLE;
          end
        end
        S_SYNC: begin
          if (!sp_ok) begin
            // full/empty refused the access: preempt the thread
            op_blocked <= 1'b1;
            blk_sync   <= 1'b1;
            st         <= S_IDLE;
          end else if (o.op == OP_SENQ) begin
            wake_sync <= 1'b1;
            rf_we     <= 1'b1;
            rf_waddr  <= o.rd;
            rf_wdata  <= new_spec;
            op_done   <= 1'b1;
            st        <= S_IDLE;
          end else begin
            wake_sync <= (o.op == OP_SDEQ);
            st        <= S_SWAIT;
          end
        end
        S_SWAIT: if (sp_rvalid) begin
          rf_we    <= 1'b1;
          rf_waddr <= o.rd;
          rf_wdata <= elem_rd;
          if (o.op == OP_SDEQ) st <= S_REG2;
          else begin
            op_done <= 1'b1;
            st      <= S_IDLE;
          end
        end
        S_REG2: begin
          rf_we    <= 1'b1;
          rf_waddr <= o.rs;
          rf_wdata <= new_spec;
          op_done  <= 1'b1;
          st       <= S_IDLE;
        end
        S_VLS: if (vls_ready) begin
          op_done <= 1'b1;
          blk_mem <= 1'b1;
          st      <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // an operation ends in exactly one way
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({op_done, op_blocked, op_exc}));
endmodule
