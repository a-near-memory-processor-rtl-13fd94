// nmp_pkg: constants and types shared by the Near-Memory Processor (NMP) RTL.
//
// The NMP is a blocked-multithreaded coprocessor with a byte-addressed
// scratchpad (per-byte full/empty, error and mask flags), a 16-lane vector
// unit, stream buffers kept in the scratchpad, and bit-manipulation support
// (Leadz, Popcnt, Mix, Sshift, Bmm with a single 64x64 Bit Matrix Register).
//
// The sizes below follow the architecture's main configuration: 16 lanes,
// 4 hardware contexts, a 4-cycle context switch, a 64 KB scratchpad reached
// with 20-bit virtual addresses and a 6-cycle scratchpad latency, 128 pending
// memory operations. The operation encoding, the packing of specifiers into
// 64-bit registers and the page size are this design's own choices, since
// the full instruction set is not published with the architecture.
package nmp_pkg;

  localparam int unsigned XLEN        = 64;   // scalar word width
  localparam int unsigned LANES       = 16;   // vector lanes
  localparam int unsigned CONTEXTS    = 4;    // hardware thread contexts
  localparam int unsigned SWITCH_CYC  = 4;    // context switch time
  localparam int unsigned SPAD_BYTES  = 65536;
  localparam int unsigned SPAD_VA_W   = 20;   // scratchpad virtual address
  localparam int unsigned SPAD_PAGE_W = 12;   // 4 KB scratchpad pages (own choice)
  localparam int unsigned SPAD_LAT    = 6;    // scratchpad access latency
  localparam int unsigned NREGS       = 32;   // MIPS-like register count
  localparam int unsigned MEM_PA_W    = 48;   // physical memory address width (own choice)
  localparam int unsigned MAX_PENDING = 128;  // outstanding loads / stores
  localparam int unsigned BMR_N       = 64;   // bit matrix is BMR_N x BMR_N

  // Scratchpad access operations. The synchronizing ones look at the
  // full/empty bit of every enabled byte and are refused (no side effect)
  // when the condition does not hold.
  typedef enum logic [2:0] {
    SP_READ   = 3'd0,  // plain read
    SP_WRITE  = 3'd1,  // plain write, full/empty bits untouched
    SP_SYNC_RD= 3'd2,  // consuming read: needs full, leaves empty
    SP_PEEK   = 3'd3,  // non-consuming synchronized read: needs full
    SP_SYNC_WR= 3'd4,  // synchronized write: needs empty, leaves full
    SP_SETFE  = 3'd5   // write the full/empty bits only (from wdata bit 0 of each byte)
  } sp_op_e;

  // Addressing modes of an operation (direct, scalar indirect, vector
  // indirect, stream indirect).
  typedef enum logic [1:0] {
    AM_DIRECT = 2'd0,
    AM_SCALAR = 2'd1,
    AM_VECTOR = 2'd2,
    AM_STREAM = 2'd3
  } amode_e;

  // Element size: 1 << esize bytes.
  typedef logic [1:0] esize_t;

  // Operations accepted by the execution controller.
  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_LEADZ  = 5'd1,
    OP_POPCNT = 5'd2,
    OP_MIXH   = 5'd3,
    OP_MIXL   = 5'd4,
    OP_BMM    = 5'd5,
    OP_BMMLD  = 5'd6,
    OP_SSHL   = 5'd7,   // Sshift left, zero fill
    OP_SSHR   = 5'd8,   // Sshift right, zero fill
    OP_SROL   = 5'd9,   // Sshift left, rotating
    OP_SROR   = 5'd10,  // Sshift right, rotating
    OP_VADD   = 5'd11,
    OP_VSUB   = 5'd12,
    OP_VAND   = 5'd13,
    OP_VOR    = 5'd14,
    OP_VXOR   = 5'd15,
    OP_VMUL   = 5'd16,
    OP_VCMPLT = 5'd17,
    OP_SENQ   = 5'd18,  // stream write (enqueue at tail)
    OP_SDEQ   = 5'd19,  // stream read, dequeue at head
    OP_SPEEK  = 5'd20,  // stream read, peek at head
    OP_LDS    = 5'd21,  // scalar load from scratchpad into a register
    OP_STS    = 5'd22,  // scalar store from a register into the scratchpad
    OP_VLOAD  = 5'd23,  // vector load memory -> scratchpad
    OP_VSTORE = 5'd24,  // vector store scratchpad -> memory
    OP_EXIT   = 5'd25   // thread end: set the completion flag
  } opcode_e;

  // Vector unit operation (subset of opcode_e, re-encoded).
  typedef enum logic [2:0] {
    VU_ADD = 3'd0, VU_SUB = 3'd1, VU_AND = 3'd2, VU_OR = 3'd3,
    VU_XOR = 3'd4, VU_MUL = 3'd5, VU_CMPLT = 3'd6
  } vu_op_e;

  // A decoded operation as handed over by the instruction front end.
  typedef struct packed {
    opcode_e  op;
    esize_t   esize;
    amode_e   mode;
    logic [4:0] rd;
    logic [4:0] rs;
    logic [4:0] rt;
  } nmp_op_t;

  // Exception causes reported to the operating system.
  typedef enum logic [2:0] {
    EX_NONE      = 3'd0,
    EX_SPAD_MISS = 3'd1,  // scratchpad page not resident
    EX_BMR_TAG   = 3'd2,  // BMR owned by another thread
    EX_MEM_TLB   = 3'd3,  // main-memory TLB miss in a vector load/store
    EX_BAD_OP    = 3'd4
  } exc_e;

  // Specifier fields packed in a 64-bit register (own layout):
  //   [19:0]  start address (scratchpad virtual)
  //   [35:20] length in elements (vector or stream buffer)
  //   [51:36] head (input stream) or tail (output stream) element index
  function automatic logic [SPAD_VA_W-1:0] spec_addr(input logic [XLEN-1:0] r);
    return r[SPAD_VA_W-1:0];
  endfunction
  function automatic logic [15:0] spec_len(input logic [XLEN-1:0] r);
    return r[35:20];
  endfunction
  function automatic logic [15:0] spec_ptr(input logic [XLEN-1:0] r);
    return r[51:36];
  endfunction

endpackage
