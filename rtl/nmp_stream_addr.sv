// nmp_stream_addr: stream buffer specifier arithmetic.
//
// A stream buffer is a circular queue in the scratchpad described by a
// specifier: buffer start address, buffer length in elements, and the index
// of the head (for a stream read) or tail (for a stream write). This block
// computes the scratchpad virtual address of the element the pointer names
// and the pointer after the access, wrapping at the end of the buffer. A peek
// leaves the pointer where it is; a dequeue or an enqueue advances it. Full
// and empty conditions are not computed here: they come from the full/empty
// bits of the scratchpad bytes, which the access itself tests. The behaviour
// follows the architecture; the specifier layout (see nmp_pkg) is this
// design's choice.
//
// Interface: combinational. spec in, esize = log2 of the element size in
// bytes, advance = 0 for a peek. addr and new_spec out.
module nmp_stream_addr
  import nmp_pkg::*;
(
  input  logic [XLEN-1:0]      spec,
  input  esize_t               esize,
  input  logic                 advance,
  output logic [SPAD_VA_W-1:0] addr,
  output logic [XLEN-1:0]      new_spec
);
  logic [15:0] len, ptr, nxt;

  always_comb begin
    len  = spec[35:20];
    ptr  = spec[51:36];
    addr = spec[SPAD_VA_W-1:0] + (SPAD_VA_W'(ptr) << esize);
    nxt  = (ptr + 16'd1 >= len) ? 16'd0 : ptr + 16'd1;
    new_spec = spec;
    if (advance) new_spec[51:36] = nxt;
  end
endmodule
