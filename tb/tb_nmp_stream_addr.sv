// tb_nmp_stream_addr: self-checking test of stream specifier arithmetic.
// Walks head/tail pointers around buffers of several lengths and element
// sizes and checks addresses, wrap-around and that a peek does not move.
module tb_nmp_stream_addr;
  import nmp_pkg::*;
  logic [63:0] spec, new_spec;
  esize_t esize;
  logic advance;
  logic [19:0] addr;
  int checks = 0, failures = 0;

  nmp_stream_addr dut (.spec, .esize, .advance, .addr, .new_spec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int es = 0; es < 4; es++)
      for (int len = 1; len < 12; len += 3) begin
        int ptr;
        logic [19:0] base;
        ptr = 0;
        base = 20'($urandom_range(0, 4095) * 8);
        spec = {12'd0, 16'd0, 16'(len), base};
        esize = 2'(es);
        for (int step = 0; step < 3 * len; step++) begin
          advance = (step % 5) != 4;
          #1;
          checks++;
          if (addr != base + 20'(ptr * (1 << es))) begin
            failures++; $display("FAIL addr %h exp %h", addr, base + 20'(ptr * (1 << es)));
          end
          if (advance) ptr = (ptr + 1 == len) ? 0 : ptr + 1;
          checks++;
          if (new_spec[51:36] != 16'(ptr) || new_spec[35:0] != spec[35:0]) begin
            failures++; $display("FAIL ptr %0d exp %0d", new_spec[51:36], ptr);
          end
          spec = new_spec;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
