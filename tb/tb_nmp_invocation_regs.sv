// tb_nmp_invocation_regs: self-checking test of the Invocation Register Sets.
// Writes invocation packets through the host bus, rings doorbells, checks
// the packet handed to the thread manager, read-back, the pending/accepted
// status, lowest-set-first order and refusal of a doorbell while a packet
// is still pending.
module tb_nmp_invocation_regs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic h_req = 0, h_we = 0;
  logic [7:0] h_addr = 0;
  logic [63:0] h_wdata = 0, h_rdata;
  logic inv_valid, inv_ready = 0;
  logic [1:0] inv_set;
  logic [63:0] inv_func, inv_args, inv_flag;
  int checks = 0, failures = 0;

  nmp_invocation_regs #(.NSETS(4), .AW(8)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(int s, int r, logic [63:0] v);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = 8'(s * 32 + r * 8); h_wdata = v;
    @(negedge clk); h_req = 0; h_we = 0;
  endtask
  task automatic rd(int s, int r, output logic [63:0] v);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = 8'(s * 32 + r * 8);
    @(negedge clk); h_req = 0; v = h_rdata;
  endtask
  task automatic packet(int s, logic [63:0] f, logic [63:0] a, logic [63:0] c);
    wr(s, 0, f); wr(s, 1, a); wr(s, 2, c); wr(s, 3, 64'd1);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(!inv_valid, "nothing pending after reset");
    packet(2, 64'h1000, 64'h2000, 64'h3000);
    chk(inv_valid && inv_set == 2 && inv_func == 64'h1000 && inv_args == 64'h2000 &&
        inv_flag == 64'h3000, "packet of set 2 presented");
    rd(2, 1, v); chk(v == 64'h2000, "read back ARGS");
    rd(2, 3, v); chk(v == 64'd3, "status pending and accepted");
    wr(2, 3, 64'd1);
    rd(2, 3, v); chk(v == 64'd1, "second doorbell refused while pending");
    packet(0, 64'hA, 64'hB, 64'hC);
    chk(inv_valid && inv_set == 0 && inv_func == 64'hA, "lowest set served first");
    @(negedge clk); inv_ready = 1;
    @(negedge clk); inv_ready = 0;
    chk(inv_valid && inv_set == 2, "set 2 next");
    @(negedge clk); inv_ready = 1;
    @(negedge clk); inv_ready = 0;
    chk(!inv_valid, "all taken");
    rd(2, 3, v); chk(v == 64'd0, "set 2 idle, last refused");
    packet(2, 64'h5, 64'h6, 64'h7);
    rd(2, 3, v); chk(v == 64'd3, "set 2 accepts again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
