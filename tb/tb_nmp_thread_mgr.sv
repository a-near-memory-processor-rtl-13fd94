// tb_nmp_thread_mgr: self-checking test of the Thread Management Unit.
// Creates threads, checks the argument register write, the 4-cycle
// context switch, preemption on a synchronization block and on a memory
// block, wake-ups, round-robin order, the completion-flag store on exit,
// reuse of a freed context and refusal when all contexts are taken.
module tb_nmp_thread_mgr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic inv_valid = 0, inv_ready;
  logic [63:0] inv_func = 0, inv_args = 0, inv_flag = 0;
  logic cur_valid; logic [1:0] cur_tid; logic [63:0] cur_func;
  logic blk_sync = 0, blk_mem = 0, exit_req = 0, wake_sync = 0, wake_mem = 0;
  logic [1:0] wake_mem_tid = 0;
  logic init_en; logic [1:0] init_ctx; logic [4:0] init_reg; logic [63:0] init_data;
  logic cw_valid, cw_ready = 0; logic [63:0] cw_addr;
  logic [31:0] n_switches;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  nmp_thread_mgr #(.NCTX(4), .SWITCH_CYC(4), .ARG_REG(4)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic create(logic [63:0] f, logic [63:0] a, logic [63:0] fl, output logic [1:0] ctx);
    @(negedge clk);
    inv_valid = 1; inv_func = f; inv_args = a; inv_flag = fl;
    #1;
    chk(inv_ready && init_en && init_reg == 5'd4 && init_data == a, "argument register write");
    ctx = init_ctx;
    @(negedge clk) inv_valid = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask
  // cycles until a thread runs
  task automatic wait_run(output int n);
    n = 0;
    while (!cur_valid && n < 50) begin @(negedge clk); n++; end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] c0, c1, c2, c3, first;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    create(64'h100, 64'hA0, 64'hF0, c0);
    wait_run(n);
    chk(n == 5 && cur_func == 64'h100 && cur_tid == c0, $sformatf("first thread runs after switch (%0d)", n));
    create(64'h200, 64'hA1, 64'hF1, c1);
    chk(cur_valid && cur_tid == c0, "no preemption without an event");
    // synchronization block: the other thread runs 4 cycles later
    pulse(blk_sync);
    chk(!cur_valid, "thread descheduled");
    wait_run(n);
    chk(n == 4 && cur_tid == c1, $sformatf("switch to second thread (%0d)", n));
    // memory block of the second: first is still blocked, core idles
    pulse(blk_mem);
    repeat (10) @(negedge clk);
    chk(!cur_valid, "idle while all threads are blocked");
    wake_mem_tid = c1;
    pulse(wake_mem);
    wait_run(n);
    chk(cur_tid == c1 && n == 5, $sformatf("memory wake-up (%0d)", n));
    // wake_sync readies the first: still runs only after the second yields
    pulse(wake_sync);
    repeat (3) @(negedge clk);
    chk(cur_tid == c1, "blocked multithreading keeps the running thread");
    pulse(exit_req);
    chk(cw_valid && cw_addr == 64'hF1, "completion flag store issued");
    @(negedge clk) cw_ready = 1;
    @(negedge clk) cw_ready = 0;
    chk(!cw_valid, "completion store accepted");
    wait_run(n);
    chk(cur_tid == c0, "first thread resumes");
    // fill all contexts
    create(64'h300, 64'hA2, 64'hF2, c2);
    create(64'h400, 64'hA3, 64'hF3, c3);
    create(64'h500, 64'hA4, 64'hF4, first);
    @(negedge clk); inv_valid = 1; #1;
    chk(!inv_ready, "all four contexts taken");
    @(negedge clk) inv_valid = 0;
    chk(n_switches == 32'd4, $sformatf("switch count %0d", n_switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
