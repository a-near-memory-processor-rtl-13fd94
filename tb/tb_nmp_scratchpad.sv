// tb_nmp_scratchpad: self-checking test of the multi-bank scratchpad.
// Checks full-width writes and reads at word addresses that start in any
// bank, byte enables, the 6-cycle read latency, error/mask flag storage,
// and the full/empty protocol: synchronized write into empty bytes,
// refusal of a second one, peek, consuming read, refusal of a read of
// empty bytes. Both ports are exercised, port 1 running in parallel.
module tb_nmp_scratchpad;
  import nmp_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic   [1:0] req = '0, ok, rvalid;
  sp_op_e [1:0] op;
  logic   [1:0][12:0] waddr = '0;
  logic   [1:0][L-1:0][7:0] be = '0, werr = '0, wmask = '0, rfe, rerr, rmask;
  logic busy;
  logic   [1:0][L-1:0][63:0] wdata = '0, rdata;
  logic [63:0] model [8192];
  int checks = 0, failures = 0;

  nmp_scratchpad #(.BYTES(65536), .NLANES(L), .LAT(6), .NPORTS(2)) dut (.*);

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // one access on port p; returns ok and, for reads, the data after the latency
  task automatic access(int p, sp_op_e o, logic [12:0] a, logic [L-1:0][7:0] e,
                        logic [L-1:0][63:0] d, output bit acc,
                        output logic [L-1:0][63:0] rd, output logic [L-1:0][7:0] fe_o,
                        output logic [L-1:0][7:0] er_o, output logic [L-1:0][7:0] mk_o);
    int lat;
    @(negedge clk);
    req[p] = 1; op[p] = o; waddr[p] = a; be[p] = e; wdata[p] = d;
    #1 acc = ok[p];
    @(negedge clk);
    req[p] = 0;
    rd = '0; fe_o = '0; er_o = '0; mk_o = '0;
    if (acc && (o == SP_READ || o == SP_SYNC_RD || o == SP_PEEK)) begin
      lat = 1;
      while (!rvalid[p] && lat < 20) begin @(negedge clk); lat++; end
      chk(lat == 6, $sformatf("read latency %0d", lat));
      rd = rdata[p]; fe_o = rfe[p]; er_o = rerr[p]; mk_o = rmask[p];
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit acc;
    logic [L-1:0][63:0] d, rd;
    logic [L-1:0][7:0] fe_o, er_o, mk_o;
    op[0] = SP_READ; op[1] = SP_READ;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(dut.busy == 1'b1, "flag clearing after reset");
    while (dut.busy) @(negedge clk);
    // plain writes/reads at random word addresses, full and partial enables
    for (int it = 0; it < 40; it++) begin
      logic [12:0] a;
      logic [L-1:0][7:0] e;
      a = 13'($urandom);
      for (int i = 0; i < L; i++) begin
        d[i] = {$urandom, $urandom};
        e[i] = (it % 2) ? 8'($urandom) : 8'hff;
        for (int k = 0; k < 8; k++)
          if (e[i][k]) model[13'(a + 13'(i))][8*k +: 8] = d[i][8*k +: 8];
      end
      if (it == 0) for (int w = 0; w < 8192; w++) ;  // model starts unknown
      werr[0] = '0; wmask[0] = '0;
      access(0, SP_WRITE, a, e, d, acc, rd, fe_o, er_o, mk_o);
      chk(acc, "plain write accepted");
      access(0, SP_READ, a, '1, '0, acc, rd, fe_o, er_o, mk_o);
      for (int i = 0; i < L; i++)
        for (int k = 0; k < 8; k++)
          if (e[i][k])
            chk(rd[i][8*k +: 8] == d[i][8*k +: 8], $sformatf("data lane %0d byte %0d", i, k));
    end
    // flags written with data
    werr[0] = '0; wmask[0] = '0;
    werr[0][3] = 8'h0f; wmask[0][5] = 8'hf0;
    access(0, SP_WRITE, 13'd100, '1, '0, acc, rd, fe_o, er_o, mk_o);
    werr[0] = '0; wmask[0] = '0;
    access(0, SP_READ, 13'd100, '1, '0, acc, rd, fe_o, er_o, mk_o);
    chk(er_o[3] == 8'h0f && mk_o[5] == 8'hf0 && er_o[4] == 0 && mk_o[4] == 0, "error/mask flags");
    // full/empty protocol on word 2000, bytes 0..3
    begin
      logic [L-1:0][7:0] e4;
      e4 = '0; e4[0] = 8'h0f;
      d = '0; d[0] = 64'h1122_3344_5566_7788;
      access(0, SP_SYNC_RD, 13'd2000, e4, '0, acc, rd, fe_o, er_o, mk_o);
      chk(!acc, "consuming read of empty bytes refused");
      access(0, SP_SYNC_WR, 13'd2000, e4, d, acc, rd, fe_o, er_o, mk_o);
      chk(acc, "synchronized write into empty bytes");
      access(0, SP_SYNC_WR, 13'd2000, e4, d, acc, rd, fe_o, er_o, mk_o);
      chk(!acc, "second synchronized write refused");
      access(0, SP_PEEK, 13'd2000, e4, '0, acc, rd, fe_o, er_o, mk_o);
      chk(acc && rd[0][31:0] == 32'h5566_7788 && fe_o[0] == 8'h0f, "peek reads full bytes");
      access(0, SP_SYNC_RD, 13'd2000, e4, '0, acc, rd, fe_o, er_o, mk_o);
      chk(acc && rd[0][31:0] == 32'h5566_7788, "consuming read");
      access(0, SP_PEEK, 13'd2000, e4, '0, acc, rd, fe_o, er_o, mk_o);
      chk(!acc, "peek after consume refused");
      // SETFE then a consuming read succeeds
      d = '0; d[0] = 64'h0000_0000_0101_0101;
      access(1, SP_SETFE, 13'd2000, e4, d, acc, rd, fe_o, er_o, mk_o);
      access(1, SP_SYNC_RD, 13'd2000, e4, '0, acc, rd, fe_o, er_o, mk_o);
      chk(acc, "port 1 consuming read after SETFE");
    end
    // both ports at once, different addresses
    begin
      logic [L-1:0][63:0] d0, d1;
      for (int i = 0; i < L; i++) begin d0[i] = {$urandom, $urandom}; d1[i] = {$urandom, $urandom}; end
      @(negedge clk);
      req = 2'b11; op[0] = SP_WRITE; op[1] = SP_WRITE;
      waddr[0] = 13'd3000; waddr[1] = 13'd4003; be[0] = '1; be[1] = '1;
      wdata[0] = d0; wdata[1] = d1;
      @(negedge clk);
      req = 2'b00;
      access(1, SP_READ, 13'd3000, '1, '0, acc, rd, fe_o, er_o, mk_o);
      chk(rd == d0, "port 0 write seen on port 1");
      access(0, SP_READ, 13'd4003, '1, '0, acc, rd, fe_o, er_o, mk_o);
      chk(rd == d1, "port 1 write seen on port 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
