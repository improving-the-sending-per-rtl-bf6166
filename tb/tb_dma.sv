// tb_dma: self-checking test of the single-channel DMA.
//
// A behavioural SB (one-clock read latency) and an SBI buffer are modelled
// in the testbench. The test first moves a 1460-byte segment between aligned
// addresses and checks the document's cost: 183 reads and 183 writes, two
// clocks per 64-bit word (busy for 2*183 + 2 clocks). It then runs random
// transfers with any source and destination byte offset and length, checks
// every destination byte against the source, checks that bytes outside the
// destination range are untouched, that no write happens while the SBI has no
// free buffer, and that end-of-packet transfers commit length dst + len.
`timescale 1ns/1ps
module tb_dma;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        wr_src = 0, wr_dst = 0, wr_ctrl = 0;
  logic [31:0] wdata = 0;
  logic        busy;
  logic [31:0] xfer_count;
  logic        sb_rd;
  logic [12:0] sb_addr;
  logic [63:0] sb_rdata;
  logic        sbi_free = 1, sbi_we, sbi_commit;
  logic [7:0]  sbi_addr;
  logic [7:0]  sbi_be;
  logic [63:0] sbi_wdata;
  logic [15:0] sbi_len;

  dma #(.SB_AW(13), .SBI_AW(8), .LEN_W(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  byte unsigned sb [65536];
  byte unsigned sbi_m [2048];
  int n_rd = 0, n_wr = 0, n_commit = 0, last_commit_len = 0, bad_wr = 0;

  always @(posedge clk) begin
    if (sb_rd) begin
      for (int i = 0; i < 8; i++) sb_rdata[63-8*i -: 8] <= sb[{sb_addr, 3'(i)}];
      n_rd++;
    end
    if (sbi_we) begin
      if (!sbi_free) bad_wr++;
      for (int i = 0; i < 8; i++) if (sbi_be[i]) sbi_m[{sbi_addr, 3'(i)}] = sbi_wdata[63-8*i -: 8];
      n_wr++;
    end
    if (sbi_commit) begin n_commit++; last_commit_len = sbi_len; end
  end

  task automatic reg_wr(input int which, input int unsigned v);
    @(negedge clk);
    wdata = v; wr_src = (which == 0); wr_dst = (which == 1); wr_ctrl = (which == 2);
    @(negedge clk);
    wr_src = 0; wr_dst = 0; wr_ctrl = 0;
  endtask

  // run one transfer, return the number of clocks busy was high
  task automatic xfer(input int src, input int dst, input int len, input bit eop, output int busy_clks);
    reg_wr(0, src); reg_wr(1, dst);
    @(negedge clk);
    wdata = len | (eop << 16); wr_ctrl = 1;
    @(negedge clk);
    wr_ctrl = 0;
    busy_clks = 0;
    while (busy) begin busy_clks++; @(negedge clk); end
  endtask

  initial begin
    int bc, src, dst, len, c0;
    byte unsigned prior [2048];
    for (int i = 0; i < 65536; i++) sb[i] = 8'($urandom);
    for (int i = 0; i < 2048; i++) sbi_m[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // document case: 1460-byte MSS from an aligned address
    n_rd = 0; n_wr = 0;
    xfer(16'h0100, 0, 1460, 1, bc);
    check(n_rd == 183, $sformatf("1460 B: %0d reads, expected 183", n_rd));
    check(n_wr == 183, $sformatf("1460 B: %0d writes, expected 183", n_wr));
    check(bc == 2*183 + 2, $sformatf("1460 B: busy %0d clocks, expected %0d", bc, 2*183+2));
    check(last_commit_len == 1460, "commit length 1460");
    for (int i = 0; i < 1460; i++) check(sbi_m[i] == sb[16'h0100 + i], "aligned data");

    // random unaligned transfers, some while the SBI has no free buffer
    for (int t = 0; t < 200; t++) begin
      bit eop;
      src = $urandom % 60000; dst = $urandom % 64; len = 1 + $urandom % 1400;
      eop = $urandom % 2;
      for (int i = 0; i < 2048; i++) prior[i] = 8'($urandom);
      sbi_m = prior;
      c0 = n_commit;
      if (t % 10 == 3) begin
        sbi_free = 0;
        fork begin repeat (20) @(negedge clk); sbi_free = 1; end join_none
      end
      xfer(src, dst, len, eop, bc);
      for (int i = 0; i < 1536; i++) begin
        if (i >= dst && i < dst + len) begin
          if (sbi_m[i] != sb[src + i - dst])
            check(0, $sformatf("t%0d src=%0d dst=%0d len=%0d byte %0d", t, src, dst, len, i));
        end else if (sbi_m[i] != prior[i])
          check(0, $sformatf("t%0d byte %0d outside the range written", t, i));
      end
      check(1, "transfer data");
      check((n_commit - c0) == int'(eop), "commit only with end of packet");
      if (eop) check(last_commit_len == dst + len, "commit length dst+len");
      if ((src - dst) % 8 == 0)
        check(bc == 2 * ((dst + len - 1) / 8 - dst / 8 + 1) + 2 || t % 10 == 3, "aligned-stream timing");
    end
    check(bad_wr == 0, "no SBI write without a free buffer");
    check(xfer_count == 201, "transfer counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
