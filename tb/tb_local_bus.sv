// tb_local_bus: self-checking test of the local bus.
//
// The testbench plays the SEP (holding a request until rdy, then pulsing
// done), the DMA (busy flag and SB reads), the SB (one-clock read latency) and
// the FIFOs. It checks that the DMA owns the SB port while busy and the SEP
// waits (sep_wait), that rdy comes one clock after the grant with valid read
// data, that stores reach the SB with their byte enables only on done, and the
// register decode: FIFO2 pop, FIFO1 push, the three DMA registers and the
// status words, each in the 32-bit half selected by address bit 2, and the
// programmed-I/O window onto the SBI and its commit register.
`timescale 1ns/1ps
module tb_local_bus;
  import lso_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  lb_req_t     req;
  logic        done = 0, rdy, sep_wait;
  logic [63:0] rdata;
  logic        dma_busy = 0, dma_sb_rd = 0;
  logic [12:0] dma_sb_addr = 0;
  logic        sb_en, sb_we;
  logic [7:0]  sb_be;
  logic [12:0] sb_addr;
  logic [63:0] sb_wdata, sb_rdata;
  logic        f2_pop, f2_empty = 0, f1_push, f1_full = 0;
  logic [31:0] f2_rdata = 32'hCAFE_0001, f1_wdata;
  logic        dma_wr_src, dma_wr_dst, dma_wr_ctrl;
  logic [31:0] dma_wdata;
  logic        sbi_free = 1;
  logic        pio_we, pio_commit;
  logic [7:0]  pio_addr, pio_be;
  logic [63:0] pio_wdata;
  logic [15:0] pio_len;

  local_bus #(.SB_AW(13), .SBI_AW(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [63:0] sbm [8192];
  always @(posedge clk) if (sb_en) begin
    sb_rdata <= sbm[sb_addr];
    if (sb_we) for (int i = 0; i < 8; i++) if (sb_be[i]) sbm[sb_addr][63-8*i -: 8] <= sb_wdata[63-8*i -: 8];
  end

  int n_pio_we = 0, n_pio_commit = 0;
  logic [7:0]  last_pio_addr, last_pio_be;
  logic [63:0] last_pio_wdata;
  logic [15:0] last_pio_len;
  always @(posedge clk) begin
    if (pio_we) begin n_pio_we++; last_pio_addr = pio_addr; last_pio_be = pio_be; last_pio_wdata = pio_wdata; end
    if (pio_commit) begin n_pio_commit++; last_pio_len = pio_len; end
  end
  int n_pop = 0, n_push = 0, n_src = 0, n_dst = 0, n_ctrl = 0, n_sb_we = 0;
  logic [31:0] last_push, last_src, last_dst, last_ctrl;
  always @(posedge clk) begin
    if (f2_pop) n_pop++;
    if (f1_push) begin n_push++; last_push = f1_wdata; end
    if (dma_wr_src) begin n_src++; last_src = dma_wdata; end
    if (dma_wr_dst) begin n_dst++; last_dst = dma_wdata; end
    if (dma_wr_ctrl) begin n_ctrl++; last_ctrl = dma_wdata; end
    if (sb_we) n_sb_we++;
  end

  // one SEP access; returns the data and the clocks from request to rdy
  task automatic access(input logic [16:0] a, input bit we, input logic [7:0] be,
                        input logic [63:0] wd, output logic [63:0] rd, output int lat);
    @(negedge clk);
    req.req = 1; req.we = we; req.addr = a; req.be = be; req.wdata = wd;
    #0.2;
    lat = 0;
    while (!rdy) begin
      check(!(sb_we), "no SB write before done");
      @(negedge clk); lat++;
    end
    rd = rdata;
    done = 1;
    @(negedge clk);
    done = 0; req = '0;
  endtask

  initial begin
    logic [63:0] d;
    int lat;
    req = '0;
    for (int i = 0; i < 8192; i++) sbm[i] = {i[31:0], ~i[31:0]};
    repeat (3) @(negedge clk);
    rst_n = 1;

    // SB read, no DMA: rdy one clock after the grant
    access(17'h00108, 0, 8'h0F, '0, d, lat);
    check(d == sbm[33], "SB read data");
    check(lat == 1, $sformatf("read latency %0d", lat));
    // SB store with byte enables
    access(17'h00110, 1, 8'hF0, 64'h1111_2222_3333_4444, d, lat);
    @(negedge clk);
    check(sbm[34] == {32'd34, 32'h3333_4444}, "SB store lanes");
    check(n_sb_we == 1, "one SB write");

    // DMA busy: the SB port follows the DMA, the SEP waits
    fork
      begin
        dma_busy = 1;
        for (int i = 0; i < 10; i++) begin
          dma_sb_rd = 1; dma_sb_addr = 13'(100 + i);
          @(negedge clk);
          check(sb_en && sb_addr == 13'(100 + i) && !sb_we, "DMA drives the SB port");
          check(sb_rdata == sbm[100 + i], "DMA read data");
          if (i >= 2) check(sep_wait && !rdy, "SEP held off while the DMA is busy");
        end
        dma_sb_rd = 0; dma_busy = 0;
      end
      begin
        @(negedge clk);
        access(17'h00200, 0, 8'hF0, '0, d, lat);
      end
    join
    check(lat >= 9, $sformatf("SEP waited for the DMA (%0d clocks)", lat));
    check(d == sbm[64], "read after the DMA released the bus");

    // registers
    access(A_FIFO_STAT, 0, 8'h0F, '0, d, lat);
    check(d[63:32] == 32'h3, "FIFO status");
    access(A_FIFO2_POP, 0, 8'h0F, '0, d, lat);
    check(d[63:32] == 32'hCAFE_0001 && n_pop == 1, "FIFO2 pop");
    access(A_FIFO1_PUSH, 1, 8'hF0, {32'd0, 32'h0000_0BAD}, d, lat);
    check(n_push == 1 && last_push == 32'h0BAD, "FIFO1 push");
    access(A_DMA_SRC, 1, 8'h0F, {32'h0000_1234, 32'd0}, d, lat);
    access(A_DMA_DST, 1, 8'hF0, {32'd0, 32'h0000_0028}, d, lat);
    access(A_DMA_CTRL, 1, 8'h0F, {32'h0001_05B4, 32'd0}, d, lat);
    check(n_src == 1 && last_src == 32'h1234, "DMA source register");
    check(n_dst == 1 && last_dst == 32'h28, "DMA destination register");
    check(n_ctrl == 1 && last_ctrl == 32'h0001_05B4, "DMA control register");
    sbi_free = 0; f2_empty = 1; f1_full = 1;
    access(A_SBI_STAT, 0, 8'h0F, '0, d, lat);
    check(d[63:32] == 32'h0, "SBI status busy");
    sbi_free = 1;
    access(A_SBI_STAT, 0, 8'h0F, '0, d, lat);
    check(d[63:32] == 32'h1, "SBI status free");
    access(A_FIFO_STAT, 0, 8'h0F, '0, d, lat);
    check(d[63:32] == 32'h0, "FIFO status empty/full");
    // programmed I/O: SBI window write and commit
    access(17'h18000 + 17'h01AC, 1, 8'hF0, {32'd0, 32'hA5A5_5A5A}, d, lat);
    check(n_pio_we == 1 && last_pio_addr == 8'h35 && last_pio_be == 8'hF0 &&
          last_pio_wdata[31:0] == 32'hA5A5_5A5A, "SBI window write");
    access(A_SBI_COMMIT, 1, 8'hF0, {32'd0, 32'd61}, d, lat);
    check(n_pio_commit == 1 && last_pio_len == 16'd61, "SBI commit register");
    check(n_sb_we == 1, "register accesses do not write the SB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
