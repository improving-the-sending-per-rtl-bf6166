// tb_lso_send_ni: end-to-end test of the sending-side network interface at its
// default parameters (64 KiB SB, 1500-byte SBI buffers, SEP at 1/5 of the
// DMA clock).
//
// The host side of the testbench writes messages (header template + data)
// into the Sending Buffer, posts their address and the MTU on FIFO2 and
// collects the SEP's reports from FIFO1. The MAC side takes packets from the
// SBI, at first with random back-pressure. An independent reference model
// computes every packet the interface must emit: single messages (SSM) go out
// unchanged; TCP messages become segments of MTU-40 data bytes with the IP
// total length, sequence number (initial + offset) and acknowledgment field
// (sequence + segment length) rewritten; UDP messages become IP fragments of
// MTU-20 bytes with the fragment offset and more-fragments flag set. Every
// received byte is compared with the model.
//
// The test also counts that each mechanism happened: SSM, BOM, COM, EOM for
// TCP and UDP, an empty signalling packet, the SEP waiting for the DMA to
// release the bus, the SEP executing while the DMA transfers, the DMA waiting
// for a free SBI buffer, the DMA's unaligned (funnel) path, the SEP's
// write-back bypass, the SBI's two buffers both full, and small messages
// (64 bytes or less) sent by programmed I/O instead of the DMA.
`timescale 1ns/1ps
module tb_lso_send_ni;
  localparam int MTU = 1500;

  logic clk = 0, rst_n = 0;
  always #0.25 clk = ~clk;

  logic        h_sb_en = 0, h_sb_we = 0;
  logic [7:0]  h_sb_be = 0;
  logic [12:0] h_sb_addr = 0;
  logic [63:0] h_sb_wdata = 0, h_sb_rdata;
  logic        h_msg_push = 0, h_msg_full;
  logic [31:0] h_msg_data = 0;
  logic        h_stat_pop, h_stat_empty;
  logic [31:0] h_stat_data;
  logic        m_valid, m_ready = 0, m_last;
  logic [63:0] m_data;
  logic [7:0]  m_keep;
  logic [31:0] sep_instr_count, sep_idle_count, dma_xfer_count, pkt_count;
  logic        sep_bus_wait;

  lso_send_ni dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- host memory image and reference model ----------------
  byte unsigned sbm [65536];
  byte unsigned exp_b [$];
  int           exp_len [$];
  int n_ssm = 0, n_bom = 0, n_com = 0, n_eom = 0, n_udp_frag = 0, n_empty = 0;

  task automatic put16(input int a, input int v);
    sbm[a] = 8'(v >> 8); sbm[a+1] = 8'(v);
  endtask
  task automatic put32(input int a, input int unsigned v);
    for (int i = 0; i < 4; i++) sbm[a+i] = 8'(v >> (24 - 8*i));
  endtask

  // build a message in sbm: IP header, TCP (proto 6) or UDP (17) header, data
  task automatic build_msg(input int shap, input int proto, input int tl,
                           input int unsigned seq0, input int seed);
    put16(shap + 0, 16'h4500); put16(shap + 2, tl);
    put16(shap + 4, 16'h1234); put16(shap + 6, 0);
    sbm[shap+8] = 8'd64; sbm[shap+9] = 8'(proto);
    put16(shap + 10, 0); put32(shap + 12, 32'h0a000001); put32(shap + 16, 32'h0a000002);
    if (proto == 6) begin
      put16(shap + 20, 1000); put16(shap + 22, 2000);
      put32(shap + 24, seq0); put32(shap + 28, 0);
      for (int i = 32; i < 40; i++) sbm[shap+i] = 8'(i);
      for (int i = 40; i < tl; i++) sbm[shap+i] = 8'((i * 7 + seed + (i >> 8)) ^ (i >> 3));
    end else begin
      put16(shap + 20, 3000); put16(shap + 22, 4000);
      put16(shap + 24, tl - 20); put16(shap + 26, 0);
      for (int i = 28; i < tl; i++) sbm[shap+i] = 8'((i * 5 + seed) ^ (i >> 4));
    end
  endtask

  task automatic expect_msg(input int shap, input int proto, input int tl, input int unsigned seq0);
    int hl, chunk, left, off, len;
    byte unsigned hdr [40];
    if (tl <= MTU) begin
      for (int i = 0; i < tl; i++) exp_b.push_back(sbm[shap+i]);
      exp_len.push_back(tl);
      n_ssm++;
      if (tl == 40) n_empty++;
      return;
    end
    hl = (proto == 6) ? 40 : 20;
    chunk = (proto == 6) ? MTU - hl : (MTU - hl) & ~7; left = tl - hl; off = 0;
    for (int i = 0; i < hl; i++) hdr[i] = sbm[shap+i];
    while (left > 0) begin
      len = (left > chunk) ? chunk : left;
      hdr[2] = 8'((hl + len) >> 8); hdr[3] = 8'(hl + len);
      if (proto == 6) begin
        int unsigned s, a;
        s = seq0 + off; a = s + len;
        for (int i = 0; i < 4; i++) begin
          hdr[24+i] = 8'(s >> (24 - 8*i)); hdr[28+i] = 8'(a >> (24 - 8*i));
        end
      end else begin
        int fo;
        fo = (off >> 3) | ((left > chunk) ? 16'h2000 : 0);
        hdr[6] = 8'(fo >> 8); hdr[7] = 8'(fo);
        n_udp_frag++;
      end
      for (int i = 0; i < hl; i++) exp_b.push_back(hdr[i]);
      for (int i = 0; i < len; i++) exp_b.push_back(sbm[shap + hl + off + i]);
      exp_len.push_back(hl + len);
      if (off == 0) n_bom++; else if (left > chunk) n_com++; else n_eom++;
      off += len; left -= len;
    end
  endtask

  task automatic host_write_range(input int a0, input int a1);
    for (int w = a0 / 8; w <= (a1 - 1) / 8; w++) begin
      @(negedge clk);
      h_sb_en = 1; h_sb_we = 1; h_sb_be = 8'hFF; h_sb_addr = 13'(w);
      for (int i = 0; i < 8; i++) h_sb_wdata[63-8*i -: 8] = sbm[w*8+i];
    end
    @(negedge clk);
    h_sb_en = 0; h_sb_we = 0;
  endtask

  task automatic post(input int shap);
    @(negedge clk); h_msg_push = 1; h_msg_data = shap;
    @(negedge clk); h_msg_data = MTU;
    @(negedge clk); h_msg_push = 0;
  endtask

  int reports [$];
  always @(posedge clk) begin
    if (rst_n && h_stat_pop && !h_stat_empty) reports.push_back(h_stat_data);
  end
  assign h_stat_pop = !h_stat_empty;

  // ---------------- MAC side ----------------
  bit    mac_throttle = 1;
  int    got_pkts = 0;
  int    rx_len = 0;
  always @(negedge clk) m_ready <= mac_throttle ? (($urandom % 8) == 0) : 1'b1;
  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    for (int i = 0; i < 8; i++) if (m_keep[i]) begin
      if (exp_b.size() == 0) check(0, "unexpected byte");
      else begin
        byte unsigned e;
        e = exp_b.pop_front();
        if (m_data[63-8*i -: 8] != e) begin
          check(0, $sformatf("pkt %0d byte %0d: got %02x exp %02x", got_pkts, rx_len, m_data[63-8*i -: 8], e));
        end
      end
      rx_len++;
    end
    if (m_last) begin
      int el;
      el = (exp_len.size() > 0) ? exp_len.pop_front() : -1;
      check(rx_len == el, $sformatf("pkt %0d length %0d exp %0d", got_pkts, rx_len, el));
      check(1, "packet");
      got_pkts++;
      rx_len = 0;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_pio = 0, n_sep_wait = 0, n_overlap = 0, n_dma_waitbuf = 0, n_prime = 0, n_bypass = 0, n_both_full = 0;
  always @(posedge clk) if (rst_n) begin
    if (sep_bus_wait) n_sep_wait++;
    if (dut.pio_commit) n_pio++;
    if (dut.u_dma.busy && dut.u_sep.adv && dut.u_sep.f_valid) n_overlap++;
    if (dut.u_dma.state == dut.u_dma.S_WAITBUF && !dut.u_dma.sbi_free) n_dma_waitbuf++;
    if (dut.u_dma.state == dut.u_dma.S_PRIME) n_prime++;
    if (dut.u_sep.adv && dut.u_sep.f_valid && dut.u_sep.w_valid &&
        (dut.u_sep.ins.rs1 == dut.u_sep.w_rd || dut.u_sep.ins.rd == dut.u_sep.w_rd)) n_bypass++;
    if (dut.u_sbi.full == 2'b11) n_both_full++;
  end

  task automatic wait_reports(input int n);
    while (reports.size() < n && cyc < 3_000_000) @(posedge clk);
  endtask

  initial begin
    int wait0; int unsigned i0, d0;
    for (int i = 0; i < 65536; i++) sbm[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    // phase 1: several messages queued at once, MAC throttled
    build_msg(16'h0104, 6, 4000, 32'h1000_0000, 1);   expect_msg(16'h0104, 6, 4000, 32'h1000_0000);
    build_msg(16'h2000, 17, 3100, 0, 2);               expect_msg(16'h2000, 17, 3100, 0);
    build_msg(16'h4004, 6, 300, 32'h55, 3);            expect_msg(16'h4004, 6, 300, 32'h55);
    build_msg(16'h5000, 6, 40, 32'h77, 4);             expect_msg(16'h5000, 6, 40, 32'h77);
    build_msg(16'h5800, 17, 61, 0, 8);                expect_msg(16'h5800, 17, 61, 0);
    build_msg(16'h6000, 17, 1500, 0, 5);               expect_msg(16'h6000, 17, 1500, 0);
    build_msg(16'h7000, 6, 1541, 32'hFFFF_FF00, 6);    expect_msg(16'h7000, 6, 1541, 32'hFFFF_FF00);
    host_write_range(16'h0104, 16'h0104 + 4000);
    host_write_range(16'h2000, 16'h2000 + 3100);
    host_write_range(16'h4004, 16'h4004 + 300);
    host_write_range(16'h5000, 16'h5000 + 40);
    host_write_range(16'h5800, 16'h5800 + 61);
    host_write_range(16'h6000, 16'h6000 + 1500);
    host_write_range(16'h7000, 16'h7000 + 1541);
    post(16'h0104); post(16'h2000); post(16'h4004); post(16'h5000); post(16'h5800); post(16'h6000); post(16'h7000);
    wait_reports(7);
    check(reports.size() == 7, "seven FIFO1 reports");
    if (reports.size() == 7) begin
      check(reports[0] == 32'h0104 && reports[1] == 32'h2000 && reports[2] == 32'h4004 &&
            reports[3] == 32'h5000 && reports[4] == 32'h5800 && reports[5] == 32'h6000 &&
            reports[6] == 32'h7000, "report order");
    end
    // phase 2: one maximum-size TCP datagram (64 KiB window), MAC at full speed
    while (exp_len.size() != 0 && cyc < 3_000_000) @(posedge clk);
    mac_throttle = 0;
    build_msg(0, 6, 65000, 32'hABCD_0000, 7); expect_msg(0, 6, 65000, 32'hABCD_0000);
    host_write_range(0, 65000);
    wait0 = cyc; i0 = sep_instr_count; d0 = sep_idle_count;
    post(0);
    wait_reports(8);
    check(reports.size() == 8 && reports[7] == 0, "report for 64 KiB datagram");
    while (exp_len.size() != 0 && cyc < 3_000_000) @(posedge clk);
    repeat (20) @(posedge clk);
    check(exp_b.size() == 0 && exp_len.size() == 0, "all expected packets received");
    check(got_pkts == int'(pkt_count), "SBI packet counter");
    $display("64 KiB TCP datagram: %0d clocks", cyc - wait0);
    $display("SEP instructions %0d, idle steps %0d (64 KiB datagram: %0d instructions, %0d idle steps)", sep_instr_count, sep_idle_count, sep_instr_count - i0, sep_idle_count - d0);
    $display("programmed-I/O packets: %0d", n_pio);
    $display("mechanisms: ssm=%0d bom=%0d com=%0d eom=%0d udp_frag=%0d empty=%0d sep_wait=%0d overlap=%0d dma_waitbuf=%0d prime=%0d bypass=%0d both_full=%0d",
             n_ssm, n_bom, n_com, n_eom, n_udp_frag, n_empty, n_sep_wait, n_overlap, n_dma_waitbuf, n_prime, n_bypass, n_both_full);
    check(n_pio >= 2, "small packets sent by programmed I/O");
    check(n_ssm > 0, "SSM happened");   check(n_bom > 0, "BOM happened");
    check(n_com > 0, "COM happened");   check(n_eom > 0, "EOM happened");
    check(n_udp_frag > 0, "UDP fragmentation happened");
    check(n_empty > 0, "empty signalling packet happened");
    check(n_sep_wait > 0, "SEP waited for the DMA");
    check(n_overlap > 0, "SEP ran during a DMA transfer");
    check(n_dma_waitbuf > 0, "DMA waited for an SBI buffer");
    check(n_prime > 0, "DMA unaligned path used");
    check(n_bypass > 0, "SEP bypass used");
    check(n_both_full > 0, "both SBI buffers full");
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
