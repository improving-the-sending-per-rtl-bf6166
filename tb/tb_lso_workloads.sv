// tb_lso_workloads: the packet-size workloads of the evaluation, run on the
// full interface at its default parameters.
//
// For TCP and for UDP, and for packets of 1500, 1024 and 512 bytes (the MTU
// posted with the message), the host sends one message that the interface
// cuts into twelve packets; the MAC takes words at full speed. Every packet's
// length and its rewritten header fields are checked against an independent
// model. In the steady state (packets 3 to 11) the testbench measures clocks
// per packet, SEP instructions and SEP idle steps per packet, and reports the
// line rate this reaches with the fast clock at 2115 MHz (SEP at 423 MHz).
`timescale 1ns/1ps
module tb_lso_workloads;
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
  logic        m_valid, m_ready, m_last;
  logic [63:0] m_data;
  logic [7:0]  m_keep;
  logic [31:0] sep_instr_count, sep_idle_count, dma_xfer_count, pkt_count;
  logic        sep_bus_wait;

  lso_send_ni dut (.*);

  assign m_ready    = 1'b1;
  assign h_stat_pop = !h_stat_empty;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  byte unsigned sbm [65536];
  int exp_len [$];
  int exp_fld [$];        // expected TCP sequence number or UDP flags/offset
  int got = 0;
  longint t_last [32];
  int unsigned i_at [32], d_at [32];

  // collect the header words of each packet: IP TL (word 0), flags/offset
  // (word 0), TCP sequence number (word 3)
  int rx_w = 0, rx_len = 0, rx_tl = 0, rx_fld = 0;
  bit is_tcp;
  always @(posedge clk) if (rst_n && m_valid) begin
    if (rx_w == 0) begin rx_tl = m_data[47:32]; rx_fld = m_data[15:0]; end
    if (rx_w == 3 && is_tcp) rx_fld = m_data[63:32];
    for (int i = 0; i < 8; i++) if (m_keep[i]) rx_len++;
    rx_w++;
    if (m_last) begin
      int el, ef;
      el = exp_len.size() ? exp_len.pop_front() : -1;
      ef = exp_fld.size() ? exp_fld.pop_front() : -1;
      check(rx_len == el && rx_tl == el, $sformatf("packet %0d length %0d/%0d exp %0d", got, rx_len, rx_tl, el));
      check(rx_fld == ef, $sformatf("packet %0d header field %08x exp %08x", got, rx_fld, ef));
      if (got < 32) begin t_last[got] = cyc; i_at[got] = sep_instr_count; d_at[got] = sep_idle_count; end
      got++;
      rx_w = 0; rx_len = 0;
    end
  end

  task automatic run(input bit tcp, input int pkt);
    int hl, chunk, tl, off, n, shap, len;
    real cpp, ipp, dpp, gbps;
    is_tcp = tcp;
    hl = tcp ? 40 : 20;
    chunk = tcp ? pkt - hl : (pkt - hl) & ~7;
    n = 12;
    tl = hl + n * chunk;
    shap = 'h100;
    for (int i = 0; i < tl; i++) sbm[shap + i] = 8'(i * 13 + pkt);
    sbm[shap] = 8'h45; sbm[shap+1] = 0; sbm[shap+2] = 8'(tl >> 8); sbm[shap+3] = 8'(tl);
    sbm[shap+6] = 0; sbm[shap+7] = 0; sbm[shap+8] = 64; sbm[shap+9] = tcp ? 8'd6 : 8'd17;
    sbm[shap+24] = 8'h00; sbm[shap+25] = 8'h00; sbm[shap+26] = 8'h10; sbm[shap+27] = 8'h00;
    off = 0;
    for (int k = 0; k < n; k++) begin
      len = chunk;
      exp_len.push_back(hl + len);
      exp_fld.push_back(tcp ? 32'h1000 + off : (off >> 3) | ((k < n - 1) ? 16'h2000 : 0));
      off += len;
    end
    for (int w = shap / 8; w <= (shap + tl - 1) / 8; w++) begin
      @(negedge clk);
      h_sb_en = 1; h_sb_we = 1; h_sb_be = 8'hFF; h_sb_addr = 13'(w);
      for (int i = 0; i < 8; i++) h_sb_wdata[63-8*i -: 8] = sbm[w*8+i];
    end
    @(negedge clk); h_sb_en = 0; h_sb_we = 0;
    got = 0;
    @(negedge clk); h_msg_push = 1; h_msg_data = shap;
    @(negedge clk); h_msg_data = pkt;
    @(negedge clk); h_msg_push = 0;
    while (got < n && cyc < 5_000_000) @(posedge clk);
    repeat (10) @(posedge clk);
    check(got == n && exp_len.size() == 0, "all packets of the workload");
    cpp = real'(t_last[11] - t_last[3]) / 8.0;
    ipp = real'(i_at[11] - i_at[3]) / 8.0;
    dpp = real'(d_at[11] - d_at[3]) / 8.0;
    gbps = real'(pkt) * 8.0 * 2.115 / cpp;
    $display("WORKLOAD %s %0d B: %.1f clocks/packet, %.1f SEP instructions/packet, %.1f SEP idle steps/packet, %.1f Gb/s at 2115 MHz",
             tcp ? "TCP" : "UDP", pkt, cpp, ipp, dpp, gbps);
    // the DMA alone needs 2 clocks per 64-bit word of header and payload
    check(cpp >= 2.0 * real'(pkt) / 8.0, "no faster than the DMA bound");
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) sbm[i] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    run(1, 1500); run(1, 1024); run(1, 512);
    run(0, 1500); run(0, 1024); run(0, 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
