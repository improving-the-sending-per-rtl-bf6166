// tb_sbi: self-checking test of the Sending Buffer Interface.
//
// A producer writes packets of random length (1..1500 bytes, including 0-byte
// and 1500-byte ones) into the buffer offered by the SBI and commits them; a
// consumer with random back-pressure takes them off the MAC side. The test
// checks every word, byte-keep mask and last flag against the packets sent, the
// packet order, that fill_free drops when both buffers hold packets, that the
// two buffers are used alternately, and the packet counter.
`timescale 1ns/1ps
module tb_sbi;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        we = 0, commit = 0, fill_free;
  logic [7:0]  waddr = 0, wbe = 0;
  logic [63:0] wdata = 0;
  logic [10:0] commit_len = 0;
  logic        m_valid, m_ready = 0, m_last;
  logic [63:0] m_data;
  logic [7:0]  m_keep;
  logic [31:0] pkt_count;

  sbi #(.PKT_BYTES(1500)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  localparam int NPKT = 60;
  int          lens [NPKT];
  function automatic logic [7:0] pbyte(input int p, input int i);
    return 8'(p * 31 + i * 3 + (i >> 7));
  endfunction

  int rx_p = 0, rx_i = 0, n_notfree = 0, n_sel_toggle = 0;
  always @(negedge clk) m_ready <= ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n) begin
    if (!fill_free) n_notfree++;
    if (m_valid && m_ready) begin
      for (int i = 0; i < 8; i++) begin
        bit k;
        k = (rx_i + i) < lens[rx_p];
        check(m_keep[i] == k, $sformatf("pkt %0d keep byte %0d", rx_p, rx_i + i));
        if (k) check(m_data[63-8*i -: 8] == pbyte(rx_p, rx_i + i), $sformatf("pkt %0d byte %0d", rx_p, rx_i + i));
      end
      rx_i += 8;
      check(m_last == (rx_i >= lens[rx_p]), $sformatf("pkt %0d last flag", rx_p));
      if (m_last) begin rx_p++; rx_i = 0; end
    end
  end
  logic prev_sel = 0;
  always @(posedge clk) begin
    if (dut.fill_sel != prev_sel) n_sel_toggle++;
    prev_sel <= dut.fill_sel;
  end

  initial begin
    for (int p = 0; p < NPKT; p++) lens[p] = (p == 3) ? 0 : (p == 4) ? 1500 : 1 + $urandom % 1500;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPKT; p++) begin
      while (!fill_free) @(negedge clk);
      for (int w = 0; w < (lens[p] + 7) / 8; w++) begin
        we = 1; waddr = 8'(w); wbe = 8'hFF;
        for (int i = 0; i < 8; i++) wdata[63-8*i -: 8] = pbyte(p, w*8 + i);
        @(negedge clk);
      end
      we = 0;
      commit = 1; commit_len = 11'(lens[p]);
      @(negedge clk);
      commit = 0;
    end
    while (rx_p < NPKT && pkt_count < NPKT + 5) @(negedge clk);
    repeat (5) @(negedge clk);
    check(rx_p == NPKT, "all packets received");
    check(pkt_count == NPKT, "packet counter");
    check(n_notfree > 0, "both buffers were full at times");
    check(n_sel_toggle == NPKT, "fill buffer alternates once per packet");
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
