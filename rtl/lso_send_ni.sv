// lso_send_ni: sending side of a network interface that performs large-send
// offload (LSO) for TCP/IP and UDP/IP at up to 100 Gb/s.
//
// The host stores a message of up to 64 KiB, its IP header and TCP or UDP
// header first, in the Sending Buffer (SB) and posts two words on FIFO2: the
// message's byte address in the SB and the MTU. The Sending Embedded
// Processor (SEP) runs the LSO program held in its instruction memory. A
// message no longer than the MTU (SSM) goes out as it is. A longer one is cut
// into a beginning (BOM), continuations (COM) and an end (EOM): for each piece
// the SEP rewrites the header template in place in the SB (IP total length,
// and the TCP sequence/acknowledgment fields or the IP fragment offset and
// more-fragments flag), then starts the DMA twice, once for the header and
// once for the payload. Both transfers land in the Sending Buffer
// Interface (SBI), whose two packet buffers alternate between being filled and
// being drained by the MAC. While the DMA moves the payload the SEP computes
// the next piece's fields; it only waits when it next needs the local bus.
// A message of at most 64 bytes is instead copied by the SEP itself into the
// SBI (programmed I/O), as the document suggests for small packets, where
// setting up the DMA costs as much as the copy. When a message is done the SEP
// returns its address on FIFO1.
//
// Clocking follows the document's main configuration: the DMA, buffers and
// bus run on `clk`, and the SEP advances once every CLK_RATIO (5) clocks.
// Sizes follow the document: 64 KiB SB, 64-bit local bus, 1500-byte SBI
// buffers. FIFO depth, instruction memory size, the handshakes and the
// program's details are this design's own.
//
// Ports: host SB port (64-bit words, byte enables, read data one clock after
// h_sb_en), FIFO2 push, FIFO1 pop, and the packet stream to the MAC
// (valid/ready, 64-bit big-endian words, m_keep, m_last). Status counters
// are brought out for monitoring.
module lso_send_ni
  import lso_pkg::*;
#(
  parameter int unsigned CLK_RATIO  = 5,
  parameter int unsigned SB_BYTES   = 65536,
  parameter int unsigned PKT_BYTES  = 1500,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned IM_DEPTH   = 256,
  parameter string       FW_FILE    = "rtl/lso_fw.hex",
  localparam int unsigned SB_AW     = $clog2(SB_BYTES / 8),
  localparam int unsigned SBI_AW    = $clog2((PKT_BYTES + 7) / 8),
  localparam int unsigned SBI_LW    = $clog2(PKT_BYTES + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host: Sending Buffer port
  input  logic             h_sb_en,
  input  logic             h_sb_we,
  input  logic [7:0]       h_sb_be,
  input  logic [SB_AW-1:0] h_sb_addr,
  input  logic [63:0]      h_sb_wdata,
  output logic [63:0]      h_sb_rdata,
  // host: FIFO2 (messages to the SEP)
  input  logic             h_msg_push,
  input  logic [31:0]      h_msg_data,
  output logic             h_msg_full,
  // host: FIFO1 (sending status from the SEP)
  input  logic             h_stat_pop,
  output logic [31:0]      h_stat_data,
  output logic             h_stat_empty,
  // MAC: packets out of the SBI
  output logic             m_valid,
  input  logic             m_ready,
  output logic [63:0]      m_data,
  output logic [7:0]       m_keep,
  output logic             m_last,
  // monitoring
  output logic [31:0]      sep_instr_count,
  output logic [31:0]      sep_idle_count,
  output logic [31:0]      dma_xfer_count,
  output logic [31:0]      pkt_count,
  output logic             sep_bus_wait   // SEP access held off while the DMA owns the bus
);
  localparam int unsigned IM_AW = $clog2(IM_DEPTH);

  logic ce;
  ce_gen #(.RATIO(CLK_RATIO)) u_ce (.clk, .rst_n, .ce);

  // SEP core and its instruction memory
  logic             im_en;
  logic [IM_AW-1:0] im_addr;
  logic [31:0]      im_rdata;
  lb_req_t          lb;
  logic             lb_done, lb_rdy;
  logic [BUS_W-1:0] lb_rdata;

  imem #(.DEPTH(IM_DEPTH), .INIT_FILE(FW_FILE)) u_imem (
    .clk, .en(im_en), .addr(im_addr), .rdata(im_rdata));

  sep_core #(.IM_AW(IM_AW)) u_sep (
    .clk, .rst_n, .ce,
    .im_en, .im_addr, .im_rdata,
    .lb, .lb_done, .lb_rdy, .lb_rdata,
    .instr_count(sep_instr_count), .idle_count(sep_idle_count));

  // Sending Buffer
  logic              sb_en, sb_we;
  logic [7:0]        sb_be;
  logic [SB_AW-1:0]  sb_addr;
  logic [63:0]       sb_wdata, sb_rdata;

  sb_ram #(.BYTES(SB_BYTES)) u_sb (
    .clk,
    .a_en(h_sb_en), .a_we(h_sb_we), .a_be(h_sb_be), .a_addr(h_sb_addr),
    .a_wdata(h_sb_wdata), .a_rdata(h_sb_rdata),
    .b_en(sb_en), .b_we(sb_we), .b_be(sb_be), .b_addr(sb_addr),
    .b_wdata(sb_wdata), .b_rdata(sb_rdata));

  // host FIFOs
  logic        f2_pop, f2_empty, f1_push, f1_full;
  logic [31:0] f2_rdata, f1_wdata;

  msg_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .push(h_msg_push), .wdata(h_msg_data), .full(h_msg_full),
    .pop(f2_pop), .rdata(f2_rdata), .empty(f2_empty), .count());

  msg_fifo #(.W(32), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .push(f1_push), .wdata(f1_wdata), .full(f1_full),
    .pop(h_stat_pop), .rdata(h_stat_data), .empty(h_stat_empty), .count());

  // DMA
  logic              dma_busy, dma_wr_src, dma_wr_dst, dma_wr_ctrl;
  logic [31:0]       dma_wdata;
  logic              dma_sb_rd;
  logic [SB_AW-1:0]  dma_sb_addr;
  logic              sbi_free, sbi_we, sbi_commit;
  logic [SBI_AW-1:0] sbi_addr;
  logic [7:0]        sbi_be;
  logic [63:0]       sbi_wdata;
  logic [15:0]       sbi_len;

  dma #(.SB_AW(SB_AW), .SBI_AW(SBI_AW), .LEN_W(16)) u_dma (
    .clk, .rst_n,
    .wr_src(dma_wr_src), .wr_dst(dma_wr_dst), .wr_ctrl(dma_wr_ctrl), .wdata(dma_wdata),
    .busy(dma_busy), .xfer_count(dma_xfer_count),
    .sb_rd(dma_sb_rd), .sb_addr(dma_sb_addr), .sb_rdata(sb_rdata),
    .sbi_free, .sbi_we, .sbi_addr, .sbi_be, .sbi_wdata, .sbi_commit, .sbi_len);

  // local bus
  // SBI fill port: the DMA, or the SEP's programmed I/O when the DMA is idle
  logic              pio_we, pio_commit;
  logic [SBI_AW-1:0] pio_addr;
  logic [7:0]        pio_be;
  logic [63:0]       pio_wdata;
  logic [15:0]       pio_len;
  logic              fill_we, fill_commit;
  logic [SBI_AW-1:0] fill_addr;
  logic [7:0]        fill_be;
  logic [63:0]       fill_wdata;
  logic [15:0]       fill_len;

  always_comb begin
    if (dma_busy) begin
      fill_we = sbi_we;  fill_addr = sbi_addr;  fill_be = sbi_be;  fill_wdata = sbi_wdata;
      fill_commit = sbi_commit;  fill_len = sbi_len;
    end else begin
      fill_we = pio_we;  fill_addr = pio_addr;  fill_be = pio_be;  fill_wdata = pio_wdata;
      fill_commit = pio_commit;  fill_len = pio_len;
    end
  end

  local_bus #(.SB_AW(SB_AW), .SBI_AW(SBI_AW)) u_bus (
    .clk, .rst_n,
    .req(lb), .done(lb_done), .rdy(lb_rdy), .rdata(lb_rdata), .sep_wait(sep_bus_wait),
    .dma_busy, .dma_sb_rd, .dma_sb_addr,
    .sb_en, .sb_we, .sb_be, .sb_addr, .sb_wdata, .sb_rdata,
    .f2_pop, .f2_rdata, .f2_empty, .f1_push, .f1_wdata, .f1_full,
    .dma_wr_src, .dma_wr_dst, .dma_wr_ctrl, .dma_wdata,
    .sbi_free, .pio_we, .pio_addr, .pio_be, .pio_wdata, .pio_commit, .pio_len);

  // Sending Buffer Interface
  sbi #(.PKT_BYTES(PKT_BYTES)) u_sbi (
    .clk, .rst_n,
    .we(fill_we), .waddr(fill_addr), .wbe(fill_be), .wdata(fill_wdata),
    .commit(fill_commit), .commit_len(SBI_LW'(fill_len)), .fill_free(sbi_free),
    .m_valid, .m_ready, .m_data, .m_keep, .m_last,
    .pkt_count);
endmodule
