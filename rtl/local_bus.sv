// local_bus: the interface's local bus, shared by the SEP core and the DMA.
//
// The document's sending side has one local bus linking the Sending Buffer,
// the DMA and the SEP, and the SEP must release the bus while the DMA moves
// data; an access the SEP makes meanwhile waits until the DMA lets go. This
// module is that bus: the DMA owns the SB port while `dma_busy`, otherwise the
// SEP is granted. It also decodes the SEP's addresses (bit 16 clear: SB;
// set: the FIFO, DMA and SBI registers of lso_pkg and the SBI write window)
// and returns read data.
//
// SEP handshake: the SEP holds `req` (address, byte enables, write data)
// steady in its execute stage. `rdy` rises one clock after the bus was
// granted, when registered read data is valid; the SEP then completes the
// access by pulsing `done` for one clock, which is also the clock in which a
// store is written and a FIFO word is pushed or popped. The grant rule and
// the address map are this design's choices.
//
// Programmed I/O: stores to the SBI window (A_SBI_WIN + byte offset) go
// straight into the SBI buffer being filled, and a store to A_SBI_COMMIT
// closes that buffer, so the SEP can send a small packet without the DMA.
// The document leaves the choice between the DMA and programmed I/O to the
// size of the data; the window and commit register are this design's.
// pio_be and pio_wdata are the request's own byte enables and data lanes,
// passed through unchanged; only pio_we and pio_commit are decoded.
module local_bus
  import lso_pkg::*;
#(
  parameter int unsigned SB_AW  = 13,
  parameter int unsigned SBI_AW = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // SEP master
  input  lb_req_t           req,
  input  logic              done,
  output logic              rdy,
  output logic [BUS_W-1:0]  rdata,
  output logic              sep_wait,    // SEP access held off by the DMA
  // DMA master (reads the SB)
  input  logic              dma_busy,
  input  logic              dma_sb_rd,
  input  logic [SB_AW-1:0]  dma_sb_addr,
  // SB port B
  output logic              sb_en,
  output logic              sb_we,
  output logic [BUS_BE-1:0] sb_be,
  output logic [SB_AW-1:0]  sb_addr,
  output logic [BUS_W-1:0]  sb_wdata,
  input  logic [BUS_W-1:0]  sb_rdata,
  // FIFO2 (host to SEP) and FIFO1 (SEP to host)
  output logic              f2_pop,
  input  logic [31:0]       f2_rdata,
  input  logic              f2_empty,
  output logic              f1_push,
  output logic [31:0]       f1_wdata,
  input  logic              f1_full,
  // DMA registers
  output logic              dma_wr_src,
  output logic              dma_wr_dst,
  output logic              dma_wr_ctrl,
  output logic [31:0]       dma_wdata,
  // SBI status and programmed-I/O writes
  input  logic              sbi_free,
  output logic              pio_we,
  output logic [SBI_AW-1:0] pio_addr,
  output logic [BUS_BE-1:0] pio_be,
  output logic [BUS_W-1:0]  pio_wdata,
  output logic              pio_commit,
  output logic [15:0]       pio_len
);
  logic gnt, gnt_q, is_io, io_sel_q;
  logic [31:0] io_wdata, io_val;
  logic [BUS_W-1:0] io_q;

  assign gnt      = req.req && !dma_busy;
  assign sep_wait = req.req && dma_busy;
  assign is_io    = req.addr[16];
  assign rdy      = gnt_q;

  // SB port B: DMA while it holds the bus, else the SEP
  always_comb begin
    if (dma_busy) begin
      sb_en    = dma_sb_rd;
      sb_we    = 1'b0;
      sb_be    = '0;
      sb_addr  = dma_sb_addr;
      sb_wdata = '0;
    end else begin
      sb_en    = gnt && !is_io;
      sb_we    = gnt && !is_io && req.we && done;
      sb_be    = req.be;
      sb_addr  = req.addr[SB_AW+2:3];
      sb_wdata = req.wdata;
    end
  end

  // register accesses are 32 bits, in the half of the 64-bit word given by addr[2]
  assign io_wdata = req.addr[2] ? req.wdata[31:0] : req.wdata[63:32];
  wire io_wr = gnt && is_io && req.we && done;
  wire io_rd = gnt && is_io && !req.we && done;

  assign f1_push     = io_wr && (req.addr == A_FIFO1_PUSH);
  assign f1_wdata    = io_wdata;
  assign dma_wr_src  = io_wr && (req.addr == A_DMA_SRC);
  assign dma_wr_dst  = io_wr && (req.addr == A_DMA_DST);
  assign dma_wr_ctrl = io_wr && (req.addr == A_DMA_CTRL);
  assign dma_wdata   = io_wdata;
  assign f2_pop      = io_rd && (req.addr == A_FIFO2_POP);

  // programmed I/O into the SBI
  assign pio_we     = gnt && is_io && req.addr[15] && req.we && done;
  assign pio_addr   = req.addr[SBI_AW+2:3];
  assign pio_be     = req.be;
  assign pio_wdata  = req.wdata;
  assign pio_commit = io_wr && (req.addr == A_SBI_COMMIT);
  assign pio_len    = io_wdata[15:0];

  always_comb begin
    unique case (req.addr)
      A_FIFO2_POP: io_val = f2_rdata;
      A_FIFO_STAT: io_val = {30'd0, !f1_full, !f2_empty};
      A_SBI_STAT:  io_val = {31'd0, sbi_free};
      default:     io_val = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt_q    <= 1'b0;
      io_sel_q <= 1'b0;
      io_q     <= '0;
    end else begin
      gnt_q    <= gnt && !done;
      io_sel_q <= is_io;
      io_q     <= req.addr[2] ? {32'd0, io_val} : {io_val, 32'd0};
    end
  end

  assign rdata = io_sel_q ? io_q : sb_rdata;

  a_done_needs_rdy: assert property (@(posedge clk) disable iff (!rst_n) done |-> (rdy && gnt));
  a_no_pop_empty:   assert property (@(posedge clk) disable iff (!rst_n) f2_pop |-> !f2_empty);
  a_no_push_full:   assert property (@(posedge clk) disable iff (!rst_n) f1_push |-> !f1_full);
endmodule
