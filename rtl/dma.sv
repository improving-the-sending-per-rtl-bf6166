// dma: single-channel DMA that moves header and payload bytes from the
// Sending Buffer (SB) to the Sending Buffer Interface (SBI).
//
// As in the document, each 64-bit word costs two cycles: in the first the
// DMA reads the source word into its data register, in the second it writes
// the word into the destination buffer, while its state machine drives the
// read and write strobes and steps the address counters. A transfer of a
// 1460-byte segment from an aligned address takes 183 reads and 183 writes.
// The SEP programs the channel through three registers and then releases the
// local bus to it; `busy` holds the bus until the transfer ends.
//
// This design's own additions: source and destination may be at any byte
// position. When they are not at the same byte offset within a word, one extra
// read primes a second data register, and each written word is taken from the
// two registered source words through a byte funnel. Byte enables trim the
// first and last destination words. A transfer started with the end-of-packet
// bit commits the SBI buffer once its last word is written, with the packet
// length dst + len. Before the first write the DMA waits for the SBI to have a
// free buffer.
//
// Register writes: reg_src (SB byte address), reg_dst (byte offset in the SBI
// buffer), reg_ctrl (length in bytes and end-of-packet bit; starts the channel).
// Timing: start, one cycle to check the SBI, optional prime read, 2 cycles per
// destination word, one cycle to finish: busy for 2*N + 2 (+1) cycles.
module dma #(
  parameter int unsigned SB_AW  = 13,   // SB word address width (64 KiB)
  parameter int unsigned SBI_AW = 8,    // SBI word address width
  parameter int unsigned LEN_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // register writes from the SEP
  input  logic              wr_src,
  input  logic              wr_dst,
  input  logic              wr_ctrl,
  input  logic [31:0]       wdata,
  output logic              busy,
  output logic [31:0]       xfer_count,   // completed transfers
  // SB read port (data arrives one cycle after rd)
  output logic              sb_rd,
  output logic [SB_AW-1:0]  sb_addr,
  input  logic [63:0]       sb_rdata,
  // SBI write port
  input  logic              sbi_free,
  output logic              sbi_we,
  output logic [SBI_AW-1:0] sbi_addr,
  output logic [7:0]        sbi_be,
  output logic [63:0]       sbi_wdata,
  output logic              sbi_commit,
  output logic [LEN_W-1:0]  sbi_len
);
  typedef enum logic [2:0] {S_IDLE, S_WAITBUF, S_PRIME, S_RD, S_WR, S_DONE} state_e;
  state_e state;

  logic [SB_AW+2:0]  src;        // byte address
  logic [LEN_W-1:0]  dst;        // byte offset
  logic [LEN_W-1:0]  len;
  logic              eop;
  logic [SB_AW-1:0]  srcw;       // source word counter
  logic [LEN_W-4:0]  dw, dw_last; // destination word counter and last word
  logic [2:0]        shift;      // byte offset of the source stream
  logic [2:0]        first_off, last_off;
  logic              prime_cap;
  logic [63:0]       prev;       // first data register (primed word)

  // byte funnel: destination word = 8 bytes of {prev, cur} starting at byte `shift`
  logic [127:0] pair;
  logic [63:0]  funnel;
  assign pair   = {prev, sb_rdata} << (8 * shift);
  assign funnel = (shift == 3'd0) ? sb_rdata : pair[127:64];

  always_comb begin
    sbi_be = 8'hFF;
    for (int i = 0; i < 8; i++) begin
      if (dw == (LEN_W-3)'(dst >> 3) && 3'(i) < first_off) sbi_be[i] = 1'b0;
      if (dw == dw_last && 3'(i) > last_off)                 sbi_be[i] = 1'b0;
    end
  end

  assign busy      = (state != S_IDLE);
  assign sb_rd     = (state == S_PRIME) || (state == S_RD);
  assign sb_addr   = srcw;
  assign sbi_we    = (state == S_WR);
  assign sbi_addr  = SBI_AW'(dw);
  assign sbi_wdata = funnel;
  assign sbi_commit = (state == S_DONE) && eop;
  assign sbi_len    = dst + len;

  // start-of-transfer arithmetic: the source stream begins dst[2:0] bytes
  // before src so that it lines up with the first destination word
  logic [SB_AW+2:0] base;
  logic [LEN_W-1:0] lastb;
  assign base  = src - (SB_AW+3)'(dst[2:0]);
  assign lastb = dst + LEN_W'(wdata) - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      src <= '0; dst <= '0; len <= '0; eop <= 1'b0;
      srcw <= '0; dw <= '0; dw_last <= '0; shift <= '0;
      first_off <= '0; last_off <= '0; prime_cap <= 1'b0;
      prev <= '0; xfer_count <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (wr_src) src <= (SB_AW+3)'(wdata);
          if (wr_dst) dst <= LEN_W'(wdata);
          if (wr_ctrl) begin
            len       <= LEN_W'(wdata);
            eop       <= wdata[16];
            srcw      <= base[SB_AW+2:3];
            shift     <= base[2:0];
            first_off <= dst[2:0];
            last_off  <= lastb[2:0];
            dw        <= dst[LEN_W-1:3];
            dw_last   <= lastb[LEN_W-1:3];
            state     <= (LEN_W'(wdata) == '0) ? S_DONE : S_WAITBUF;
          end
        end
        S_WAITBUF: if (sbi_free) state <= (shift != 3'd0) ? S_PRIME : S_RD;
        S_PRIME: begin
          srcw      <= srcw + 1'b1;
          prime_cap <= 1'b1;
          state     <= S_RD;
        end
        S_RD: begin
          if (prime_cap) prev <= sb_rdata;
          prime_cap <= 1'b0;
          srcw      <= srcw + 1'b1;
          state     <= S_WR;
        end
        S_WR: begin
          prev <= sb_rdata;
          if (dw == dw_last) state <= S_DONE;
          else begin
            dw    <= dw + 1'b1;
            state <= S_RD;
          end
        end
        S_DONE: begin
          xfer_count <= xfer_count + 1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !(wr_src || wr_dst || wr_ctrl));
  a_wait_for_buffer: assert property (@(posedge clk) disable iff (!rst_n)
    sbi_we |-> sbi_free);
endmodule
