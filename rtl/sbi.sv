// sbi: Sending Buffer Interface, the line-interface side of the sending path.
//
// Two buffers, each holding one packet of up to 1500 bytes (the document's
// numbers), are filled alternately by the DMA and drained to the MAC. A small
// sequential machine selects the buffer being filled: only that buffer takes
// writes, it stays selected until the whole packet is in (the DMA's
// end-of-packet commit), and then the machine switches to the other buffer.
// While the MAC drains one buffer the DMA can fill the other, which is the
// overlap between the core engine and the MAC that the document wants.
//
// Fill side: word writes with byte enables into the selected buffer; `commit`
// closes the packet with its length in bytes. `fill_free` is low while the
// selected buffer still holds a packet the MAC has not taken.
// Drain side: a valid/ready stream of 64-bit words, big-endian byte order,
// `m_last` on the final word and `m_keep` giving the valid bytes (from byte 0)
// of every word. The drain side reads its buffer combinationally; the MAC
// handshake and the drain-side read style are this design's choices.
module sbi #(
  parameter int unsigned PKT_BYTES = 1500,
  localparam int unsigned WORDS    = (PKT_BYTES + 7) / 8,
  localparam int unsigned AW       = $clog2(WORDS),
  localparam int unsigned LW       = $clog2(PKT_BYTES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // fill side (from the DMA over the local bus)
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wbe,
  input  logic [63:0]   wdata,
  input  logic          commit,
  input  logic [LW-1:0] commit_len,
  output logic          fill_free,
  // drain side (to the MAC)
  output logic          m_valid,
  input  logic          m_ready,
  output logic [63:0]   m_data,
  output logic [7:0]    m_keep,
  output logic          m_last,
  // status
  output logic [31:0]   pkt_count
);
  logic [63:0]   buf0 [WORDS];
  logic [63:0]   buf1 [WORDS];
  logic          fill_sel, drain_sel;
  logic [1:0]    full;
  logic [LW-1:0] len [2];
  logic [AW-1:0] rptr;

  assign fill_free = !full[fill_sel];

  // fill side
  always_ff @(posedge clk) begin
    if (we && !full[fill_sel])
      for (int i = 0; i < 8; i++)
        if (wbe[i]) begin
          if (fill_sel) buf1[waddr][63-8*i -: 8] <= wdata[63-8*i -: 8];
          else          buf0[waddr][63-8*i -: 8] <= wdata[63-8*i -: 8];
        end
  end

  // drain side
  logic [LW-1:0] dlen;
  logic [LW-1:0] bytes_left;
  assign dlen       = len[drain_sel];
  assign bytes_left = dlen - LW'({rptr, 3'b000});
  assign m_valid    = full[drain_sel];
  assign m_data     = drain_sel ? buf1[rptr] : buf0[rptr];
  assign m_last     = (bytes_left <= LW'(8));
  always_comb begin
    m_keep = 8'hFF;
    if (m_last)
      for (int i = 0; i < 8; i++) m_keep[i] = (LW'(i) < bytes_left);
  end


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_sel  <= 1'b0;
      drain_sel <= 1'b0;
      full      <= '0;
      len[0]    <= '0;
      len[1]    <= '0;
      rptr      <= '0;
      pkt_count <= '0;
    end else begin
      if (commit && !full[fill_sel]) begin
        full[fill_sel] <= 1'b1;
        len[fill_sel]  <= commit_len;
        fill_sel       <= !fill_sel;
      end
      if (m_valid && m_ready) begin
        if (m_last) begin
          full[drain_sel] <= 1'b0;
          drain_sel       <= !drain_sel;
          rptr            <= '0;
          pkt_count       <= pkt_count + 1;
        end else begin
          rptr <= rptr + 1'b1;
        end
      end
    end
  end

  a_commit_free: assert property (@(posedge clk) disable iff (!rst_n) commit |-> !full[fill_sel]);
  a_len_ok:      assert property (@(posedge clk) disable iff (!rst_n) commit |-> (commit_len <= LW'(PKT_BYTES)));
endmodule
