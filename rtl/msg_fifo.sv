// msg_fifo: memory-based message FIFO between the host CPU and the SEP.
//
// Two instances carry the host traffic: FIFO2 brings the host's messages to
// the SEP (where a message sits in the Sending Buffer, the MTU) and FIFO1
// returns the SEP's sending status to the host. Exchanging these words
// through FIFOs, rather than by interrupts, is the document's scheme.
//
// The document keeps the FIFO pointers in SEP registers; here each FIFO keeps
// its own read and write pointers in hardware, so the SEP reaches a FIFO by
// one load or store. Depth is not given by the document and is a parameter.
//
// Interface: push/pop handshake, one word per clock each way. rdata shows the
// oldest word while not empty (first-word fall-through). A push while full
// and a pop while empty are ignored (and flagged by assertions).
module msg_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic [PW:0]  count
);
  logic [W-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign full  = (count == (PW+1)'(DEPTH));
  assign empty = (count == 0);
  assign rdata = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wp] <= wdata;

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
