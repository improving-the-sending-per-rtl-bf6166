// sb_ram: the Sending Buffer (SB), a dual-port memory shared by the host and
// the network interface's local bus.
//
// The host stores each outgoing message here (its IP/TCP or IP/UDP header
// template followed by the application data). On the other port the SEP
// rewrites header fields in place and the DMA reads headers and payload out to
// the Sending Buffer Interface. The document makes the SB dual-ported so both
// sides work at once and sizes messages at up to 64 KiB; both are followed.
//
// Interface: two identical synchronous ports, 64-bit words with byte enables.
// A read returns data one clock after en is high. If both ports write the
// same word in one clock, port B (the local bus) is applied last and wins;
// that ordering is this design's choice.
module sb_ram #(
  parameter int unsigned BYTES = 65536,
  parameter int unsigned W     = 64,
  localparam int unsigned NBE  = W / 8,
  localparam int unsigned AW   = $clog2(BYTES / NBE)
) (
  input  logic           clk,
  // port A: host
  input  logic           a_en,
  input  logic           a_we,
  input  logic [NBE-1:0] a_be,
  input  logic [AW-1:0]  a_addr,
  input  logic [W-1:0]   a_wdata,
  output logic [W-1:0]   a_rdata,
  // port B: local bus
  input  logic           b_en,
  input  logic           b_we,
  input  logic [NBE-1:0] b_be,
  input  logic [AW-1:0]  b_addr,
  input  logic [W-1:0]   b_wdata,
  output logic [W-1:0]   b_rdata
);
  logic [W-1:0] mem [BYTES/NBE];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we)
        for (int i = 0; i < NBE; i++)
          if (a_be[i]) mem[a_addr][W-1-8*i -: 8] <= a_wdata[W-1-8*i -: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we)
        for (int i = 0; i < NBE; i++)
          if (b_be[i]) mem[b_addr][W-1-8*i -: 8] <= b_wdata[W-1-8*i -: 8];
    end
  end
endmodule
