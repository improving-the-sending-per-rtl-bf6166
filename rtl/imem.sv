// imem: the SEP's instruction local memory.
//
// The document's three-stage SEP fetches each instruction from a local
// memory, apart from the local bus, so fetching never waits for the DMA. This
// is a read-only memory loaded at start-up with the LSO program. The default
// file holds the 73-instruction segmentation/fragmentation program, one
// hex-encoded instruction per line in the lso_pkg format; its assembly listing
// is given in the README. The memory's size is this design's choice.
//
// Interface: synchronous read, data one clock after en is high; while en is
// low the output holds, which lets the SEP stall without refetching.
module imem #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/lso_fw.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  output logic [31:0]   rdata
);
  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk)
    if (en) rdata <= rom[addr];
endmodule
