// ce_gen: clock enable for the SEP core.
//
// The document runs the DMA at five times the SEP's clock (2115 MHz against
// 423 MHz) so the DMA's transfers no longer leave the SEP idle. Here the whole
// interface runs on the fast DMA clock and the SEP advances only on the
// cycles where ce is high, one in RATIO. A single clock with an enable is this
// design's choice; it keeps every transfer between the two synchronous.
module ce_gen #(
  parameter int unsigned RATIO = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic ce
);
  localparam int unsigned CW = (RATIO > 1) ? $clog2(RATIO) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cnt <= '0;
    else if (cnt == CW'(RATIO - 1))  cnt <= '0;
    else                             cnt <= cnt + 1'b1;
  end

  assign ce = (cnt == CW'(RATIO - 1));
endmodule
