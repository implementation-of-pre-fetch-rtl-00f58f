// gray_ptr: FIFO pointer counter, used once for writing and once for reading.
// It keeps an ADDR_W+1 bit binary count; the low ADDR_W bits address the RAM
// and the extra bit marks each wrap-around. The same count is held in Gray code
// (g), which is what crosses to the other clock domain, because only one bit
// changes per increment. ginc is the Gray value the pointer takes at the next
// edge (g when inc is low), used by the full and empty flag logic so that the
// flags are registered in the same cycle as the pointer moves.
// Interface: inc must already be qualified by the caller (no write when full,
// no read when empty). Asynchronous active-low reset to zero.
// The inc/g/ginc/rst_n interface follows the pointer boxes of the FIFO block
// diagram; keeping a binary address beside the Gray pointer is this design's
// choice (low Gray bits alone do not visit the RAM words in a valid order).
module gray_ptr #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inc,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W:0] g,
  output logic [ADDR_W:0] ginc
);
  logic [ADDR_W:0] bin, bin_next;

  assign bin_next = bin + {{ADDR_W{1'b0}}, inc};
  assign ginc     = bin_next ^ (bin_next >> 1);
  assign addr     = bin[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin <= '0;
      g   <= '0;
    end else begin
      bin <= bin_next;
      g   <= ginc;
    end
  end
endmodule
