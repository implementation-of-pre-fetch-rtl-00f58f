// full_flag: full flag logic of the write side.
// The FIFO is full when the next write pointer equals the synchronized read
// pointer with its two top Gray bits inverted: the writer is then exactly one
// lap (DEPTH words) ahead of the reader. The flag is registered on wclk, so it
// rises on the same edge as the write that fills the last word. It falls
// two or three wclk edges after a read, once the read pointer has crossed the
// synchronizer: a pessimistic flag that never lets a write overrun.
// Reset clears the flag. The comparison itself is the usual Gray-pointer
// method; the document names the block and its inputs, not its equation.
module full_flag #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic            wclk,
  input  logic            wrst_n,
  input  logic [ADDR_W:0] wgraynext,
  input  logic [ADDR_W:0] wq2_rptr,
  output logic            wfull
);
  logic full_val;

  if (ADDR_W >= 2) begin : g_wide
    assign full_val = (wgraynext == {~wq2_rptr[ADDR_W:ADDR_W-1], wq2_rptr[ADDR_W-2:0]});
  end else begin : g_narrow
    assign full_val = (wgraynext == ~wq2_rptr);
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) wfull <= 1'b0;
    else         wfull <= full_val;
  end
endmodule
