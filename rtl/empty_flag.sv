// empty_flag: empty flag logic of the read side.
// The FIFO is empty when the next read pointer equals the write pointer
// synchronized into the read clock domain. The flag is registered on rclk, so
// it rises on the same edge as the read that takes the last word, and falls
// two or three rclk edges after a write, once the write pointer has crossed the
// synchronizer (pessimistic: data is never read before it is written).
// Reset sets the flag. The comparison is the usual Gray-pointer method; the
// document names the block and its inputs, not its equation.
module empty_flag #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic            rclk,
  input  logic            rrst_n,
  input  logic [ADDR_W:0] rgraynext,
  input  logic [ADDR_W:0] rq2_wptr,
  output logic            rempty
);
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) rempty <= 1'b1;
    else         rempty <= (rgraynext == rq2_wptr);
  end
endmodule
