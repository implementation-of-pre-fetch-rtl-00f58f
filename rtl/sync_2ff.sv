// sync_2ff: two-stage flip-flop synchronizer for a Gray-coded pointer.
// d comes from the other clock domain; q is d delayed by two edges of clk.
// Because the pointer is Gray coded, at most one bit is in flight at a time,
// so q is always either the old or the new pointer value. The first stage may
// go metastable; the second stage gives it a full clock period to settle.
// Asynchronous active-low reset to zero, matching the pointers' reset value.
// Two flip-flop stages and Gray-coded pointers follow the design description.
module sync_2ff #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
