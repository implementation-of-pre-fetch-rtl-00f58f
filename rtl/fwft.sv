// fwft: prefetch (first-word-fall-through) stage placed after the ordinary FIFO.
// It has two parts. The enable controller turns the user's read strobe and the
// FIFO's empty flag into the FIFO's own read strobe: it reads the FIFO ahead of
// any request whenever the FIFO has data and there is room downstream, so the
// next word is fetched before it is asked for. The output register holds the
// word presented to the user on fifo_dout; fifo_empty is low while it holds a
// valid word. A user read (rd_n_i low) therefore takes the word already on
// fifo_dout and the register is refilled at that same rclk edge from the word
// the FIFO fetched earlier, so back-to-back reads run at one word per cycle.
//
// Two valid bits track the pipeline: fifo_valid means the FIFO's registered
// output (fifo_dout_i) holds a fetched word not yet moved, out_valid means
// the output register holds a word. At each rising clk edge:
//   load_out = fifo_valid & (~out_valid | rd)      output register loads
//   fifo_rd  = ~fifo_empty_i & (~fifo_valid | load_out)   FIFO is read
// fifo_rd_n_o is combinational from rd_n_i (same cycle). Latency: the first
// word reaches fifo_dout two clk edges after fifo_empty_i goes low.
// Read strobes are active low (rd_n_i, fifo_rd_n_o) and the signal names follow
// the prefetch block diagram; the valid-bit bookkeeping is this design's own.
// A read while fifo_empty is high is ignored. Asynchronous active-low reset.
module fwft #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  // user side
  input  logic              rd_n_i,
  output logic [DATA_W-1:0] fifo_dout,
  output logic              fifo_empty,
  // ordinary FIFO side
  output logic              fifo_rd_n_o,
  input  logic [DATA_W-1:0] fifo_dout_i,
  input  logic              fifo_empty_i
);
  logic rd, fifo_rd, load_out;
  logic fifo_valid, out_valid;

  // enable controller
  assign rd       = !rd_n_i;
  assign load_out = fifo_valid && (!out_valid || rd);
  assign fifo_rd  = !fifo_empty_i && (!fifo_valid || load_out);
  assign fifo_rd_n_o = !fifo_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_valid <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      if (fifo_rd)       fifo_valid <= 1'b1;
      else if (load_out) fifo_valid <= 1'b0;
      if (load_out)      out_valid  <= 1'b1;
      else if (rd)       out_valid  <= 1'b0;
    end
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        fifo_dout <= '0;
    else if (load_out) fifo_dout <= fifo_dout_i;
  end

  assign fifo_empty = !out_valid;
endmodule
