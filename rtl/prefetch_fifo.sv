// prefetch_fifo: asynchronous FIFO with a prefetch (first-word-fall-through)
// read port; the top of the design.
// An ordinary Gray-pointer asynchronous FIFO (async_fifo, 16 x 16 bits by
// default) is followed in the read clock domain by the fwft stage, which reads
// the FIFO ahead of the user and keeps the oldest word waiting on fifo_dout.
// The user sees the data before asking for it: with fifo_empty low, fifo_dout
// already is the oldest word, and a read (rd_n_i low at a rising rclk edge)
// consumes it and presents the next word after that edge, one word per cycle.
// Write side: wr_n_i low at a rising wclk edge with fifo_full low stores
// wr_data_i; fifo_full reports that the 16-word RAM is full. Up to two more
// words may sit in the prefetch stage, so the whole path holds DEPTH+2 words.
// Latency: a word written into an empty FIFO appears on fifo_dout after the
// write-pointer synchronizer (2 rclk edges), the empty flag (1 edge) and the
// prefetch stage (2 edges).
// The FIFO/FWFT split and the port names follow the prefetch block diagram;
// the separate clocks and resets per side follow the FIFO block diagram.
module prefetch_fifo #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_pkg::DEPTH_DEF
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              wr_n_i,
  input  logic [DATA_W-1:0] wr_data_i,
  output logic              fifo_full,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rd_n_i,
  output logic [DATA_W-1:0] fifo_dout,
  output logic              fifo_empty
);
  logic              fifo_rd_n_o;
  logic [DATA_W-1:0] fifo_dout_i;
  logic              fifo_empty_i;

  async_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .wclk  (wclk),  .wrst_n(wrst_n), .winc(!wr_n_i), .wdata(wr_data_i), .wfull(fifo_full),
    .rclk  (rclk),  .rrst_n(rrst_n), .rinc(!fifo_rd_n_o), .rdata(fifo_dout_i),
    .rempty(fifo_empty_i)
  );

  fwft #(.DATA_W(DATA_W)) u_fwft (
    .clk(rclk), .rst_n(rrst_n),
    .rd_n_i(rd_n_i), .fifo_dout(fifo_dout), .fifo_empty(fifo_empty),
    .fifo_rd_n_o(fifo_rd_n_o), .fifo_dout_i(fifo_dout_i), .fifo_empty_i(fifo_empty_i)
  );
endmodule
