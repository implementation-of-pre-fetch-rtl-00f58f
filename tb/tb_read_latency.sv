// tb_read_latency: the ordinary FIFO and the prefetch FIFO side by side, one
// shared clock, the same writes and the same read requests.
// Workloads: the ordinary FIFO gets the sequence 0001, 0002, 0003, 0000; the
// prefetch FIFO gets one word (1111), then two (1111, 2222), then three
// (1111, 2222, 3333) and each batch is read back after it has been written.
// Measured for every read: with the ordinary FIFO the word appears on its
// output one clock edge after the edge that samples the request; with the
// prefetch FIFO the word is already on fifo_dout at that edge (zero wait).
// Both are checked for every word, and the order and values against the
// written sequence.
module tb_read_latency;
  localparam int DATA_W = 16;
  logic clk = 0, rst_n = 0;
  // ordinary FIFO
  logic o_winc = 0, o_rinc = 0, o_full, o_empty;
  logic [DATA_W-1:0] o_wdata = '0, o_rdata;
  // prefetch FIFO
  logic p_wr_n = 1, p_rd_n = 1, p_full, p_empty;
  logic [DATA_W-1:0] p_wdata = '0, p_dout;
  int checks = 0, failures = 0, n_ord = 0, n_pre = 0;

  async_fifo u_ord (
    .wclk(clk), .wrst_n(rst_n), .winc(o_winc), .wdata(o_wdata), .wfull(o_full),
    .rclk(clk), .rrst_n(rst_n), .rinc(o_rinc), .rdata(o_rdata), .rempty(o_empty)
  );
  prefetch_fifo u_pre (
    .wclk(clk), .wrst_n(rst_n), .wr_n_i(p_wr_n), .wr_data_i(p_wdata), .fifo_full(p_full),
    .rclk(clk), .rrst_n(rst_n), .rd_n_i(p_rd_n), .fifo_dout(p_dout), .fifo_empty(p_empty)
  );

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ordinary FIFO: request at edge k, data valid after edge k (seen at k+1)
  task automatic ord_batch(input logic [DATA_W-1:0] w[]);
    foreach (w[i]) begin
      @(negedge clk) begin o_winc = 1; o_wdata = w[i]; end
    end
    @(negedge clk) o_winc = 0;
    repeat (6) @(negedge clk);
    foreach (w[i]) begin
      o_rinc = 1;
      @(posedge clk);                  // request sampled here
      chk(o_rdata != w[i] || (i > 0 && w[i] == w[i-1]),
          $sformatf("ordinary FIFO showed %h before the read edge", w[i]));
      #1;
      chk(o_rdata == w[i], $sformatf("ordinary: %h one edge after request, expected %h", o_rdata, w[i]));
      n_ord++;
      @(negedge clk);
    end
    o_rinc = 0;
    chk(o_empty, "ordinary FIFO empty after batch");
  endtask

  // prefetch FIFO: data already valid at the edge that samples the request
  task automatic pre_batch(input logic [DATA_W-1:0] w[]);
    foreach (w[i]) begin
      @(negedge clk) begin p_wr_n = 0; p_wdata = w[i]; end
    end
    @(negedge clk) p_wr_n = 1;
    repeat (8) @(negedge clk);
    foreach (w[i]) begin
      p_rd_n = 0;
      @(posedge clk);                  // request sampled here
      chk(!p_empty && p_dout == w[i],
          $sformatf("prefetch: %h at the request edge, expected %h", p_dout, w[i]));
      n_pre++;
      @(negedge clk);
    end
    p_rd_n = 1;
    chk(p_empty, "prefetch FIFO empty after batch");
  endtask

  initial begin
    #12 rst_n = 1;
    ord_batch('{16'h0001, 16'h0002, 16'h0003, 16'h0000});
    pre_batch('{16'h1111});
    pre_batch('{16'h1111, 16'h2222});
    pre_batch('{16'h1111, 16'h2222, 16'h3333});
    chk(n_ord == 4 && n_pre == 6, "all reads performed");
    $display("ordinary reads=%0d (1-edge wait), prefetch reads=%0d (no wait)", n_ord, n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
