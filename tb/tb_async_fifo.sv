// tb_async_fifo: self-checking test of the ordinary asynchronous FIFO.
// Write and read clocks run at unrelated periods (several ratios in turn).
// A reference queue records every accepted write; each accepted read must
// show the oldest queued word on rdata one rclk edge later (standard read).
// Also checked: the number of stored words never exceeds DEPTH, requests to a
// full or empty FIFO are ignored, flags after reset, and that full and empty
// were both reached. The latency from a write into an empty FIFO to rempty
// falling is checked with equal, aligned clocks: three rclk edges.
module tb_async_fifo;
  localparam int DATA_W = 16, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic winc = 0, rinc = 0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic wfull, rempty;
  int checks = 0, failures = 0;
  int n_full = 0, n_empty_read = 0, n_full_write = 0, n_reads = 0;
  realtime wper = 5, rper = 5;
  logic [DATA_W-1:0] q[$];
  logic [DATA_W-1:0] exp_word;
  logic expect_data = 0;
  int wr_pct = 50, rd_pct = 50;
  bit run = 0;

  async_fifo #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write side driver and model
  always @(posedge wclk) if (run) begin
    if (winc) begin
      if (!wfull) q.push_back(wdata);
      else n_full_write++;
    end
    chk(q.size() <= DEPTH, "more than DEPTH words stored");
    if (wfull) n_full++;
  end
  always @(negedge wclk) if (run) begin
    winc  <= ($urandom_range(0, 99) < wr_pct);
    wdata <= DATA_W'($urandom);
  end

  // read side driver and checker
  always @(posedge rclk) if (run) begin
    if (rinc && !rempty) begin
      exp_word = q.pop_front();
      expect_data = 1;
      n_reads++;
    end else begin
      if (rinc) n_empty_read++;
      expect_data = 0;
    end
  end
  always @(negedge rclk) if (run) begin
    if (expect_data) chk(rdata == exp_word, $sformatf("rdata %h expected %h", rdata, exp_word));
    rinc <= ($urandom_range(0, 99) < rd_pct);
  end

  initial begin
    int lat;
    #12;   // reset held over the first clock edges
    chk(rempty == 1 && wfull == 0, "flags after reset");
    #10 wrst_n = 1; rrst_n = 1;
    // latency with equal aligned clocks: write one word
    @(negedge wclk) begin winc = 1; wdata = 16'h1111; end
    @(posedge wclk); #1 winc = 0;
    lat = 0;
    while (rempty) begin @(posedge rclk); #1 lat++; end
    chk(lat == 3, $sformatf("write to rempty low took %0d rclk edges, expected 3", lat));
    @(negedge rclk) rinc = 1;
    @(posedge rclk); #1 rinc = 0;
    chk(rdata == 16'h1111, "first word after one read edge");
    chk(rempty == 1, "empty again after last read");
    // random traffic at several clock ratios and loads
    run = 1;
    for (int phase = 0; phase < 6; phase++) begin
      case (phase)
        0: begin wper = 5;   rper = 7.3; wr_pct = 70; rd_pct = 30; end
        1: begin wper = 5;   rper = 7.3; wr_pct = 30; rd_pct = 90; end
        2: begin wper = 11;  rper = 3.1; wr_pct = 90; rd_pct = 20; end
        3: begin wper = 11;  rper = 3.1; wr_pct = 40; rd_pct = 80; end
        4: begin wper = 4.2; rper = 4.9; wr_pct = 60; rd_pct = 60; end
        5: begin wper = 6;   rper = 6;   wr_pct = 0;  rd_pct = 100; end
      endcase
      repeat (3000) @(posedge wclk);
    end
    run = 0;
    chk(q.size() == 0, "all written words were read back");
    chk(n_reads > 1000, "enough reads");
    chk(n_full > 0, "full reached");
    chk(n_full_write > 0, "write while full attempted");
    chk(n_empty_read > 0, "read while empty attempted");
    $display("reads=%0d full_cycles=%0d writes_blocked=%0d reads_blocked=%0d",
             n_reads, n_full, n_full_write, n_empty_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
