// tb_prefetch_fifo: end-to-end test of the prefetch FIFO at its default size
// (16 words of 16 bits; no parameter is overridden).
// Directed part, with write and read clocks equal and aligned:
//   - one word 16'h1111 written, shown on fifo_dout before any read, then read
//   - two words 16'h1111, 16'h2222 written, read on two consecutive edges
//   - three words 16'h1111, 16'h2222, 16'h3333 written, first one shown at
//     once, then read continuously
//   - write latency: a word written into an empty FIFO reaches fifo_dout
//     (fifo_empty low) five rclk edges after its write edge
//   - fill: writes held on for 40 cycles without reading are accepted exactly
//     DEPTH+2 times (RAM plus the two prefetch registers), fifo_full rises and
//     further writes are dropped; the drain then runs at one word per cycle
// Random part: unrelated clock periods, random write and read strobes, a
// reference queue checking order and contents of every word read.
// Each mechanism (prefetch before a read, back-to-back reads, full, dropped
// write, ignored read of an empty FIFO, unequal clocks) is counted, and one
// that never happened is a failure.
module tb_prefetch_fifo;
  localparam int DATA_W = 16, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_n_i = 1, rd_n_i = 1;
  logic [DATA_W-1:0] wr_data_i = '0, fifo_dout;
  logic fifo_full, fifo_empty;
  int checks = 0, failures = 0;
  int n_prefetch = 0, n_b2b = 0, n_full = 0, n_drop = 0, n_empty_rd = 0, n_reads = 0;
  int n_async_reads = 0;
  logic [DATA_W-1:0] q[$];
  realtime wper = 5, rper = 5;
  bit run = 0, async_phase = 0, prev_read = 0;
  int wr_pct = 50, rd_pct = 50;

  prefetch_fifo dut (.*);

  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  // reference model: write side
  always @(posedge wclk) if (wrst_n) begin
    if (!wr_n_i) begin
      if (!fifo_full) q.push_back(wr_data_i);
      else n_drop++;
    end
    if (fifo_full) n_full++;
  end

  // reference model: read side
  always @(posedge rclk) if (rrst_n) begin
    if (!rd_n_i && !fifo_empty) begin
      logic [DATA_W-1:0] e;
      e = q.pop_front();
      chk(fifo_dout == e, $sformatf("fifo_dout %h expected %h", fifo_dout, e));
      n_reads++;
      if (prev_read) n_b2b++;
      if (async_phase) n_async_reads++;
      prev_read = 1;
    end else begin
      if (!rd_n_i) n_empty_rd++;
      if (!fifo_empty) n_prefetch++;   // word waiting on fifo_dout before a read
      prev_read = 0;
    end
  end

  // random stimulus
  always @(negedge wclk) if (run) begin
    wr_n_i    <= !($urandom_range(0, 99) < wr_pct);
    wr_data_i <= DATA_W'($urandom);
  end
  always @(negedge rclk) if (run) rd_n_i <= !($urandom_range(0, 99) < rd_pct);

  task automatic write_words(input logic [DATA_W-1:0] w[]);
    foreach (w[i]) begin
      @(negedge wclk) begin wr_n_i = 0; wr_data_i = w[i]; end
    end
    @(negedge wclk) wr_n_i = 1;
  endtask

  task automatic read_n(input int n);
    @(negedge rclk) rd_n_i = 0;
    repeat (n) @(negedge rclk);
    rd_n_i = 1;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, got;
    #12;   // reset held over the first clock edges
    chk(fifo_empty == 1 && fifo_full == 0, "flags after reset");
    #10 wrst_n = 1; rrst_n = 1;

    // one word: shown before the read, latency five rclk edges
    @(negedge wclk) begin wr_n_i = 0; wr_data_i = 16'h1111; end
    @(posedge wclk); #1 wr_n_i = 1;
    lat = 0;
    while (fifo_empty && lat < 20) begin @(posedge rclk); #1 lat++; end
    chk(lat == 5, $sformatf("write to fifo_dout took %0d rclk edges, expected 5", lat));
    chk(fifo_dout == 16'h1111, "single word on fifo_dout before read");
    read_n(1);
    chk(fifo_empty == 1, "empty after single read");

    // two words, two consecutive reads
    write_words('{16'h1111, 16'h2222});
    repeat (8) @(negedge rclk);
    chk(fifo_dout == 16'h1111 && !fifo_empty, "first of two words waiting");
    read_n(2);
    chk(fifo_empty == 1 && q.size() == 0, "two words read");

    // three words, first falls through, continuous read
    write_words('{16'h1111, 16'h2222, 16'h3333});
    repeat (8) @(negedge rclk);
    chk(fifo_dout == 16'h1111, "first of three words waiting");
    read_n(3);
    chk(fifo_empty == 1 && q.size() == 0, "three words read");

    // fill without reading
    @(negedge wclk) wr_n_i = 0;
    for (int i = 0; i < 40; i++) begin
      wr_data_i = 16'h4000 + 16'(i);
      @(negedge wclk);
    end
    wr_n_i = 1;
    chk(q.size() == DEPTH + 2, $sformatf("%0d words accepted, expected %0d", q.size(), DEPTH + 2));
    chk(fifo_full == 1, "full after filling");
    // drain at full rate
    @(negedge rclk) rd_n_i = 0;
    got = 0;
    for (int i = 0; i < DEPTH + 2; i++) begin
      @(posedge rclk);
      if (!fifo_empty) got++;
      @(negedge rclk);
    end
    rd_n_i = 1;
    chk(got == DEPTH + 2, $sformatf("drain gave %0d words in %0d cycles", got, DEPTH + 2));
    chk(fifo_empty == 1 && q.size() == 0, "empty after drain");
    repeat (4) @(negedge wclk);
    chk(fifo_full == 0, "full cleared after drain");

    // random traffic, unrelated clocks
    run = 1;
    async_phase = 1;
    for (int phase = 0; phase < 5; phase++) begin
      case (phase)
        0: begin wper = 5;   rper = 8.3; wr_pct = 70; rd_pct = 40; end
        1: begin wper = 9.7; rper = 3.3; wr_pct = 60; rd_pct = 70; end
        2: begin wper = 4.1; rper = 4.7; wr_pct = 90; rd_pct = 30; end
        3: begin wper = 6.3; rper = 5.1; wr_pct = 30; rd_pct = 90; end
        4: begin wper = 5;   rper = 5.9; wr_pct = 0;  rd_pct = 100; end
      endcase
      repeat (4000) @(posedge wclk);
    end
    run = 0;
    @(negedge wclk) wr_n_i = 1;
    @(negedge rclk) rd_n_i = 1;
    chk(q.size() == 0, "every word written was read");

    $display("reads=%0d prefetch=%0d back_to_back=%0d full=%0d dropped=%0d empty_reads=%0d async_reads=%0d",
             n_reads, n_prefetch, n_b2b, n_full, n_drop, n_empty_rd, n_async_reads);
    chk(n_prefetch > 0, "prefetch never seen");
    chk(n_b2b > 0, "back-to-back read never seen");
    chk(n_full > 0, "full never seen");
    chk(n_drop > 0, "dropped write never seen");
    chk(n_empty_rd > 0, "read of empty FIFO never seen");
    chk(n_async_reads > 1000, "too few reads with unequal clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
