// tb_fwft: self-checking test of the prefetch (first-word-fall-through) stage.
// The ordinary FIFO in front of it is modelled here behaviourally: a queue
// with an empty flag and a registered output that loads the oldest word one
// edge after a read strobe. The checker keeps its own list of every word
// handed to the model and requires that each user read, taken at a rising edge
// with rd_n_i and fifo_empty low, finds exactly the next word already on
// fifo_dout. Also checked: the stage never reads an empty FIFO, the first
// word appears two edges after fifo_empty_i falls, continuous reading runs at
// one word per clock, and a read while fifo_empty is high changes nothing.
module tb_fwft;
  localparam int DATA_W = 16;
  logic clk = 0, rst_n = 0;
  logic rd_n_i = 1, fifo_rd_n_o, fifo_empty, fifo_empty_i;
  logic [DATA_W-1:0] fifo_dout, fifo_dout_i;
  logic [DATA_W-1:0] src[$], expq[$];
  int checks = 0, failures = 0, n_reads = 0, n_empty_reads = 0;
  int rd_pct = 50, push_pct = 50;
  bit run = 0;

  fwft #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  // behavioural standard-read FIFO
  assign fifo_empty_i = (src.size() == 0);
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_dout_i <= '0;
    else if (!fifo_rd_n_o) begin
      checks++;
      if (fifo_empty_i) begin failures++; $display("%t: read of an empty FIFO", $time); end
      else fifo_dout_i <= src.pop_front();
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t: %s", $time, what); end
  endtask

  task automatic push(input logic [DATA_W-1:0] v);
    src.push_back(v);
    expq.push_back(v);
  endtask

  // user-side checker
  always @(posedge clk) if (rst_n) begin
    if (!rd_n_i) begin
      if (!fifo_empty) begin
        logic [DATA_W-1:0] e;
        e = expq.pop_front();
        chk(fifo_dout == e, $sformatf("fifo_dout %h expected %h", fifo_dout, e));
        n_reads++;
      end else n_empty_reads++;
    end
  end

  always @(negedge clk) if (run) begin
    rd_n_i <= !($urandom_range(0, 99) < rd_pct);
    if ($urandom_range(0, 99) < push_pct) push(DATA_W'($urandom));
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, streak;
    #12 rst_n = 1;
    chk(fifo_empty == 1, "empty after reset");
    // reading an empty stage does nothing
    @(negedge clk) rd_n_i = 0;
    @(negedge clk) rd_n_i = 1;
    chk(fifo_empty == 1 && fifo_rd_n_o == 1, "read while empty ignored");
    // first word falls through without a read: two edges after fifo_empty_i
    @(negedge clk) push(16'h1111);
    lat = 0;
    while (fifo_empty) begin @(posedge clk); #1 lat++; end
    chk(lat == 2, $sformatf("fall-through took %0d edges, expected 2", lat));
    chk(fifo_dout == 16'h1111, "prefetched word shown before any read");
    repeat (3) @(negedge clk);
    chk(fifo_dout == 16'h1111 && !fifo_empty, "word held while not read");
    // continuous read at full rate
    for (int i = 0; i < 40; i++) push(DATA_W'(16'h2000 + i));
    repeat (4) @(negedge clk);
    rd_n_i = 0;
    streak = 0;
    for (int i = 0; i < 41; i++) begin
      @(posedge clk);
      if (!fifo_empty) streak++;
      @(negedge clk);
    end
    rd_n_i = 1;
    chk(streak == 41, $sformatf("continuous read gave %0d words in 41 cycles", streak));
    chk(fifo_empty == 1, "empty after draining");
    // random traffic
    run = 1;
    for (int phase = 0; phase < 4; phase++) begin
      case (phase)
        0: begin rd_pct = 30; push_pct = 60; end
        1: begin rd_pct = 90; push_pct = 40; end
        2: begin rd_pct = 60; push_pct = 60; end
        3: begin rd_pct = 100; push_pct = 0; end
      endcase
      repeat (2000) @(posedge clk);
    end
    run = 0;
    chk(expq.size() == 0, "every word delivered");
    chk(n_reads > 2000, "enough reads");
    chk(n_empty_reads > 0, "read while empty exercised");
    $display("reads=%0d empty_reads=%0d", n_reads, n_empty_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
