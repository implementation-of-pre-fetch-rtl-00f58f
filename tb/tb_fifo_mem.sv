// tb_fifo_mem: self-checking test of the dual-port FIFO storage.
// Writes every address with a random word, then reads all addresses back
// through the combinational read port and compares with a reference array.
// A second pass overwrites random addresses while reading others, and checks
// that a disabled write leaves the word unchanged.
module tb_fifo_mem;
  localparam int DATA_W = 16, DEPTH = 16, ADDR_W = 4;
  logic wclk = 0, write = 0;
  logic [ADDR_W-1:0] waddr = '0, raddr = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [DATA_W-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 wclk = ~wclk;

  initial begin
    repeat (2000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [ADDR_W-1:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("mismatch addr %0d: got %h expected %h", a, rdata, ref_mem[a]);
    end
  endtask

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge wclk);
      write = 1; waddr = i[ADDR_W-1:0]; wdata = DATA_W'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge wclk) write = 0;
    for (int i = 0; i < DEPTH; i++) check_read(i[ADDR_W-1:0]);
    // random writes, some disabled, interleaved with reads
    for (int n = 0; n < 400; n++) begin
      @(negedge wclk);
      write = 1'($urandom_range(0, 1));
      waddr = ADDR_W'($urandom); wdata = DATA_W'($urandom);
      if (write) ref_mem[waddr] = wdata;
      @(posedge wclk);
      #1;
      check_read(ADDR_W'($urandom));
      check_read(waddr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
