// tb_gray_ptr: self-checking test of the Gray-code pointer counter.
// A reference binary count follows random increments; after each edge the
// test checks the RAM address, the Gray pointer (b ^ b>>1 of the reference),
// the look-ahead ginc, and that consecutive Gray values differ in exactly one
// bit. Runs long enough to wrap the 5-bit pointer several times.
module tb_gray_ptr;
  import fifo_pkg::*;
  localparam int ADDR_W = 4;
  logic clk = 0, rst_n = 0, inc = 0;
  logic [ADDR_W-1:0] addr;
  logic [ADDR_W:0] g, ginc, g_prev;
  logic [ADDR_W:0] ref_cnt;
  logic [31:0] exp_g, exp_ginc;
  logic [ADDR_W:0] nxt;
  int checks = 0, failures = 0;

  gray_ptr #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t: %s (cnt=%0d g=%b ginc=%b addr=%0d)", $time, what, ref_cnt, g, ginc, addr);
    end
  endtask

  initial begin
    ref_cnt = '0;
    #12 rst_n = 1;
    chk(g == '0 && addr == '0, "reset value");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      inc = $urandom_range(0, 3) != 0;
      #1;
      nxt = ref_cnt + (ADDR_W+1)'(inc);
      exp_ginc = bin2gray(32'(nxt));
      chk(ginc == exp_ginc[ADDR_W:0], "ginc look-ahead");
      g_prev = g;
      @(posedge clk);
      if (inc) ref_cnt = ref_cnt + 1'b1;
      #1;
      exp_g = bin2gray(32'(ref_cnt));
      chk(g == exp_g[ADDR_W:0], "gray pointer");
      chk(addr == ref_cnt[ADDR_W-1:0], "binary address");
      if (inc) chk($countones(g ^ g_prev) == 1, "one bit changes per step");
      else     chk(g == g_prev, "holds without inc");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
