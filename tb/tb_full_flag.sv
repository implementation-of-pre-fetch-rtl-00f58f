// tb_full_flag: self-checking test of the full flag logic.
// Random binary write/read positions are chosen with the write position 0 to
// DEPTH words ahead of the read position, turned into Gray pointers, and
// applied. After the next wclk edge wfull must be high exactly when the
// binary distance is DEPTH; reset must clear the flag.
module tb_full_flag;
  import fifo_pkg::*;
  localparam int ADDR_W = 4, DEPTH = 16;
  logic wclk = 0, wrst_n = 0;
  logic [ADDR_W:0] wgraynext = '0, wq2_rptr = '0;
  logic wfull;
  logic [ADDR_W:0] r, w;
  logic [31:0] gw, gr;
  logic exp_full;
  int checks = 0, failures = 0, n_full = 0;

  full_flag #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 wclk = ~wclk;

  initial begin
    repeat (5000) @(posedge wclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wgraynext = 5'b11000; wq2_rptr = '0;   // would be full
    #12;
    checks++;
    if (wfull !== 1'b0) begin failures++; $display("reset did not clear wfull"); end
    @(negedge wclk) wrst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge wclk);
      r = (ADDR_W+1)'($urandom);
      // bias towards the full and near-full distances
      w = r + (($urandom_range(0, 3) == 0) ? (ADDR_W+1)'(DEPTH) : (ADDR_W+1)'($urandom_range(0, DEPTH)));
      gw = bin2gray(32'(w)); gr = bin2gray(32'(r));
      wgraynext = gw[ADDR_W:0]; wq2_rptr = gr[ADDR_W:0];
      exp_full = ((ADDR_W+1)'(w - r) == (ADDR_W+1)'(DEPTH));
      @(posedge wclk); #1;
      checks++;
      if (exp_full) n_full++;
      if (wfull !== exp_full) begin
        failures++;
        $display("w=%0d r=%0d wfull=%b expected %b", w, r, wfull, exp_full);
      end
    end
    checks++;
    if (n_full == 0) begin failures++; $display("full case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
