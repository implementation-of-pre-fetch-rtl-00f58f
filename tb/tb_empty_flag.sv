// tb_empty_flag: self-checking test of the empty flag logic.
// Random binary read/write positions, with the write position 0 to DEPTH
// words ahead of the read position, are turned into Gray pointers. After the
// next rclk edge rempty must be high exactly when the positions are equal;
// reset must set the flag.
module tb_empty_flag;
  import fifo_pkg::*;
  localparam int ADDR_W = 4, DEPTH = 16;
  logic rclk = 0, rrst_n = 0;
  logic [ADDR_W:0] rgraynext = '0, rq2_wptr = 5'b00001;
  logic rempty;
  logic [ADDR_W:0] r, w;
  logic [31:0] gw, gr;
  logic exp_empty;
  int checks = 0, failures = 0, n_empty = 0;

  empty_flag #(.ADDR_W(ADDR_W)) dut (.*);

  always #5 rclk = ~rclk;

  initial begin
    repeat (5000) @(posedge rclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (rempty !== 1'b1) begin failures++; $display("reset did not set rempty"); end
    @(negedge rclk) rrst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge rclk);
      r = (ADDR_W+1)'($urandom);
      w = r + (($urandom_range(0, 3) == 0) ? '0 : (ADDR_W+1)'($urandom_range(0, DEPTH)));
      gw = bin2gray(32'(w)); gr = bin2gray(32'(r));
      rgraynext = gr[ADDR_W:0]; rq2_wptr = gw[ADDR_W:0];
      exp_empty = (w == r);
      @(posedge rclk); #1;
      checks++;
      if (exp_empty) n_empty++;
      if (rempty !== exp_empty) begin
        failures++;
        $display("w=%0d r=%0d rempty=%b expected %b", w, r, rempty, exp_empty);
      end
    end
    checks++;
    if (n_empty == 0) begin failures++; $display("empty case never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
