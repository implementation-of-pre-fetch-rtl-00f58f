// tb_sync_2ff: self-checking test of the two-stage synchronizer.
// Drives a new random value each cycle and checks that q, after each rising edge, equals the
// value the first stage sampled at the edge before (two edges from d to q), and that reset clears both stages.
module tb_sync_2ff;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] d = '1, q;
  logic [W-1:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== '0) begin failures++; $display("reset: q=%b", q); end
    @(negedge clk) rst_n = 1;
    hist[0] = d; hist[1] = d; hist[2] = d;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = W'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      if (n >= 2) begin
        checks++;
        if (q !== hist[1]) begin
          failures++;
          $display("%t: q=%b expected %b", $time, q, hist[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
