// async_fifo: ordinary (standard-read) asynchronous FIFO.
// Write side (wclk): winc with wfull low stores wdata and advances the write
// pointer. Read side (rclk): rinc with rempty low advances the read pointer and
// loads the word at the read address into the rdata register, so a read
// request shows its data one rclk edge later (standard read, not
// fall-through). Requests against a full or empty FIFO are ignored.
// Pointers cross the clock domains as Gray codes through two flip-flop
// stages; full and empty are registered and pessimistic, so the flags settle
// two or three edges of the observing clock after the other side moved.
// Structure (RAM, two pointer counters, two synchronizers, full and empty flag
// logic) follows the FIFO block diagram; the register on rdata follows the
// ordinary FIFO's waveform, where data appears one beat after rd. Resets are
// asynchronous and active low, one per clock domain; rdata resets to zero.
module async_fifo #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_pkg::DEPTH_DEF,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              wrst_n,
  input  logic              winc,
  input  logic [DATA_W-1:0] wdata,
  output logic              wfull,
  input  logic              rclk,
  input  logic              rrst_n,
  input  logic              rinc,
  output logic [DATA_W-1:0] rdata,
  output logic              rempty
);
  logic [ADDR_W-1:0] waddr, raddr;
  logic [ADDR_W:0]   wptr, wgraynext, rptr, rgraynext, wq2_rptr, rq2_wptr;
  logic [DATA_W-1:0] mem_rdata;
  logic              wen, ren;

  assign wen = winc && !wfull;
  assign ren = rinc && !rempty;

  fifo_mem #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_mem (
    .wclk (wclk), .write(wen), .waddr(waddr), .wdata(wdata),
    .raddr(raddr), .rdata(mem_rdata)
  );

  gray_ptr #(.ADDR_W(ADDR_W)) u_wptr (
    .clk(wclk), .rst_n(wrst_n), .inc(wen), .addr(waddr), .g(wptr), .ginc(wgraynext)
  );

  gray_ptr #(.ADDR_W(ADDR_W)) u_rptr (
    .clk(rclk), .rst_n(rrst_n), .inc(ren), .addr(raddr), .g(rptr), .ginc(rgraynext)
  );

  sync_2ff #(.W(ADDR_W + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rptr), .q(wq2_rptr)
  );

  sync_2ff #(.W(ADDR_W + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wptr), .q(rq2_wptr)
  );

  full_flag #(.ADDR_W(ADDR_W)) u_full (
    .wclk(wclk), .wrst_n(wrst_n), .wgraynext(wgraynext), .wq2_rptr(wq2_rptr), .wfull(wfull)
  );

  empty_flag #(.ADDR_W(ADDR_W)) u_empty (
    .rclk(rclk), .rrst_n(rrst_n), .rgraynext(rgraynext), .rq2_wptr(rq2_wptr), .rempty(rempty)
  );

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n)  rdata <= '0;
    else if (ren) rdata <= mem_rdata;
  end

  // DEPTH must be a power of two for the Gray-pointer full/empty comparison.
  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two");
endmodule
