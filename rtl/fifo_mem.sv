// fifo_mem: dual-port storage of the asynchronous FIFO.
// A register array of DEPTH words of DATA_W bits. Port A writes wdata to
// waddr on the rising edge of wclk when write is high. Port B is a
// combinational read: rdata always shows the word at raddr, so the read side
// decides when to capture it (the ordinary FIFO registers it, see async_fifo).
// Storage built from registers with a write port and a read port follows the
// description of the storage module; the combinational read port and the lack
// of reset on the array are this design's choices.
module fifo_mem #(
  parameter int unsigned DATA_W = fifo_pkg::DATA_W_DEF,
  parameter int unsigned DEPTH  = fifo_pkg::DEPTH_DEF,
  localparam int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              wclk,
  input  logic              write,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (write) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
