// fifo_pkg: constants shared by the prefetch FIFO modules.
// The FIFO is 16 words deep and 16 bits wide, the configuration the design is
// built around. Pointers carry one bit more than the RAM address so that a
// full FIFO can be told from an empty one. The Gray-code helpers are used by
// the pointer counters and by testbenches as a reference.
package fifo_pkg;
  localparam int unsigned DATA_W_DEF = 16;
  localparam int unsigned DEPTH_DEF  = 16;

  // Binary to reflected Gray code.
  function automatic logic [31:0] bin2gray(input logic [31:0] b);
    return b ^ (b >> 1);
  endfunction
endpackage
