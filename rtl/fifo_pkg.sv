// fifo_pkg -- configuration shared by the generic FIFO, its property module
// and the enqueue/dequeue controller.
//
// The FIFO holds 2**BIT_DEPTH words of DATA_WIDTH bits. The defaults given here, a
// 16-word buffer of 16-bit words, are the smaller of the two depths (2**4 and
// 2**8) and widths (16 and 32) in the FIFO's configuration list; the other
// three combinations are reached by overriding the module parameters.
// The two threshold functions fix where the status flags switch: almost_full
// at three quarters of the depth and almost_empty at one quarter, as the
// FIFO's requirements state. Whether a flag includes its threshold (>= / <=)
// is this design's choice: both flags include it.
package fifo_pkg;

  parameter int unsigned DEFAULT_BIT_DEPTH  = 4;
  parameter int unsigned DEFAULT_DATA_WIDTH = 16;

  // Occupancy at and above which almost_full is set: 3/4 of the depth.
  function automatic int unsigned afull_level(input int unsigned depth);
    return (3 * depth) / 4;
  endfunction

  // Occupancy at and below which almost_empty is set: 1/4 of the depth.
  function automatic int unsigned aempty_level(input int unsigned depth);
    return depth / 4;
  endfunction

  // Hit counts of the FIFO's cover sequences, one field per sequence.
  typedef struct packed {
    logic [31:0] push_pop_sequencing;  // accepted push followed by an accepted pop
    logic [31:0] full_on;              // full rises
    logic [31:0] empty_on;             // empty rises
    logic [31:0] almost_empty_on;      // almost_empty rises
    logic [31:0] almost_full_on;       // almost_full rises
    logic [31:0] full_off;             // full falls
    logic [31:0] empty_off;            // empty falls
    logic [31:0] almost_empty_off;     // almost_empty falls
    logic [31:0] almost_full_off;      // almost_full falls
  } fifo_cov_t;

endpackage
