// fifo -- generic single-clock FIFO with occupancy flags and an error output.
//
// Words of DATA_WIDTH bits are pushed at the tail and popped from the head of
// a circular buffer of 2**BIT_DEPTH entries. The write and read pointers are
// the whole state besides the storage and the output register, and they give
// the FIFO's status: each carries one bit more than it needs to address the
// buffer, so their difference is the occupancy, 0 to 2**BIT_DEPTH, and full
// (pointers equal but for that top bit) is told apart from empty (pointers
// equal). The four status flags are decoded from the occupancy:
//   full          occupancy == depth
//   almost_full   occupancy >= 3/4 depth (so it is also set when full)
//   empty         occupancy == 0
//   almost_empty  occupancy <= 1/4 depth (so it is also set when empty)
// One clock governs pushes and pops, and reset_n is synchronous and active
// low: a clock edge that sees reset_n low empties the FIFO, clears error and
// data_out, and leaves the flags at empty/almost_empty.
//
// Timing: push and pop are sampled on the rising edge of clk. A popped word
// appears on data_out after that edge and stays there until the next pop
// (registered read, one cycle of latency). A push and a pop in the same cycle
// are both performed, also when the FIFO is full, since the pop frees the
// slot the push fills. A push into a full FIFO without a pop is dropped, and
// a pop from an empty FIFO returns nothing; either sets error for the one
// cycle after the offending edge.
//
// The interface, the flag levels, the status taken from the pointers and the
// synchronous reset follow the FIFO's requirements. The extra pointer bit,
// the registered read, the same-cycle push/pop rule at full and
// the meaning and timing of error are this design's choices.
module fifo
#(
  parameter int unsigned BIT_DEPTH  = fifo_pkg::DEFAULT_BIT_DEPTH,
  parameter int unsigned DATA_WIDTH = fifo_pkg::DEFAULT_DATA_WIDTH
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic [DATA_WIDTH-1:0] data_in,
  input  logic                  push,
  input  logic                  pop,
  output logic [DATA_WIDTH-1:0] data_out,
  output logic                  full,
  output logic                  almost_full,
  output logic                  empty,
  output logic                  almost_empty,
  output logic                  error
);

  localparam int unsigned DEPTH = 2 ** BIT_DEPTH;
  localparam int unsigned CW    = BIT_DEPTH + 1;   // pointer and occupancy width
  localparam logic [CW-1:0] AFULL_LVL  = CW'(fifo_pkg::afull_level(DEPTH));
  localparam logic [CW-1:0] AEMPTY_LVL = CW'(fifo_pkg::aempty_level(DEPTH));
  localparam logic [CW-1:0] FULL_LVL   = CW'(DEPTH);

  logic [DATA_WIDTH-1:0] mem [DEPTH];
  logic [CW-1:0]         wr_ptr, rd_ptr;   // top bit counts buffer wraps
  logic [CW-1:0]         count;            // occupancy, 0..DEPTH
  logic                  do_push, do_pop;

  // A pop needs a word; a push needs a free slot or a pop in the same cycle.
  always_comb begin
    do_pop  = pop && !empty;
    do_push = push && (!full || pop);
  end

  // Storage: no reset, written only by accepted pushes.
  always_ff @(posedge clk) begin
    if (reset_n && do_push) mem[wr_ptr[BIT_DEPTH-1:0]] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      data_out <= '0;
      error    <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop) begin
        rd_ptr   <= rd_ptr + 1'b1;
        data_out <= mem[rd_ptr[BIT_DEPTH-1:0]];
      end
      error <= (push && full && !pop) || (pop && empty);
    end
  end

  always_comb begin
    count        = wr_ptr - rd_ptr;
    full         = (count == FULL_LVL);
    almost_full  = (count >= AFULL_LVL);
    empty        = (count == '0);
    almost_empty = (count <= AEMPTY_LVL);
  end

endmodule
