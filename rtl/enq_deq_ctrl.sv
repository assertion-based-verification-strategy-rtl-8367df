// enq_deq_ctrl -- enqueue/dequeue controller between two bus controllers and
// the FIFO.
//
// The bus A side offers a word with a_valid; the controller pushes it into
// the FIFO in the same cycle (a_ack) unless the FIFO is full and no pop frees
// a slot in that cycle, in which case bus A is stalled and keeps its word
// offered. The bus B side asks for a word with b_ready; the controller pops
// when the FIFO is not empty. Because the FIFO's read is registered, the
// popped word is on data_out one cycle later, and b_valid marks that cycle.
// So the controller never pushes into a full FIFO or pops an empty one, and
// the FIFO's error output stays low. It also counts the words moved in and
// out (words_in, words_out); their difference is the FIFO's occupancy, which
// lets a system check that no word was lost or duplicated.
//
// Timing: push, pop and a_ack are combinational from the requests and the
// FIFO's flags; b_valid and the counters are registered. reset_n is
// synchronous and active low and clears b_valid and both counters.
//
// That this controller keeps the transferred amount consistent follows the
// application architecture it comes from; the request/acknowledge handshake,
// the same-cycle push at full and the counters are this design's choices.
module enq_deq_ctrl #(
  parameter int unsigned CNT_WIDTH = 32
) (
  input  logic                 clk,
  input  logic                 reset_n,
  // bus A controller side
  input  logic                 a_valid,
  output logic                 a_ack,
  // bus B controller side
  input  logic                 b_ready,
  output logic                 b_valid,
  // FIFO side
  input  logic                 full,
  input  logic                 empty,
  output logic                 push,
  output logic                 pop,
  // transfer accounting
  output logic [CNT_WIDTH-1:0] words_in,
  output logic [CNT_WIDTH-1:0] words_out
);

  always_comb begin
    pop   = b_ready && !empty;
    push  = a_valid && (!full || pop);
    a_ack = push;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      b_valid   <= 1'b0;
      words_in  <= '0;
      words_out <= '0;
    end else begin
      b_valid <= pop;
      if (push) words_in  <= words_in + 1'b1;
      if (pop)  words_out <= words_out + 1'b1;
    end
  end

  // Handshake rules: never push into a full FIFO without a pop, never pop an
  // empty one, and acknowledge only an offered word.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!reset_n)
                                   !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!reset_n)
                                   !(pop && empty));
  a_ack_offered:  assert property (@(posedge clk) disable iff (!reset_n)
                                   a_ack |-> a_valid);

endmodule
