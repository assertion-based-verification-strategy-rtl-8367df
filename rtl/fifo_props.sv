// fifo_props -- property module for the generic FIFO, meant to be bound to it.
//
// It watches only the FIFO's ports. An auxiliary occupancy counter, reset with
// the FIFO and stepped by the pushes and pops the FIFO must accept, gives the
// level the four flags are checked against. Concurrent assertions cover:
//   * the flag values after reset (full and almost_full low, empty and
//     almost_empty high), the four reset properties of the verification plan;
//   * full and empty never together, full implies almost_full, empty implies
//     almost_empty, and every flag matching the tracked occupancy with
//     almost_full at 3/4 and almost_empty at 1/4 of the depth;
//   * data_out changing only on an accepted pop, and a word pushed into an
//     empty FIFO coming out first;
//   * error set exactly in the cycle after a push into a full FIFO without a
//     pop or a pop from an empty FIFO.
// Each failing assertion prints a message and increments `violations`.
// Assertions exist only in simulation, so in a synthesized netlist
// `violations` is a constant 0; the cover counters are ordinary logic.
// The nine cover sequences of the plan (push/pop sequencing and each flag
// rising and falling) are counted in `cov`, one 32-bit counter per sequence;
// the plan asks that each be hit at least once.
//
// Timing: everything is sampled on the rising edge of clk; the checks other
// than the reset ones are disabled while reset_n is low, and those that look
// back one cycle also on the first edge after reset. The cover counters start
// at zero and are not cleared by the FIFO's reset, so they add up over the
// resets a test applies. The FIFO must see a reset before its first use.
//
// The reset properties and the list of cover sequences follow the plan; the
// occupancy rules, the error rule and the exact form of each sequence are
// this design's reading of the FIFO's requirements.
module fifo_props #(
  parameter int unsigned BIT_DEPTH  = fifo_pkg::DEFAULT_BIT_DEPTH,
  parameter int unsigned DATA_WIDTH = fifo_pkg::DEFAULT_DATA_WIDTH
) (
  input  logic                  clk,
  input  logic                  reset_n,
  input  logic [DATA_WIDTH-1:0] data_in,
  input  logic                  push,
  input  logic                  pop,
  input  logic [DATA_WIDTH-1:0] data_out,
  input  logic                  full,
  input  logic                  almost_full,
  input  logic                  empty,
  input  logic                  almost_empty,
  input  logic                  error,
  output logic [31:0]           violations,
  output fifo_pkg::fifo_cov_t   cov = '0
);

  localparam int unsigned DEPTH = 2 ** BIT_DEPTH;
  localparam int unsigned CW    = BIT_DEPTH + 1;
  localparam logic [CW-1:0] AFULL_LVL  = CW'(fifo_pkg::afull_level(DEPTH));
  localparam logic [CW-1:0] AEMPTY_LVL = CW'(fifo_pkg::aempty_level(DEPTH));
  localparam logic [CW-1:0] FULL_LVL   = CW'(DEPTH);

  logic [CW-1:0] occ;          // tracked occupancy
  logic          acc_push, acc_pop, overflow, underflow;
  logic          full_q, empty_q, afull_q, aempty_q, acc_push_q;
  logic          live;         // reset_n was high on the previous edge too
  logic [31:0]   n_viol = '0;

  always_comb begin
    acc_pop   = pop && (occ != '0);
    acc_push  = push && ((occ != FULL_LVL) || pop);
    overflow  = push && full && !pop;
    underflow = pop && empty;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      occ <= '0;
    end else begin
      case ({acc_push, acc_pop})
        2'b10:   occ <= occ + 1'b1;
        2'b01:   occ <= occ - 1'b1;
        default: occ <= occ;
      endcase
    end
  end

  // ---- reset properties -------------------------------------------------
  p_t1_full:    assert property (@(posedge clk) !reset_n |=> !full)
    else begin n_viol++; $display("fifo_props: full set after reset"); end
  p_t2_afull:   assert property (@(posedge clk) !reset_n |=> !almost_full)
    else begin n_viol++; $display("fifo_props: almost_full set after reset"); end
  p_t3_empty:   assert property (@(posedge clk) !reset_n |=> empty)
    else begin n_viol++; $display("fifo_props: empty clear after reset"); end
  p_t4_a_empty: assert property (@(posedge clk) !reset_n |=> almost_empty)
    else begin n_viol++; $display("fifo_props: almost_empty clear after reset"); end

  // ---- flag consistency ---------------------------------------------------
  p_full_xor_empty: assert property (@(posedge clk) disable iff (!reset_n)
                                     !(full && empty))
    else begin n_viol++; $display("fifo_props: full and empty together"); end
  p_full_afull: assert property (@(posedge clk) disable iff (!reset_n)
                                 full |-> almost_full)
    else begin n_viol++; $display("fifo_props: full without almost_full"); end
  p_empty_aempty: assert property (@(posedge clk) disable iff (!reset_n)
                                   empty |-> almost_empty)
    else begin n_viol++; $display("fifo_props: empty without almost_empty"); end
  p_level_flags: assert property (@(posedge clk) disable iff (!reset_n || !live)
                                  full == (occ == FULL_LVL) &&
                                  empty == (occ == '0) &&
                                  almost_full == (occ >= AFULL_LVL) &&
                                  almost_empty == (occ <= AEMPTY_LVL))
    else begin n_viol++; $display("fifo_props: flags disagree with occupancy %0d", occ); end

  // ---- error rule -----------------------------------------------------------
  p_error_set: assert property (@(posedge clk) disable iff (!reset_n)
                                (overflow || underflow) |=> error)
    else begin n_viol++; $display("fifo_props: error missing after overflow/underflow"); end
  p_error_clear: assert property (@(posedge clk) disable iff (!reset_n || !live)
                                  !(overflow || underflow) |=> !error)
    else begin n_viol++; $display("fifo_props: spurious error"); end

  // ---- data ------------------------------------------------------------------
  p_dout_stable: assert property (@(posedge clk) disable iff (!reset_n || !live)
                                  !acc_pop |=> $stable(data_out))
    else begin n_viol++; $display("fifo_props: data_out changed without a pop"); end
  // A word pushed into an empty FIFO and popped on the next cycle comes out
  // on data_out one cycle after the pop.
  p_first_word: assert property (@(posedge clk) disable iff (!reset_n || !live)
                                 (push && !pop && occ == '0) ##1 pop |=>
                                 data_out == $past(data_in, 2))
    else begin n_viol++; $display("fifo_props: first word lost"); end

  assign violations = n_viol;

  // ---- cover sequences --------------------------------------------------------
  always_ff @(posedge clk) begin
    live       <= reset_n;
    full_q     <= full;
    empty_q    <= empty;
    afull_q    <= almost_full;
    aempty_q   <= almost_empty;
    acc_push_q <= acc_push && reset_n;
  end

  always_ff @(posedge clk) begin
    if (reset_n && live) begin
      if (acc_push_q && acc_pop)     cov.push_pop_sequencing <= cov.push_pop_sequencing + 1;
      if (full && !full_q)           cov.full_on             <= cov.full_on + 1;
      if (empty && !empty_q)         cov.empty_on            <= cov.empty_on + 1;
      if (almost_empty && !aempty_q) cov.almost_empty_on     <= cov.almost_empty_on + 1;
      if (almost_full && !afull_q)   cov.almost_full_on      <= cov.almost_full_on + 1;
      if (!full && full_q)           cov.full_off            <= cov.full_off + 1;
      if (!empty && empty_q)         cov.empty_off           <= cov.empty_off + 1;
      if (!almost_empty && aempty_q) cov.almost_empty_off    <= cov.almost_empty_off + 1;
      if (!almost_full && afull_q)   cov.almost_full_off     <= cov.almost_full_off + 1;
    end
  end

  qPushPop:       cover property (@(posedge clk) disable iff (!reset_n) acc_push ##1 acc_pop);
  qFull:          cover property (@(posedge clk) disable iff (!reset_n) $rose(full));
  qEmpty:         cover property (@(posedge clk) disable iff (!reset_n) $rose(empty));
  qAlmost_empty:  cover property (@(posedge clk) disable iff (!reset_n) $rose(almost_empty));
  qAlmost_full:   cover property (@(posedge clk) disable iff (!reset_n) $rose(almost_full));
  qOffFull:       cover property (@(posedge clk) disable iff (!reset_n) $fell(full));
  qOffEmpty:      cover property (@(posedge clk) disable iff (!reset_n) $fell(empty));
  qOffAlmost_empty: cover property (@(posedge clk) disable iff (!reset_n) $fell(almost_empty));
  qOffAlmost_full:  cover property (@(posedge clk) disable iff (!reset_n) $fell(almost_full));

endmodule
