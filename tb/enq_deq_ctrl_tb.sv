// enq_deq_ctrl_tb -- test of the enqueue/dequeue controller on its own.
//
// Bus requests (a_valid, b_ready) are random, and the FIFO flags come from
// an occupancy level the testbench tracks itself from the push and pop the
// controller gives, in a 16-word FIFO. Every cycle it checks push, pop and
// a_ack against the rules worked out here (pop when asked and not empty;
// push when offered and not full, or full with a pop in the same cycle),
// b_valid one cycle after each pop, and both word counters. The mechanisms
// must each happen: bus A stalled by a full FIFO, bus B waiting on an empty
// one, a push and pop together at full, and a reset in the middle of traffic.
module enq_deq_ctrl_tb;
  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset_n, a_valid, b_ready, full, empty;
  logic        a_ack, b_valid, push, pop;
  logic [31:0] words_in, words_out;

  enq_deq_ctrl dut (
    .clk       (clk),
    .reset_n   (reset_n),
    .a_valid   (a_valid),
    .a_ack     (a_ack),
    .b_ready   (b_ready),
    .b_valid   (b_valid),
    .full      (full),
    .empty     (empty),
    .push      (push),
    .pop       (pop),
    .words_in  (words_in),
    .words_out (words_out)
  );

  int unsigned level, exp_in, exp_out;
  bit          exp_bvalid;
  int unsigned checks = 0, failures = 0;
  int unsigned n_stall = 0, n_starve = 0, n_both_full = 0, n_reset = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("enq_deq_ctrl_tb: FAILED %s at %0t", what, $time);
    end
  endtask

  initial begin
    bit ep, eq;
    reset_n = 1'b0; a_valid = 1'b0; b_ready = 1'b0;
    level = 0; exp_in = 0; exp_out = 0; exp_bvalid = 1'b0;
    full = 1'b0; empty = 1'b1;
    @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      int unsigned pa, pb;
      // drive this cycle
      pa = ((n / 50) % 2 == 0) ? 85 : 20;
      pb = ((n / 50) % 2 == 0) ? 20 : 85;
      reset_n = !(n % 997 == 500);
      a_valid = ($urandom_range(99) < pa);
      b_ready = ($urandom_range(99) < pb);
      full    = (level == DEPTH);
      empty   = (level == 0);
      #1;
      // combinational outputs
      eq = b_ready && level != 0;
      ep = a_valid && (level != DEPTH || eq);
      check("pop",   pop == eq);
      check("push",  push == ep);
      check("a_ack", a_ack == ep);
      check("b_valid", b_valid == exp_bvalid);
      check("words_in",  words_in == exp_in);
      check("words_out", words_out == exp_out);
      if (reset_n && a_valid && !ep) n_stall++;
      if (reset_n && b_ready && level == 0) n_starve++;
      if (reset_n && ep && eq && level == DEPTH) n_both_full++;
      // state after the coming edge
      @(posedge clk);
      if (!reset_n) begin
        n_reset += (level != 0);
        level = 0; exp_in = 0; exp_out = 0; exp_bvalid = 1'b0;
      end else begin
        level = level + ep - eq;
        exp_in += ep;
        exp_out += eq;
        exp_bvalid = eq;
      end
      @(negedge clk);
    end
    check("bus A stalled by full FIFO", n_stall > 0);
    check("bus B waited on empty FIFO", n_starve > 0);
    check("push and pop together at full", n_both_full > 0);
    check("reset during traffic", n_reset > 0);
    $display("enq_deq_ctrl_tb: stalls=%0d starves=%0d push+pop@full=%0d resets=%0d",
             n_stall, n_starve, n_both_full, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("enq_deq_ctrl_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
