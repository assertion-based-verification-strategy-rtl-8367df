// fifo_system_tb -- end-to-end test of the hardwired FIFO application at its
// default size (16 words of 16 bits), with no parameter overridden.
//
// A bus A source offers numbered words (each word's value is its sequence
// number) with a random a_valid and holds an offered word until a_ack; a bus
// B sink raises b_ready at random. Traffic runs in phases that favour the
// source or the sink, so the FIFO fills and drains repeatedly, and a few
// resets fall in the middle of traffic. Every cycle the testbench checks:
//   * each b_valid word is the oldest accepted word not yet delivered, and
//     arrives exactly one cycle after the pop that fetched it;
//   * the four flags match the occupancy words_in - words_out (full at 16,
//     almost_full from 12, almost_empty up to 4, empty at 0);
//   * error stays low, as the controller never overflows or underflows;
//   * the on-line property monitor reports no violation.
// It counts each mechanism and fails if one never happened: bus A stalled by
// a full FIFO, bus B kept waiting by an empty one, a push and a pop in the
// same cycle at full, each flag rising and falling (the monitor's cover
// counters), and a reset while the FIFO holds data.
module fifo_system_tb;
  localparam int unsigned DEPTH = 2 ** fifo_pkg::DEFAULT_BIT_DEPTH;
  localparam int unsigned DW    = fifo_pkg::DEFAULT_DATA_WIDTH;
  localparam int unsigned NCYC  = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                reset_n, a_valid, a_ack, b_ready, b_valid;
  logic [DW-1:0]       a_data, b_data;
  logic                full, almost_full, empty, almost_empty, error;
  logic [31:0]         words_in, words_out, violations;
  fifo_pkg::fifo_cov_t cov;

  fifo_system dut (
    .clk          (clk),
    .reset_n      (reset_n),
    .a_valid      (a_valid),
    .a_data       (a_data),
    .a_ack        (a_ack),
    .b_ready      (b_ready),
    .b_valid      (b_valid),
    .b_data       (b_data),
    .full         (full),
    .almost_full  (almost_full),
    .empty        (empty),
    .almost_empty (almost_empty),
    .error        (error),
    .words_in     (words_in),
    .words_out    (words_out),
    .violations   (violations),
    .cov          (cov)
  );

  logic [DW-1:0] sb[$];            // accepted, not yet delivered
  logic [DW-1:0] next_word;
  int unsigned   level;
  bit            popped_prev;
  int unsigned   checks = 0, failures = 0, delivered = 0;
  int unsigned   n_stall = 0, n_starve = 0, n_both_full = 0, n_reset_data = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("fifo_system_tb: FAILED %s at %0t", what, $time);
    end
  endtask

  initial begin
    reset_n = 1'b0; a_valid = 1'b0; b_ready = 1'b0; a_data = '0;
    next_word = '0; level = 0; popped_prev = 1'b0;
    @(negedge clk);
    @(negedge clk);
    for (int n = 0; n < NCYC; n++) begin
      int unsigned pa, pb;
      bit          rst, accept, fetch;
      case ((n / 60) % 3)
        0:       begin pa = 80; pb = 25; end
        1:       begin pa = 25; pb = 80; end
        default: begin pa = 60; pb = 60; end
      endcase
      rst = (n % 4999 == 2500);
      // bus A keeps an unacknowledged word offered
      if (!a_valid) a_valid = ($urandom_range(99) < pa);
      a_data  = next_word;
      b_ready = ($urandom_range(99) < pb);
      reset_n = !rst;
      #1;
      // outputs for the state reached at the last edge
      check("full",         full == (level == DEPTH));
      check("empty",        empty == (level == 0));
      check("almost_full",  almost_full == (4 * level >= 3 * DEPTH));
      check("almost_empty", almost_empty == (4 * level <= DEPTH));
      check("occupancy",    words_in - words_out == level);
      check("no error",     !error);
      check("b_valid one cycle after pop", b_valid == popped_prev);
      if (b_valid) begin
        check("word order", sb.size() > 0 && b_data == sb[0]);
        if (sb.size() > 0) void'(sb.pop_front());
        delivered++;
      end
      fetch  = b_ready && level != 0;
      accept = a_valid && (level != DEPTH || fetch);
      check("a_ack", a_ack == accept);
      if (!rst && a_valid && !accept) n_stall++;
      if (!rst && b_ready && level == 0) n_starve++;
      if (!rst && accept && fetch && level == DEPTH) n_both_full++;
      // the edge takes these inputs; update the model and the source after it
      @(negedge clk);
      if (rst) begin
        if (level != 0) n_reset_data++;
        level = 0;
        sb.delete();
        popped_prev = 1'b0;
        a_valid = 1'b0;
      end else begin
        if (fetch) popped_prev = 1'b1; else popped_prev = 1'b0;
        level = level + accept - fetch;
        if (accept) begin
          sb.push_back(next_word);
          next_word = next_word + 1'b1;
          a_valid = 1'b0;
        end
      end
    end
    check("monitor reports no violation", violations == 0);
    check("bus A stalled by full FIFO",   n_stall > 0);
    check("bus B waited on empty FIFO",   n_starve > 0);
    check("push and pop together at full", n_both_full > 0);
    check("reset while holding data",     n_reset_data > 0);
    check("words delivered",              delivered > NCYC / 4);
    check("cover push_pop_sequencing", cov.push_pop_sequencing > 0);
    check("cover full_on",             cov.full_on > 0);
    check("cover full_off",            cov.full_off > 0);
    check("cover empty_on",            cov.empty_on > 0);
    check("cover empty_off",           cov.empty_off > 0);
    check("cover almost_full_on",      cov.almost_full_on > 0);
    check("cover almost_full_off",     cov.almost_full_off > 0);
    check("cover almost_empty_on",     cov.almost_empty_on > 0);
    check("cover almost_empty_off",    cov.almost_empty_off > 0);
    $display("fifo_system_tb: delivered=%0d stalls=%0d starves=%0d push+pop@full=%0d resets-with-data=%0d full_on=%0d empty_on=%0d",
             delivered, n_stall, n_starve, n_both_full, n_reset_data, cov.full_on, cov.empty_on);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("fifo_system_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
