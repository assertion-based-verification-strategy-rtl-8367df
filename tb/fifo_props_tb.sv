// fifo_props_tb -- test of the FIFO property module on its own.
//
// The module's inputs come from a golden FIFO: the reference model of
// fifo_if, whose predicted flags, error and data_out are registered onto the
// inputs at each rising edge. A run of legal traffic must raise no violation
// and must hit all nine cover sequences. Then single-cycle corruptions of
// one output at a time are injected (a wrong flag at a chosen level, a
// spurious or missing error, data_out changing without a pop, a lost first
// word, a flag wrong right after reset); each must raise the violation count.
module fifo_props_tb;
  localparam int unsigned BD    = fifo_pkg::DEFAULT_BIT_DEPTH;
  localparam int unsigned DW    = fifo_pkg::DEFAULT_DATA_WIDTH;
  localparam int unsigned DEPTH = 2 ** BD;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  fifo_if #(.BIT_DEPTH(BD), .DATA_WIDTH(DW)) f_b (.clk(clk));

  // Golden outputs, with an optional one-cycle corruption.
  typedef enum int {
    C_NONE, C_FULL, C_EMPTY, C_AFULL, C_AEMPTY, C_ERR_SET, C_ERR_CLR, C_DOUT
  } corrupt_t;
  corrupt_t corrupt = C_NONE;

  always @(posedge clk) begin
    f_b.full         <= f_b.exp_full()         ^ (corrupt == C_FULL);
    f_b.empty        <= f_b.exp_empty()        ^ (corrupt == C_EMPTY);
    f_b.almost_full  <= f_b.exp_almost_full()  ^ (corrupt == C_AFULL);
    f_b.almost_empty <= f_b.exp_almost_empty() ^ (corrupt == C_AEMPTY);
    f_b.error        <= (corrupt == C_ERR_SET) ? 1'b1 :
                        (corrupt == C_ERR_CLR) ? 1'b0 : f_b.exp_error;
    f_b.data_out     <= f_b.exp_data_out ^ ((corrupt == C_DOUT) ? DW'(1) : DW'(0));
  end

  logic [31:0]         violations;
  fifo_pkg::fifo_cov_t cov;

  fifo_props dut (
    .clk          (clk),
    .reset_n      (f_b.reset_n),
    .data_in      (f_b.data_in),
    .push         (f_b.push),
    .pop          (f_b.pop),
    .data_out     (f_b.data_out),
    .full         (f_b.full),
    .almost_full  (f_b.almost_full),
    .empty        (f_b.empty),
    .almost_empty (f_b.almost_empty),
    .error        (f_b.error),
    .violations   (violations),
    .cov          (cov)
  );

  int unsigned checks = 0, failures = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("fifo_props_tb: FAILED %s (violations=%0d)", what, violations);
    end
  endtask

  task automatic go(input bit rst, input bit p, input bit q);
    f_b.step(rst, p, q, DW'($urandom()));
  endtask

  // Bring the golden FIFO to `lvl` words from a reset.
  task automatic to_level(input int unsigned lvl);
    f_b.do_reset(1);
    repeat (lvl) go(0, 1, 0);
    f_b.idle(2);
  endtask

  // Corrupt one output for one cycle at the current level and expect the
  // violation count to rise.
  task automatic inject(input string what, input corrupt_t c);
    logic [31:0] v0;
    f_b.idle(1);
    v0 = violations;
    @(negedge clk) corrupt = c;
    @(negedge clk) corrupt = C_NONE;
    f_b.idle(3);
    check(what, violations > v0);
  endtask

  initial begin
    logic [31:0] v0;
    f_b.do_reset(2);

    // legal traffic, including overflow and underflow attempts
    for (int n = 0; n < 3000; n++) begin
      int unsigned pp;
      pp = ((n / 40) % 2 == 0) ? 75 : 25;
      go(($urandom_range(499) == 0) ? 1'b1 : 1'b0,
         ($urandom_range(99) < pp) ? 1'b1 : 1'b0,
         ($urandom_range(99) < 100 - pp) ? 1'b1 : 1'b0);
    end
    f_b.idle(3);
    check("no violation on legal traffic", violations == 0);
    check("cover push_pop_sequencing", cov.push_pop_sequencing > 0);
    check("cover full_on",             cov.full_on > 0);
    check("cover empty_on",            cov.empty_on > 0);
    check("cover almost_empty_on",     cov.almost_empty_on > 0);
    check("cover almost_full_on",      cov.almost_full_on > 0);
    check("cover full_off",            cov.full_off > 0);
    check("cover empty_off",           cov.empty_off > 0);
    check("cover almost_empty_off",    cov.almost_empty_off > 0);
    check("cover almost_full_off",     cov.almost_full_off > 0);

    // a full/empty cycle on its own must be legal and counted once each
    to_level(0);
    v0 = cov.full_on;
    repeat (DEPTH) go(0, 1, 0);
    f_b.idle(2);
    check("full_on counted once", cov.full_on == v0 + 1);

    // corruptions
    to_level(DEPTH / 2);
    inject("full at half level",                C_FULL);
    to_level(0);
    inject("empty dropped while empty",         C_EMPTY);
    to_level(3 * DEPTH / 4 - 1);
    inject("almost_full just below 3/4",        C_AFULL);
    to_level(3 * DEPTH / 4);
    inject("almost_full dropped at 3/4",        C_AFULL);
    to_level(DEPTH / 4 + 1);
    inject("almost_empty just above 1/4",       C_AEMPTY);
    to_level(DEPTH / 4);
    inject("almost_empty dropped at 1/4",       C_AEMPTY);
    to_level(DEPTH / 2);
    inject("spurious error",                    C_ERR_SET);
    to_level(DEPTH / 2);
    inject("data_out changed without pop",      C_DOUT);

    // error missing after an overflow
    to_level(DEPTH);
    v0 = violations;
    go(0, 1, 0);
    @(negedge clk) corrupt = C_ERR_CLR;
    @(negedge clk) corrupt = C_NONE;
    f_b.idle(2);
    check("missing error after overflow", violations > v0);

    // error missing after an underflow
    to_level(0);
    v0 = violations;
    go(0, 0, 1);
    @(negedge clk) corrupt = C_ERR_CLR;
    @(negedge clk) corrupt = C_NONE;
    f_b.idle(2);
    check("missing error after underflow", violations > v0);

    // first word lost: push into empty, pop, corrupt the word as it appears
    to_level(0);
    v0 = violations;
    go(0, 1, 0);
    go(0, 0, 1);
    corrupt = C_DOUT;
    @(negedge clk) corrupt = C_NONE;
    f_b.idle(3);
    check("first word corrupted", violations > v0);

    // a flag wrong right after reset
    to_level(DEPTH);
    v0 = violations;
    f_b.do_reset(1);
    corrupt = C_FULL;
    @(negedge clk) corrupt = C_NONE;
    f_b.idle(2);
    check("full still set after reset", violations > v0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("fifo_props_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
