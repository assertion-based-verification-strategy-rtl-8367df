// fifo_check -- complete test of one FIFO configuration, the FIFO's
// property module bound to it.
//
// The transactor runs, through the fifo_if server tasks:
//   1. reset, then directed fill to full, one push too many (overflow),
//      a simultaneous push and pop at full, drain to empty, one pop too many
//      (underflow), and a simultaneous push and pop at empty;
//   2. reset applied with the FIFO at different levels (1, 1/4, 1/2, 3/4 of
//      the depth and full), each followed by a check that the FIFO is empty;
//   3. NRAND cycles of pseudo-random pushes, pops and occasional resets, in
//      phases that lean towards filling or draining so the flags toggle.
// The interface's reference model checks flags, error and data_out every
// cycle. At the end the bound property module must report no violation and
// every one of its cover sequences must have been hit; the directed
// mechanisms (overflow, underflow, push+pop at full, reset at each level)
// must each have happened at least once.
module fifo_check #(
  parameter int unsigned BIT_DEPTH  = 4,
  parameter int unsigned DATA_WIDTH = 16,
  parameter int unsigned NRAND      = 2000,
  parameter int unsigned SEED       = 1
) (
  input  logic        clk,
  output logic        done,
  output int unsigned checks,
  output int unsigned failures
);
  localparam int unsigned DEPTH = 2 ** BIT_DEPTH;
  typedef logic [DATA_WIDTH-1:0] word_t;

  fifo_if #(.BIT_DEPTH(BIT_DEPTH), .DATA_WIDTH(DATA_WIDTH)) f_b (.clk(clk));

  fifo #(
    .BIT_DEPTH  (BIT_DEPTH),
    .DATA_WIDTH (DATA_WIDTH)
  ) dut (
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
    .error        (f_b.error)
  );

  int unsigned n_overflow, n_underflow, n_both_full, n_reset_nonempty;
  int unsigned own_checks, own_failures;

  function automatic word_t rnd_word();
    word_t w = '0;
    for (int i = 0; i < DATA_WIDTH; i += 32) w = word_t'({w, $urandom()});
    return w;
  endfunction

  task automatic cyc(input bit rst, input bit p, input bit q);
    if (!rst && p && q && f_b.exp_full()) n_both_full++;
    if (rst && f_b.level() != 0) n_reset_nonempty++;
    f_b.step(rst, p, q, rnd_word());
    if (f_b.last_overflow)  n_overflow++;
    if (f_b.last_underflow) n_underflow++;
  endtask

  task automatic own_check(input string what, input bit ok);
    own_checks++;
    if (!ok) begin
      own_failures++;
      $display("%m: FAILED %s", what);
    end
  endtask

  int unsigned levels[5];

  initial begin
    done = 1'b0;
    n_overflow = 0; n_underflow = 0; n_both_full = 0; n_reset_nonempty = 0;
    own_checks = 0; own_failures = 0;
    void'($urandom(SEED));
    f_b.do_reset(2);

    // 1. fill, overflow, push+pop at full, drain, underflow, push+pop at empty
    repeat (DEPTH) cyc(0, 1, 0);
    cyc(0, 1, 0);
    cyc(0, 1, 1);
    repeat (DEPTH) cyc(0, 0, 1);
    cyc(0, 0, 1);
    cyc(0, 1, 1);
    cyc(0, 0, 1);
    f_b.idle(2);

    // 2. reset at different levels
    levels = '{1, DEPTH / 4, DEPTH / 2, 3 * DEPTH / 4, DEPTH};
    foreach (levels[i]) begin
      repeat (levels[i]) cyc(0, 1, 0);
      own_check("level reached before reset", f_b.level() == levels[i]);
      cyc(1, 0, 0);
      f_b.idle(1);
      own_check("empty after reset", f_b.empty && f_b.almost_empty &&
                                     !f_b.full && !f_b.almost_full);
    end

    // 3. pseudo-random traffic in filling and draining phases
    for (int unsigned n = 0; n < NRAND; n++) begin
      int unsigned phase, pp, pq;
      phase = (n / (2 * DEPTH)) % 3;
      pp = (phase == 0) ? 80 : (phase == 1) ? 20 : 50;
      pq = (phase == 0) ? 20 : (phase == 1) ? 80 : 50;
      cyc(($urandom_range(999) < 3) ? 1'b1 : 1'b0,
          ($urandom_range(99) < pp) ? 1'b1 : 1'b0,
          ($urandom_range(99) < pq) ? 1'b1 : 1'b0);
    end
    f_b.idle(2);

    // mechanisms and coverage
    own_check("overflow happened",              n_overflow > 0);
    own_check("underflow happened",             n_underflow > 0);
    own_check("push and pop at full happened",  n_both_full > 0);
    own_check("reset of a non-empty FIFO",      n_reset_nonempty >= 5);
    own_check("no property violation",          dut.u_props.violations == 0);
    own_check("cover push_pop_sequencing", dut.u_props.cov.push_pop_sequencing > 0);
    own_check("cover full_on",             dut.u_props.cov.full_on > 0);
    own_check("cover empty_on",            dut.u_props.cov.empty_on > 0);
    own_check("cover almost_empty_on",     dut.u_props.cov.almost_empty_on > 0);
    own_check("cover almost_full_on",      dut.u_props.cov.almost_full_on > 0);
    own_check("cover full_off",            dut.u_props.cov.full_off > 0);
    own_check("cover empty_off",           dut.u_props.cov.empty_off > 0);
    own_check("cover almost_empty_off",    dut.u_props.cov.almost_empty_off > 0);
    own_check("cover almost_full_off",     dut.u_props.cov.almost_full_off > 0);
    $display("fifo_check depth=%0d width=%0d: overflow=%0d underflow=%0d push+pop@full=%0d resets@level=%0d",
             DEPTH, DATA_WIDTH, n_overflow, n_underflow, n_both_full, n_reset_nonempty);
    done = 1'b1;
  end

  assign checks   = f_b.checks + own_checks;
  assign failures = f_b.failures + own_failures;

endmodule
