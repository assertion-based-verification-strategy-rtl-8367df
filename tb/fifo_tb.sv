// fifo_tb -- self-checking test of the generic FIFO in the four
// configurations of its verification plan: depth 2**4 and 2**8, width 16 and
// 32. Each configuration runs in its own fifo_check instance, with the
// property module bound into every FIFO instance; this module adds up their
// results. A watchdog ends the run as failed if a check hangs.
module fifo_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Bind the property module into every FIFO, as the verification plan does.
  bind fifo fifo_props #(
    .BIT_DEPTH  (BIT_DEPTH),
    .DATA_WIDTH (DATA_WIDTH)
  ) u_props (
    .clk          (clk),
    .reset_n      (reset_n),
    .data_in      (data_in),
    .push         (push),
    .pop          (pop),
    .data_out     (data_out),
    .full         (full),
    .almost_full  (almost_full),
    .empty        (empty),
    .almost_empty (almost_empty),
    .error        (error),
    .violations   (),
    .cov          ()
  );

  logic        done [4];
  int unsigned chk  [4];
  int unsigned fail [4];

  fifo_check #(.BIT_DEPTH(4), .DATA_WIDTH(16), .NRAND(3000),  .SEED(11))
    c0 (.clk(clk), .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  fifo_check #(.BIT_DEPTH(4), .DATA_WIDTH(32), .NRAND(3000),  .SEED(22))
    c1 (.clk(clk), .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  fifo_check #(.BIT_DEPTH(8), .DATA_WIDTH(16), .NRAND(12000), .SEED(33))
    c2 (.clk(clk), .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  fifo_check #(.BIT_DEPTH(8), .DATA_WIDTH(32), .NRAND(12000), .SEED(44))
    c3 (.clk(clk), .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  int unsigned checks, failures;

  task automatic report();
    checks = 0;
    failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    report();
    failures++;
    $display("fifo_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
