// fifo_wave_tb -- directed replay of a short write-then-read sequence on the
// default FIFO (16 words of 16 bits).
//
// Five words, 3'b111, 3'b101, 3'b110, 3'b101, 3'b110 (zero-extended), are
// pushed on consecutive cycles; then four pops on consecutive cycles must
// return 111, 101, 110, 101 in that order, each on data_out one cycle after
// its pop. One word is left, so the FIFO must be almost empty but not empty.
// A reset then empties it. Flags are checked at every step against levels
// worked out here (almost_full from 12 words, almost_empty up to 4).
module fifo_wave_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        reset_n, push, pop;
  logic [15:0] din, dout;
  logic        full, almost_full, empty, almost_empty, error;

  fifo dut (
    .clk          (clk),
    .reset_n      (reset_n),
    .data_in      (din),
    .push         (push),
    .pop          (pop),
    .data_out     (dout),
    .full         (full),
    .almost_full  (almost_full),
    .empty        (empty),
    .almost_empty (almost_empty),
    .error        (error)
  );

  int unsigned checks = 0, failures = 0;
  logic [15:0] words [5] = '{16'b111, 16'b101, 16'b110, 16'b101, 16'b110};

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("fifo_wave_tb: FAILED %s at %0t", what, $time);
    end
  endtask

  task automatic flags(input int unsigned lvl);
    check("full",         full == (lvl == 16));
    check("almost_full",  almost_full == (lvl >= 12));
    check("empty",        empty == (lvl == 0));
    check("almost_empty", almost_empty == (lvl <= 4));
    check("error",        !error);
  endtask

  initial begin
    reset_n = 1'b0; push = 1'b0; pop = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    flags(0);
    for (int i = 0; i < 5; i++) begin
      push = 1'b1;
      din  = words[i];
      @(negedge clk);
      flags(i + 1);
    end
    push = 1'b0;
    for (int i = 0; i < 4; i++) begin
      pop = 1'b1;
      @(negedge clk);
      check("read order", dout == words[i]);
      flags(4 - i);
    end
    pop = 1'b0;
    @(negedge clk);
    check("data_out held", dout == words[3]);
    flags(1);
    reset_n = 1'b0;
    @(negedge clk);
    reset_n = 1'b1;
    flags(0);
    check("data_out cleared by reset", dout == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("fifo_wave_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
