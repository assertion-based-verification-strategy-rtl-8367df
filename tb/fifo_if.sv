// fifo_if -- the FIFO's signal bundle for testbenches, with the server tasks
// that drive it and the reference model that predicts it.
//
// A transactor calls step() once per clock cycle. step() waits for the
// falling edge, applies the reset, push, pop and data_in values for the next
// rising edge, and advances the reference model to the state the FIFO must
// be in after that edge: the queue `model` of held words, the expected
// data_out (updated only by an accepted pop) and the expected error (set
// after a push into a full FIFO without a pop, or a pop from an empty one).
// Before driving, step() compares the FIFO's outputs with the model's
// prediction for the edge just gone (flags, error, data_out), so each
// output is checked half a cycle after it settles and a popped word must
// appear exactly one cycle after its pop. The counts go to checks/failures. The model works out the flag levels independently of the RTL:
// almost_full at and above 3/4 of the depth, almost_empty at and below 1/4.
interface fifo_if #(
  parameter int unsigned BIT_DEPTH  = 4,
  parameter int unsigned DATA_WIDTH = 16
) (
  input logic clk
);
  localparam int unsigned DEPTH = 2 ** BIT_DEPTH;

  logic                  reset_n;
  logic [DATA_WIDTH-1:0] data_in;
  logic                  push;
  logic                  pop;
  logic [DATA_WIDTH-1:0] data_out;
  logic                  full;
  logic                  almost_full;
  logic                  empty;
  logic                  almost_empty;
  logic                  error;

  // reference model
  logic [DATA_WIDTH-1:0] model[$];
  logic [DATA_WIDTH-1:0] exp_data_out;
  logic                  exp_error;
  logic                  dout_known;   // data_out is defined (after a reset)

  // scoreboard
  int unsigned checks   = 0;
  int unsigned failures = 0;

  // what the last step did, for the transactor's statistics
  bit last_overflow, last_underflow, last_reset, last_both;

  function automatic int unsigned level();
    return model.size();
  endfunction

  function automatic bit exp_full();         return level() == DEPTH;                endfunction
  function automatic bit exp_empty();        return level() == 0;                    endfunction
  function automatic bit exp_almost_full();  return 4 * level() >= 3 * DEPTH;       endfunction
  function automatic bit exp_almost_empty(); return 4 * level() <= DEPTH;            endfunction

  function automatic void expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%m: %s is %0b, expected %0b (level %0d) at %0t", what, got, exp, level(), $time);
    end
  endfunction

  function automatic void check_outputs();
    expect_bit("full",         full,         exp_full());
    expect_bit("empty",        empty,        exp_empty());
    expect_bit("almost_full",  almost_full,  exp_almost_full());
    expect_bit("almost_empty", almost_empty, exp_almost_empty());
    expect_bit("error",        error,        exp_error);
    checks++;
    if (data_out !== exp_data_out) begin
      failures++;
      $display("%m: data_out is %h, expected %h at %0t", data_out, exp_data_out, $time);
    end
  endfunction

  // One clock cycle: drive the inputs for the coming rising edge and move the
  // model to the state after it.
  task automatic step(input bit rst, input bit do_push, input bit do_pop,
                      input logic [DATA_WIDTH-1:0] d);
    bit f, e;
    @(negedge clk);
    if (dout_known) check_outputs();
    reset_n = !rst;
    push    = do_push;
    pop     = do_pop;
    data_in = d;
    f = exp_full();
    e = exp_empty();
    last_reset     = rst;
    last_overflow  = !rst && do_push && f && !do_pop;
    last_underflow = !rst && do_pop && e;
    last_both      = !rst && do_push && do_pop;
    if (rst) begin
      model.delete();
      exp_data_out = '0;
      exp_error    = 1'b0;
      dout_known   = 1'b1;
    end else begin
      exp_error = last_overflow || last_underflow;
      if (do_pop && !e) exp_data_out = model.pop_front();
      if (do_push && (!f || do_pop)) model.push_back(d);
    end
  endtask

  task automatic idle(input int unsigned n);
    repeat (n) step(1'b0, 1'b0, 1'b0, '0);
  endtask

  task automatic do_reset(input int unsigned n);
    repeat (n) step(1'b1, 1'b0, 1'b0, '0);
  endtask

  initial begin
    reset_n    = 1'b0;
    push       = 1'b0;
    pop        = 1'b0;
    data_in    = '0;
    exp_error  = 1'b0;
    dout_known = 1'b0;
    exp_data_out = '0;
  end

endinterface
