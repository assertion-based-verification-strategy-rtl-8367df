// fifo_system -- hardwired FIFO application: a generic FIFO between two bus
// controllers, governed by an enqueue/dequeue controller, with the FIFO's
// property module attached as an on-line monitor.
//
// Words offered by the bus A controller (a_valid, a_data) are pushed into the
// FIFO by the enqueue/dequeue controller, which acknowledges each with a_ack
// and stalls bus A while the FIFO is full. Words asked for by the bus B
// controller (b_ready) are popped while the FIFO is not empty and delivered on
// b_data with b_valid one cycle after the pop. The FIFO's status flags go to
// the controller and out to the bus B side. The bus controllers themselves
// are outside this module: their FIFO-side signals are its ports.
//
// The property module checks the FIFO's flags, error output and data_out
// every cycle; `violations` counts failed checks (zero in a correct run) and
// `cov` counts how often each cover sequence of the verification plan was
// seen (push followed by pop, each flag rising and falling).
//
// Timing: one clock; reset_n is synchronous and active low. A word offered in
// cycle n with a_ack high is in the FIFO after edge n; a pop in cycle m puts
// the head word on b_data after edge m, with b_valid high for that cycle.
//
// The arrangement (bus A controller -> FIFO -> bus B controller, with the
// enqueue/dequeue controller driving the FIFO controls from its status)
// follows the application architecture; the handshakes on the ports and the
// monitor instance are this design's choices.
module fifo_system #(
  parameter int unsigned BIT_DEPTH  = fifo_pkg::DEFAULT_BIT_DEPTH,
  parameter int unsigned DATA_WIDTH = fifo_pkg::DEFAULT_DATA_WIDTH,
  parameter int unsigned CNT_WIDTH  = 32
) (
  input  logic                  clk,
  input  logic                  reset_n,
  // bus A controller side
  input  logic                  a_valid,
  input  logic [DATA_WIDTH-1:0] a_data,
  output logic                  a_ack,
  // bus B controller side
  input  logic                  b_ready,
  output logic                  b_valid,
  output logic [DATA_WIDTH-1:0] b_data,
  // FIFO status
  output logic                  full,
  output logic                  almost_full,
  output logic                  empty,
  output logic                  almost_empty,
  output logic                  error,
  // transfer accounting and monitor results
  output logic [CNT_WIDTH-1:0]  words_in,
  output logic [CNT_WIDTH-1:0]  words_out,
  output logic [31:0]           violations,
  output fifo_pkg::fifo_cov_t   cov
);

  logic push, pop;

  enq_deq_ctrl #(
    .CNT_WIDTH (CNT_WIDTH)
  ) u_ctrl (
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

  fifo #(
    .BIT_DEPTH  (BIT_DEPTH),
    .DATA_WIDTH (DATA_WIDTH)
  ) u_fifo (
    .clk          (clk),
    .reset_n      (reset_n),
    .data_in      (a_data),
    .push         (push),
    .pop          (pop),
    .data_out     (b_data),
    .full         (full),
    .almost_full  (almost_full),
    .empty        (empty),
    .almost_empty (almost_empty),
    .error        (error)
  );

  fifo_props #(
    .BIT_DEPTH  (BIT_DEPTH),
    .DATA_WIDTH (DATA_WIDTH)
  ) u_props (
    .clk          (clk),
    .reset_n      (reset_n),
    .data_in      (a_data),
    .push         (push),
    .pop          (pop),
    .data_out     (b_data),
    .full         (full),
    .almost_full  (almost_full),
    .empty        (empty),
    .almost_empty (almost_empty),
    .error        (error),
    .violations   (violations),
    .cov          (cov)
  );

endmodule
