// cvms_fifo_bank: the memory block of the mapping strategy: M FIFO memories,
// one per capacitor voltage sub-range, each N cells deep so that all N SM
// positions fit into a single FIFO when all voltages fall in one sub-range.
//
// Write side: a demultiplexer steers `push`/`din` to FIFO `push_addr` (the
// map operator's address). Read side: `pop` goes to FIFO `sel`; the popped
// cell appears on `dout` one cycle later, taken through an output multiplexer
// driven by the `sel` value registered at the pop. `sel_empty` is the empty
// flag of FIFO `sel` (empty multiplexer feeding the state machine);
// `empty` gives all M flags. `init` empties every FIFO. FIFOs, demultiplexer,
// output and empty multiplexers follow the reference data path; the one-cycle
// registered read is this design's choice.
module cvms_fifo_bank #(
  parameter int unsigned M   = cvms_pkg::M_FIFO_DEF,
  parameter int unsigned N   = cvms_pkg::N_SM_DEF,
  parameter int unsigned W   = 7,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic [W-1:0]  din,
  input  logic          pop,
  input  logic [AW-1:0] sel,
  output logic [W-1:0]  dout,
  output logic          sel_empty,
  output logic [M-1:0]  empty
);

  logic [W-1:0]  fifo_dout [M];
  logic [AW-1:0] sel_q;

  for (genvar g = 0; g < M; g++) begin : g_fifo
    cvms_fifo #(.DEPTH(N), .W(W)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .init  (init),
      .push  (push && (push_addr == AW'(g))),
      .din   (din),
      .pop   (pop && (sel == AW'(g))),
      .dout  (fifo_dout[g]),
      .empty (empty[g]),
      .full  (),
      .count ()
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sel_q <= '0;
    else if (pop) sel_q <= sel;
  end

  assign dout      = fifo_dout[sel_q];
  assign sel_empty = empty[sel];

endmodule
