// cvms_fifo: one FIFO memory of the mapping strategy, DEPTH cells of W bits.
//
// A circular buffer held in an array (block-RAM friendly: one write port,
// one registered read port). `push` writes `din`; `pop` moves the oldest cell
// into the `dout` register, valid the cycle after the pop. `empty`, `full`
// and `count` come from a registered occupancy counter, so they reflect a
// push or pop from the next cycle on. `init` empties the FIFO synchronously.
// Pushing when full or popping when empty is a usage error and is checked
// with assertions; the mapping strategy sizes DEPTH to the number of SMs so
// that a full FIFO cannot be pushed.
module cvms_fifo #(
  parameter int unsigned DEPTH = cvms_pkg::N_SM_DEF,
  parameter int unsigned W     = 7,
  localparam int unsigned PTRW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [CW-1:0] count
);

  logic [W-1:0]    mem [DEPTH];
  logic [PTRW-1:0] wptr, rptr;

  function automatic logic [PTRW-1:0] inc(input logic [PTRW-1:0] p);
    return (p == PTRW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));

  always_ff @(posedge clk) begin
    if (push)
      mem[wptr] <= din;
    if (pop)
      dout <= mem[rptr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (init) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= inc(wptr);
      if (pop)  rptr <= inc(rptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
