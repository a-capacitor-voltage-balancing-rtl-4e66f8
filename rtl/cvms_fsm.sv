// cvms_fsm: state machine that sequences the mapping strategy data path.
//
// Writing operation: on `start` the data path is initialised (FIFOs and
// position counter cleared) and the order direction is latched. For N
// cycles the position counter and the map pipeline advance, one SM per
// cycle; each position is pushed into FIFO `add` MAP_LAT cycles after it
// entered the pipeline. Three drain cycles let the last position land.
// Reading operation: `sel` starts at address 0 (ascending list) or M-1
// (descending list). Each cycle, if FIFO `sel` holds data it is popped;
// otherwise, if `sel` is the last address the operation ends, else `sel`
// steps by one towards it. `valid_data` marks each list entry on the data
// path output (one cycle after its pop) and `done_map` pulses for one cycle
// after the last entry. `busy` is high from `start` until `done_map`.
//
// Timing, from the cycle after `start`: 1 init + N write + MAP_LAT drain +
// (N + M) read cycles, then `done_map`: 1 + N + 3 + N + M + 1 cycles in all
// (141 for N = 64, M = 8). Every list has exactly N entries.
//
// The flow (write all positions, then read in the requested direction,
// moving to the next FIFO when one is empty) follows the reference state
// machine. The reference flow chart starts a descending read at address M
// and ends an ascending one at M, while the memory has addresses 0..M-1;
// this design uses M-1 as the top address. Cycle-level timing is this
// design's own.
module cvms_fsm #(
  parameter int unsigned N   = cvms_pkg::N_SM_DEF,
  parameter int unsigned M   = cvms_pkg::M_FIFO_DEF,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,       // begin one operation (ignored while busy)
  input  logic          descending,  // list order, sampled with start
  input  logic [PW-1:0] pos,         // position counter value
  input  logic          sel_empty,   // FIFO `sel` is empty
  output logic          init_dp,     // clear FIFOs and position counter
  output logic          en_count,    // advance position counter
  output logic          en_r,        // advance pipeline registers r1..r6
  output logic          push,        // write into FIFO `add`
  output logic          pop,         // read FIFO `sel`
  output logic [AW-1:0] sel,         // FIFO being read
  output logic          valid_data,  // data path output holds a list entry
  output logic          done_map,    // one-cycle pulse: list complete
  output logic          busy
);

  localparam int unsigned D = cvms_pkg::MAP_LAT;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_WRITE, S_DRAIN, S_READ, S_DONE} state_t;

  state_t        state;
  logic          desc_q;
  logic [D-1:0]  issued;     // which pipeline stages hold a real SM
  logic [1:0]    drain_cnt;

  always_comb begin
    init_dp  = (state == S_INIT);
    en_count = (state == S_WRITE);
    en_r     = (state == S_WRITE) || (state == S_DRAIN);
    push     = issued[D-1];
    pop      = (state == S_READ) && !sel_empty;
    done_map = (state == S_DONE);
    busy     = (state != S_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      desc_q     <= 1'b0;
      issued     <= '0;
      drain_cnt  <= '0;
      sel        <= '0;
      valid_data <= 1'b0;
    end else begin
      valid_data <= pop;
      if (en_r)
        issued <= {issued[D-2:0], en_count};
      unique case (state)
        S_IDLE: if (start) begin
          desc_q <= descending;
          state  <= S_INIT;
        end
        S_INIT: begin
          issued <= '0;
          state  <= S_WRITE;
        end
        S_WRITE: if (pos == PW'(N - 1)) begin
          drain_cnt <= '0;
          state     <= S_DRAIN;
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == 2'(D - 1)) begin
            sel   <= desc_q ? AW'(M - 1) : '0;
            state <= S_READ;
          end
        end
        S_READ: if (sel_empty) begin
          if (sel == (desc_q ? '0 : AW'(M - 1)))
            state <= S_DONE;
          else
            sel <= desc_q ? sel - 1'b1 : sel + 1'b1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
