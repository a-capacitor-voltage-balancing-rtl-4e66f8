// cvms_core: the capacitor voltage mapping strategy (CVMS) module of one MMC
// arm: data path (map operator, position generator, FIFO memory block) plus
// the state machine that sequences it.
//
// After `start`, the module reads the N capacitor voltages one per cycle:
// it drives `vc_idx` and expects `vc`/`ins` (voltage and inserted status of
// SM `vc_idx`) back in the same cycle, e.g. from a register file. Each
// voltage is mapped to one of M sub-ranges and the SM position, with its
// status bit, is pushed into that sub-range's FIFO. The FIFOs are then read
// in ascending (`descending` = 0) or descending address order, giving a
// quasi-sorted list of SM positions on `pos_sort`/`ins_sort`/`range_sort`
// (position, status, sub-range), one entry per cycle in which `valid_data`
// is high; positions within one sub-range come out in increasing position
// order. `done_map` pulses once after the N-th entry. `vc_min` and `inv_dv`
// must be stable while `busy`.
//
// Latency: done_map comes 2N + M + 5 clock cycles after the start cycle
// (141 cycles for N = 64, M = 8; 0.7 us at 200 MHz). The first list entry
// appears N + 6 cycles after start (one more per empty FIFO read before it),
// so a consumer can begin before the list is complete. The structure
// (map operator, position counter, one FIFO per sub-range, sequencing state
// machine) follows the reference data path; the index-driven voltage
// read-in, the status bit input and the cycle timing are this design's
// choices.
module cvms_core #(
  parameter int unsigned N        = cvms_pkg::N_SM_DEF,
  parameter int unsigned M        = cvms_pkg::M_FIFO_DEF,
  parameter int unsigned VC_W     = cvms_pkg::VC_W_DEF,
  parameter int unsigned INV_W    = cvms_pkg::INV_W_DEF,
  parameter int unsigned INV_FRAC = cvms_pkg::INV_FRAC_DEF,
  localparam int unsigned PW      = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW      = (M > 1) ? $clog2(M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             descending,
  input  logic [VC_W-1:0]  vc_min,
  input  logic [INV_W-1:0] inv_dv,
  output logic [PW-1:0]    vc_idx,     // SM whose voltage is requested
  input  logic [VC_W-1:0]  vc,         // voltage of SM vc_idx
  input  logic             ins,        // SM vc_idx is inserted
  output logic [PW-1:0]    pos_sort,   // list entry: SM position
  output logic             ins_sort,   // list entry: SM status
  output logic [AW-1:0]    range_sort, // list entry: its sub-range (FIFO address)
  output logic             valid_data,
  output logic             done_map,
  output logic             busy
);

  logic          init_dp, en_count, en_r, push, pop, sel_empty;
  logic [AW-1:0] add, sel;
  logic [PW-1:0] pos, pos_d;
  logic          ins_d;
  logic [PW:0]   rd_cell;

  cvms_map_operator #(
    .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)
  ) u_map (
    .clk, .rst_n, .en(en_r), .vc, .vc_min, .inv_dv, .addr(add)
  );

  cvms_position_gen #(.N(N)) u_pos (
    .clk, .rst_n, .init(init_dp), .en_count, .en_r, .ins,
    .pos, .pos_d, .ins_d
  );

  cvms_fifo_bank #(.M(M), .N(N), .W(PW + 1)) u_mem (
    .clk, .rst_n, .init(init_dp),
    .push, .push_addr(add), .din({ins_d, pos_d}),
    .pop, .sel, .dout(rd_cell), .sel_empty, .empty()
  );

  cvms_fsm #(.N(N), .M(M)) u_fsm (
    .clk, .rst_n, .start, .descending, .pos, .sel_empty,
    .init_dp, .en_count, .en_r, .push, .pop, .sel,
    .valid_data, .done_map, .busy
  );

  // sub-range of the entry being read: the FIFO address at its pop
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   range_sort <= '0;
    else if (pop) range_sort <= sel;
  end

  assign vc_idx   = pos;
  assign pos_sort = rd_cell[PW-1:0];
  assign ins_sort = rd_cell[PW];

endmodule
