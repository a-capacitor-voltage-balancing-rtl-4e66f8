// cvms_arm: programmable-logic unit of one MMC arm. The processor writes the
// arm's capacitor voltages and mapping constants through the AXI4-Lite slave.
// Two operations use the mapping engine (cvms_core):
//   * CTRL.start: the engine builds the quasi-sorted list of SM positions and
//     the AXI4 master streams it into processor memory at DST as one N-beat
//     burst; STATUS.done is set when the burst's write response has arrived.
//   * BAL.step: the selection unit (cvms_sm_select) has the engine build the
//     list in the order it needs and updates the arm's gate states `gates`
//     (1 = SM inserted) towards the insertion index BAL.n_ref; the list is
//     also written to DST. STATUS.step_done is set when the gates are updated.
// The engine always reads the SM states from the selection unit's gates, so
// each list entry carries the SM's current state.
//
// A start is ignored while the engine, the list transfer or the selection
// unit is busy, a step while the selection unit is busy; a step waits for the
// engine and the list transfer to become idle.
//
// Timing: the address phase of the burst is issued right after the engine
// starts; the first list entry leaves the engine N + 6 cycles after the
// start (plus one per leading empty FIFO) and the engine finishes after
// 2N + M + 5 cycles. The slave / engine / master split follows the reference
// architecture, which runs the selection on the processor; placing the
// selection unit here and the wiring between the parts are this design's
// choices.
module cvms_arm
  import cvms_pkg::*;
#(
  parameter int unsigned N        = N_SM_DEF,
  parameter int unsigned M        = M_FIFO_DEF,
  parameter int unsigned VC_W     = VC_W_DEF,
  parameter int unsigned INV_W    = INV_W_DEF,
  parameter int unsigned INV_FRAC = INV_FRAC_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  axil_req_t    s_req,
  output axil_rsp_t    s_rsp,
  output axi_wreq_t    m_req,
  input  axi_wrsp_t    m_rsp,
  output logic [N-1:0] gates,      // SM gate states, 1 = inserted
  output logic         done_map,   // engine finished a list (one-cycle pulse)
  output logic         list_done,  // list delivered to memory (one-cycle pulse)
  output logic         step_done   // gates updated (one-cycle pulse)
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned NW = $clog2(N + 1);

  logic                  cpu_start, cpu_desc, core_busy, mst_busy;
  logic                  eng_start, eng_desc, sel_start, sel_desc, sel_busy;
  logic [VC_W-1:0]       vc_min, vc;
  logic [INV_W-1:0]      inv_dv;
  logic [AXI_ADDR_W-1:0] dst_addr;
  logic [PW-1:0]         vc_idx, pos_sort;
  logic [AW-1:0]         range_sort;
  logic                  ins_sort, valid_data;
  logic                  bal_step, i_pos, opt_sw;
  logic [NW-1:0]         n_ref, n_ins;

  cvms_axi_slave #(.N(N), .VC_W(VC_W), .INV_W(INV_W)) u_slave (
    .clk, .rst_n, .s_req, .s_rsp,
    .start(cpu_start), .descending(cpu_desc), .vc_min, .inv_dv, .dst_addr,
    .vc_idx, .vc,
    .bal_step, .n_ref, .i_pos, .opt_sw, .gates,
    .busy(core_busy || mst_busy || sel_busy), .list_start(eng_start), .list_done, .sel_busy, .step_done, .n_ins
  );

  // one engine, two requesters; they never start in the same cycle, since a
  // processor start is refused while the selection unit is busy
  assign eng_start = sel_start || cpu_start;
  assign eng_desc  = sel_start ? sel_desc : cpu_desc;

  cvms_core #(
    .N(N), .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)
  ) u_core (
    .clk, .rst_n, .start(eng_start), .descending(eng_desc), .vc_min, .inv_dv,
    .vc_idx, .vc, .ins(gates[vc_idx]),
    .pos_sort, .ins_sort, .range_sort, .valid_data, .done_map, .busy(core_busy)
  );

  cvms_sm_select #(.N(N), .M(M)) u_select (
    .clk, .rst_n,
    .step(bal_step), .n_ref, .i_pos, .opt_sw,
    .eng_start(sel_start), .eng_desc(sel_desc), .eng_busy(core_busy || mst_busy),
    .in_valid(valid_data), .in_pos(pos_sort), .in_range(range_sort), .eng_done(done_map),
    .gates, .n_ins, .busy(sel_busy), .step_done
  );

  cvms_axi_master #(.N(N)) u_master (
    .clk, .rst_n, .start(eng_start), .dst_addr,
    .in_valid(valid_data), .in_pos(pos_sort), .in_ins(ins_sort),
    .m_req, .m_rsp, .list_done, .busy(mst_busy)
  );

endmodule
