// cvms_pl_top: programmable-logic part of the capacitor voltage balancing
// system for one MMC phase: two independent arm units, index 0 for the upper
// arm and index 1 for the lower arm, each with its own AXI4-Lite slave port
// (voltages, constants, control) and AXI4 master port (quasi-sorted list out)
// and its own gate-state output (one bit per SM) towards the modulators.
// The two arms share only the clock and reset and may run at the same time.
// The processor system, the AXI interconnect and the power stage are outside
// this module. Per-arm timing is that of cvms_arm. Two arm units per phase
// follow the reference architecture.
module cvms_pl_top
  import cvms_pkg::*;
#(
  parameter int unsigned N        = N_SM_DEF,
  parameter int unsigned M        = M_FIFO_DEF,
  parameter int unsigned VC_W     = VC_W_DEF,
  parameter int unsigned INV_W    = INV_W_DEF,
  parameter int unsigned INV_FRAC = INV_FRAC_DEF
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req     [2],
  output axil_rsp_t s_rsp     [2],
  output axi_wreq_t m_req     [2],
  input  axi_wrsp_t m_rsp     [2],
  output logic [N-1:0] gates [2],   // SM gate states per arm, 1 = inserted
  output logic      done_map  [2],
  output logic      list_done [2],
  output logic      step_done [2]
);

  for (genvar a = 0; a < 2; a++) begin : g_arm
    cvms_arm #(
      .N(N), .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)
    ) u_arm (
      .clk, .rst_n,
      .s_req(s_req[a]), .s_rsp(s_rsp[a]),
      .m_req(m_req[a]), .m_rsp(m_rsp[a]),
      .gates(gates[a]),
      .done_map(done_map[a]), .list_done(list_done[a]), .step_done(step_done[a])
    );
  end

endmodule
