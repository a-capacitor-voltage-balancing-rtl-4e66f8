// cvms_axi_slave: AXI4-Lite register interface through which the processor
// loads one arm's capacitor voltages and mapping constants and starts the
// mapping strategy.
//
// Register map (byte addresses, 32-bit registers, see cvms_pkg):
//   0x000 CTRL    W: bit 0 = 1 starts an operation (self-clearing pulse),
//                    bit 1 = list order (1 = descending). R: bit 1.
//   0x004 STATUS  R: bit 0 busy (engine, transfer or selection),
//                    bit 1 done (set when a list has been delivered, cleared
//                    when the next list begins), bit 2 selection busy,
//                    bit 3 step done (set when the selection unit has updated
//                    the gates, cleared by the next step).
//   0x008 VC_MIN  Vc,min as a VC_W-bit voltage code.
//   0x00C INV_DV  1/dV, INV_W-bit fixed point (see cvms_map_operator).
//   0x010 DST     byte address the sorted list is written to.
//   0x014 BAL     W: bit 0 = 1 starts a selection step (self-clearing),
//                    bit 1 arm current charges (i_pos), bit 2 optimized
//                    switching, bits 23:16 insertion index n_ref.
//                 R: the stored bits 2:1 and 23:16; bits 31:24 the number
//                    of inserted SMs.
//   0x400 + 4*i   VC[i], i = 0..N-1: bits VC_W-1:0 capacitor voltage of SM i.
//   0x800 + 4*w   GATES word w (read only): bit b = SM 32w+b inserted.
// Unmapped addresses read as zero and ignore writes; every access gets an
// OKAY response. Writes are taken as whole words (WSTRB is not decoded).
//
// Handshake: a write is accepted in the cycle in which both AWVALID and
// WVALID are high and no response is pending; BVALID follows one cycle later.
// A read is accepted when no read data is pending; RVALID follows one cycle
// later. The mapping engine reads VC[vc_idx] combinationally.
//
// The selection-step register lets the processor's level modulator hand the
// insertion index and current direction to the selection unit and read the
// resulting gate states. The reference design names a slave AXI interface
// between the processor and the mapping module but gives no register map;
// everything here is this design's choice.
module cvms_axi_slave
  import cvms_pkg::*;
#(
  parameter int unsigned N     = N_SM_DEF,
  parameter int unsigned VC_W  = VC_W_DEF,
  parameter int unsigned INV_W = INV_W_DEF,
  localparam int unsigned PW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NW   = $clog2(N + 1),
  localparam int unsigned GW   = (N + 31) / 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  axil_req_t             s_req,
  output axil_rsp_t             s_rsp,
  // to the mapping engine
  output logic                  start,
  output logic                  descending,
  output logic [VC_W-1:0]       vc_min,
  output logic [INV_W-1:0]      inv_dv,
  output logic [AXI_ADDR_W-1:0] dst_addr,
  input  logic [PW-1:0]         vc_idx,
  output logic [VC_W-1:0]       vc,
  // to the selection unit
  output logic                  bal_step,
  output logic [NW-1:0]         n_ref,
  output logic                  i_pos,
  output logic                  opt_sw,
  input  logic [N-1:0]          gates,
  // status
  input  logic                  busy,
  input  logic                  list_start, // a list operation begins (clears done)
  input  logic                  list_done,  // one-cycle pulse
  input  logic                  sel_busy,
  input  logic                  step_done,  // one-cycle pulse
  input  logic [NW-1:0]         n_ins
);

  logic [VC_W-1:0] vc_reg [N];
  logic            done_q, step_done_q;
  logic [32*GW-1:0] gates_w;
  assign gates_w = (32*GW)'(gates);
  logic            bvalid_q, rvalid_q;
  logic [31:0]     rdata_q;

  // ---- address decode ------------------------------------------------
  function automatic logic in_vc(input logic [AXIL_ADDR_W-1:0] a);
    return (a >= REG_VC0) && (32'(a - REG_VC0) < 32'(4 * N));
  endfunction

  function automatic logic [PW-1:0] vc_index(input logic [AXIL_ADDR_W-1:0] a);
    logic [AXIL_ADDR_W-1:0] off;
    off = a - REG_VC0;
    return PW'(off >> 2);
  endfunction

  function automatic logic in_gates(input logic [AXIL_ADDR_W-1:0] a);
    return (a >= REG_GATES0) && (32'(a - REG_GATES0) < 32'(4 * GW));
  endfunction

  // ---- write channel ---------------------------------------------------
  logic wr_fire;
  logic [AXIL_ADDR_W-1:0] waddr;
  assign waddr   = {s_req.awaddr[AXIL_ADDR_W-1:2], 2'b00};
  assign wr_fire = s_req.awvalid && s_req.wvalid && !bvalid_q;

  assign s_rsp.awready = wr_fire;
  assign s_rsp.wready  = wr_fire;
  assign s_rsp.bresp   = 2'b00;
  assign s_rsp.bvalid  = bvalid_q;
  assign s_rsp.rvalid  = rvalid_q;
  assign s_rsp.rdata   = rdata_q;
  assign s_rsp.rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid_q <= 1'b0;
      start        <= 1'b0;
      descending   <= 1'b0;
      vc_min       <= '0;
      inv_dv       <= '0;
      dst_addr     <= '0;
      done_q       <= 1'b0;
      bal_step     <= 1'b0;
      n_ref        <= '0;
      i_pos        <= 1'b0;
      opt_sw       <= 1'b0;
      step_done_q  <= 1'b0;
    end else begin
      start    <= 1'b0;
      bal_step <= 1'b0;
      if (step_done)
        step_done_q <= 1'b1;
      if (bvalid_q && s_req.bready)
        bvalid_q <= 1'b0;
      if (list_start)
        done_q <= 1'b0;
      if (list_done)
        done_q <= 1'b1;
      if (wr_fire) begin
        bvalid_q <= 1'b1;
        unique case (waddr)
          REG_CTRL: begin
            descending <= s_req.wdata[1];
            if (s_req.wdata[0] && !busy) begin
              start  <= 1'b1;
              done_q <= 1'b0;
            end
          end
          REG_VCMIN: vc_min   <= s_req.wdata[VC_W-1:0];
          REG_INVDV: inv_dv   <= s_req.wdata[INV_W-1:0];
          REG_DST:   dst_addr <= s_req.wdata;
          REG_BAL: begin
            i_pos  <= s_req.wdata[1];
            opt_sw <= s_req.wdata[2];
            n_ref  <= s_req.wdata[16 +: NW];
            if (s_req.wdata[0] && !sel_busy) begin
              bal_step    <= 1'b1;
              step_done_q <= 1'b0;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // Voltage registers: written by the processor, read by the engine.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++)
        vc_reg[i] <= '0;
    end else if (wr_fire && in_vc(waddr)) begin
      vc_reg[vc_index(waddr)] <= s_req.wdata[VC_W-1:0];
    end
  end

  assign vc = vc_reg[vc_idx];

  // ---- read channel ----------------------------------------------------
  logic [AXIL_ADDR_W-1:0] raddr;
  logic [31:0]            rdata_next;
  assign raddr         = {s_req.araddr[AXIL_ADDR_W-1:2], 2'b00};
  assign s_rsp.arready = !rvalid_q;

  always_comb begin
    rdata_next = '0;
    if (in_vc(raddr)) begin
      rdata_next[VC_W-1:0] = vc_reg[vc_index(raddr)];
    end else if (in_gates(raddr)) begin
      logic [AXIL_ADDR_W-1:0] goff;
      goff       = raddr - REG_GATES0;
      rdata_next = gates_w[32 * int'(32'(goff) >> 2) +: 32];
    end else begin
      unique case (raddr)
        REG_CTRL:   rdata_next[1]        = descending;
        REG_STATUS: rdata_next[3:0]      = {step_done_q, sel_busy, done_q, busy};
        REG_BAL:    begin
          rdata_next[2:1]       = {opt_sw, i_pos};
          rdata_next[16 +: NW]  = n_ref;
          rdata_next[24 +: NW]  = n_ins;
        end
        REG_VCMIN:  rdata_next[VC_W-1:0] = vc_min;
        REG_INVDV:  rdata_next[INV_W-1:0] = inv_dv;
        REG_DST:    rdata_next           = dst_addr;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
    end else if (s_req.arvalid && !rvalid_q) begin
      rvalid_q <= 1'b1;
      rdata_q  <= rdata_next;
    end else if (rvalid_q && s_req.rready) begin
      rvalid_q <= 1'b0;
    end
  end

  initial assert (N <= 255) else $error("n_ref field holds at most 255 SMs, N=%0d", N);

  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               bvalid_q && !s_req.bready |=> bvalid_q);
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
                               rvalid_q && !s_req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
