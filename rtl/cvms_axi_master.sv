// cvms_axi_master: sends one arm's quasi-sorted list of SM positions to the
// processor's memory as a single AXI4 write burst.
//
// On `start` (the same pulse that starts the mapping engine) the base address
// is latched and the address phase of an INCR burst of N 32-bit beats is
// issued at once, so it overlaps with the engine's writing operation. List
// entries arriving on `in_valid`/`in_pos`/`in_ins` are buffered in an N-deep
// FIFO, so the engine never has to wait, and leave as W beats: bits PW-1:0
// carry the SM position, bit 31 the SM's inserted status. Entries go out in
// the order they arrive, so the processor can use the first ones before the
// burst ends. After the write response, `list_done` pulses for one cycle;
// `busy` is high from `start` until then.
//
// Throughput: at most one beat every two cycles (the buffer has a registered
// read). N must not exceed 256 (AXI4 burst length) and the N*4-byte list must
// not cross a 4 KB boundary. The reference design states only that the list
// goes to the processor over AXI in burst mode; buffer, beat format and
// timing are this design's choices.
module cvms_axi_master
  import cvms_pkg::*;
#(
  parameter int unsigned N   = N_SM_DEF,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [AXI_ADDR_W-1:0] dst_addr,
  input  logic                  in_valid,
  input  logic [PW-1:0]         in_pos,
  input  logic                  in_ins,
  output axi_wreq_t             m_req,
  input  axi_wrsp_t             m_rsp,
  output logic                  list_done,
  output logic                  busy
);

  logic                  aw_pending;
  logic [AXI_ADDR_W-1:0] awaddr_q;
  logic                  wvalid_q, loading, b_wait;
  logic [PW:0]           wcell_q, buf_dout;
  logic [CW-1:0]         beats;      // beats accepted so far
  logic                  buf_empty, buf_pop, w_fire;

  assign w_fire  = wvalid_q && m_rsp.wready;
  assign buf_pop = busy && !buf_empty && !loading && (!wvalid_q || w_fire);

  cvms_fifo #(.DEPTH(N), .W(PW + 1)) u_buf (
    .clk, .rst_n, .init(start),
    .push(in_valid), .din({in_ins, in_pos}),
    .pop(buf_pop), .dout(buf_dout),
    .empty(buf_empty), .full(), .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      aw_pending <= 1'b0;
      awaddr_q   <= '0;
      wvalid_q   <= 1'b0;
      wcell_q    <= '0;
      loading    <= 1'b0;
      beats      <= '0;
      b_wait     <= 1'b0;
      list_done  <= 1'b0;
    end else begin
      list_done <= 1'b0;
      loading   <= buf_pop;
      if (start) begin
        busy       <= 1'b1;
        aw_pending <= 1'b1;
        awaddr_q   <= dst_addr;
        beats      <= '0;
        b_wait     <= 1'b0;
        wvalid_q   <= 1'b0;
        loading    <= 1'b0;
      end else begin
        if (aw_pending && m_rsp.awready)
          aw_pending <= 1'b0;
        if (w_fire) begin
          wvalid_q <= 1'b0;
          beats    <= beats + 1'b1;
          if (beats == CW'(N - 1))
            b_wait <= 1'b1;
        end
        if (loading) begin
          wvalid_q <= 1'b1;
          wcell_q  <= buf_dout;
        end
        if (b_wait && m_rsp.bvalid) begin
          b_wait    <= 1'b0;
          busy      <= 1'b0;
          list_done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    m_req         = '0;
    m_req.awaddr  = awaddr_q;
    m_req.awlen   = 8'(N - 1);
    m_req.awsize  = 3'($clog2(AXI_DATA_W / 8));
    m_req.awburst = 2'b01;                       // INCR
    m_req.awvalid = aw_pending;
    m_req.wdata[PW-1:0]       = wcell_q[PW-1:0];
    m_req.wdata[LIST_INS_BIT] = wcell_q[PW];
    m_req.wstrb   = '1;
    m_req.wlast   = (beats == CW'(N - 1));
    m_req.wvalid  = wvalid_q;
    m_req.bready  = b_wait;
  end

  initial assert (N <= 256) else $error("burst length N=%0d exceeds 256", N);

  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                m_req.awvalid && !m_rsp.awready && !start |=> m_req.awvalid);
  a_w_stable:  assert property (@(posedge clk) disable iff (!rst_n)
                                m_req.wvalid && !m_rsp.wready && !start |=> m_req.wvalid && $stable(m_req.wdata));

endmodule
