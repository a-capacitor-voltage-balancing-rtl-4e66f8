// tb_axi_mem: behavioural AXI4 write-only memory for testbenches. Accepts one
// burst at a time, stores 32-bit beats into a word array starting at
// awaddr/4, and answers with OKAY after the last beat. AWREADY and WREADY are
// withheld at random when `stall` is set, to exercise back-pressure. It
// checks burst type, size, length against the number of beats and WLAST, and
// counts bursts, beats, stalls and protocol errors.
// It stands in for the processor memory behind the interconnect, which the
// reference design takes as given; its behaviour is this design's own.
module tb_axi_mem
  import cvms_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      stall,
  input  axi_wreq_t req,
  output axi_wrsp_t rsp
);

  logic [31:0] mem [WORDS];
  int bursts = 0, beats = 0, stalls = 0, errors = 0;
  int first_beat_cycle = -1;

  logic        have_aw;
  int          addr_w, len, beat_i;
  logic        awready_r, wready_r, bvalid_r;
  int          cyc = 0;

  assign rsp.awready = awready_r;
  assign rsp.wready  = wready_r;
  assign rsp.bvalid  = bvalid_r;
  assign rsp.bresp   = 2'b00;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hDEAD_BEEF;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_aw   <= 0;
      awready_r <= 0;
      wready_r  <= 0;
      bvalid_r  <= 0;
      beat_i    <= 0;
    end else begin
      cyc <= cyc + 1;
      awready_r <= !have_aw && !(stall && $urandom_range(0, 2) == 0);
      wready_r  <= !(stall && $urandom_range(0, 2) == 0);
      if (req.awvalid && !awready_r && stall) stalls <= stalls + 1;
      if (req.wvalid && !wready_r && stall) stalls <= stalls + 1;
      if (req.awvalid && awready_r) begin
        have_aw <= 1;
        addr_w  <= int'(req.awaddr >> 2);
        len     <= int'(req.awlen) + 1;
        beat_i  <= 0;
        if (req.awburst != 2'b01 || req.awsize != 3'd2) errors <= errors + 1;
        awready_r <= 0;
      end
      if (req.wvalid && wready_r) begin
        // beats may arrive before the address; they are kept in order
        mem[(have_aw ? addr_w : pend_base) + beat_i] <= req.wdata;
        if (beat_i == 0) first_beat_cycle <= cyc;
        beat_i <= beat_i + 1;
        beats  <= beats + 1;
        if (req.wlast) begin
          if (have_aw && beat_i + 1 != len) errors <= errors + 1;
          bvalid_r <= 1;
        end
      end
      if (bvalid_r && req.bready) begin
        bvalid_r <= 0;
        have_aw  <= 0;
        bursts   <= bursts + 1;
      end
    end
  end

  // Beats that come before the address phase are written relative to the
  // address still pending on the AW channel.
  int pend_base;
  assign pend_base = int'(req.awaddr >> 2);

endmodule
