// tb_cvms_axi_slave: self-checking test of the AXI4-Lite register interface.
// Writes every register and all N voltage words, reads them back over AXI,
// reads the voltages through the engine-side index port, checks the start
// pulse (one cycle, not issued while busy), the sticky done flag, the
// selection-step register and its pulse, the gate-state words, and that
// unmapped addresses read as zero. The manager withholds BREADY/RREADY at
// random to exercise the response hold.
// The register map under test is this design's own; the reference design
// names the interface only.
module tb_cvms_axi_slave;
  import cvms_pkg::*;
  localparam int unsigned N = 16, VC_W = 16, INV_W = 18;
  localparam int unsigned PW = $clog2(N);

  logic clk = 0, rst_n = 0;
  axil_req_t s_req;
  axil_rsp_t s_rsp;
  localparam int unsigned NW = $clog2(N + 1);
  logic start, descending, busy = 0, list_done = 0, list_start = 0;
  logic bal_step, i_pos, opt_sw, sel_busy = 0, step_done = 0;
  logic [NW-1:0] n_ref, n_ins = NW'(5);
  logic [N-1:0] gates = 16'hA5C3;
  int steps = 0;
  logic [VC_W-1:0] vc_min, vc;
  logic [INV_W-1:0] inv_dv;
  logic [AXI_ADDR_W-1:0] dst_addr;
  logic [PW-1:0] vc_idx = '0;
  int checks = 0, failures = 0, starts = 0;

  cvms_axi_slave #(.N(N), .VC_W(VC_W), .INV_W(INV_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;
  always @(posedge clk) if (bal_step) steps++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic axil_write(input logic [AXIL_ADDR_W-1:0] a, input logic [31:0] d);
    s_req.awaddr = a; s_req.awvalid = 1; s_req.wdata = d; s_req.wstrb = '1; s_req.wvalid = 1;
    do @(posedge clk); while (!(s_rsp.awready && s_rsp.wready));
    #1;
    s_req.awvalid = 0; s_req.wvalid = 0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
    s_req.bready = 1;
    while (!s_rsp.bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_req.bready = 0;
  endtask

  task automatic axil_read(input logic [AXIL_ADDR_W-1:0] a, output logic [31:0] d);
    s_req.araddr = a; s_req.arvalid = 1;
    do @(posedge clk); while (!s_rsp.arready);
    #1;
    s_req.arvalid = 0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
    while (!s_rsp.rvalid) begin @(posedge clk); #1; end
    d = s_rsp.rdata;
    s_req.rready = 1;
    @(posedge clk); #1;
    s_req.rready = 0;
  endtask

  logic [31:0] words [N];
  logic [31:0] rd;

  initial begin
    s_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    axil_write(REG_VCMIN, 32'd10000);
    axil_write(REG_INVDV, 32'd1677);
    axil_write(REG_DST, 32'h1000_0200);
    for (int i = 0; i < N; i++) begin
      words[i] = {16'd0, 16'($urandom)};
      axil_write(REG_VC0 + AXIL_ADDR_W'(4 * i), words[i] | 32'hFFFF_0000);
    end
    check(vc_min == 16'd10000 && inv_dv == 18'd1677 && dst_addr == 32'h1000_0200, "config outputs");
    axil_read(REG_VCMIN, rd); check(rd == 32'd10000, "read VC_MIN");
    axil_read(REG_INVDV, rd); check(rd == 32'd1677, "read INV_DV");
    axil_read(REG_DST, rd);   check(rd == 32'h1000_0200, "read DST");
    axil_read(12'h3F0, rd);   check(rd == 32'd0, "unmapped reads zero");
    for (int i = 0; i < N; i++) begin
      axil_read(REG_VC0 + AXIL_ADDR_W'(4 * i), rd);
      check(rd == words[i], $sformatf("read VC[%0d]", i));
      vc_idx = PW'(i);
      #1;
      check(vc == words[i][15:0], $sformatf("engine port VC[%0d]", i));
    end
    // start with descending order
    starts = 0;
    axil_write(REG_CTRL, 32'h3);
    check(starts == 1 && descending, "start pulse, descending latched");
    axil_read(REG_CTRL, rd); check(rd == 32'h2, "read CTRL");
    busy = 1;
    axil_write(REG_CTRL, 32'h1);
    check(starts == 1, "start ignored while busy");
    axil_read(REG_STATUS, rd); check(rd == 32'h1, "status busy");
    busy = 0;
    @(posedge clk); #1; list_done = 1; @(posedge clk); #1; list_done = 0;
    axil_read(REG_STATUS, rd); check(rd == 32'h2, "status done");
    axil_write(REG_CTRL, 32'h1);
    check(starts == 2 && !descending, "second start, ascending");
    axil_read(REG_STATUS, rd); check(rd == 32'h0, "done cleared by start");
    // selection step register
    axil_write(REG_BAL, 32'h000B_0007);
    check(steps == 1 && i_pos && opt_sw && n_ref == NW'(11), "step pulse and fields");
    axil_read(REG_BAL, rd); check(rd == 32'h050B_0006, $sformatf("read BAL %h", rd));
    sel_busy = 1;
    axil_write(REG_BAL, 32'h0003_0001);
    check(steps == 1 && n_ref == NW'(3) && !i_pos && !opt_sw, "step ignored while selecting");
    axil_read(REG_STATUS, rd); check(rd == 32'h4, "status selection busy");
    sel_busy = 0;
    @(posedge clk); #1; step_done = 1; @(posedge clk); #1; step_done = 0;
    axil_read(REG_STATUS, rd); check(rd == 32'h8, "status step done");
    axil_read(REG_GATES0, rd); check(rd == 32'h0000_A5C3, "read GATES");
    axil_read(REG_GATES0 + 12'd4, rd); check(rd == 32'h0, "beyond GATES reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
