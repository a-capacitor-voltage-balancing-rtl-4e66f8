// tb_cvms_arm: one arm unit end to end at reduced size (N = 16, M = 4). The
// processor side is played by AXI4-Lite write/read tasks, the memory by
// tb_axi_mem. Each run loads random voltages and SM states, programs Vc,min,
// 1/dV and the destination, starts the arm, polls STATUS until done and
// compares the list in memory with a reference computed in real arithmetic.
// A selection step then inserts the five lowest-voltage SMs, checked through
// the gate outputs and registers, and a last list must carry those states.
// The expected lists follow the mapping rule of the reference strategy; the
// register sequence is this design's own interface.
module tb_cvms_arm;
  import cvms_pkg::*;
  localparam int unsigned N = 16, M = 4, INV_FRAC = 20;

  logic clk = 0, rst_n = 0, stall = 0;
  axil_req_t s_req;
  axil_rsp_t s_rsp;
  axi_wreq_t m_req;
  axi_wrsp_t m_rsp;
  logic [N-1:0] gates;
  logic done_map, list_done, step_done;
  int checks = 0, failures = 0;

  cvms_arm #(.N(N), .M(M)) dut (.*);
  tb_axi_mem #(.WORDS(256)) u_mem (.clk, .rst_n, .stall, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    s_req.bready = 1;
    do @(posedge clk); while (!(s_rsp.awready && s_rsp.wready));
    #1;
    s_req.awvalid = 0; s_req.wvalid = 0;
    while (!s_rsp.bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_req.bready = 0;
  endtask

  task automatic axil_read(input logic [AXIL_ADDR_W-1:0] a, output logic [31:0] d);
    s_req.araddr = a; s_req.arvalid = 1; s_req.rready = 1;
    do @(posedge clk); while (!s_rsp.arready);
    #1;
    s_req.arvalid = 0;
    while (!s_rsp.rvalid) begin @(posedge clk); #1; end
    d = s_rsp.rdata;
    @(posedge clk); #1;
    s_req.rready = 0;
  endtask

  int volt [N];
  bit st [N];

  task automatic run(input int vmin, input int dv, input bit desc, input int base_word);
    int exp_list [$];
    logic [31:0] rd;
    int inv, polls;
    inv = (1 << INV_FRAC) / dv;
    for (int p = 0; p < N; p++) begin
      volt[p] = vmin - dv + $urandom_range(0, (M + 2) * dv);
      st[p] = gates[p];
      axil_write(REG_VC0 + AXIL_ADDR_W'(4 * p), {16'd0, 16'(volt[p])});
    end
    for (int k = 0; k < M; k++) begin
      int a = desc ? M - 1 - k : k;
      for (int p = 0; p < N; p++) begin
        int r = int'($floor((real'(volt[p]) - real'(vmin)) * real'(inv) / real'(1 << INV_FRAC) + 0.5));
        r = (r < 0) ? 0 : (r > M - 1) ? M - 1 : r;
        if (r == a) exp_list.push_back(p);
      end
    end
    axil_write(REG_VCMIN, 32'(vmin));
    axil_write(REG_INVDV, 32'(inv));
    axil_write(REG_DST, 32'(base_word * 4));
    axil_write(REG_CTRL, {30'd0, desc, 1'b1});
    polls = 0;
    do begin axil_read(REG_STATUS, rd); polls++; end while (rd[1] == 0 && polls < 200);
    check(rd[1:0] == 2'b10, "STATUS done, not busy");
    for (int i = 0; i < N; i++)
      check(u_mem.mem[base_word + i] == {st[exp_list[i]], 31'(exp_list[i])},
            $sformatf("list[%0d] = %h expected pos %0d", i, u_mem.mem[base_word + i], exp_list[i]));
  endtask

  initial begin
    s_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    run(10000, 625, 0, 0);
    stall = 1;
    run(20000, 100, 1, 32);
    run(500, 40, 0, 64);
    // selection step: insert the 5 SMs with the lowest voltages
    begin
      logic [31:0] rd;
      int polls;
      axil_write(REG_BAL, {8'd0, 8'd5, 13'd0, 3'b111});
      polls = 0;
      do begin axil_read(REG_STATUS, rd); polls++; end while (rd[3:1] != 3'b101 && polls < 200);
      check(rd[3:0] == 4'b1010, "STATUS step done, list delivered");
      for (int i = 0; i < N; i++) begin
        int p;
        p = int'(u_mem.mem[64 + i] & 32'hFF);
        // the step's list went to the last destination again, in ascending order
        check(gates[p] == (i < 5), $sformatf("gate of list entry %0d (SM %0d) word %h gates %h", i, p, u_mem.mem[64+i], gates));
      end
      axil_read(REG_GATES0, rd); check(rd == 32'(gates) && $countones(gates) == 5, "GATES register");
      axil_read(REG_BAL, rd); check(rd[31:24] == 8'd5, "inserted count");
    end
    // lists now carry the gate states in bit 31
    run(500, 40, 1, 96);
    check(u_mem.errors == 0, "AXI burst format");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
