// tb_cvms_axi_master: self-checking test of the list-sending AXI4 master.
// A behavioural AXI memory (tb_axi_mem) with random AWREADY/WREADY stalls
// receives the burst. List entries are fed in bursts with random gaps, as the
// mapping engine produces them; the test checks that the memory holds every
// entry in order at the destination address (position in the low bits,
// status in bit 31), one INCR burst of N beats with WLAST on the last,
// list_done after the response and busy until then. Several lists are sent
// back to back to different addresses.
// Burst mode follows the reference design; beat format and timing checked
// here are this design's own.
module tb_cvms_axi_master;
  import cvms_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned PW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, in_ins = 0, stall = 0;
  logic [AXI_ADDR_W-1:0] dst_addr = '0;
  logic [PW-1:0] in_pos = '0;
  axi_wreq_t m_req;
  axi_wrsp_t m_rsp;
  logic list_done, busy;
  int checks = 0, failures = 0;

  cvms_axi_master #(.N(N)) dut (.*);
  tb_axi_mem #(.WORDS(256)) u_mem (.clk, .rst_n, .stall, .req(m_req), .rsp(m_rsp));

  always #5 clk = ~clk;

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

  task automatic send(input int base_word, input bit st);
    logic [31:0] exp [N];
    int guard;
    stall = st;
    dst_addr = AXI_ADDR_W'(base_word * 4);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    check(busy, "busy after start");
    repeat ($urandom_range(2, 10)) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      in_valid = 1;
      in_pos = PW'($urandom);
      in_ins = 1'($urandom);
      exp[i] = {in_ins, 31'(in_pos)};
      @(posedge clk); #1;
      in_valid = 0;
      if ($urandom_range(0, 3) == 0) begin repeat ($urandom_range(1, 3)) @(posedge clk); #1; end
    end
    guard = 0;
    while (!list_done && guard < 1000) begin @(posedge clk); #1; guard++; end
    check(list_done, "list_done");
    @(posedge clk); #1;
    check(!busy, "idle after list_done");
    for (int i = 0; i < N; i++)
      check(u_mem.mem[base_word + i] == exp[i], $sformatf("word %0d: %h expected %h", i, u_mem.mem[base_word + i], exp[i]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    send(0, 0);
    send(64, 1);
    send(128, 1);
    check(u_mem.bursts == 3, $sformatf("bursts %0d", u_mem.bursts));
    check(u_mem.beats == 3 * N, "beats");
    check(u_mem.errors == 0, "burst format and WLAST");
    check(u_mem.stalls > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
