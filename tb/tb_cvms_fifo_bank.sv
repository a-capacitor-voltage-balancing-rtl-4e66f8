// tb_cvms_fifo_bank: self-checking test of the M-FIFO memory block. Random
// pushes to random addresses and random pops from random FIFOs (never to a
// full or from an empty FIFO) are checked against one queue per FIFO: data
// order, one-cycle read latency, the selected-empty flag and all M empty
// flags. A phase fills one FIFO to its full depth N, as happens when all
// capacitor voltages fall in one sub-range; `init` must empty every FIFO.
// The FIFO-per-sub-range organisation and depth N follow the reference
// design; the read latency checked is this design's own.
module tb_cvms_fifo_bank;
  localparam int unsigned M = 4, N = 6, W = 4;
  localparam int unsigned AW = $clog2(M);

  logic clk = 0, rst_n = 0, init = 0, push = 0, pop = 0;
  logic [AW-1:0] push_addr = '0, sel = '0;
  logic [W-1:0]  din = '0, dout;
  logic          sel_empty;
  logic [M-1:0]  empty;
  int checks = 0, failures = 0, full_seen = 0;

  cvms_fifo_bank #(.M(M), .N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [M][$];
  logic         exp_valid = 0;
  logic [W-1:0] exp_data;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic cycle(input bit do_push, input int pa, input bit do_pop, input int ps);
    push = do_push; push_addr = AW'(pa); din = W'($urandom);
    pop = do_pop; sel = AW'(ps);
    #1;
    check(sel_empty == (q[ps].size() == 0), "sel_empty");
    for (int a = 0; a < M; a++) check(empty[a] == (q[a].size() == 0), "empty vector");
    @(posedge clk);
    if (do_pop) begin exp_data = q[ps].pop_front(); end
    if (do_push) q[pa].push_back(din);
    if (do_push && q[pa].size() == N) full_seen++;
    #1;
    if (do_pop) check(dout == exp_data, $sformatf("dout %0h expected %0h", dout, exp_data));
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    for (int i = 0; i < 4000; i++) begin
      int pa, ps;
      bit dp, dq;
      pa = $urandom_range(0, M - 1);
      ps = $urandom_range(0, M - 1);
      dp = ($urandom_range(0, 1) == 1) && (q[pa].size() < N);
      dq = ($urandom_range(0, 1) == 1) && (q[ps].size() > 0);
      if (dp && dq && pa == ps && q[ps].size() == 0) dq = 0;
      cycle(dp, pa, dq, ps);
    end
    // fill FIFO 2 completely, then drain it
    init = 1; @(posedge clk); #1; init = 0;
    for (int a = 0; a < M; a++) q[a].delete();
    #1;
    check(empty == '1, "init empties all FIFOs");
    for (int i = 0; i < N; i++) cycle(1, 2, 0, 0);
    for (int i = 0; i < N; i++) cycle(0, 0, 1, 2);
    cycle(0, 0, 0, 2);
    check(full_seen > 0, "a FIFO was filled to depth N");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
