// tb_cvms_fsm: self-checking test of the mapping strategy state machine.
// The testbench plays the data path: it keeps a position counter and one
// occupancy count per FIFO, gives every position a random sub-range address,
// and answers `sel_empty` from its counts. Checked: exactly N pushes with the
// pipeline latency of three cycles, the FIFO visiting order (ascending or
// descending, a FIFO emptied before moving on), valid_data one cycle after
// each pop, N entries per list, done_map 2N + M + 5 cycles after start, and
// that start is ignored while busy.
// The write-then-read flow follows the reference flow chart; the cycle
// counts are this design's own timing.
module tb_cvms_fsm;
  localparam int unsigned N = 16, M = 8;
  localparam int unsigned AW = $clog2(M), PW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, descending = 0, sel_empty;
  logic [PW-1:0] pos;
  logic init_dp, en_count, en_r, push, pop, valid_data, done_map, busy;
  logic [AW-1:0] sel;
  int checks = 0, failures = 0;

  cvms_fsm #(.N(N), .M(M)) dut (.*);

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

  // data path model
  int cnt [M];
  int addr_of [N];
  int issue_cyc [$];
  int pushes, pops, valids;
  int cyc = 0;
  logic pop_q = 1'b0;

  assign sel_empty = (cnt[sel] == 0);

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    pop_q <= pop && rst_n;
    if (rst_n) begin
    if (init_dp) pos <= '0;
    else if (en_count) begin
      pos <= pos + 1'b1;
      issue_cyc.push_back(cyc);
    end
    if (push) begin
      int ic;
      ic = issue_cyc.pop_front();
      check(cyc - ic == 3, "push three cycles after issue");
      cnt[addr_of[pushes]]++;
      pushes++;
    end
    if (pop) begin
      cnt[sel]--;
      pops++;
    end
    if (valid_data) valids++;
    check(valid_data == pop_q, "valid_data follows pop by one cycle");
    end
  end

  task automatic run(input bit desc);
    int t0, last_sel, visits;
    bit order_ok;
    for (int p = 0; p < N; p++) addr_of[p] = $urandom_range(0, M - 1);
    if ($urandom_range(0, 3) == 0) for (int p = 0; p < N; p++) addr_of[p] = 5;
    pushes = 0; pops = 0; valids = 0;
    issue_cyc.delete();
    descending = desc;
    start = 1;
    t0 = cyc;
    @(posedge clk); #1;
    start = 0; descending = !desc;
    last_sel = desc ? M - 1 : 0;
    order_ok = 1;
    while (!done_map) begin
      if (pop) begin
        if (desc ? (int'(sel) > last_sel) : (int'(sel) < last_sel)) order_ok = 0;
        last_sel = int'(sel);
      end
      if (cyc - t0 == 20) begin start = 1; end     // must be ignored while busy
      @(posedge clk); #1;
      start = 0;
    end
    check(cyc - t0 == 2 * N + M + 5, $sformatf("done after %0d cycles", cyc - t0));
    @(posedge clk); #1;
    check(!busy, "idle after done");
    check(pushes == N, "N pushes");
    check(pops == N && valids == N, $sformatf("N list entries (%0d)", valids));
    check(order_ok, "FIFO visiting order");
    for (int a = 0; a < M; a++) check(cnt[a] == 0, "all FIFOs read out");
  endtask

  initial begin
    for (int a = 0; a < M; a++) cnt[a] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 0; r < 10; r++) run(r % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
