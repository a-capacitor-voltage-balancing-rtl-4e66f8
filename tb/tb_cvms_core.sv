// tb_cvms_core: end-to-end test of the mapping engine of one arm. The
// testbench holds N capacitor voltages and SM states in arrays that answer
// `vc_idx` combinationally, starts an operation and compares the list with a
// reference built independently: every SM's sub-range is computed in real
// arithmetic (clamp(round((vc - vc_min)/dV), 0, M-1)) and the positions are
// listed sub-range by sub-range (ascending or descending), in increasing
// position order within a sub-range. Also checked: the SM status bits, the
// sub-range reported with each entry, the list length, the first-entry
// latency (N + 6 cycles, plus one per empty FIFO read before the first
// non-empty one) and the completion latency (2N + M + 5 cycles). Voltage
// sets include all SMs in one sub-range and voltages beyond both ends of the
// range.
// The mapping rule and list order follow the reference strategy; the cycle
// counts are this design's own timing.
module tb_cvms_core;
  localparam int unsigned N = 64, M = 8, VC_W = 16, INV_W = 18, INV_FRAC = 20;
  localparam int unsigned PW = $clog2(N);

  logic clk = 0, rst_n = 0, start = 0, descending = 0;
  logic [VC_W-1:0]  vc_min = 16'd10000;
  logic [INV_W-1:0] inv_dv;
  logic [PW-1:0]    vc_idx, pos_sort;
  logic [$clog2(M)-1:0] range_sort;
  logic [VC_W-1:0]  vc;
  logic             ins, ins_sort, valid_data, done_map, busy;
  int checks = 0, failures = 0;

  logic [VC_W-1:0] volt [N];
  logic            state [N];
  assign vc  = volt[vc_idx];
  assign ins = state[vc_idx];

  cvms_core #(.N(N), .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int sub_range(int v);
    real x;
    int  a;
    x = (real'(v) - real'(vc_min)) * real'(inv_dv) / real'(1 << INV_FRAC);
    a = int'($floor(x + 0.5));
    return (a < 0) ? 0 : (a > M - 1) ? M - 1 : a;
  endfunction

  task automatic run(input bit desc);
    int exp_list[$], got_pos[$], got_ins[$], got_rng[$];
    int cyc, first, skipped;
    skipped = 0;
    for (int k = 0; k < M; k++) begin
      int a = desc ? M - 1 - k : k;
      for (int p = 0; p < N; p++) if (sub_range(volt[p]) == a) exp_list.push_back(p);
      if (exp_list.size() == 0) skipped++;
    end
    descending = desc;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 1; first = -1;
    while (!done_map && cyc < 10 * N) begin
      if (valid_data) begin
        if (first < 0) first = cyc;
        got_pos.push_back(pos_sort);
        got_ins.push_back(ins_sort);
        got_rng.push_back(range_sort);
      end
      @(posedge clk); #1;
      cyc++;
    end
    if (valid_data) begin got_pos.push_back(pos_sort); got_ins.push_back(ins_sort); got_rng.push_back(range_sort); end
    check(cyc == 2 * N + M + 5, $sformatf("done_map after %0d cycles", cyc));
    check(first == N + 6 + skipped, $sformatf("first entry after %0d cycles", first));
    check(got_pos.size() == N, $sformatf("list length %0d", got_pos.size()));
    for (int i = 0; i < N && i < got_pos.size(); i++) begin
      check(got_pos[i] == exp_list[i], $sformatf("entry %0d: %0d expected %0d", i, got_pos[i], exp_list[i]));
      check(got_ins[i] == int'(state[got_pos[i]]), "status bit");
      check(got_rng[i] == sub_range(volt[got_pos[i]]), "sub-range of entry");
    end
    @(posedge clk); #1;
  endtask

  initial begin
    inv_dv = INV_W'((1 << INV_FRAC) / 625);   // dV = 625 codes: 10k..15k over 8 ranges
    for (int p = 0; p < N; p++) begin volt[p] = '0; state[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int r = 0; r < 12; r++) begin
      for (int p = 0; p < N; p++) begin
        state[p] = 1'($urandom);
        case (r % 4)
          0: volt[p] = 16'(10000 + $urandom_range(0, 5000));
          1: volt[p] = 16'(12400 + $urandom_range(0, 200));     // all near one range
          2: volt[p] = 16'(8000 + $urandom_range(0, 9000));     // beyond both ends
          default: volt[p] = 16'(11500 + $urandom_range(0, 1500));
        endcase
      end
      run(r % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
