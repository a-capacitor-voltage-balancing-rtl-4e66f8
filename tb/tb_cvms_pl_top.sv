// tb_cvms_pl_top: end-to-end test of the programmable-logic top at its
// default size (N = 64 SMs per arm, M = 8 sub-ranges), both arms. Each arm is
// driven by its own AXI4-Lite manager task and writes into its own
// behavioural AXI memory. Every run loads random voltages and SM states,
// programs Vc,min = 10000 and dV (10 kV .. 15 kV over 8 sub-ranges when the
// voltage code is in volts), starts the arm and checks the list in memory
// against a reference computed in real arithmetic. The engine time from the
// start pulse to done_map must be 2N + M + 5 = 141 cycles.
//
// Mechanisms that must each occur at least once: ascending list, descending
// list, empty sub-range skipped while reading, voltage below Vc,min and above
// the top sub-range (saturation), all SMs in one FIFO (full depth), AXI
// back-pressure, both arms busy at once, a start ignored while busy, and the
// first list word reaching memory before the engine has finished. Selection
// steps then run on both arms: SMs inserted, bypassed, re-selected without
// switching optimisation, held, and swapped out of the critical sub-range;
// later lists must carry the new gate states in bit 31.
// The two-arm structure and the mapping rule follow the reference design;
// the register interface and cycle counts are this design's own.
module tb_cvms_pl_top;
  import cvms_pkg::*;
  localparam int unsigned N = N_SM_DEF, M = M_FIFO_DEF, INV_FRAC = INV_FRAC_DEF;

  logic clk = 0, rst_n = 0;
  logic stall [2] = '{0, 0};
  axil_req_t s_req [2];
  axil_rsp_t s_rsp [2];
  axi_wreq_t m_req [2];
  axi_wrsp_t m_rsp [2];
  logic [N-1:0] gates [2];
  logic done_map [2], list_done [2], step_done [2];
  int checks = 0, failures = 0;

  cvms_pl_top dut (.*);
  tb_axi_mem #(.WORDS(1024)) u_mem0 (.clk, .rst_n, .stall(stall[0]), .req(m_req[0]), .rsp(m_rsp[0]));
  tb_axi_mem #(.WORDS(1024)) u_mem1 (.clk, .rst_n, .stall(stall[1]), .req(m_req[1]), .rsp(m_rsp[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_asc = 0, n_desc = 0, n_skip = 0, n_sat_lo = 0, n_sat_hi = 0, n_full = 0;
  int n_both_busy = 0, n_start_ignored = 0, n_early_word = 0;
  int n_insert = 0, n_bypass = 0, n_reselect = 0, n_swap = 0, n_hold = 0;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  // engine cycle counting per arm
  int cyc = 0;
  int t_start [2], t_done [2];
  logic core_busy [2];
  always @(posedge clk) cyc <= cyc + 1;
  assign core_busy[0] = dut.g_arm[0].u_arm.core_busy;
  assign core_busy[1] = dut.g_arm[1].u_arm.core_busy;
  always @(posedge clk) begin
    if (dut.g_arm[0].u_arm.eng_start) t_start[0] <= cyc;
    if (dut.g_arm[1].u_arm.eng_start) t_start[1] <= cyc;
    if (done_map[0]) t_done[0] <= cyc;
    if (done_map[1]) t_done[1] <= cyc;
    if (core_busy[0] && core_busy[1]) n_both_busy++;
  end

  task automatic axil_write(input int a, input logic [AXIL_ADDR_W-1:0] ad, input logic [31:0] d);
    s_req[a].awaddr = ad; s_req[a].awvalid = 1; s_req[a].wdata = d; s_req[a].wstrb = '1;
    s_req[a].wvalid = 1; s_req[a].bready = 1;
    do @(posedge clk); while (!(s_rsp[a].awready && s_rsp[a].wready));
    #1;
    s_req[a].awvalid = 0; s_req[a].wvalid = 0;
    while (!s_rsp[a].bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    s_req[a].bready = 0;
  endtask

  task automatic axil_read(input int a, input logic [AXIL_ADDR_W-1:0] ad, output logic [31:0] d);
    s_req[a].araddr = ad; s_req[a].arvalid = 1; s_req[a].rready = 1;
    do @(posedge clk); while (!s_rsp[a].arready);
    #1;
    s_req[a].arvalid = 0;
    while (!s_rsp[a].rvalid) begin @(posedge clk); #1; end
    d = s_rsp[a].rdata;
    @(posedge clk); #1;
    s_req[a].rready = 0;
  endtask

  function automatic int first_beat(int a);
    return (a == 0) ? u_mem0.first_beat_cycle : u_mem1.first_beat_cycle;
  endfunction

  function automatic logic [31:0] mem_word(int a, int i);
    return (a == 0) ? u_mem0.mem[i] : u_mem1.mem[i];
  endfunction

  // kind: 0 spread over the range, 1 all in one sub-range, 2 beyond both ends,
  //       3 clustered in the middle
  task automatic run(input int a, input int kind, input bit desc, input int base_word);
    int volt [N];
    bit st [N];
    int cnt [M];
    int exp_list [$];
    logic [31:0] rd;
    int vmin, dv, inv, polls;
    vmin = 10000; dv = 625;
    inv = (1 << INV_FRAC) / dv;
    for (int k = 0; k < M; k++) cnt[k] = 0;
    for (int p = 0; p < N; p++) begin
      case (kind)
        0: volt[p] = vmin + $urandom_range(0, M * dv - 1);
        1: volt[p] = vmin + 3 * dv + $urandom_range(0, dv / 4);
        2: volt[p] = vmin - 2000 + $urandom_range(0, M * dv + 4000);
        default: volt[p] = vmin + 2 * dv + $urandom_range(0, 2 * dv);
      endcase
      st[p] = gates[a][p];
      axil_write(a, REG_VC0 + AXIL_ADDR_W'(4 * p), {16'd0, 16'(volt[p])});
    end
    for (int k = 0; k < M; k++) begin
      int ad = desc ? M - 1 - k : k;
      for (int p = 0; p < N; p++) begin
        real x;
        int r;
        x = (real'(volt[p]) - real'(vmin)) * real'(inv) / real'(1 << INV_FRAC);
        r = int'($floor(x + 0.5));
        if (r < 0) begin r = 0; if (k == 0) n_sat_lo++; end
        if (r > M - 1) begin r = M - 1; if (k == 0) n_sat_hi++; end
        if (r == ad) begin exp_list.push_back(p); cnt[ad]++; end
      end
      if (cnt[ad] == 0) n_skip++;
      if (cnt[ad] == N) n_full++;
    end
    if (desc) n_desc++; else n_asc++;
    axil_write(a, REG_VCMIN, 32'(vmin));
    axil_write(a, REG_INVDV, 32'(inv));
    axil_write(a, REG_DST, 32'(base_word * 4));
    axil_write(a, REG_CTRL, {30'd0, desc, 1'b1});
    // a second start while the arm is busy must be ignored
    axil_read(a, REG_STATUS, rd);
    if (rd[0]) begin
      int tsv = t_start[a];
      axil_write(a, REG_CTRL, {30'd0, desc, 1'b1});
      if (t_start[a] == tsv) n_start_ignored++;
    end
    polls = 0;
    do begin axil_read(a, REG_STATUS, rd); polls++; end while (rd[1] == 0 && polls < 500);
    check(rd[1:0] == 2'b10, $sformatf("arm %0d STATUS done", a));
    check(t_done[a] - t_start[a] == 2 * N + M + 5,
          $sformatf("arm %0d engine time %0d cycles", a, t_done[a] - t_start[a]));
    if (first_beat(a) < t_done[a] && first_beat(a) > t_start[a]) n_early_word++;
    for (int i = 0; i < N; i++)
      check(mem_word(a, base_word + i) == {st[exp_list[i]], 31'(exp_list[i])},
            $sformatf("arm %0d list[%0d] = %h expected pos %0d", a, i, mem_word(a, base_word + i), exp_list[i]));
  endtask

  // One sampling period of the selection unit: ask for n_ref inserted SMs.
  // Checked: the inserted count, the number of gates that changed (|dN| in
  // optimized mode plus two per swap), and STATUS.
  task automatic sel_step(input int a, input int nr, input bit ip, input bit opt);
    logic [N-1:0] g_prev;
    logic [31:0] rd;
    int d, changed, polls, n_before;
    g_prev = gates[a];
    n_before = $countones(g_prev);
    axil_write(a, REG_BAL, {8'd0, 8'(nr), 13'd0, opt, ip, 1'b1});
    polls = 0;
    do begin axil_read(a, REG_STATUS, rd); polls++; end while (rd[3:1] != 3'b101 && polls < 500);
    check(rd[3:0] == 4'b1010, $sformatf("arm %0d step done", a));
    check($countones(gates[a]) == nr, $sformatf("arm %0d inserted %0d expected %0d", a, $countones(gates[a]), nr));
    axil_read(a, REG_BAL, rd);
    check(int'(rd[31:24]) == nr, "inserted count register");
    d = (nr > n_before) ? nr - n_before : n_before - nr;
    changed = $countones(g_prev ^ gates[a]);
    if (opt) begin
      check(changed >= d && ((changed - d) % 2 == 0), $sformatf("arm %0d changed %0d for dN %0d", a, changed, d));
      n_swap += (changed - d) / 2;
      if (nr > n_before) n_insert++; else if (nr < n_before) n_bypass++; else n_hold++;
    end else if (nr != n_before) n_reselect++;
  endtask

  initial begin
    s_req[0] = '0; s_req[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    run(0, 0, 0, 0);
    run(1, 0, 1, 0);
    stall[0] = 1; stall[1] = 1;
    fork
      begin run(0, 1, 1, 64);  run(0, 2, 0, 128); run(0, 3, 1, 192); end
      begin run(1, 2, 1, 64);  run(1, 3, 0, 128); run(1, 1, 0, 192); end
    join
    check(u_mem0.bursts == 4 && u_mem1.bursts == 4, "one burst per list");
    // selection steps on both arms at once, each after a list with new voltages
    fork
      begin
        sel_step(0, 20, 1, 1); run(0, 0, 0, 256);
        sel_step(0, 24, 0, 1); run(0, 3, 1, 320);
        sel_step(0, 18, 1, 1); sel_step(0, 18, 1, 1);
        sel_step(0, 30, 1, 0); run(0, 0, 0, 384);
        sel_step(0, 30, 1, 1);
      end
      begin
        sel_step(1, 40, 0, 0); run(1, 2, 1, 256);
        sel_step(1, 33, 1, 1); run(1, 0, 0, 320);
        sel_step(1, 35, 0, 1); sel_step(1, 35, 0, 1);
        sel_step(1, 10, 1, 1);
      end
    join
    check(u_mem0.errors == 0 && u_mem1.errors == 0, "AXI burst format");
    $display("mechanisms: asc=%0d desc=%0d skip=%0d sat_lo=%0d sat_hi=%0d full=%0d both_busy=%0d start_ignored=%0d stalls=%0d early_word=%0d",
             n_asc, n_desc, n_skip, n_sat_lo, n_sat_hi, n_full, n_both_busy, n_start_ignored,
             u_mem0.stalls + u_mem1.stalls, n_early_word);
    check(n_asc > 0, "ascending list");
    check(n_desc > 0, "descending list");
    check(n_skip > 0, "empty sub-range skipped");
    check(n_sat_lo > 0, "saturation below Vc,min");
    check(n_sat_hi > 0, "saturation above the top sub-range");
    check(n_full > 0, "all SMs in one FIFO");
    check(n_both_busy > 0, "both arms busy at once");
    check(n_start_ignored > 0, "start ignored while busy");
    check(u_mem0.stalls + u_mem1.stalls > 0, "AXI back-pressure");
    check(n_early_word > 0, "first list word g_prev done_map");
    $display("selection: insert=%0d bypass=%0d hold=%0d reselect=%0d swaps=%0d",
             n_insert, n_bypass, n_hold, n_reselect, n_swap);
    check(n_insert > 0, "selection step inserting SMs");
    check(n_bypass > 0, "selection step bypassing SMs");
    check(n_hold > 0, "selection step with unchanged index");
    check(n_reselect > 0, "full re-selection without switching optimisation");
    check(n_swap > 0, "swap of an SM in the critical sub-range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
