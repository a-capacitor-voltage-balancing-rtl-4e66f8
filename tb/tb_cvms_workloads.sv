// tb_cvms_workloads: the simulation-study configuration of the balancing
// strategy, N = 16 SMs per arm, with a capacitor voltage band of 10 kV to
// 15 kV (one voltage code per volt) and a nominal voltage of 12.5 kV.
//
// Part A, list building at M = 8, 16 and 64: three mapping engines read the
// same random voltages (inside and beyond the band) and each list is compared
// with a real-arithmetic model of the mapping. Each engine must finish in
// 2N + M + 5 cycles, so more sub-ranges cost more read time (45, 53 and
// 101 cycles here).
//
// Part B, closed-loop balancing at M = 8: an engine and the selection unit
// drive a behavioural arm. Every sampling period the arm current is
// i = 0.45 + cos(theta) (per unit) and the insertion index is
// round(N/2 * (1 - 0.9 cos(theta))), with 200 periods per fundamental cycle.
// Each inserted capacitor changes by 16 V * i / c_p, where c_p is a fixed
// per-SM capacitance spread of +-10 %. The run starts from voltages spread
// over 10.3 kV .. 14.7 kV, close to both band edges, and lasts four
// fundamental cycles, once without and once with switching optimisation.
// Checked: every step leaves exactly n_ref SMs inserted; without
// optimisation the final spread is below two sub-ranges (1250 V); with
// optimisation (where only the swap at the outer sub-ranges keeps SMs near
// the edges from drifting further) all voltages stay inside the
// 10 kV .. 15 kV band, the spread shrinks, and there are fewer switching
// events than without it.
// The band, N, the M values and the optimisation trade-off come from the
// reference study; the arm model, its constants and the bounds checked are
// this testbench's own.
module tb_cvms_workloads;
  localparam int unsigned N = 16, VC_W = 16, INV_W = 18, INV_FRAC = 20;
  localparam int unsigned PW = $clog2(N), NW = $clog2(N + 1);
  localparam int unsigned NM = 3;
  localparam int unsigned MS [NM] = '{8, 16, 64};
  localparam real VMIN = 10000.0, VMAX = 15000.0;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int unsigned inv_of(int unsigned m);
    return int'($floor(real'(1 << INV_FRAC) * real'(m) / (VMAX - VMIN) + 0.5));
  endfunction

  function automatic int rng_of(int v, int unsigned m);
    int a;
    a = int'($floor((real'(v) - VMIN) * real'(inv_of(m)) / real'(1 << INV_FRAC) + 0.5));
    return (a < 0) ? 0 : (a > int'(m) - 1) ? int'(m) - 1 : a;
  endfunction

  // ---------------------------------------------------------------- part A
  logic            a_start = 0, a_desc = 0;
  logic [VC_W-1:0] a_volt [N];
  logic [NM-1:0]   a_valid, a_done, a_busy;
  logic [PW-1:0]   a_idx [NM];
  logic [PW-1:0]   a_pos [NM];
  int              a_list [NM][$];
  int              a_t_done [NM];
  int              cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  for (genvar g = 0; g < NM; g++) begin : g_eng
    localparam int unsigned M  = MS[g];
    localparam int unsigned AW = $clog2(M);
    logic [AW-1:0] rng;
    logic          ins_s;
    cvms_core #(.N(N), .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)) u_eng (
      .clk, .rst_n, .start(a_start), .descending(a_desc),
      .vc_min(VC_W'(int'(VMIN))), .inv_dv(INV_W'(inv_of(M))),
      .vc_idx(a_idx[g]), .vc(a_volt[a_idx[g]]), .ins(1'b0),
      .pos_sort(a_pos[g]), .ins_sort(ins_s), .range_sort(rng),
      .valid_data(a_valid[g]), .done_map(a_done[g]), .busy(a_busy[g])
    );
    always @(posedge clk) begin
      if (a_valid[g]) a_list[g].push_back(int'(a_pos[g]));
      if (a_done[g])  a_t_done[g] <= cyc;
    end
  end

  int a_runs [NM];

  task automatic run_lists(input int runs);
    for (int r = 0; r < runs; r++) begin
      int t0;
      for (int p = 0; p < N; p++)
        a_volt[p] = VC_W'($urandom_range(int'(VMIN) - 1500, int'(VMAX) + 1500));
      for (int g = 0; g < NM; g++) a_list[g].delete();
      @(posedge clk); #1;
      a_desc  = 1'($urandom_range(0, 1));
      a_start = 1;
      t0 = cyc;
      @(posedge clk); #1;
      a_start = 0;
      wait (a_busy == '0);
      @(posedge clk); #1;
      for (int g = 0; g < NM; g++) begin
        int exp_l [$];
        int unsigned m = MS[g];
        for (int k = 0; k < int'(m); k++) begin
          int a = a_desc ? int'(m) - 1 - k : k;
          for (int p = 0; p < N; p++) if (rng_of(int'(a_volt[p]), m) == a) exp_l.push_back(p);
        end
        check(a_list[g] == exp_l, $sformatf("M=%0d run %0d list", m, r));
        check(a_t_done[g] - t0 == 2 * N + m + 5,
              $sformatf("M=%0d engine time %0d", m, a_t_done[g] - t0));
        a_runs[g]++;
      end
    end
  endtask

  // ---------------------------------------------------------------- part B
  localparam int unsigned BM = 8, BAW = $clog2(BM);
  localparam int PERIODS = 800;

  logic            step = 0, i_pos = 0, opt_sw = 0;
  logic [NW-1:0]   n_ref = '0;
  logic            eng_start, eng_desc, eng_busy, in_valid, eng_done, busy, step_done;
  logic [PW-1:0]   in_pos, b_idx;
  logic [BAW-1:0]  in_range;
  logic [N-1:0]    gates;
  logic [NW-1:0]   n_ins;
  logic [VC_W-1:0] b_volt [N];
  logic            b_ins_s;

  cvms_core #(.N(N), .M(BM), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)) u_beng (
    .clk, .rst_n, .start(eng_start), .descending(eng_desc),
    .vc_min(VC_W'(int'(VMIN))), .inv_dv(INV_W'(inv_of(BM))),
    .vc_idx(b_idx), .vc(b_volt[b_idx]), .ins(gates[b_idx]),
    .pos_sort(in_pos), .ins_sort(b_ins_s), .range_sort(in_range),
    .valid_data(in_valid), .done_map(eng_done), .busy(eng_busy)
  );

  cvms_sm_select #(.N(N), .M(BM)) u_sel (.*);

  real vcap [N];
  real cfac [N];
  int  switches [2];
  real final_spread [2];
  real vlo [2], vhi [2];

  task automatic run_arm(input bit opt);
    logic [N-1:0] g_prev;
    for (int p = 0; p < N; p++) vcap[p] = 10300.0 + 4400.0 * real'((p * 7) % N) / real'(N - 1);
    switches[opt] = 0;
    vlo[opt] = 1.0e9;
    vhi[opt] = -1.0e9;
    // clear the gates first with a full re-selection to zero
    @(posedge clk); #1;
    n_ref = '0; opt_sw = 0; i_pos = 1; step = 1;
    @(posedge clk); #1;
    step = 0;
    wait (step_done); @(posedge clk); #1;
    for (int k = 0; k < PERIODS; k++) begin
      real th, cur;
      int nr;
      th  = 2.0 * 3.14159265358979 * real'(k) / 200.0;
      cur = 0.45 + $cos(th);
      nr  = int'($floor(real'(N) / 2.0 * (1.0 - 0.9 * $cos(th)) + 0.5));
      for (int p = 0; p < N; p++) b_volt[p] = VC_W'(int'($floor(vcap[p] + 0.5)));
      g_prev = gates;
      n_ref  = NW'(nr);
      i_pos  = (cur > 0.0);
      opt_sw = opt;
      step   = 1;
      @(posedge clk); #1;
      step = 0;
      wait (step_done); @(posedge clk); #1;
      check(n_ins == NW'(nr) && $countones(gates) == nr,
            $sformatf("opt=%0d period %0d: %0d inserted, %0d wanted", opt, k, $countones(gates), nr));
      switches[opt] += $countones(gates ^ g_prev);
      // the capacitors of inserted SMs carry the arm current for one period
      for (int p = 0; p < N; p++) begin
        if (gates[p]) vcap[p] += 16.0 * cur / cfac[p];
        if (vcap[p] < vlo[opt]) vlo[opt] = vcap[p];
        if (vcap[p] > vhi[opt]) vhi[opt] = vcap[p];
      end
    end
    begin
      real mn, mx;
      mn = vcap[0]; mx = vcap[0];
      for (int p = 1; p < N; p++) begin
        if (vcap[p] < mn) mn = vcap[p];
        if (vcap[p] > mx) mx = vcap[p];
      end
      final_spread[opt] = mx - mn;
    end
  endtask

  initial begin
    for (int p = 0; p < N; p++) cfac[p] = 0.9 + 0.2 * real'($urandom_range(0, 1000)) / 1000.0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run_lists(40);
    for (int g = 0; g < NM; g++)
      check(a_runs[g] == 40, $sformatf("M=%0d: %0d lists", MS[g], a_runs[g]));
    run_arm(1'b0);
    run_arm(1'b1);
    $display("balancing: spread %0.0f V / %0.0f V, band %0.0f..%0.0f V / %0.0f..%0.0f V, switches %0d / %0d (without / with optimisation)",
             final_spread[0], final_spread[1], vlo[0], vhi[0], vlo[1], vhi[1], switches[0], switches[1]);
    check(final_spread[0] < 1250.0, "spread without optimisation");
    check(vlo[1] >= VMIN && vhi[1] <= VMAX, "band with optimisation");
    check(final_spread[1] < 4400.0, "spread shrinks with optimisation");
    check(switches[1] < switches[0], "optimisation reduces switching");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
