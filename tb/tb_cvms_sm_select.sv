// tb_cvms_sm_select: self-checking test of the SM selection unit fed by a
// real mapping engine (N = 16, M = 4). Each sampling step draws new capacitor
// voltages, a new insertion index, a current direction and the switching
// optimisation flag; a reference model in the testbench orders the SMs by
// sub-range, applies the selection rules (insert/bypass the |dN| best SMs, or
// re-select all without optimisation, then swap SMs stuck in the critical
// sub-range) and predicts the gate vector. Checked after every step: the gate
// vector, the inserted count, and that the engine was asked for the list
// order that puts the wanted SMs first. Each kind of action (insert, bypass,
// full re-selection, no change, swap) must occur.
// The four insert/bypass cases and the full re-selection follow the
// reference selection flow; the swap pairing checked is this design's own
// reading of the swap rule.
module tb_cvms_sm_select;
  localparam int unsigned N = 16, M = 4, VC_W = 16, INV_W = 18, INV_FRAC = 20;
  localparam int unsigned PW = $clog2(N), AW = $clog2(M), NW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic step = 0, i_pos = 0, opt_sw = 0;
  logic [NW-1:0] n_ref = '0;
  logic eng_start, eng_desc, eng_busy, in_valid, eng_done, busy, step_done;
  logic [PW-1:0] in_pos, vc_idx;
  logic [AW-1:0] in_range;
  logic [N-1:0]  gates;
  logic [NW-1:0] n_ins;
  logic [VC_W-1:0] vc_min = 16'd10000;
  logic [INV_W-1:0] inv_dv = INV_W'((1 << INV_FRAC) / 1000);
  logic [VC_W-1:0] volt [N];
  logic ins_unused;
  int checks = 0, failures = 0;

  cvms_core #(.N(N), .M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)) u_eng (
    .clk, .rst_n, .start(eng_start), .descending(eng_desc), .vc_min, .inv_dv,
    .vc_idx, .vc(volt[vc_idx]), .ins(gates[vc_idx]),
    .pos_sort(in_pos), .ins_sort(ins_unused), .range_sort(in_range),
    .valid_data(in_valid), .done_map(eng_done), .busy(eng_busy)
  );

  cvms_sm_select #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  int n_insert = 0, n_bypass = 0, n_reset = 0, n_none = 0, n_swap = 0;
  bit desc_seen;
  always @(posedge clk) if (eng_start) desc_seen <= eng_desc;

  function automatic int rng_of(int v);
    int a;
    a = int'($floor((real'(v) - 10000.0) / 1000.0 * (real'(inv_dv) * 1000.0 / real'(1 << INV_FRAC)) + 0.5));
    return (a < 0) ? 0 : (a > M - 1) ? M - 1 : a;
  endfunction

  bit mg [N];   // model gate state
  int m_on = 0;

  task automatic do_step(input int nr, input bit ip, input bit opt);
    int lst [$];
    int rg [N];
    bit want_low, tch [N];
    int act, tgt, cnt, crit, cr;
    for (int p = 0; p < N; p++) begin
      volt[p] = 16'(9500 + $urandom_range(0, 1000 * M + 1000));
      rg[p] = rng_of(volt[p]);
      tch[p] = 0;
    end
    // action: 0 none, 1 reset, 2 insert, 3 bypass
    if (!opt) begin act = (nr != m_on) ? 1 : 0; tgt = nr; want_low = ip; end
    else if (nr > m_on) begin act = 2; tgt = nr - m_on; want_low = ip; end
    else if (nr < m_on) begin act = 3; tgt = m_on - nr; want_low = !ip; end
    else begin act = 0; tgt = 0; want_low = ip; end
    for (int k = 0; k < M; k++) begin
      int a = want_low ? k : M - 1 - k;
      for (int p = 0; p < N; p++) if (rg[p] == a) lst.push_back(p);
    end
    cnt = 0;
    foreach (lst[i]) begin
      int p = lst[i];
      if (act == 1) begin mg[p] = (cnt < tgt); if (cnt < tgt) cnt++; end
      if (act == 2 && !mg[p] && cnt < tgt) begin mg[p] = 1; tch[p] = 1; cnt++; end
      if (act == 3 && mg[p] && cnt < tgt) begin mg[p] = 0; tch[p] = 1; cnt++; end
    end
    if (act == 1) m_on = cnt; else if (act == 2) m_on += cnt; else if (act == 3) m_on -= cnt;
    case (act) 0: n_none++; 1: n_reset++; 2: n_insert++; default: n_bypass++; endcase
    // swaps: inserted SMs in the critical sub-range against bypassed SMs from
    // the far end of the voltage order
    crit = ip ? M - 1 : 0;
    cr = 0;
    begin
      int partners [$];
      int pi;
      // partner order: lowest voltages first when charging, highest first otherwise
      if (ip == want_low) partners = lst;
      else for (int i = N - 1; i >= 0; i--) partners.push_back(lst[i]);
      pi = 0;
      foreach (lst[i]) begin
        int c = lst[i];
        if (mg[c] && rg[c] == crit && !tch[c]) begin
          bit found = 0;
          while (pi < N && !found) begin
            int q = partners[pi];
            pi++;
            if (!mg[q] && rg[q] != crit && !tch[q]) begin
              mg[c] = 0; mg[q] = 1; tch[c] = 1; tch[q] = 1; found = 1; n_swap++;
            end
          end
          if (!found) break;
        end
      end
    end
    n_ref = NW'(nr); i_pos = ip; opt_sw = opt;
    step = 1;
    @(posedge clk); #1;
    step = 0;
    while (!step_done) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    check(desc_seen == !want_low, "list order requested from the engine");
    for (int p = 0; p < N; p++) check(gates[p] == mg[p], $sformatf("gate %0d = %0d expected %0d", p, gates[p], mg[p]));
    check(int'(n_ins) == m_on && $countones(gates) == m_on, $sformatf("inserted count %0d expected %0d", n_ins, m_on));
  endtask

  initial begin
    for (int p = 0; p < N; p++) begin mg[p] = 0; volt[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int s = 0; s < 300; s++) begin
      int nr;
      bit opt;
      opt = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 3))
        0: nr = m_on;
        1: nr = $urandom_range(0, N);
        default: nr = m_on + $urandom_range(0, 4) - 2;
      endcase
      if (nr < 0) nr = 0;
      if (nr > N) nr = N;
      do_step(nr, 1'($urandom), opt);
    end
    $display("actions: insert=%0d bypass=%0d reset=%0d none=%0d swaps=%0d", n_insert, n_bypass, n_reset, n_none, n_swap);
    check(n_insert > 0 && n_bypass > 0 && n_reset > 0 && n_none > 0 && n_swap > 0, "every action exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
