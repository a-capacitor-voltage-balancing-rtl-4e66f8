// tb_cvms_map_operator: self-checking test of the sub-range address mapping.
// Random samples, random Vc,min and 1/dV, and a random pipeline enable; each
// sample's expected address is computed with real arithmetic
// (clamp(round((vc - vc_min) / dV), 0, M-1)) and compared three enabled
// cycles later. Directed samples cover both saturation ends and the
// rounding midpoint.
// The mapping formula follows the reference strategy; the fixed-point
// format and the three-cycle latency are this design's own.
module tb_cvms_map_operator;
  localparam int unsigned M = 8, VC_W = 16, INV_W = 18, INV_FRAC = 20;

  logic clk = 0, rst_n = 0, en = 0;
  logic [VC_W-1:0]  vc = '0, vc_min = '0;
  logic [INV_W-1:0] inv_dv = '0;
  logic [$clog2(M)-1:0] addr;
  int checks = 0, failures = 0, sat_lo = 0, sat_hi = 0;

  cvms_map_operator #(.M(M), .VC_W(VC_W), .INV_W(INV_W), .INV_FRAC(INV_FRAC)) dut (.*);

  always #5 clk = ~clk;

  function automatic int expect_addr(int v, int vmin, int inv);
    real x;
    int  a;
    x = (real'(v) - real'(vmin)) * real'(inv) / real'(1 << INV_FRAC);
    a = int'($floor(x + 0.5));
    if (a < 0) a = 0;
    if (a > M - 1) a = M - 1;
    return a;
  endfunction

  int exp_q[$];
  int in_flight[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [VC_W-1:0] v, input logic e);
    vc = v; en = e;
    @(posedge clk);
    #1;
    if (e) begin
      in_flight.push_back(expect_addr(v, vc_min, inv_dv));
      if (in_flight.size() > 2) begin
        int ex = in_flight.pop_front();
        checks++;
        if (addr !== ex) begin
          failures++;
          $display("FAIL addr=%0d expected %0d", addr, ex);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < 6; set++) begin
      vc_min = 16'(10000 + $urandom_range(0, 5000));
      // dV between 40 and 2000 codes
      inv_dv = INV_W'(((1 << INV_FRAC) / $urandom_range(40, 2000)));
      in_flight.delete();
      // fill pipeline fresh
      for (int i = 0; i < 200; i++) begin
        logic [VC_W-1:0] v;
        v = 16'(int'(vc_min) + $urandom_range(0, 16000) - 3000);
        if (expect_addr(v, vc_min, inv_dv) == 0 && v < vc_min) sat_lo++;
        if (v > vc_min && (real'(v - vc_min) * real'(inv_dv) / real'(1 << INV_FRAC)) > real'(M - 0.5)) sat_hi++;
        step(v, ($urandom_range(0, 3) != 0));
      end
      // flush with enabled cycles
      repeat (3) step(vc_min, 1'b1);
    end
    // directed: dV = 625 codes (5 kV over M = 8 with 1 V per code), exact midpoint
    vc_min = 16'd10000; inv_dv = INV_W'(1 << INV_FRAC) / 625;
    in_flight.delete();
    repeat (3) step(16'd10000, 1'b1);
    step(16'd10000, 1'b1);   // 0
    step(16'd10312, 1'b1);   // 0.4992 -> 0
    step(16'd10940, 1'b1);   // ~1.5 -> 1 or 2 per real model
    step(16'd15000, 1'b1);   // 8 -> saturates to 7
    step(16'd9000,  1'b1);   // below -> 0
    step(16'hFFFF,  1'b1);   // far above -> 7
    repeat (3) step(16'd10000, 1'b1);
    checks++;
    if (sat_lo == 0 || sat_hi == 0) begin
      failures++;
      $display("FAIL saturation not exercised lo=%0d hi=%0d", sat_lo, sat_hi);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
