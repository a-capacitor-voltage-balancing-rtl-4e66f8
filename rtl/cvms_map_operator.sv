// cvms_map_operator: turns one capacitor voltage sample into the address of
// the FIFO memory (voltage sub-range) it belongs to.
//
//   addr = sat_[0, M-1]( round( (vc - vc_min) * inv_dv ) )
//
// Three pipeline registers, as in the mapping-strategy data path: r1 holds the
// sample, r2 the difference vc - vc_min, r3 the rounded and saturated address.
// All three advance together when `en` is high, so `addr` shows the result
// for the sample presented MAP_LAT = 3 enabled cycles earlier.
//
// The subtract / multiply / round / saturate order follows the reference
// design. This implementation's own choices: vc and vc_min are unsigned
// VC_W-bit codes; inv_dv = 1/dV is unsigned fixed point with INV_FRAC
// fractional bits (address units per voltage LSB); rounding is to nearest
// with halves rounded up; samples below vc_min saturate to address 0 and
// samples beyond the top sub-range to M-1. One multiplier is used.
module cvms_map_operator #(
  parameter int unsigned M        = cvms_pkg::M_FIFO_DEF,
  parameter int unsigned VC_W     = cvms_pkg::VC_W_DEF,
  parameter int unsigned INV_W    = cvms_pkg::INV_W_DEF,
  parameter int unsigned INV_FRAC = cvms_pkg::INV_FRAC_DEF,
  localparam int unsigned AW      = (M > 1) ? $clog2(M) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,       // advance r1..r3
  input  logic [VC_W-1:0]  vc,       // measured capacitor voltage
  input  logic [VC_W-1:0]  vc_min,   // lower end of the mapped range
  input  logic [INV_W-1:0] inv_dv,   // 1/dV, fixed point
  output logic [AW-1:0]    addr      // sub-range address of the sample 3 cycles back
);

  localparam int unsigned DW = VC_W + 1;          // signed difference
  localparam int unsigned PW = DW + INV_W + 1;    // signed product

  logic [VC_W-1:0]      vc_r1;
  logic signed [DW-1:0] diff_r2;
  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] rounded;
  logic [AW-1:0]        addr_next;

  always_comb begin
    prod    = PW'(diff_r2) * $signed({1'b0, inv_dv});
    rounded = (prod + (PW'(1) <<< (INV_FRAC - 1))) >>> INV_FRAC;
    if (rounded < 0)
      addr_next = '0;
    else if (rounded > PW'(M - 1))
      addr_next = AW'(M - 1);
    else
      addr_next = AW'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vc_r1   <= '0;
      diff_r2 <= '0;
      addr    <= '0;
    end else if (en) begin
      vc_r1   <= vc;
      diff_r2 <= $signed({1'b0, vc_r1}) - $signed({1'b0, vc_min});
      addr    <= addr_next;
    end
  end

endmodule
