// cvms_position_gen: SM position generator of the mapping-strategy data path.
//
// A counter produces the position `pos` of the SM whose capacitor voltage is
// being presented to the map operator (it also serves as the read index of
// the voltage registers). The position, together with the SM's status bit
// (inserted = 1, bypassed = 0), passes through three registers (r4..r6) that
// advance with `en_r`, so `pos_d`/`ins_d` line up with the map operator's
// address. `init` clears the counter at the start of an operation; `en_count`
// advances it. The counter, the three delay registers and their enables follow
// the reference data path; carrying the status bit alongside the position is
// this design's choice (the status is stored in the FIFO cell with it).
module cvms_position_gen #(
  parameter int unsigned N   = cvms_pkg::N_SM_DEF,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,      // clear the counter
  input  logic          en_count,  // pos <= pos + 1
  input  logic          en_r,      // advance r4..r6
  input  logic          ins,       // status of SM `pos`
  output logic [PW-1:0] pos,       // current counter value
  output logic [PW-1:0] pos_d,     // position, delayed by three registers
  output logic          ins_d      // status, delayed by three registers
);

  localparam int unsigned D = cvms_pkg::MAP_LAT;

  logic [PW-1:0] pos_sr [D];
  logic          ins_sr [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pos <= '0;
    else if (init)
      pos <= '0;
    else if (en_count)
      pos <= (pos == PW'(N - 1)) ? '0 : pos + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) begin
        pos_sr[i] <= '0;
        ins_sr[i] <= 1'b0;
      end
    end else if (en_r) begin
      pos_sr[0] <= pos;
      ins_sr[0] <= ins;
      for (int i = 1; i < D; i++) begin
        pos_sr[i] <= pos_sr[i-1];
        ins_sr[i] <= ins_sr[i-1];
      end
    end
  end

  assign pos_d = pos_sr[D-1];
  assign ins_d = ins_sr[D-1];

endmodule
