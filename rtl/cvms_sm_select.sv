// cvms_sm_select: sub-module selection of one arm, driven by the quasi-sorted
// list of the mapping engine. It keeps the arm's gate state (`gates[i]` = 1:
// SM i inserted) and, once per sampling period (`step`), moves it to the
// insertion index `n_ref` requested by nearest level control.
//
// Decision, per the selection flow of capacitor voltage balancing:
//   opt_sw = 1 (optimized switching frequency), dN = n_ref - inserted count:
//     dN > 0, i_pos = 1: insert dN bypassed SMs with the lowest voltages
//     dN > 0, i_pos = 0: insert dN bypassed SMs with the highest voltages
//     dN < 0, i_pos = 1: bypass |dN| inserted SMs with the highest voltages
//     dN < 0, i_pos = 0: bypass |dN| inserted SMs with the lowest voltages
//   opt_sw = 0: when n_ref changes, all SMs are re-chosen: the n_ref SMs with
//     the lowest (i_pos = 1) or highest (i_pos = 0) voltages are inserted.
// Swap: afterwards, an inserted SM whose voltage lies in the outermost
// sub-range in the direction the current drives it (top sub-range M-1 when
// the arm current charges, i_pos = 1; sub-range 0 when it discharges) is
// bypassed and replaced by a bypassed SM from the other end of the list
// (lowest voltage when charging, highest when discharging) that is not in
// that sub-range itself. SMs switched earlier in the same step are left alone.
//
// Operation: on `step` the unit waits until the engine is idle, starts it
// with the list order that puts the wanted SMs first (ascending when the
// lowest voltages are wanted), stores the list (position and sub-range)
// as it arrives, then walks it once for the main action (one entry per
// cycle) and once more for swaps. `step_done` pulses when `gates` holds the
// new state; a step takes about 2N + M + 5 engine cycles plus N to 3N cycles
// of walking. `n_ins` is the number of inserted SMs.
//
// The four cases, the full re-selection without switching optimisation and
// the swap at the first/last sub-range follow the reference strategy, which
// runs the selection on the processor; running it in logic next to the
// engine, storing the list and the exact swap pairing rule are this design's
// choices.
module cvms_sm_select #(
  parameter int unsigned N   = cvms_pkg::N_SM_DEF,
  parameter int unsigned M   = cvms_pkg::M_FIFO_DEF,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // request from the modulator
  input  logic          step,       // one-cycle pulse per sampling period
  input  logic [NW-1:0] n_ref,      // SMs to be inserted (0..N)
  input  logic          i_pos,      // arm current charges the inserted SMs
  input  logic          opt_sw,     // optimized switching frequency
  // mapping engine
  output logic          eng_start,
  output logic          eng_desc,
  input  logic          eng_busy,
  input  logic          in_valid,
  input  logic [PW-1:0] in_pos,
  input  logic [AW-1:0] in_range,
  input  logic          eng_done,
  // result
  output logic [N-1:0]  gates,
  output logic [NW-1:0] n_ins,
  output logic          busy,
  output logic          step_done
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_COLLECT, S_MAIN, S_SWC, S_SWP, S_DONE} state_t;
  typedef enum logic [1:0] {A_NONE, A_RESET, A_INSERT, A_BYPASS} action_t;

  state_t        state;
  action_t       action;
  logic          ipos_q;
  logic [NW-1:0] target, cnt;
  logic [PW-1:0] buf_pos [N];
  logic [AW-1:0] buf_rng [N];
  logic [PW-1:0] wr, ci, pi, crit_pos;
  logic [N-1:0]  touched;
  logic          p_front;      // partner search walks the list from its front
  logic [AW-1:0] crit_rng;

  logic [PW-1:0] cur_pos, c_pos, p_pos;
  logic [PW-1:0] p_idx;
  assign cur_pos = buf_pos[ci];
  assign c_pos   = buf_pos[ci];
  assign p_idx   = p_front ? pi : PW'(N - 1) - pi;
  assign p_pos   = buf_pos[p_idx];

  assign busy      = (state != S_IDLE);
  assign eng_start = (state == S_WAIT) && !eng_busy;
  assign step_done = (state == S_DONE);
  assign crit_rng  = ipos_q ? AW'(M - 1) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      action   <= A_NONE;
      ipos_q   <= 1'b0;
      eng_desc <= 1'b0;
      target   <= '0;
      cnt      <= '0;
      wr       <= '0;
      ci       <= '0;
      pi       <= '0;
      crit_pos <= '0;
      touched  <= '0;
      p_front  <= 1'b0;
      gates    <= '0;
      n_ins    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (step) begin
          logic want_low;
          ipos_q <= i_pos;
          if (!opt_sw) begin
            action   <= (n_ref != n_ins) ? A_RESET : A_NONE;
            target   <= n_ref;
            want_low  = i_pos;
          end else if (n_ref > n_ins) begin
            action   <= A_INSERT;
            target   <= n_ref - n_ins;
            want_low  = i_pos;
          end else if (n_ref < n_ins) begin
            action   <= A_BYPASS;
            target   <= n_ins - n_ref;
            want_low  = !i_pos;
          end else begin
            action   <= A_NONE;
            target   <= '0;
            want_low  = i_pos;
          end
          eng_desc <= !want_low;
          // the swap partner comes from the low end when charging
          p_front  <= (i_pos == want_low);
          state    <= S_WAIT;
        end
        S_WAIT: if (!eng_busy) begin
          wr    <= '0;
          state <= S_COLLECT;
        end
        S_COLLECT: begin
          if (in_valid) begin
            buf_pos[wr] <= in_pos;
            buf_rng[wr] <= in_range;
            wr          <= wr + 1'b1;
          end
          if (eng_done) begin
            ci      <= '0;
            pi      <= '0;
            cnt     <= '0;
            touched <= '0;
            state   <= (action == A_NONE) ? S_SWC : S_MAIN;
          end
        end
        S_MAIN: begin
          unique case (action)
            A_RESET: begin
              gates[cur_pos] <= (cnt < target);
              if (cnt < target) cnt <= cnt + 1'b1;
            end
            A_INSERT: if (!gates[cur_pos] && cnt < target) begin
              gates[cur_pos]   <= 1'b1;
              touched[cur_pos] <= 1'b1;
              cnt              <= cnt + 1'b1;
            end
            A_BYPASS: if (gates[cur_pos] && cnt < target) begin
              gates[cur_pos]   <= 1'b0;
              touched[cur_pos] <= 1'b1;
              cnt              <= cnt + 1'b1;
            end
            default: ;
          endcase
          if (ci == PW'(N - 1)) begin
            ci    <= '0;
            pi    <= '0;
            state <= S_SWC;
          end else
            ci <= ci + 1'b1;
        end
        S_SWC: begin
          if (gates[c_pos] && buf_rng[ci] == crit_rng && !touched[c_pos]) begin
            crit_pos <= c_pos;
            state    <= S_SWP;
          end else if (ci == PW'(N - 1))
            state <= S_DONE;
          else
            ci <= ci + 1'b1;
        end
        S_SWP: begin
          if (!gates[p_pos] && buf_rng[p_idx] != crit_rng && !touched[p_pos]) begin
            gates[crit_pos]   <= 1'b0;
            gates[p_pos]      <= 1'b1;
            touched[crit_pos] <= 1'b1;
            touched[p_pos]    <= 1'b1;
            if (ci == PW'(N - 1) || pi == PW'(N - 1))
              state <= S_DONE;
            else begin
              ci    <= ci + 1'b1;
              pi    <= pi + 1'b1;
              state <= S_SWC;
            end
          end else if (pi == PW'(N - 1))
            state <= S_DONE;
          else
            pi <= pi + 1'b1;
        end
        S_DONE: begin
          unique case (action)
            A_RESET:  n_ins <= cnt;
            A_INSERT: n_ins <= n_ins + cnt;
            A_BYPASS: n_ins <= n_ins - cnt;
            default: ;
          endcase
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
