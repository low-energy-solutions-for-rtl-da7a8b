// l3ep_controller: L3EP low-latency, low-energy program-and-verify
// controller for one TLC PCM cell (one write driver).
//
// Algorithm, per programming iteration:
//   1. C <- 0; sense the cell resistance R and form E = R - R_M, R_M the
//      midpoint resistance of the target state (nvm_pkg::tlc_mid_kohm).
//   2. |E| <= eps: done.
//   3. E < -eps or E > alpha*eps: one partial amorphization pulse. The first
//      one of a write uses the amplitude predicted by l3ep_regression from
//      R_M; later ones use V <- V + M*dV with dV = -E / 2**KA_SHIFT mV and the
//      update multiplier M = 10 when R moved by less than DR_MIN_KOHM since
//      the previous sense, else 1. After an amorphization pulse alpha is
//      raised to its maximum, so later amorphizations happen only for
//      E < -eps. The controller then waits T_AMORPH_SETTLE cycles for the
//      melted cell to solidify and starts a new iteration.
//   4. Otherwise (eps < E <= alpha*eps): a pack of C0 crystallization
//      pulses, C0 = 1, 2 or 3 growing with E. Pulses are separated by
//      T_SHORT_IDLE cycles with no verify in between; the amplitude starts at
//      VC_BASE + E / 2**KC_SHIFT mV and grows by DV_C mV per pulse. After the
//      last pulse of the pack the controller waits T_SS cycles for the
//      steady-state resistance and starts a new iteration.
// Terminal states 0 and 7 are written like an SLC cell: one full RESET pulse
// (T_RESET cycles) or one full SET pulse (T_SET cycles), no verify.
// A write that reaches MAX_PULSES pulses stops with converged = 0.
//
// Interfaces: sense_req (1 cycle) -> sense_valid with sense_kohm some cycles
// later (resistance estimator); pulse_valid (1 cycle) with pulse_kind,
// pulse_mv and pulse_width (cycles) to the write driver, which must finish the
// pulse within pulse_width cycles, during which the controller waits.
// start/target are taken when idle; done pulses for one cycle at the end with
// converged, the pulse counts and op_cycles (start edge to done edge).
// One clock cycle is 1 ns in the reference timing (8 ns pulses, 2 ns idle
// between packed pulses, 30 ns after amorphization, 15/35 ns terminal writes).
//
// The decision structure, the regression start, the multiplier values 1 and
// 10, the pulse packing and the timings above follow the documented algorithm.
// This design's own choices: fixed-point integer arithmetic (kOhm, mV, alpha
// with 8 fractional bits), the raise of alpha to its maximum, the C0
// thresholds (E <= 1.25 eps: 1, E <= 1.75 eps: 2, else 3), the gains
// KA_SHIFT/KC_SHIFT, VC_BASE, DV_C, DR_MIN_KOHM, T_SS, the amplitude limits
// and MAX_PULSES.
module l3ep_controller
  import nvm_pkg::*;
#(
  parameter int unsigned DEGREE          = 3,     // regression predictor degree (1 or 3)
  parameter int unsigned EPS_KOHM        = 370,   // write margin
  parameter int unsigned ALPHA_Q8        = 563,   // initial alpha = 2.2 (8 fractional bits)
  parameter int unsigned KA_SHIFT        = 6,
  parameter int unsigned KC_SHIFT        = 4,
  parameter int unsigned VC_BASE_MV      = 450,
  parameter int unsigned DV_C_MV         = 4,
  parameter int unsigned DR_MIN_KOHM     = 40,
  parameter int unsigned V_MIN_MV        = 550,
  parameter int unsigned V_MAX_MV        = 900,
  parameter int unsigned PULSE_W         = 8,
  parameter int unsigned T_SHORT_IDLE    = 2,
  parameter int unsigned T_AMORPH_SETTLE = 30,
  parameter int unsigned T_SS            = 30,
  parameter int unsigned T_RESET         = 15,
  parameter int unsigned T_SET           = 35,
  parameter int unsigned FULL_RESET_MV   = 900,
  parameter int unsigned FULL_SET_MV     = 500,
  parameter int unsigned MAX_PULSES      = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // write request
  input  logic        start,
  input  logic [2:0]  target,
  output logic        busy,
  output logic        done,
  output logic        converged,
  output logic [7:0]  n_amorph,
  output logic [7:0]  n_cryst,
  output logic [15:0] op_cycles,
  // resistance estimator
  output logic        sense_req,
  input  logic        sense_valid,
  input  logic [15:0] sense_kohm,
  // write driver
  output logic        pulse_valid,
  output pulse_e      pulse_kind,
  output logic [11:0] pulse_mv,
  output logic [7:0]  pulse_width
);

  typedef enum logic [3:0] {
    S_IDLE, S_TERM, S_SENSE, S_SENSE_WAIT, S_DECIDE, S_REG_WAIT,
    S_AMORPH, S_CRYST, S_PULSE_WAIT, S_IDLE_GAP, S_SETTLE, S_DONE
  } state_e;

  state_e state, after_pulse;

  logic [15:0]        rm;          // target midpoint
  logic [15:0]        r_cur, r_prev;
  logic               have_prev;
  logic signed [17:0] err;
  logic [15:0]        alpha;
  logic               first_amorph;
  logic [11:0]        v_am, v_cr;
  logic [1:0]         c_cnt;
  logic [7:0]         tmr;
  logic [7:0]         n_pulses;

  // regression predictor, started with every write
  logic       reg_start, reg_busy, reg_done;
  logic [11:0] reg_v, reg_v_q;
  logic        reg_ok;

  assign reg_start = (state == S_IDLE) && start && (target != 3'd0) && (target != 3'd7);

  l3ep_regression #(.DEGREE(DEGREE)) u_reg (
    .clk, .rst_n, .start(reg_start), .rm_kohm(16'(tlc_mid_kohm(32'(target)))),
    .busy(reg_busy), .done(reg_done), .v_mv(reg_v)
  );

  // --------- decision helpers (combinational) ---------
  logic [17:0] abs_e, eps, alpha_eps, abs_dr;
  logic        in_margin, do_amorph;
  logic [1:0]  c0;
  logic signed [17:0] dv;
  logic signed [17:0] v_next;

  assign abs_e     = err[17] ? 18'(-err) : 18'(err);
  assign eps       = 18'(EPS_KOHM);
  assign alpha_eps = 18'((32'(alpha) * EPS_KOHM) >> 8);
  assign abs_dr    = (r_cur >= r_prev) ? 18'(r_cur - r_prev) : 18'(r_prev - r_cur);
  assign in_margin = (abs_e <= eps);
  assign do_amorph = err[17] || (abs_e > alpha_eps);
  assign c0        = (abs_e <= 18'((EPS_KOHM * 5) / 4)) ? 2'd1 :
                     (abs_e <= 18'((EPS_KOHM * 7) / 4)) ? 2'd2 : 2'd3;
  assign dv        = -(err >>> KA_SHIFT);
  assign v_next    = $signed({6'd0, v_am}) +
                     ((have_prev && abs_dr < 18'(DR_MIN_KOHM)) ? dv * 18'sd10 : dv);

  function automatic logic [11:0] clamp_v(logic signed [17:0] v);
    if (v < $signed(18'(V_MIN_MV))) return 12'(V_MIN_MV);
    if (v > $signed(18'(V_MAX_MV))) return 12'(V_MAX_MV);
    return 12'(v);
  endfunction

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      after_pulse  <= S_IDLE;
      rm           <= '0;
      r_cur        <= '0;
      r_prev       <= '0;
      have_prev    <= 1'b0;
      err          <= '0;
      alpha        <= '0;
      first_amorph <= 1'b1;
      v_am         <= '0;
      v_cr         <= '0;
      c_cnt        <= '0;
      tmr          <= '0;
      n_pulses     <= '0;
      n_amorph     <= '0;
      n_cryst      <= '0;
      op_cycles    <= '0;
      done         <= 1'b0;
      converged    <= 1'b0;
      sense_req    <= 1'b0;
      pulse_valid  <= 1'b0;
      pulse_kind   <= PULSE_AMORPH;
      pulse_mv     <= '0;
      pulse_width  <= '0;
      reg_ok       <= 1'b0;
      reg_v_q      <= '0;
    end else begin
      done        <= 1'b0;
      sense_req   <= 1'b0;
      pulse_valid <= 1'b0;
      if (state != S_IDLE) op_cycles <= op_cycles + 1'b1;
      if (reg_done) begin
        reg_ok  <= 1'b1;
        reg_v_q <= reg_v;
      end

      case (state)
        S_IDLE: if (start) begin
          op_cycles    <= '0;
          n_amorph     <= '0;
          n_cryst      <= '0;
          n_pulses     <= '0;
          have_prev    <= 1'b0;
          first_amorph <= 1'b1;
          alpha        <= 16'(ALPHA_Q8);
          reg_ok       <= 1'b0;
          converged    <= 1'b0;
          if (target == 3'd0 || target == 3'd7) begin
            pulse_valid <= 1'b1;
            pulse_kind  <= (target == 3'd0) ? PULSE_FULL_RESET : PULSE_FULL_SET;
            pulse_mv    <= (target == 3'd0) ? 12'(FULL_RESET_MV) : 12'(FULL_SET_MV);
            pulse_width <= (target == 3'd0) ? 8'(T_RESET) : 8'(T_SET);
            tmr         <= (target == 3'd0) ? 8'(T_RESET - 1) : 8'(T_SET - 1);
            state       <= S_TERM;
          end else begin
            rm         <= 16'(tlc_mid_kohm(32'(target)));
            state      <= S_SENSE;
          end
        end

        S_TERM: if (tmr == 0) begin
          converged <= 1'b1;
          done      <= 1'b1;
          state     <= S_IDLE;
        end else tmr <= tmr - 1'b1;

        // iteration start: C <- 0, verify
        S_SENSE: begin
          c_cnt     <= '0;
          sense_req <= 1'b1;
          state     <= S_SENSE_WAIT;
        end

        S_SENSE_WAIT: if (sense_valid) begin
          r_prev <= r_cur;
          r_cur  <= sense_kohm;
          err    <= $signed({2'b00, sense_kohm}) - $signed({2'b00, rm});
          state  <= S_DECIDE;
        end

        S_DECIDE: begin
          if (in_margin) begin
            converged <= 1'b1;
            state     <= S_DONE;
          end else if (n_pulses >= 8'(MAX_PULSES)) begin
            state <= S_DONE;
          end else if (do_amorph) begin
            state <= first_amorph ? S_REG_WAIT : S_AMORPH;
            if (!first_amorph) v_am <= clamp_v(v_next);
          end else begin
            c_cnt <= c0;
            v_cr  <= 12'(VC_BASE_MV + 32'(abs_e >> KC_SHIFT));
            state <= S_CRYST;
          end
        end

        S_REG_WAIT: if (reg_ok) begin
          v_am  <= clamp_v($signed({6'd0, reg_v_q}));
          state <= S_AMORPH;
        end

        S_AMORPH: begin
          pulse_valid  <= 1'b1;
          pulse_kind   <= PULSE_AMORPH;
          pulse_mv     <= v_am;
          pulse_width  <= 8'(PULSE_W);
          n_pulses     <= n_pulses + 1'b1;
          n_amorph     <= n_amorph + 1'b1;
          first_amorph <= 1'b0;
          have_prev    <= 1'b1;
          alpha        <= 16'hFFFF;
          tmr          <= 8'(PULSE_W - 1);
          after_pulse  <= S_SETTLE;
          state        <= S_PULSE_WAIT;
        end

        S_CRYST: begin
          pulse_valid <= 1'b1;
          pulse_kind  <= PULSE_CRYST;
          pulse_mv    <= v_cr;
          pulse_width <= 8'(PULSE_W);
          n_pulses    <= n_pulses + 1'b1;
          n_cryst     <= n_cryst + 1'b1;
          c_cnt       <= c_cnt - 1'b1;
          tmr         <= 8'(PULSE_W - 1);
          after_pulse <= (c_cnt == 2'd1) ? S_SETTLE : S_IDLE_GAP;
          state       <= S_PULSE_WAIT;
        end

        S_PULSE_WAIT: if (tmr == 0) begin
          // the S_CRYST cycle is the last idle cycle between packed pulses
          if (after_pulse == S_IDLE_GAP) begin
            tmr   <= 8'(T_SHORT_IDLE - 2);
            v_cr  <= v_cr + 12'(DV_C_MV);
            state <= (T_SHORT_IDLE >= 2) ? S_IDLE_GAP : S_CRYST;
          end else begin
            tmr   <= (pulse_kind == PULSE_AMORPH) ? 8'(T_AMORPH_SETTLE - 1) : 8'(T_SS - 1);
            state <= after_pulse;
          end
        end else tmr <= tmr - 1'b1;

        S_IDLE_GAP: if (tmr == 0) state <= S_CRYST;
                    else tmr <= tmr - 1'b1;

        S_SETTLE: if (tmr == 0) state <= S_SENSE;
                  else tmr <= tmr - 1'b1;

        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  a_pulse_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 pulse_valid |-> !sense_req);

endmodule
