// tb_l3ep_controller: self-checking testbench for the L3EP program-and-verify
// controller at its documented settings (cubic predictor, eps = 370 kOhm,
// alpha = 2.2, 8-cycle pulses, 2 idle cycles between packed pulses, 30 cycles
// after amorphization, 15/35-cycle terminal writes, 1 cycle = 1 ns).
// The testbench plays the resistance estimator (answers 10 cycles after a
// sense request) and a behavioural TLC PCM cell:
//   * partial amorphization at V mV sets R to the resistance whose predicted
//     amplitude is V (inverse of the cubic curve), plus a per-write cell
//     offset (cell-to-cell variation, up to +-600 kOhm) and noise;
//   * a crystallization pulse at V mV lowers R by 2*(V-400) kOhm +-20%;
//   * full RESET gives about 4.8 MOhm, full SET about 10 kOhm.
// Writes to random targets from random start resistances are checked against
// an independent model of the decisions: in-margin stop, amorphize when
// E < -eps or E > alpha*eps (alpha raised after an amorphization), otherwise
// a pack of 1-3 crystallization pulses, 2 idle cycles apart, without verify,
// at 450 + |E|/16 mV rising by 4 mV per pulse; the first amorphization uses
// the predicted amplitude, later ones V + M*dV with dV = -E/64 and M = 10
// when R moved less than 40 kOhm since the previous verify. Terminal writes
// must take exactly 15 and 35 cycles with one full pulse. The testbench counts
// amorphizations, packed crystallizations, M = 10 updates and terminal writes
// (each must occur) and reports the mean write latency per target.
module tb_l3ep_controller;
  import nvm_pkg::*;
  localparam int EPS = 370;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        start = 1'b0;
  logic [2:0]  target = '0;
  logic        busy, done, converged;
  logic [7:0]  n_amorph, n_cryst;
  logic [15:0] op_cycles;
  logic        sense_req;
  logic        sense_valid = 1'b0;
  logic [15:0] sense_kohm = '0;
  logic        pulse_valid;
  pulse_e      pulse_kind;
  logic [11:0] pulse_mv;
  logic [7:0]  pulse_width;

  l3ep_controller dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // ---------------- behavioural cell and sensor ----------------
  int r_cell = 0;          // kOhm
  int offset = 0;          // per-write cell variation, kOhm
  function automatic real vpred(real r);
    real x = r / 1000.0;
    return 620.0 + 40.0 * x - 16.0 * x * x + 3.0 * x * x * x;
  endfunction
  function automatic int r_of_v(int v);
    int r = 0;
    while (r < 5000 && vpred(real'(r)) < real'(v)) r += 5;
    return r;
  endfunction
  function automatic int nz(int a);   // uniform noise in [-a, a]
    return int'($urandom % (2 * a + 1)) - a;
  endfunction

  int sense_at = -1;
  always @(negedge clk) begin
    sense_valid = 1'b0;
    if (sense_req) sense_at = int'(cyc) + 9;
    if (sense_at == int'(cyc)) begin
      sense_valid = 1'b1;
      sense_kohm = 16'(r_cell < 0 ? 0 : r_cell);
      sense_at = -1;
    end
  end

  // ---------------- decision model ----------------
  int  m_r_cur, m_r_prev, m_err, m_v_am, m_rm, m_cpend, m_v_cr;
  bit  m_have_prev, m_first, m_alpha_max, m_in_write, m_terminal;
  int  last_pulse_cyc, start_cyc;
  int  cnt_amorph = 0, cnt_cryst = 0, cnt_pack = 0, cnt_m10 = 0, cnt_term0 = 0, cnt_term7 = 0,
       cnt_first = 0, cnt_conv = 0, cnt_writes = 0;
  longint lat_sum[8] = '{0, 0, 0, 0, 0, 0, 0, 0};
  int     lat_n[8] = '{0, 0, 0, 0, 0, 0, 0, 0};

  function automatic int clampv(int v);
    if (v < 550) return 550;
    if (v > 900) return 900;
    return v;
  endfunction
  function automatic int ashr(int v, int s);   // arithmetic shift, rounds towards -inf
    return v >>> s;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (sense_valid && m_in_write) begin
      m_r_prev = m_r_cur;
      m_r_cur  = int'(sense_kohm);
      m_err    = m_r_cur - m_rm;
      chk(m_cpend == 0, "verify only after the whole pack");
    end
    if (pulse_valid) begin
      chk(pulse_width == 8'd8 || m_terminal, "pulse width 8 cycles");
      if (m_terminal) begin
        chk(pulse_kind == (target == 0 ? PULSE_FULL_RESET : PULSE_FULL_SET), "terminal pulse kind");
        chk(pulse_width == (target == 0 ? 8'd15 : 8'd35), "terminal pulse width");
        r_cell = (target == 0) ? 4800 + nz(100) : 10 + nz(3);
      end else if (pulse_kind == PULSE_AMORPH) begin
        int ae, mexp, vexp;
        ae = (m_err < 0) ? -m_err : m_err;
        chk(m_cpend == 0, "no amorphization inside a pack");
        chk(ae > EPS && (m_err < -EPS || (!m_alpha_max && ae > (563 * EPS) / 256)), "amorphization decision");
        if (m_first) begin
          vexp = clampv(int'(vpred(real'(m_rm)) + 0.5));
          chk(int'(pulse_mv) >= vexp - 1 && int'(pulse_mv) <= vexp + 1,
              $sformatf("first amplitude %0d exp %0d", pulse_mv, vexp));
          cnt_first++;
        end else begin
          mexp = (((m_r_cur > m_r_prev) ? m_r_cur - m_r_prev : m_r_prev - m_r_cur) < 40) ? 10 : 1;
          vexp = clampv(m_v_am - mexp * ashr(m_err, 6));
          chk(int'(pulse_mv) == vexp, $sformatf("amplitude update %0d exp %0d (M=%0d)", pulse_mv, vexp, mexp));
          if (mexp == 10) cnt_m10++;
        end
        m_v_am = int'(pulse_mv);
        m_first = 1'b0;
        m_alpha_max = 1'b1;
        cnt_amorph++;
        r_cell = r_of_v(int'(pulse_mv)) + offset + nz(20);
      end else if (pulse_kind == PULSE_CRYST) begin
        int ae, dr;
        ae = (m_err < 0) ? -m_err : m_err;
        if (m_cpend == 0) begin      // first pulse of a pack
          chk(m_err > EPS && (m_alpha_max || ae <= (563 * EPS) / 256), "crystallization decision");
          m_cpend = (ae <= (EPS * 5) / 4) ? 1 : (ae <= (EPS * 7) / 4) ? 2 : 3;
          m_v_cr = 450 + (ae >>> 4);
          if (m_cpend > 1) cnt_pack++;
        end else begin
          chk(int'(cyc) == last_pulse_cyc + 10, "packed pulses: 8-cycle pulse, 2 idle cycles");
          m_v_cr = m_v_cr + 4;
        end
        chk(int'(pulse_mv) == m_v_cr, $sformatf("crystallization amplitude %0d exp %0d", pulse_mv, m_v_cr));
        m_cpend--;
        cnt_cryst++;
        dr = 2 * (int'(pulse_mv) - 400);
        dr = dr + (dr * nz(20)) / 100;
        r_cell = r_cell - dr;
        if (r_cell < 10) r_cell = 10;
      end
      last_pulse_cyc = int'(cyc);
    end
    if (done) begin
      int lat;
      lat = int'(cyc) - start_cyc;
      if (m_terminal) begin
        chk(op_cycles == (target == 0 ? 16'd15 : 16'd35), $sformatf("terminal latency %0d", op_cycles));
        chk(n_amorph == 0 && n_cryst == 0 && converged, "terminal write: one full pulse");
        if (target == 0) cnt_term0++; else cnt_term7++;
      end else begin
        int ae;
        ae = (m_err < 0) ? -m_err : m_err;
        chk(converged == (ae <= EPS), "converged flag");
        chk(32'(n_amorph) + 32'(n_cryst) <= 32, "pulse budget");
        if (converged) begin
          int rl, ru;
          rl = tlc_lower_kohm(target); ru = tlc_lower_kohm(target - 1);
          chk(r_cell >= rl && r_cell <= ru, $sformatf("cell %0d kOhm inside state %0d", r_cell, target));
          cnt_conv++;
        end
      end
      lat_sum[target] += lat; lat_n[target]++;
      m_in_write = 1'b0;
    end
  end

  initial begin
    #500_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 600; n++) begin
      int t;
      t = (n < 8) ? (n % 8) : int'($urandom % 8);
      r_cell = (($urandom % 2) == 0) ? 10 + int'($urandom % 100) : 4700 + nz(100);
      if (($urandom % 3) == 0) r_cell = int'($urandom % 5000);
      offset = nz(600);
      target = 3'(t);
      m_rm = (t >= 1 && t <= 6) ? int'(tlc_mid_kohm(t)) : 0;
      m_terminal = (t == 0 || t == 7);
      m_first = 1'b1; m_alpha_max = 1'b0; m_have_prev = 1'b0; m_cpend = 0;
      m_r_cur = 0; m_r_prev = 0; m_err = 0; m_v_am = 0;
      m_in_write = 1'b1;
      start = 1'b1; start_cyc = int'(cyc);
      @(negedge clk);
      start = 1'b0;
      chk(busy, "busy after start");
      while (m_in_write) @(negedge clk);
      cnt_writes++;
      repeat (1 + $urandom % 3) @(negedge clk);
      chk(!busy, "idle after done");
    end
    chk(cnt_first > 0 && cnt_amorph > cnt_first, "first and incremental amorphizations");
    chk(cnt_pack > 0, "packed crystallization pulses");
    chk(cnt_m10 > 0, "update multiplier M = 10 used");
    chk(cnt_term0 > 0 && cnt_term7 > 0, "terminal writes");
    chk(cnt_conv > 0, "converged writes");
    $display("writes %0d converged(intermediate) %0d amorph %0d (first %0d, M=10 %0d) cryst %0d packs %0d",
             cnt_writes, cnt_conv, cnt_amorph, cnt_first, cnt_m10, cnt_cryst, cnt_pack);
    for (int s = 0; s < 8; s++)
      if (lat_n[s] > 0) $display("state %0d: mean write latency %0d ns over %0d writes", s, lat_sum[s] / lat_n[s], lat_n[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
