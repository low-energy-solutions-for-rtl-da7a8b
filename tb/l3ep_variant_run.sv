// l3ep_variant_run: testbench helper that runs one configuration of the L3EP
// program-and-verify controller (predictor degree, write margin eps) on a
// stream of random TLC writes and checks the outcome. Used by
// tb_l3ep_variants, once per configuration.
//
// How it works: the helper holds an l3ep_controller, a resistance estimator
// that answers 10 cycles after a sense request, and the same behavioural
// TLC PCM cell as tb_l3ep_controller: a partial amorphization at V mV sets
// R to the resistance at which the cubic predictor curve gives V, plus a
// per-write offset of up to +-600 kOhm and +-20 kOhm noise; a
// crystallization pulse at V mV lowers R by 2*(V-400) kOhm +-20%; full
// RESET gives about 4.8 MOhm and full SET about 10 kOhm. N_WRITES writes go
// to random targets (the first eight cover every state) from random start
// resistances.
// Checks: a target-0 or target-7 write takes one full pulse and exactly 15
// or 35 cycles; every intermediate write that reports converged has left
// the cell within eps of the state midpoint, one that does not has used its
// pulse budget; at least 90% of intermediate writes converge. It sums the
// latency (start to done, 1 cycle = 1 ns) of the intermediate writes.
//
// Interface: clk, rst_n in; done rises at the end; checks, failures, the
// number of intermediate writes, how many converged, their total latency and
// their total pulse count are outputs.
module l3ep_variant_run
  import nvm_pkg::*;
#(
  parameter int unsigned DEGREE   = 3,
  parameter int unsigned EPS      = 370,
  parameter int unsigned N_WRITES = 400
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output int     n_mid,
  output int     n_conv,
  output longint lat_mid,
  output longint pulses_mid
);
  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  logic        start;
  logic [2:0]  target;
  logic        busy, l_done, converged;
  logic [7:0]  n_amorph, n_cryst;
  logic [15:0] op_cycles;
  logic        sense_req, sense_valid;
  logic [15:0] sense_kohm;
  logic        pulse_valid;
  pulse_e      pulse_kind;
  logic [11:0] pulse_mv;
  logic [7:0]  pulse_width;

  l3ep_controller #(.DEGREE(DEGREE), .EPS_KOHM(EPS)) dut (
    .clk, .rst_n, .start, .target, .busy, .done(l_done), .converged,
    .n_amorph, .n_cryst, .op_cycles, .sense_req, .sense_valid, .sense_kohm,
    .pulse_valid, .pulse_kind, .pulse_mv, .pulse_width
  );

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m @%0d: %s", cyc, msg);
    end
  endtask

  // ---------------- behavioural cell and sensor ----------------
  int r_cell;
  int offset;
  int sense_at;
  function automatic real vpred(real r);
    real x;
    x = r / 1000.0;
    return 620.0 + 40.0 * x - 16.0 * x * x + 3.0 * x * x * x;
  endfunction
  function automatic int r_of_v(int v);
    int r;
    r = 0;
    while (r < 5000 && vpred(real'(r)) < real'(v)) r += 5;
    return r;
  endfunction
  function automatic int nz(int a);   // uniform noise in [-a, a]
    return int'($urandom % (2 * a + 1)) - a;
  endfunction

  always @(negedge clk) begin
    int dr;
    sense_valid = 1'b0;
    if (sense_req) sense_at = int'(cyc) + 9;
    if (sense_at == int'(cyc)) begin
      sense_valid = 1'b1;
      sense_kohm  = 16'(r_cell < 0 ? 0 : r_cell);
      sense_at    = -1;
    end
    if (pulse_valid) begin
      case (pulse_kind)
        PULSE_FULL_RESET: r_cell = 4800 + nz(100);
        PULSE_FULL_SET:   r_cell = 10 + nz(3);
        PULSE_AMORPH:     r_cell = r_of_v(int'(pulse_mv)) + offset + nz(20);
        default: begin
          dr = 2 * (int'(pulse_mv) - 400);
          dr = dr + (dr * nz(20)) / 100;
          r_cell = r_cell - dr;
          if (r_cell < 10) r_cell = 10;
        end
      endcase
    end
  end

  // ---------------- write stream ----------------
  initial begin
    int t, lat, c0, rm, ae;
    done = 1'b0; checks = 0; failures = 0; n_mid = 0; n_conv = 0;
    lat_mid = 0; pulses_mid = 0; cyc = 0;
    start = 1'b0; target = '0; sense_valid = 1'b0; sense_kohm = '0;
    r_cell = 0; offset = 0; sense_at = -1;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < N_WRITES; n++) begin
      t = (n < 8) ? n : int'($urandom % 8);
      r_cell = (($urandom % 2) == 0) ? 10 + int'($urandom % 100) : 4700 + nz(100);
      if (($urandom % 3) == 0) r_cell = int'($urandom % 5000);
      offset = nz(600);
      target = 3'(t);
      start = 1'b1;
      c0 = int'(cyc);
      @(negedge clk);
      start = 1'b0;
      while (!l_done && int'(cyc) < c0 + 20000) @(negedge clk);
      chk(l_done, "write finishes");
      lat = int'(cyc) - c0;
      if (t == 0 || t == 7) begin
        chk(op_cycles == ((t == 0) ? 16'd15 : 16'd35), "terminal write latency 15 / 35 cycles");
        chk(converged && n_amorph == 0 && n_cryst == 0, "terminal write: one full pulse");
      end else begin
        rm = int'(tlc_mid_kohm(t));
        ae = (r_cell > rm) ? r_cell - rm : rm - r_cell;
        if (converged) chk(ae <= int'(EPS), $sformatf("converged cell %0d kOhm within eps of %0d", r_cell, rm));
        else           chk(32'(n_amorph) + 32'(n_cryst) >= 32, "gave up only at the pulse budget");
        n_mid++;
        if (converged) n_conv++;
        lat_mid += longint'(lat);
        pulses_mid += longint'(n_amorph) + longint'(n_cryst);
      end
      @(negedge clk);
    end
    chk(n_conv * 10 >= n_mid * 9, "at least 90% of intermediate writes converge");
    done = 1'b1;
  end
endmodule
