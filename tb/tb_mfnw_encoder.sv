// tb_mfnw_encoder: self-checking testbench for the flip-n-write word encoder.
// The instance under test has the default (documented) configuration: plain
// MFNW, 8 MLC cells plus one tag cell, power-of-two state weights. Two more
// instances run MFNW2 (transformation R, xtag 00/11) and MFNW3 (R, S1, S2,
// xtag = transformation number) on the same stimulus.
// An independent model builds all candidates (transformation, then the four
// inversions {i, {8{i}} ^ w}), costs them against the stored word over the
// cells that change, and takes the cheapest (lowest index on ties). Every
// encoder output must match the model, come out exactly three cycles after
// the input cycle, decode back to the new word, and never cost more than
// writing the word unencoded. A new word enters in most cycles. The testbench
// also reports how often a non-trivial candidate was chosen.
module tb_mfnw_encoder;
  localparam int N = 8, DW = 16;
  localparam int SW0 = DW + 2, SW1 = DW + 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic           in_valid = 1'b0;
  logic [DW-1:0]  new_word = '0;
  logic [SW0-1:0] old0 = '0;
  logic [SW1-1:0] old2 = '0, old3 = '0;
  logic           v0, v2, v3;
  logic [SW0-1:0] w0;
  logic [SW1-1:0] w2, w3;
  logic [1:0]     c0;
  logic [2:0]     c2;
  logic [3:0]     c3;
  logic [23:0]    e0, e2, e3;
  logic [3:0]     n0;
  logic [3:0]     n2, n3;

  mfnw_encoder dut (.clk, .rst_n, .in_valid, .new_word, .old_word(old0),
    .out_valid(v0), .out_word(w0), .out_choice(c0), .out_energy(e0), .out_cell_writes(n0));
  mfnw_encoder #(.NUM_XFORM(1)) dut2 (.clk, .rst_n, .in_valid, .new_word, .old_word(old2),
    .out_valid(v2), .out_word(w2), .out_choice(c2), .out_energy(e2), .out_cell_writes(n2));
  mfnw_encoder #(.NUM_XFORM(3)) dut3 (.clk, .rst_n, .in_valid, .new_word, .old_word(old3),
    .out_valid(v3), .out_word(w3), .out_choice(c3), .out_energy(e3), .out_cell_writes(n3));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int unsigned wt(logic [1:0] s);
    case (s) 0: return 4; 1: return 32; 2: return 64; default: return 2; endcase
  endfunction
  function automatic int unsigned cost(logic [SW1-1:0] n, logic [SW1-1:0] o, int cells);
    int unsigned e = 0;
    for (int c = 0; c < cells; c++) if (n[2*c +: 2] != o[2*c +: 2]) e += wt(n[2*c +: 2]);
    return e;
  endfunction
  function automatic logic [DW-1:0] xf(int s, logic [DW-1:0] w);
    logic [DW-1:0] r = w;
    case (s)
      1: r = {w[0], w[DW-1:1]};
      2: for (int c = 0; c < N; c++) if (w[2*c+1]) r[2*c] = ~w[2*c];
      3: for (int c = 0; c < N; c++) if (w[2*c]) r[2*c+1] = ~w[2*c+1];
      default: ;
    endcase
    return r;
  endfunction
  function automatic logic [DW-1:0] ixf(int s, logic [DW-1:0] w);
    if (s == 1) return {w[DW-2:0], w[DW-1]};
    return xf(s, w);
  endfunction
  // reference encoder: nx = 0, 1, 3 transformations; returns stored word
  function automatic logic [SW1-1:0] ref_enc(int nx, logic [DW-1:0] w, logic [SW1-1:0] o,
                                             output int unsigned best, output int unsigned be);
    int cells = (nx == 0) ? 9 : 10;
    logic [SW1-1:0] bw = '0, cw;
    be = 32'hffff_ffff; best = 0;
    for (int t = 0; t <= nx; t++)
      for (int i = 0; i < 4; i++) begin
        int s = (nx == 1 && t == 1) ? 1 : t;
        logic [1:0] xt = (nx == 1) ? ((t == 0) ? 2'b00 : 2'b11) : 2'(t);
        logic [DW-1:0] d = xf(s, w);
        for (int c = 0; c < N; c++) d[2*c +: 2] = d[2*c +: 2] ^ 2'(i);
        cw = (nx == 0) ? SW1'({2'(i), d}) : {xt, 2'(i), d};
        if (cost(cw, o, cells) < be) begin be = cost(cw, o, cells); best = t * 4 + i; bw = cw; end
      end
    return bw;
  endfunction
  function automatic logic [DW-1:0] ref_dec(int nx, logic [SW1-1:0] s);
    logic [DW-1:0] d = s[DW-1:0] ^ {N{s[DW +: 2]}};
    logic [1:0] xt = s[SW1-1 -: 2];
    if (nx == 0) return d;
    if (nx == 1) return (xt == 2'b00) ? d : ixf(1, d);
    return ixf(int'(xt), d);
  endfunction

  typedef struct { logic [SW1-1:0] w0, w1, w2; int unsigned i0, i1, i2, e0, e1, e2;
                   int unsigned plain; bit shared; logic [DW-1:0] nw; int unsigned cyc; } exp_t;
  exp_t q[$];
  int nontrivial[3] = '{0, 0, 0};

  exp_t x_out;
  always @(negedge clk) if (rst_n) begin
    chk(v0 == v2 && v0 == v3, "valid alignment");
    if (v0) begin
      if (q.size() == 0) chk(1'b0, "unexpected out_valid");
      else begin
        x_out = q.pop_front();
        chk(cyc == x_out.cyc + 3, $sformatf("latency %0d", cyc - x_out.cyc));
        chk(w0 == x_out.w0[SW0-1:0], $sformatf("MFNW word %h exp %h", w0, x_out.w0[SW0-1:0]));
        chk(32'(c0) == x_out.i0 && 32'(e0) == x_out.e0, "MFNW choice/energy");
        chk(w2 == x_out.w1 && 32'(c2) == x_out.i1 && 32'(e2) == x_out.e1, "MFNW2 result");
        chk(w3 == x_out.w2 && 32'(c3) == x_out.i2 && 32'(e3) == x_out.e2, "MFNW3 result");
        chk(ref_dec(0, SW1'(w0)) == x_out.nw, "MFNW decodes back");
        chk(ref_dec(1, w2) == x_out.nw, "MFNW2 decodes back");
        chk(ref_dec(3, w3) == x_out.nw, "MFNW3 decodes back");
        chk(32'(e0) <= x_out.plain, "MFNW never worse than unencoded");
        if (x_out.shared) chk(e3 <= e0 && e2 <= e0, "more candidates, no worse cost");
        if (c0 != 0) nontrivial[0]++;
        if (c2 != 0) nontrivial[1]++;
        if (c3 != 0) nontrivial[2]++;
      end
    end
  end

  initial begin
    #200_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t x;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      if (($urandom % 5) != 0) begin
        new_word = DW'($urandom);
        old0 = SW0'($urandom); old2 = SW1'($urandom); old3 = SW1'($urandom);
        if (n % 7 == 0) old0 = {2'b00, new_word};            // rewrite of the same value
        if (n % 11 == 0) old0 = {2'b01, ~new_word};          // complement stored
        x.shared = (n % 2 == 0);
        if (x.shared) begin old2 = {2'b00, old0}; old3 = {2'b00, old0}; end
        x.nw = new_word; x.cyc = cyc;
        x.w0 = ref_enc(0, new_word, SW1'(old0), x.i0, x.e0);
        x.w1 = ref_enc(1, new_word, old2, x.i1, x.e1);
        x.w2 = ref_enc(3, new_word, old3, x.i2, x.e2);
        x.plain = cost(SW1'({2'b00, new_word}), SW1'(old0), 9);
        q.push_back(x);
        in_valid = 1'b1;
      end else in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    chk(q.size() == 0, "all results returned");
    chk(nontrivial[0] > 0 && nontrivial[1] > 0 && nontrivial[2] > 0, "non-trivial candidates chosen");
    $display("non-trivial choices: MFNW %0d MFNW2 %0d MFNW3 %0d", nontrivial[0], nontrivial[1], nontrivial[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
