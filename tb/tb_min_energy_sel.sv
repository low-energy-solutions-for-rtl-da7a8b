// tb_min_energy_sel: self-checking testbench for min_energy_sel at its
// default size (2-bit cells, 9-cell words, 4 candidates, power-of-two MLC
// weights 4, 32, 64, 2).
// Random candidate sets and stored words, with random gaps between inputs,
// are compared with an independent cost model: cost = sum over cells that
// differ from the stored word of the weight of the new state; the cheapest
// candidate, lowest index on ties, must come out exactly 3 cycles after it
// went in. Directed cases cover ties, identical words and all-different words.
module tb_min_energy_sel;
  import nvm_pkg::*;
  localparam int CB = 2, WC = 9, NC = 4, W = CB * WC;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic              in_valid = 1'b0;
  logic [NC-1:0][W-1:0] cand = '0;
  logic [W-1:0]      old_word = '0;
  logic              out_valid;
  logic [1:0]        out_idx;
  logic [W-1:0]      out_word;
  logic [23:0]       out_energy;
  logic [3:0]        out_cell_writes;

  min_energy_sel dut (.*);

  function automatic int unsigned wt(int unsigned s);
    case (s) 0: return 4; 1: return 32; 2: return 64; default: return 2; endcase
  endfunction
  function automatic int unsigned cost(logic [W-1:0] n, logic [W-1:0] o, output int unsigned nw);
    int unsigned e = 0; nw = 0;
    for (int c = 0; c < WC; c++)
      if (n[2*c +: 2] != o[2*c +: 2]) begin e += wt(n[2*c +: 2]); nw++; end
    return e;
  endfunction

  int unsigned q_idx[$], q_en[$], q_nw[$], q_cyc[$];
  logic [W-1:0] q_word[$];
  int ties = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  task automatic push(logic [NC-1:0][W-1:0] c, logic [W-1:0] o);
    int unsigned best = 0, be, e, nw, bnw;
    be = cost(c[0], o, bnw);
    for (int i = 1; i < NC; i++) begin
      e = cost(c[i], o, nw);
      if (e == be) ties++;
      if (e < be) begin be = e; best = i; bnw = nw; end
    end
    cand = c; old_word = o; in_valid = 1'b1;
    q_idx.push_back(best); q_en.push_back(be); q_nw.push_back(bnw);
    q_word.push_back(c[best]); q_cyc.push_back(cyc);
  endtask

  // output checker, at the falling edge
  always @(negedge clk) if (rst_n && out_valid) begin
    if (q_idx.size() == 0) chk(1'b0, "unexpected out_valid");
    else begin
      chk(out_idx == 2'(q_idx[0]), $sformatf("idx %0d exp %0d", out_idx, q_idx[0]));
      chk(out_energy == 24'(q_en[0]), $sformatf("energy %0d exp %0d", out_energy, q_en[0]));
      chk(out_word == q_word[0], "word");
      chk(out_cell_writes == 4'(q_nw[0]), "cell writes");
      chk(cyc == q_cyc[0] + 3, $sformatf("latency %0d", cyc - q_cyc[0]));
      void'(q_idx.pop_front()); void'(q_en.pop_front()); void'(q_nw.pop_front());
      void'(q_word.pop_front()); void'(q_cyc.pop_front());
    end
  end

  initial begin
    #200_000_000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NC-1:0][W-1:0] c;
    logic [W-1:0] o;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // directed: all candidates equal to the stored word -> cost 0, index 0
    o = W'(18'h2d1c3);
    push({o, o, o, o}, o); @(negedge clk); in_valid = 1'b0;
    // directed: tie between candidates 1 and 3, both cheaper than 0 and 2
    o = '0;
    c[0] = {9{2'b10}}; c[1] = {{8{2'b00}}, 2'b11}; c[2] = {9{2'b01}}; c[3] = {{8{2'b00}}, 2'b11};
    push(c, o); @(negedge clk);
    // directed: only the last candidate is cheap
    c[0] = {9{2'b10}}; c[1] = {9{2'b01}}; c[2] = {9{2'b00}} | 18'h1; c[3] = '0;
    push(c, {9{2'b11}}); @(negedge clk); in_valid = 1'b0;
    repeat (5) @(negedge clk);
    // random
    for (int n = 0; n < 20000; n++) begin
      if (($urandom % 4) != 0) begin
        for (int i = 0; i < NC; i++) c[i] = W'($urandom);
        o = W'($urandom);
        if (($urandom % 8) == 0) c[$urandom % NC] = o;
        push(c, o);
      end else in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    chk(q_idx.size() == 0, "all results returned");
    chk(ties > 0, "tie cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
