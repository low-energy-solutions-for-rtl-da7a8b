// tb_fve_line_codec: self-checking testbench for the line-level frequent-value
// codec at its documented MLC size: 4 words of 16 eight-bit slices plus 2 tag
// cells per 512-bit line, k = 8 dictionaries, one shared encoder and decoder.
// Dictionaries as in the word testbenches (codewords sorted by MLC write
// energy, synthetic per-cluster frequency orders). Random lines, built mostly
// from the frequent values of one cluster per word, are encoded against
// random or previously written old lines, and stored lines are decoded, in
// both directions at once. Checks: every encoded word is the cheapest of the
// k versions (model), enc_energy is the sum of the word costs, an encoded
// line decodes back to the original data, and a line accepted in cycle n is
// answered in cycle n+WPL+4 (encode) and n+WPL+2 (decode), the latency of a
// codec shared across the words of a line.
module tb_fve_line_codec;
  localparam int FVL = 8, S = 16, K = 8, DW = 128, SW = 132, WPL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic                ld_valid = 1'b0, enc_in_valid = 1'b0, dec_in_valid = 1'b0;
  logic [2:0]          ld_dict = '0;
  logic [FVL-1:0]      ld_value = '0, ld_code = '0;
  logic [WPL*DW-1:0]   new_line = '0, dec_line;
  logic [WPL*SW-1:0]   old_line = '0, enc_line, stored_line = '0;
  logic                enc_in_ready, enc_out_valid, dec_in_ready, dec_out_valid;
  logic [31:0]         enc_energy;

  fve_line_codec dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int unsigned e(logic [1:0] s);
    case (s) 0: return 36; 1: return 307; 2: return 547; default: return 20; endcase
  endfunction
  function automatic int unsigned cw_energy(int v);
    return e(2'(v)) + e(2'(v >> 2)) + e(2'(v >> 4)) + e(2'(v >> 6));
  endfunction
  logic [7:0] dict [K][256];
  logic [7:0] idict [K][256];
  logic [7:0] freq [K][256];
  logic [7:0] ve [256];
  task automatic build_dicts();
    for (int j = 0; j < 256; j++) ve[j] = 8'(j);
    for (int a = 1; a < 256; a++)
      for (int b = a; b > 0 && cw_energy(ve[b]) < cw_energy(ve[b-1]); b--) begin
        logic [7:0] t = ve[b]; ve[b] = ve[b-1]; ve[b-1] = t;
      end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < 256; j++) begin
        freq[i][j] = 8'((j * (2 * i + 37)) + 29 * i);
        dict[i][freq[i][j]] = ve[j];
        idict[i][ve[j]] = freq[i][j];
      end
  endtask
  function automatic int unsigned cost(logic [SW-1:0] n, logic [SW-1:0] o);
    int unsigned c = 0;
    for (int k = 0; k < SW / 2; k++) if (n[2*k +: 2] != o[2*k +: 2]) c += e(n[2*k +: 2]);
    return c;
  endfunction
  function automatic logic [SW-1:0] enc_word(logic [DW-1:0] w, logic [SW-1:0] o, output int unsigned be);
    logic [SW-1:0] c, bw;
    int unsigned ce;
    be = 32'hffffffff; bw = '0;
    for (int i = 0; i < K; i++) begin
      c = '0;
      c[SW-1 -: 4] = 4'(i);
      for (int s = 0; s < S; s++) c[s*8 +: 8] = dict[i][w[s*8 +: 8]];
      ce = cost(c, o);
      if (ce < be) begin be = ce; bw = c; end
    end
    return bw;
  endfunction
  function automatic logic [DW-1:0] dec_word(logic [SW-1:0] st);
    logic [DW-1:0] d;
    for (int s = 0; s < S; s++) d[s*8 +: 8] = idict[st[DW +: 3]][st[s*8 +: 8]];
    return d;
  endfunction

  logic [WPL*SW-1:0] qe_l[$]; int unsigned qe_e[$], qe_c[$]; logic [WPL*DW-1:0] qe_d[$];
  logic [WPL*DW-1:0] qd_l[$]; int unsigned qd_c[$];
  logic [WPL*SW-1:0] last_enc = '0;
  int n_enc = 0, n_dec = 0;

  always @(negedge clk) if (rst_n) begin
    if (enc_out_valid) begin
      logic [WPL*DW-1:0] d;
      chk(qe_c.size() > 0, "encode result expected");
      chk(cyc == qe_c.pop_front() + WPL + 4, "encode latency");
      chk(enc_line == qe_l.pop_front(), "encoded line");
      chk(enc_energy == qe_e.pop_front(), "line cost");
      d = qe_d.pop_front();
      for (int w = 0; w < WPL; w++) chk(dec_word(enc_line[w*SW +: SW]) == d[w*DW +: DW], "encoded line decodes back");
      last_enc = enc_line;
      n_enc++;
    end
    if (dec_out_valid) begin
      chk(qd_c.size() > 0, "decode result expected");
      chk(cyc == qd_c.pop_front() + WPL + 2, "decode latency");
      chk(dec_line == qd_l.pop_front(), "decoded line");
      n_dec++;
    end
  end

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cl;
    int unsigned tot, be;
    logic [WPL*SW-1:0] el;
    logic [WPL*DW-1:0] dl;
    build_dicts();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < K; i++)
      for (int v = 0; v < 256; v++) begin
        ld_valid = 1'b1; ld_dict = 3'(i); ld_value = 8'(v); ld_code = dict[i][v];
        @(negedge clk);
      end
    ld_valid = 1'b0;
    for (int n = 0; n < 6000; n++) begin
      if (!enc_in_valid || enc_in_ready) begin
        enc_in_valid = ($urandom % 2) == 0;
        for (int w = 0; w < WPL; w++) begin
          cl = $urandom % K;
          for (int s = 0; s < S; s++)
            new_line[w*DW + s*8 +: 8] = (($urandom % 4) != 0) ? freq[cl][$urandom % 6] : 8'($urandom);
        end
        for (int k = 0; k < WPL * SW / 32 + 1; k++) old_line[k*32 +: 32] = $urandom;
        if (($urandom % 2) == 0) old_line = last_enc;
      end
      if (!dec_in_valid || dec_in_ready) begin
        dec_in_valid = ($urandom % 2) == 0;
        for (int k = 0; k < WPL * SW / 32 + 1; k++) stored_line[k*32 +: 32] = $urandom;
        for (int w = 0; w < WPL; w++) stored_line[w*SW + DW +: 4] = {1'b0, stored_line[w*SW + DW +: 3]};
        if (($urandom % 2) == 0) stored_line = last_enc;
      end
      #1;
      if (enc_in_valid && enc_in_ready) begin
        tot = 0;
        for (int w = 0; w < WPL; w++) begin
          el[w*SW +: SW] = enc_word(new_line[w*DW +: DW], old_line[w*SW +: SW], be);
          tot += be;
        end
        qe_l.push_back(el); qe_e.push_back(tot); qe_c.push_back(cyc); qe_d.push_back(new_line);
      end
      if (dec_in_valid && dec_in_ready) begin
        for (int w = 0; w < WPL; w++) dl[w*DW +: DW] = dec_word(stored_line[w*SW +: SW]);
        qd_l.push_back(dl); qd_c.push_back(cyc);
      end
      @(negedge clk);
    end
    enc_in_valid = 1'b0; dec_in_valid = 1'b0;
    repeat (12) @(negedge clk);
    chk(qe_c.size() == 0 && qd_c.size() == 0, "all lines returned");
    chk(n_enc > 100 && n_dec > 100, "traffic");
    $display("lines encoded %0d decoded %0d", n_enc, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
