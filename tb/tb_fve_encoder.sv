// tb_fve_encoder: self-checking testbench for the frequent-value word encoder
// at its documented MLC size: 8-bit slices (4 cells), 16 slices per word,
// k = 8 dictionaries, 2 tag cells, MLC PCM energies 36, 307, 547, 20 pJ.
// Dictionaries are built the way the offline code generator builds them:
// the 256 codewords are sorted by write energy (sum of the state energies of
// their four cells) and dictionary i maps the j-th most frequent value of
// cluster i to the j-th cheapest codeword. The cluster frequency orders here
// are synthetic permutations (no application traces are used).
// Words are drawn mostly from the frequent values of one cluster. Each output
// is compared with a model that encodes the word with every dictionary, puts
// the dictionary number in the tag cells, costs each version against the
// stored word (cells that change only) and keeps the cheapest (lowest number
// on ties); the result must come out three cycles after the input cycle and
// every dictionary must be chosen at least once.
module tb_fve_encoder;
  localparam int FVL = 8, S = 16, K = 8, DW = 128, SW = 132;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic           ld_valid = 1'b0, in_valid = 1'b0;
  logic [2:0]     ld_dict = '0;
  logic [FVL-1:0] ld_value = '0, ld_code = '0;
  logic [DW-1:0]  new_word = '0;
  logic [SW-1:0]  old_word = '0;
  logic           out_valid;
  logic [SW-1:0]  out_word;
  logic [2:0]     out_dict;
  logic [31:0]    out_energy;

  fve_encoder dut (.*);

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

  // dictionaries: dict[i][v] = code
  logic [7:0] dict [K][256];
  logic [7:0] ve [256];     // codewords by increasing energy
  logic [7:0] freq [K][256]; // freq[i][j] = j-th most frequent value of cluster i

  task automatic build_dicts();
    for (int j = 0; j < 256; j++) ve[j] = 8'(j);
    for (int a = 1; a < 256; a++)     // insertion sort by energy, stable
      for (int b = a; b > 0 && cw_energy(ve[b]) < cw_energy(ve[b-1]); b--) begin
        logic [7:0] t = ve[b]; ve[b] = ve[b-1]; ve[b-1] = t;
      end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < 256; j++) begin
        freq[i][j] = 8'((j * (2 * i + 37)) + 29 * i);   // odd multiplier: a permutation
        dict[i][freq[i][j]] = ve[j];
      end
  endtask

  function automatic int unsigned cost(logic [SW-1:0] n, logic [SW-1:0] o);
    int unsigned c = 0;
    for (int k = 0; k < SW / 2; k++) if (n[2*k +: 2] != o[2*k +: 2]) c += e(n[2*k +: 2]);
    return c;
  endfunction

  logic [SW-1:0] q_w[$]; int unsigned q_d[$], q_e[$], q_c[$];
  int used[K] = '{0, 0, 0, 0, 0, 0, 0, 0};

  always @(negedge clk) if (rst_n && out_valid) begin
    chk(q_c.size() > 0, "result expected");
    if (q_c.size() > 0) begin
      chk(cyc == q_c.pop_front() + 3, "latency");
      chk(out_word == q_w.pop_front(), "encoded word");
      chk(32'(out_dict) == q_d.pop_front(), "dictionary");
      chk(out_energy == q_e.pop_front(), "cost");
      chk(out_word[SW-1 -: 4] == 4'(out_dict), "tag holds the dictionary number");
      used[out_dict]++;
    end
  end

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build_dicts();
    chk(cw_energy(ve[0]) == 80 && ve[0] == 8'hff, "cheapest codeword is all-11");
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < K; i++)
      for (int v = 0; v < 256; v++) begin
        ld_valid = 1'b1; ld_dict = 3'(i); ld_value = 8'(v); ld_code = dict[i][v];
        @(negedge clk);
      end
    ld_valid = 1'b0;
    for (int n = 0; n < 8000; n++) begin
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        int cl;
        logic [SW-1:0] c, bw;
        int unsigned be, ce, bi;
        cl = $urandom % K;
        for (int s = 0; s < S; s++)
          new_word[s*8 +: 8] = (($urandom % 4) != 0) ? freq[cl][$urandom % 6] : 8'($urandom);
        old_word = (($urandom % 3) == 0) ? SW'(0) : {4'($urandom), 32'($urandom), 32'($urandom), 32'($urandom), 32'($urandom)};
        if (n % 4 == 1) old_word = {132{1'b1}};
        if (n % 4 == 2) begin      // stored word written earlier with the cluster's dictionary
          old_word[SW-1 -: 4] = 4'(cl);
          for (int s = 0; s < S; s++) old_word[s*8 +: 8] = dict[cl][freq[cl][$urandom % 6]];
        end
        be = 32'hffffffff; bi = 0; bw = '0;
        for (int i = 0; i < K; i++) begin
          c = '0;
          c[SW-1 -: 4] = 4'(i);
          for (int s = 0; s < S; s++) c[s*8 +: 8] = dict[i][new_word[s*8 +: 8]];
          ce = cost(c, old_word);
          if (ce < be) begin be = ce; bi = i; bw = c; end
        end
        q_w.push_back(bw); q_d.push_back(bi); q_e.push_back(be); q_c.push_back(cyc);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (5) @(negedge clk);
    chk(q_c.size() == 0, "all results returned");
    for (int i = 0; i < K; i++) chk(used[i] > 0, $sformatf("dictionary %0d chosen", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
