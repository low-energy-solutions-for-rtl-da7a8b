// fve_cfg_check: testbench helper that runs one configuration of the
// frequent-value line codec (fve_line_codec) on a synthetic write workload
// and checks it against a model. Used by tb_fve_configs, once per line
// organisation (MLC or TLC cells, k dictionaries, slices per word, tag cells,
// words per line).
//
// How it works: dictionaries are built by the encoding rule of the scheme -
// the j-th most frequent value of cluster i is mapped to the j-th cheapest
// codeword (codeword cost = sum of the state energies of its cells, stable
// sort) - with a synthetic frequency order per cluster,
// f_i(j) = (j * (2i + 37) + 29i) mod 2**FVL, and loaded through the load port.
// Then N_LINES lines are written, one after another, over a single memory
// line: every word draws 3 of 4 slices from the 6 most frequent values of a
// random cluster and the rest at random. Each line is encoded against the
// line stored before it and the stored line is then decoded again.
// Checks per line: every word is the cheapest of the k versions (first on
// ties), the tag field holds the dictionary number, enc_energy is the sum of
// the word costs, the stored line decodes to the data, encode answers in
// cycle n+WPL+4 and decode in cycle n+WPL+2 after the accepting cycle n. At
// the end the energy of the encoded writes must be below that of writing the
// same data unencoded with data-comparison write (only changed cells cost).
//
// Interface: clk, rst_n in; done rises when the run is over; checks and
// failures count the checks; e_fve and e_dcw are the total write energies
// (units of the TECH energy table).
module fve_cfg_check
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned FVL       = 8,
  parameter int unsigned SLICES    = 16,
  parameter int unsigned K         = 8,
  parameter int unsigned TAG_CELLS = 2,
  parameter int unsigned WPL       = 4,
  parameter tech_e       TECH      = TECH_MLC_PCM,
  parameter int unsigned N_LINES   = 200
) (
  input  logic    clk,
  input  logic    rst_n,
  output logic    done,
  output int      checks,
  output int      failures,
  output longint  e_fve,
  output longint  e_dcw
);
  localparam int unsigned NV  = 1 << FVL;
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned DW  = SLICES * FVL;
  localparam int unsigned TW  = TAG_CELLS * CELL_BITS;
  localparam int unsigned SW  = DW + TW;
  localparam int unsigned SWC = SW / CELL_BITS;
  localparam int unsigned DWC = DW / CELL_BITS;

  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  logic                ld_valid, enc_in_valid, dec_in_valid;
  logic [KW-1:0]       ld_dict;
  logic [FVL-1:0]      ld_value, ld_code;
  logic [WPL*DW-1:0]   new_line, dec_line;
  logic [WPL*SW-1:0]   old_line, enc_line, stored_line;
  logic                enc_in_ready, enc_out_valid, dec_in_ready, dec_out_valid;
  logic [31:0]         enc_energy;

  fve_line_codec #(
    .CELL_BITS(CELL_BITS), .FVL(FVL), .SLICES(SLICES), .K(K),
    .TAG_CELLS(TAG_CELLS), .WPL(WPL), .TECH(TECH)
  ) dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m @%0d: %s", cyc, msg);
    end
  endtask

  function automatic int unsigned cw_energy(int unsigned v);
    int unsigned t;
    t = 0;
    for (int c = 0; c < FVL / CELL_BITS; c++)
      t += state_energy(TECH, (v >> (c * CELL_BITS)) & ((1 << CELL_BITS) - 1));
    return t;
  endfunction

  logic [FVL-1:0] dict  [K][NV];
  logic [FVL-1:0] idict [K][NV];
  logic [FVL-1:0] freq  [K][NV];
  logic [FVL-1:0] ve    [NV];

  task automatic build_dicts();
    logic [FVL-1:0] t;
    for (int j = 0; j < NV; j++) ve[j] = FVL'(j);
    for (int a = 1; a < NV; a++)
      for (int b = a; b > 0 && cw_energy(ve[b]) < cw_energy(ve[b-1]); b--) begin
        t = ve[b]; ve[b] = ve[b-1]; ve[b-1] = t;
      end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < NV; j++) begin
        freq[i][j] = FVL'((j * (2 * i + 37)) + 29 * i);
        dict[i][freq[i][j]] = ve[j];
        idict[i][ve[j]] = freq[i][j];
      end
  endtask

  // energy of writing cells n over cells o (changed cells only)
  function automatic int unsigned cost_w(logic [SW-1:0] n, logic [SW-1:0] o);
    int unsigned c;
    c = 0;
    for (int k = 0; k < SWC; k++)
      if (n[k*CELL_BITS +: CELL_BITS] != o[k*CELL_BITS +: CELL_BITS])
        c += state_energy(TECH, int'(n[k*CELL_BITS +: CELL_BITS]));
    return c;
  endfunction
  function automatic int unsigned cost_d(logic [DW-1:0] n, logic [DW-1:0] o);
    int unsigned c;
    c = 0;
    for (int k = 0; k < DWC; k++)
      if (n[k*CELL_BITS +: CELL_BITS] != o[k*CELL_BITS +: CELL_BITS])
        c += state_energy(TECH, int'(n[k*CELL_BITS +: CELL_BITS]));
    return c;
  endfunction

  function automatic logic [SW-1:0] enc_word(logic [DW-1:0] w, logic [SW-1:0] o,
                                             output int unsigned be);
    logic [SW-1:0] c, bw;
    int unsigned ce;
    be = 32'hffffffff;
    bw = '0;
    for (int i = 0; i < K; i++) begin
      c = '0;
      c[DW +: TW] = TW'(i);
      for (int s = 0; s < SLICES; s++) c[s*FVL +: FVL] = dict[i][w[s*FVL +: FVL]];
      ce = cost_w(c, o);
      if (ce < be) begin be = ce; bw = c; end
    end
    return bw;
  endfunction

  initial begin
    int unsigned c0, tot, be, cl;
    logic [WPL*SW-1:0] exp_l;
    logic [WPL*DW-1:0] raw_old;
    done = 1'b0; checks = 0; failures = 0; e_fve = 0; e_dcw = 0; cyc = 0;
    ld_valid = 1'b0; enc_in_valid = 1'b0; dec_in_valid = 1'b0;
    ld_dict = '0; ld_value = '0; ld_code = '0;
    new_line = '0; old_line = '0; stored_line = '0; raw_old = '0;
    build_dicts();
    @(posedge rst_n);
    @(negedge clk);
    for (int i = 0; i < K; i++)
      for (int v = 0; v < NV; v++) begin
        ld_valid = 1'b1; ld_dict = KW'(i); ld_value = FVL'(v); ld_code = dict[i][v];
        @(negedge clk);
      end
    ld_valid = 1'b0;
    for (int n = 0; n < N_LINES; n++) begin
      for (int w = 0; w < WPL; w++) begin
        cl = $urandom % K;
        for (int s = 0; s < SLICES; s++)
          new_line[w*DW + s*FVL +: FVL] =
            (($urandom % 4) != 0) ? freq[cl][$urandom % 6] : FVL'($urandom);
      end
      // encode over the stored line
      tot = 0;
      for (int w = 0; w < WPL; w++) begin
        exp_l[w*SW +: SW] = enc_word(new_line[w*DW +: DW], old_line[w*SW +: SW], be);
        tot += be;
        e_dcw += longint'(cost_d(new_line[w*DW +: DW], raw_old[w*DW +: DW]));
      end
      e_fve += longint'(tot);
      enc_in_valid = 1'b1;
      #1;
      chk(enc_in_ready, "encoder ready");
      c0 = cyc;
      @(negedge clk);
      enc_in_valid = 1'b0;
      while (!enc_out_valid && cyc < c0 + 40) @(negedge clk);
      chk(cyc == c0 + WPL + 4, "encode latency n+WPL+4");
      chk(enc_line == exp_l, "encoded line is the cheapest version of every word");
      chk(enc_energy == tot, "line cost");
      for (int w = 0; w < WPL; w++)
        chk(int'(enc_line[w*SW + DW +: TW]) < K, "tag names a dictionary");
      // store, then read back through the decoder
      old_line = enc_line;
      raw_old = new_line;
      stored_line = enc_line;
      @(negedge clk);
      dec_in_valid = 1'b1;
      #1;
      chk(dec_in_ready, "decoder ready");
      c0 = cyc;
      @(negedge clk);
      dec_in_valid = 1'b0;
      while (!dec_out_valid && cyc < c0 + 40) @(negedge clk);
      chk(cyc == c0 + WPL + 2, "decode latency n+WPL+2");
      chk(dec_line == new_line, "stored line decodes to the data");
      @(negedge clk);
    end
    chk(e_fve < e_dcw, "frequent-value encoding writes less energy than unencoded DCW");
    done = 1'b1;
  end
endmodule
