// tb_tfnw_codec: self-checking testbench for the TLC flip-n-write codec.
// The instance under test has the default word of 8 TLC cells plus a 3-bit
// tag cell. A second, two-cell instance replays the worked example of the
// method: stored word 0,2,3 (tag 0, cells 2 and 3, octal) and new data 1,3;
// the eight inversions 013, 102, 231, 320, 457, 546, 675, 764 cost 6.7, 28,
// 61.1, 37.1, 56.7, 63.7, 29.6 and 45.6 pJ and inversion 0 must be written
// (6.7 pJ = 67 tenths).
// Random words are checked against an independent model (TLC RRAM state
// energies in tenths of a pJ, cells that change only, tag included, lowest
// index on ties): encoded word and cost three cycles after the input cycle,
// decoded word one cycle after, and encode-then-decode returns the data.
module tb_tfnw_codec;
  localparam int N = 8, DW = 24, SW = 27;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          enc_valid = 1'b0, dec_valid = 1'b0;
  logic [DW-1:0] enc_new = '0, dec_data;
  logic [SW-1:0] enc_old = '0, enc_word, dec_stored = '0;
  logic          enc_out_valid, dec_out_valid;
  logic [23:0]   enc_energy;

  tfnw_codec dut (.*);

  // worked example, two data cells
  logic       x_valid = 1'b0, x_ov, x_dv;
  logic [5:0] x_new = 6'o13, x_dd;
  logic [8:0] x_old = 9'o023, x_word;
  logic [23:0] x_en;
  tfnw_codec #(.N_CELLS(2)) dut_ex (.clk, .rst_n, .enc_valid(x_valid), .enc_new(x_new),
    .enc_old(x_old), .enc_out_valid(x_ov), .enc_word(x_word), .enc_energy(x_en),
    .dec_valid(1'b0), .dec_stored(9'd0), .dec_out_valid(x_dv), .dec_data(x_dd));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic int unsigned e(int s);
    int unsigned t[8] = '{20, 67, 193, 351, 356, 196, 85, 15};
    return t[s];
  endfunction
  function automatic int unsigned cost(logic [SW-1:0] n, logic [SW-1:0] o, int cells);
    int unsigned c = 0;
    for (int k = 0; k < cells; k++) if (n[3*k +: 3] != o[3*k +: 3]) c += e(n[3*k +: 3]);
    return c;
  endfunction
  function automatic logic [SW-1:0] inv(int i, logic [DW-1:0] w, int cells);
    logic [SW-1:0] r = '0;
    for (int k = 0; k < cells; k++) r[3*k +: 3] = w[3*k +: 3] ^ 3'(i);
    r[3*cells +: 3] = 3'(i);
    return r;
  endfunction

  logic [SW-1:0] qe_w[$]; int unsigned qe_e[$], qe_c[$]; logic [DW-1:0] qe_d[$];
  logic [DW-1:0] qd_d[$]; int unsigned qd_c[$];
  int nontriv = 0;

  always @(negedge clk) if (rst_n) begin
    if (enc_out_valid) begin
      logic [SW-1:0] w;
      w = qe_w.pop_front();
      chk(cyc == qe_c.pop_front() + 3, "encode latency");
      chk(enc_word == w, "encoded word");
      chk(32'(enc_energy) == qe_e.pop_front(), "encode cost");
      chk((enc_word[DW-1:0] ^ {N{enc_word[DW +: 3]}}) == qe_d.pop_front(), "encode-decode round trip");
      if (enc_word[DW +: 3] != 3'd0) nontriv++;
    end
    if (dec_out_valid) begin
      chk(cyc == qd_c.pop_front() + 1, "decode latency");
      chk(dec_data == qd_d.pop_front(), "decoded word");
    end
  end

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned paper[8] = '{67, 280, 611, 371, 567, 637, 296, 456};
    logic [8:0] paper_inv[8] = '{9'o013, 9'o102, 9'o231, 9'o320, 9'o457, 9'o546, 9'o675, 9'o764};
    int unsigned xc;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // worked example
    for (int i = 0; i < 8; i++) begin
      chk(inv(i, 24'(x_new), 2) == SW'(paper_inv[i]), $sformatf("example inversion %0d", i));
      chk(cost(inv(i, 24'(x_new), 2), SW'(x_old), 3) == paper[i], $sformatf("example cost %0d", i));
    end
    x_valid = 1'b1; xc = cyc;
    @(negedge clk); x_valid = 1'b0;
    while (!x_ov) @(negedge clk);
    chk(cyc == xc + 3, "example latency");
    chk(x_word == 9'o013 && x_en == 24'd67, $sformatf("example result %o %0d", x_word, x_en));
    // random
    for (int n = 0; n < 20000; n++) begin
      int unsigned be, c;
      logic [SW-1:0] bw;
      enc_valid = ($urandom % 4) != 0;
      dec_valid = ($urandom % 3) != 0;
      enc_new = DW'($urandom);
      enc_old = SW'($urandom);
      if (n % 5 == 0) enc_old = inv($urandom % 8, enc_new, N);
      dec_stored = SW'($urandom);
      if (enc_valid) begin
        be = 32'hffffffff;
        for (int i = 0; i < 8; i++) begin
          c = cost(inv(i, enc_new, N), enc_old, N + 1);
          if (c < be) begin be = c; bw = inv(i, enc_new, N); end
        end
        qe_w.push_back(bw); qe_e.push_back(be); qe_c.push_back(cyc); qe_d.push_back(enc_new);
      end
      if (dec_valid) begin
        qd_d.push_back(dec_stored[DW-1:0] ^ {N{dec_stored[DW +: 3]}}); qd_c.push_back(cyc);
      end
      @(negedge clk);
    end
    enc_valid = 1'b0; dec_valid = 1'b0;
    repeat (5) @(negedge clk);
    chk(qe_c.size() == 0 && qd_c.size() == 0, "all results returned");
    chk(nontriv > 0, "non-trivial inversions chosen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
