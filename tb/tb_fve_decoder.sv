// tb_fve_decoder: self-checking testbench for the frequent-value word decoder
// at its documented MLC size (16 slices of 8 bits, k = 8, 2 tag cells).
// The same dictionaries as in the encoder testbench are loaded (codewords
// sorted by MLC write energy, assigned to synthetic per-cluster frequency
// orders). Stored words with a random tag and random codewords must decode,
// slice by slice, to the value whose codeword in the tagged dictionary is the
// stored slice, one cycle after the input cycle.
module tb_fve_decoder;
  localparam int FVL = 8, S = 16, K = 8, DW = 128, SW = 132;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic           ld_valid = 1'b0, in_valid = 1'b0;
  logic [2:0]     ld_dict = '0;
  logic [FVL-1:0] ld_value = '0, ld_code = '0;
  logic [SW-1:0]  stored = '0;
  logic           out_valid;
  logic [DW-1:0]  data;

  fve_decoder dut (.*);

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
  logic [7:0] ve [256];

  task automatic build_dicts();
    logic [7:0] f;
    for (int j = 0; j < 256; j++) ve[j] = 8'(j);
    for (int a = 1; a < 256; a++)
      for (int b = a; b > 0 && cw_energy(ve[b]) < cw_energy(ve[b-1]); b--) begin
        logic [7:0] t = ve[b]; ve[b] = ve[b-1]; ve[b-1] = t;
      end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < 256; j++) begin
        f = 8'((j * (2 * i + 37)) + 29 * i);
        dict[i][f] = ve[j];
        idict[i][ve[j]] = f;
      end
  endtask

  logic [DW-1:0] q_d[$]; int unsigned q_c[$];
  int tags[4] = '{0, 0, 0, 0};

  always @(negedge clk) if (rst_n && out_valid) begin
    chk(q_c.size() > 0, "result expected");
    if (q_c.size() > 0) begin
      chk(cyc == q_c.pop_front() + 1, "latency");
      chk(data == q_d.pop_front(), "decoded word");
    end
  end

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] d;
    int t;
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
    for (int n = 0; n < 8000; n++) begin
      in_valid = ($urandom % 4) != 0;
      if (in_valid) begin
        t = $urandom % K;
        stored[SW-1 -: 4] = 4'(t);
        for (int s = 0; s < S; s++) begin
          stored[s*8 +: 8] = 8'($urandom);
          d[s*8 +: 8] = idict[t][stored[s*8 +: 8]];
        end
        q_d.push_back(d); q_c.push_back(cyc);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(q_c.size() == 0, "all results returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
