// tb_mfnw_line_ctrl: self-checking testbench for the MFNW line controller at
// its default size (512-bit lines, 32 slices of 8 MLC cells + 1 tag cell,
// plain MFNW, power-of-two weights, 6-bit addresses).
// The testbench plays the NVM array (one-cycle read, full-line write) and
// issues random reads and writes, sometimes together (the read must win).
// Checks:
//  * every written line equals a reference MFNW encoding of each 16-bit slice
//    against the stored slice (cheapest of the four inversions, lowest index
//    on ties), and last_energy is the sum of the slice costs;
//  * a write accepted in cycle n reads the old line in cycle n and writes the
//    array in cycle n+4 (one array read plus the three-cycle encoder);
//  * a read accepted in cycle n answers in cycle n+2 (array read plus the
//    one-cycle decoder) with the line last written to that address;
//  * the number of non-trivial inversions chosen is nonzero.
module tb_mfnw_line_ctrl;
  localparam int LB = 512, AW = 6, WORDS = 32, SW = 18, LSW = WORDS * SW;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          wr_valid = 1'b0, rd_valid = 1'b0;
  logic          wr_ready, rd_ready, rd_resp_valid;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [LB-1:0] wr_line = '0, rd_resp_line;
  logic          mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [LSW-1:0] mem_rd_data = '0, mem_wr_data;
  logic [31:0]   last_energy;

  mfnw_line_ctrl dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // array played by the testbench
  logic [LSW-1:0] mem [64];
  always @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end

  function automatic int unsigned wt(logic [1:0] s);
    case (s) 0: return 4; 1: return 32; 2: return 64; default: return 2; endcase
  endfunction
  function automatic logic [SW-1:0] enc(logic [15:0] w, logic [SW-1:0] o, output int unsigned be, output bit nontriv);
    logic [SW-1:0] best = '0, c;
    int unsigned e;
    be = 32'hffffffff; nontriv = 1'b0;
    for (int i = 0; i < 4; i++) begin
      c = {2'(i), w ^ {8{2'(i)}}};
      e = 0;
      for (int k = 0; k < 9; k++) if (c[2*k +: 2] != o[2*k +: 2]) e += wt(c[2*k +: 2]);
      if (e < be) begin be = e; best = c; nontriv = (i != 0); end
    end
    return best;
  endfunction

  logic [LB-1:0] golden [64];
  // expected events
  logic [LB-1:0]  w_line[$];  logic [AW-1:0] w_addr[$];  int unsigned w_cyc[$];
  logic [AW-1:0]  r_addr[$];  int unsigned r_cyc[$];
  int n_wr = 0, n_rd = 0, n_nontriv = 0, n_both = 0;

  always @(negedge clk) if (rst_n) begin
    if (mem_wr_en) begin
      if (w_cyc.size() == 0) chk(1'b0, "unexpected array write");
      else begin
        logic [LB-1:0] l;
        logic [AW-1:0] a;
        logic [LSW-1:0] exp_line;
        int unsigned tot, e;
        bit nt;
        l = w_line.pop_front(); a = w_addr.pop_front();
        chk(cyc == w_cyc.pop_front() + 4, "write reaches the array 4 cycles after acceptance");
        chk(mem_wr_addr == a, "write address");
        tot = 0;
        for (int s = 0; s < WORDS; s++) begin
          exp_line[s*SW +: SW] = enc(l[s*16 +: 16], mem[a][s*SW +: SW], e, nt);
          tot += e;
          if (nt) n_nontriv++;
        end
        chk(mem_wr_data == exp_line, "encoded line");
        @(posedge clk);
        #1 chk(last_energy == tot, $sformatf("line cost %0d exp %0d", last_energy, tot));
        n_wr++;
      end
    end
  end

  always @(negedge clk) if (rst_n && rd_resp_valid) begin
    if (r_cyc.size() == 0) chk(1'b0, "unexpected read response");
    else begin
      chk(cyc == r_cyc.pop_front() + 2, "read answers 2 cycles after acceptance");
      chk(rd_resp_line == golden[r_addr.pop_front()], "read data");
      n_rd++;
    end
  end

  function automatic logic [LB-1:0] rnd_line();
    logic [LB-1:0] l;
    for (int k = 0; k < LB / 32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin mem[a] = '0; golden[a] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      if (!wr_valid || wr_ready) begin
        wr_valid = ($urandom % 3) != 0;
        wr_addr  = AW'($urandom % 8);
        wr_line  = (($urandom % 4) == 0) ? ~golden[wr_addr] : rnd_line();
      end
      if (!rd_valid || rd_ready) begin
        rd_valid = ($urandom % 3) == 0;
        rd_addr  = AW'($urandom % 8);
      end
      #1;
      if (rd_valid && wr_valid && rd_ready) n_both++;
      if (rd_valid && rd_ready) begin
        chk(!wr_ready, "read has priority");
        r_addr.push_back(rd_addr); r_cyc.push_back(cyc);
      end else if (wr_valid && wr_ready) begin
        w_line.push_back(wr_line); w_addr.push_back(wr_addr); w_cyc.push_back(cyc);
        golden[wr_addr] = wr_line;
      end
      @(negedge clk);
    end
    wr_valid = 1'b0; rd_valid = 1'b0;
    repeat (10) @(negedge clk);
    chk(w_cyc.size() == 0 && r_cyc.size() == 0, "all requests served");
    chk(n_nontriv > 0 && n_both > 0 && n_wr > 100 && n_rd > 100, "coverage");
    $display("writes %0d reads %0d non-trivial slices %0d", n_wr, n_rd, n_nontriv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
