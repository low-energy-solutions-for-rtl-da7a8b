// tb_nvm_array: self-checking testbench for the MLC NVM array model at its
// default size (64 lines of 288 two-bit cells, MLC PCM energies 36, 307, 547
// and 20 pJ).
// Random reads and full-line writes, sometimes to the same line in the same
// cycle, are checked against a shadow memory: a read returns the line one
// cycle later (the old content if the line is written in that cycle), a write
// adds, over the cells that change only, one cell write and the state energy
// per cell and one count to state_writes of the new state. stat_clr clears
// the statistics. Contents start at zero.
module tb_nvm_array;
  localparam int CB = 2, LC = 288, L = 64, LW = CB * LC, AW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          rd_en = 1'b0, wr_en = 1'b0, stat_clr = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [LW-1:0] rd_data, wr_data = '0;
  logic [47:0]   energy;
  logic [31:0]   cell_writes;
  logic [3:0][31:0] state_writes;

  nvm_array dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  logic [LW-1:0] shadow [L];
  longint unsigned m_energy = 0, m_cells = 0;
  longint unsigned m_state[4] = '{0, 0, 0, 0};
  longint unsigned tot_state[4] = '{0, 0, 0, 0};
  function automatic int unsigned e(int s);
    case (s) 0: return 36; 1: return 307; 2: return 547; default: return 20; endcase
  endfunction
  function automatic logic [LW-1:0] rnd_line(logic [LW-1:0] base);
    logic [LW-1:0] l = base;
    int mode = $urandom % 3;
    for (int c = 0; c < LC; c++)
      if (mode == 0 || ($urandom % 8) == 0) l[2*c +: 2] = 2'($urandom);
    return l;
  endfunction

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [LW-1:0] exp_rd;
    bit pend_rd;
    for (int a = 0; a < L; a++) shadow[a] = '0;
    pend_rd = 1'b0;
    exp_rd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 6000; n++) begin
      if (pend_rd) chk(rd_data == exp_rd, "read data");
      chk(energy == m_energy && cell_writes == 32'(m_cells), "energy and cell counts");
      for (int s = 0; s < 4; s++) chk(state_writes[s] == 32'(m_state[s]), "per-state counts");
      rd_en = ($urandom % 2) == 0;
      wr_en = ($urandom % 2) == 0;
      stat_clr = (n % 1000) == 999;
      rd_addr = AW'($urandom);
      wr_addr = (($urandom % 4) == 0) ? rd_addr : AW'($urandom);
      wr_data = rnd_line(shadow[wr_addr]);
      pend_rd = rd_en;
      exp_rd  = shadow[rd_addr];
      if (stat_clr) begin
        m_energy = 0; m_cells = 0; m_state = '{0, 0, 0, 0};
      end else if (wr_en) begin
        for (int c = 0; c < LC; c++)
          if (wr_data[2*c +: 2] != shadow[wr_addr][2*c +: 2]) begin
            m_energy += e(wr_data[2*c +: 2]); m_cells++; m_state[wr_data[2*c +: 2]]++;
            tot_state[wr_data[2*c +: 2]]++;
          end
      end
      if (wr_en) shadow[wr_addr] = wr_data;
      @(negedge clk);
    end
    chk(tot_state[0] > 0 && tot_state[1] > 0 && tot_state[2] > 0 && tot_state[3] > 0, "all states written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
