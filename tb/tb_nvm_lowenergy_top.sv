// tb_nvm_lowenergy_top: end-to-end, full-size testbench of nvm_lowenergy_top
// with every parameter at its default (documented) value: 512-bit lines,
// MFNW on 8-cell MLC words with a 64-line array and an 8-entry write buffer,
// TFNW on 8-cell TLC words, FVE with k = 8 dictionaries, 16 slices and 2 tag
// cells per word, 4 words per line, and the cubic-predictor L3EP controller.
// It exercises the four parts through the top-level ports only:
//  * MFNW: bursts of line writes (filling the write buffer) and reads. A
//    shadow of the array is kept with a reference MFNW encoder; each written
//    line's cost (m_last_line_cost), the array energy in pJ and the number of
//    programmed cells must match it, and reads must return the data written.
//  * TFNW: random words are encoded against random stored words and decoded
//    back; the result must be the cheapest inversion.
//  * FVE: dictionaries are loaded, lines are encoded against the previous
//    encoded line and decoded back.
//  * L3EP: writes to all eight TLC states of a behavioural PCM cell; every
//    intermediate write must end inside its state, terminal writes must take
//    15 and 35 cycles.
// Each mechanism is counted (non-trivial MFNW inversion, write-buffer full,
// MFNW read decode, non-trivial TFNW inversion, FVE dictionary choices other
// than 0, FVE decode, L3EP amorphization, packed crystallization, terminal
// RESET and SET); a mechanism that never occurs is a failure. The MFNW energy
// is also compared with writing the same lines unencoded.
module tb_nvm_lowenergy_top;
  import nvm_pkg::*;
  localparam int LB = 512, AW = 6, MSW = 18, MLSW = 32 * MSW;
  localparam int TDW = 24, TSW = 27;
  localparam int FDW = 128, FSW = 132, WPL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // MFNW ports
  logic m_wr_valid = 1'b0, m_rd_valid = 1'b0, m_stat_clr = 1'b0;
  logic m_wr_ready, m_rd_ready, m_rd_resp_valid;
  logic [AW-1:0] m_wr_addr = '0, m_rd_addr = '0;
  logic [LB-1:0] m_wr_line = '0, m_rd_resp_line;
  logic [3:0]    m_wb_level;
  logic [47:0]   m_energy_pj;
  logic [31:0]   m_cell_writes, m_last_line_cost;
  logic [3:0][31:0] m_state_writes;
  // TFNW ports
  logic t_enc_valid = 1'b0, t_dec_valid = 1'b0, t_enc_out_valid, t_dec_out_valid;
  logic [TDW-1:0] t_enc_new = '0, t_dec_data;
  logic [TSW-1:0] t_enc_old = '0, t_dec_stored = '0, t_enc_word;
  logic [23:0]    t_enc_energy;
  // FVE ports
  logic f_ld_valid = 1'b0, f_enc_in_valid = 1'b0, f_dec_in_valid = 1'b0;
  logic [2:0] f_ld_dict = '0;
  logic [7:0] f_ld_value = '0, f_ld_code = '0;
  logic f_enc_in_ready, f_enc_out_valid, f_dec_in_ready, f_dec_out_valid;
  logic [WPL*FDW-1:0] f_new_line = '0, f_dec_line;
  logic [WPL*FSW-1:0] f_old_line = '0, f_enc_line, f_stored_line = '0;
  logic [31:0] f_enc_energy;
  // L3EP ports
  logic l_start = 1'b0, l_busy, l_done, l_converged, l_sense_req, l_pulse_valid;
  logic l_sense_valid = 1'b0;
  logic [2:0] l_target = '0;
  logic [7:0] l_n_amorph, l_n_cryst, l_pulse_width;
  logic [15:0] l_op_cycles, l_sense_kohm = '0;
  pulse_e l_pulse_kind;
  logic [11:0] l_pulse_mv;

  nvm_lowenergy_top dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // mechanism counters
  int c_mfnw_inv = 0, c_wb_full = 0, c_mfnw_rd = 0, c_tfnw_inv = 0, c_fve_dict = 0,
      c_fve_dec = 0, c_amorph = 0, c_pack = 0, c_reset = 0, c_set = 0;

  // =================== MFNW ===================
  function automatic int unsigned wshift(logic [1:0] s);
    case (s) 0: return 4; 1: return 32; 2: return 64; default: return 2; endcase
  endfunction
  function automatic int unsigned epj(logic [1:0] s);
    case (s) 0: return 36; 1: return 307; 2: return 547; default: return 20; endcase
  endfunction
  logic [MLSW-1:0] shadow [64];
  logic [LB-1:0]   golden [64];
  longint unsigned e_model = 0, e_plain = 0, cells_model = 0;
  logic [LB-1:0]   wq_line[$];
  logic [AW-1:0]   wq_addr[$];
  logic [AW-1:0]   rq_addr[$];
  logic [LB-1:0]   rq_line[$];

  // write-back model: lines reach the array in acceptance order
  task automatic model_write(logic [AW-1:0] a, logic [LB-1:0] l, output int unsigned cost);
    logic [MSW-1:0] o, c, best;
    int unsigned bc, cc, nt;
    cost = 0;
    for (int s = 0; s < 32; s++) begin
      o = shadow[a][s*MSW +: MSW];
      bc = 32'hffffffff; best = '0; nt = 0;
      for (int i = 0; i < 4; i++) begin
        c = {2'(i), l[s*16 +: 16] ^ {8{2'(i)}}};
        cc = 0;
        for (int k = 0; k < 9; k++) if (c[2*k +: 2] != o[2*k +: 2]) cc += wshift(c[2*k +: 2]);
        if (cc < bc) begin bc = cc; best = c; nt = i; end
      end
      if (nt != 0) c_mfnw_inv++;
      cost += bc;
      for (int k = 0; k < 9; k++)
        if (best[2*k +: 2] != o[2*k +: 2]) begin e_model += epj(best[2*k +: 2]); cells_model++; end
      shadow[a][s*MSW +: MSW] = best;
    end
  endtask

  // plain (unencoded) reference array, for the energy comparison
  logic [LB-1:0] plain [64];
  task automatic plain_write(logic [AW-1:0] a, logic [LB-1:0] l);
    for (int k = 0; k < LB / 2; k++)
      if (l[2*k +: 2] != plain[a][2*k +: 2]) e_plain += epj(l[2*k +: 2]);
    plain[a] = l;
  endtask

  // array write monitor: the controller's array write strobe inside the top
  // marks when the next buffered line is written back; one cycle later the
  // line cost and the array statistics must match the model
  int unsigned pend_cost[$];
  always @(negedge clk) if (rst_n) begin
    if (pend_cost.size() > 0) begin
      chk(m_last_line_cost == pend_cost.pop_front(), "MFNW line cost");
      chk(m_energy_pj == e_model && m_cell_writes == 32'(cells_model), "array energy and cells");
    end
    if (dut.mem_wr_en) begin
      int unsigned cost;
      chk(wq_line.size() > 0, "array write expected");
      if (wq_line.size() > 0) begin
        logic [LB-1:0] l;
        logic [AW-1:0] a;
        l = wq_line.pop_front(); a = wq_addr.pop_front();
        chk(dut.mem_wr_addr == a, "write order and address");
        model_write(a, l, cost);
        plain_write(a, l);
        chk(dut.mem_wr_data == shadow[a], "encoded line");
        pend_cost.push_back(cost);
      end
    end
    if (m_rd_resp_valid) begin
      chk(rq_line.size() > 0, "read response expected");
      if (rq_line.size() > 0) chk(m_rd_resp_line == rq_line.pop_front(), "MFNW read data");
      c_mfnw_rd++;
    end
    if (!m_wr_ready && m_wr_valid) c_wb_full++;
  end

  function automatic logic [LB-1:0] rnd_line(int kind, logic [LB-1:0] prev);
    logic [LB-1:0] l;
    for (int k = 0; k < LB / 32; k++) l[k*32 +: 32] = $urandom;
    case (kind)
      0: return l;
      1: return ~prev;                                   // complement of the stored data
      2: return prev ^ (l & {16{32'h0000_00ff}});        // small change
      default: return {LB{1'b0}} | l[63:0];              // mostly zero
    endcase
  endfunction

  task automatic mfnw_phase();
    int unsigned cost;
    int n_w = 0, n_r = 0;
    for (int a = 0; a < 64; a++) begin shadow[a] = '0; golden[a] = '0; plain[a] = '0; end
    for (int burst = 0; burst < 60; burst++) begin
      // a burst of writes, faster than the controller drains them
      for (int j = 0; j < 12; j++) begin
        m_wr_valid = 1'b1;
        m_wr_addr  = AW'($urandom % 16);
        m_wr_line  = rnd_line($urandom % 4, golden[m_wr_addr]);
        #1;
        while (!m_wr_ready) begin @(negedge clk); #1; end
        golden[m_wr_addr] = m_wr_line;
        wq_line.push_back(m_wr_line); wq_addr.push_back(m_wr_addr);
        @(negedge clk);
        n_w++;
      end
      m_wr_valid = 1'b0;
      // wait for the buffer to drain, checking each line as it is written
      while (wq_line.size() > 0 || pend_cost.size() > 0) @(negedge clk);
      // reads of lines of this burst
      for (int j = 0; j < 4; j++) begin
        m_rd_valid = 1'b1;
        m_rd_addr  = AW'($urandom % 16);
        #1;
        while (!m_rd_ready) begin @(negedge clk); #1; end
        rq_line.push_back(golden[m_rd_addr]);
        @(negedge clk);
        m_rd_valid = 1'b0;
        n_r++;
        repeat (3) @(negedge clk);
      end
    end
    repeat (20) @(negedge clk);
    chk(rq_line.size() == 0, "all reads answered");
    chk(m_energy_pj == e_model, $sformatf("array energy %0d pJ, model %0d pJ", m_energy_pj, e_model));
    chk(m_cell_writes == 32'(cells_model), "programmed cells");
    $display("MFNW: %0d line writes, %0d reads, energy %0d pJ vs %0d pJ unencoded (%0d%%)",
             n_w, n_r, e_model, e_plain, (e_model * 100) / (e_plain == 0 ? 1 : e_plain));
    chk(e_model < e_plain, "MFNW energy below unencoded writes");
  endtask


  // =================== TFNW ===================
  function automatic int unsigned etlc(int st);
    int unsigned t[8] = '{20, 67, 193, 351, 356, 196, 85, 15};
    return t[st];
  endfunction
  task automatic tfnw_phase();
    for (int n = 0; n < 500; n++) begin
      logic [TSW-1:0] bw, c;
      int unsigned be, ce, bi;
      t_enc_new = TDW'($urandom);
      t_enc_old = TSW'($urandom);
      be = 32'hffffffff; bi = 0; bw = '0;
      for (int i = 0; i < 8; i++) begin
        for (int k = 0; k < 8; k++) c[3*k +: 3] = t_enc_new[3*k +: 3] ^ 3'(i);
        c[TSW-1 -: 3] = 3'(i);
        ce = 0;
        for (int k = 0; k < 9; k++) if (c[3*k +: 3] != t_enc_old[3*k +: 3]) ce += etlc(c[3*k +: 3]);
        if (ce < be) begin be = ce; bw = c; bi = i; end
      end
      t_enc_valid = 1'b1;
      @(negedge clk);
      t_enc_valid = 1'b0;
      while (!t_enc_out_valid) @(negedge clk);
      chk(t_enc_word == bw && 32'(t_enc_energy) == be, "TFNW encoding");
      if (bi != 0) c_tfnw_inv++;
      t_dec_stored = t_enc_word; t_dec_valid = 1'b1;
      @(negedge clk);
      t_dec_valid = 1'b0;
      chk(t_dec_out_valid && t_dec_data == t_enc_new, "TFNW decode");
    end
  endtask

  // =================== FVE ===================
  logic [7:0] fdict [8][256];
  logic [7:0] ffreq [8][256];
  function automatic int unsigned cwe(int v);
    return epj(2'(v)) + epj(2'(v >> 2)) + epj(2'(v >> 4)) + epj(2'(v >> 6));
  endfunction
  task automatic fve_phase();
    logic [7:0] ve [256];
    logic [WPL*FSW-1:0] last;
    for (int j = 0; j < 256; j++) ve[j] = 8'(j);
    for (int a = 1; a < 256; a++)
      for (int b = a; b > 0 && cwe(ve[b]) < cwe(ve[b-1]); b--) begin
        logic [7:0] t;
        t = ve[b]; ve[b] = ve[b-1]; ve[b-1] = t;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 256; j++) begin
        ffreq[i][j] = 8'((j * (2 * i + 37)) + 29 * i);
        fdict[i][ffreq[i][j]] = ve[j];
      end
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 256; v++) begin
        f_ld_valid = 1'b1; f_ld_dict = 3'(i); f_ld_value = 8'(v); f_ld_code = fdict[i][v];
        @(negedge clk);
      end
    f_ld_valid = 1'b0;
    last = '0;
    for (int n = 0; n < 200; n++) begin
      int cl;
      for (int w = 0; w < WPL; w++) begin
        cl = $urandom % 8;
        for (int s = 0; s < 16; s++)
          f_new_line[w*FDW + s*8 +: 8] = (($urandom % 4) != 0) ? ffreq[cl][$urandom % 6] : 8'($urandom);
      end
      f_old_line = last;
      f_enc_in_valid = 1'b1;
      #1;
      while (!f_enc_in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      f_enc_in_valid = 1'b0;
      while (!f_enc_out_valid) @(negedge clk);
      for (int w = 0; w < WPL; w++) if (f_enc_line[w*FSW + FDW +: 3] != 3'd0) c_fve_dict++;
      last = f_enc_line;
      f_stored_line = f_enc_line; f_dec_in_valid = 1'b1;
      #1;
      while (!f_dec_in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      f_dec_in_valid = 1'b0;
      while (!f_dec_out_valid) @(negedge clk);
      chk(f_dec_line == f_new_line, "FVE line round trip");
      c_fve_dec++;
    end
  endtask

  // =================== L3EP ===================
  int r_cell = 0, offset = 0, sense_at = -1;
  function automatic real vpred(real r);
    real x = r / 1000.0;
    return 620.0 + 40.0 * x - 16.0 * x * x + 3.0 * x * x * x;
  endfunction
  function automatic int r_of_v(int v);
    int r = 0;
    while (r < 5000 && vpred(real'(r)) < real'(v)) r += 5;
    return r;
  endfunction
  function automatic int nz(int a);
    return int'($urandom % (2 * a + 1)) - a;
  endfunction
  int last_cryst = -100;
  always @(negedge clk) if (rst_n) begin
    l_sense_valid = 1'b0;
    if (l_sense_req) sense_at = int'(cyc) + 9;
    if (sense_at == int'(cyc)) begin
      l_sense_valid = 1'b1; l_sense_kohm = 16'(r_cell); sense_at = -1;
    end
    if (l_pulse_valid) begin
      case (l_pulse_kind)
        PULSE_FULL_RESET: begin r_cell = 4800 + nz(100); c_reset++; end
        PULSE_FULL_SET:   begin r_cell = 10 + nz(3); c_set++; end
        PULSE_AMORPH:     begin r_cell = r_of_v(int'(l_pulse_mv)) + offset + nz(20); c_amorph++; end
        default: begin
          if (int'(cyc) == last_cryst + 10) c_pack++;
          last_cryst = int'(cyc);
          r_cell = r_cell - 2 * (int'(l_pulse_mv) - 400);
          if (r_cell < 10) r_cell = 10;
        end
      endcase
    end
  end
  task automatic l3ep_phase();
    for (int n = 0; n < 200; n++) begin
      int t, c0;
      t = n % 8;
      r_cell = (($urandom % 2) == 0) ? 10 + int'($urandom % 100) : 4700 + nz(100);
      offset = nz(500);
      l_target = 3'(t); l_start = 1'b1; c0 = int'(cyc);
      @(negedge clk);
      l_start = 1'b0;
      while (!l_done) @(negedge clk);
      chk(l_converged, $sformatf("L3EP write to state %0d converged", t));
      if (t == 0 || t == 7) chk(l_op_cycles == (t == 0 ? 16'd15 : 16'd35), "terminal write latency");
      else chk(r_cell >= int'(tlc_lower_kohm(t)) && r_cell <= int'(tlc_lower_kohm(t - 1)),
               $sformatf("cell %0d kOhm in state %0d", r_cell, t));
      @(negedge clk);
    end
  endtask

  // =================== sequencing ===================
  initial begin
    #900_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      mfnw_phase();
      tfnw_phase();
      fve_phase();
      l3ep_phase();
    join
    chk(c_mfnw_inv > 0, "mechanism: MFNW non-trivial inversion");
    chk(c_wb_full > 0,  "mechanism: write buffer full");
    chk(c_mfnw_rd > 0,  "mechanism: MFNW read decode");
    chk(c_tfnw_inv > 0, "mechanism: TFNW non-trivial inversion");
    chk(c_fve_dict > 0, "mechanism: FVE dictionary other than 0");
    chk(c_fve_dec > 0,  "mechanism: FVE decode");
    chk(c_amorph > 0,   "mechanism: L3EP amorphization");
    chk(c_pack > 0,     "mechanism: L3EP packed crystallization");
    chk(c_reset > 0 && c_set > 0, "mechanism: L3EP terminal RESET and SET");
    $display("mechanisms: mfnw_inv=%0d wb_full=%0d mfnw_read=%0d tfnw_inv=%0d fve_dict=%0d fve_dec=%0d amorph=%0d packed=%0d reset=%0d set=%0d",
             c_mfnw_inv, c_wb_full, c_mfnw_rd, c_tfnw_inv, c_fve_dict, c_fve_dec, c_amorph, c_pack, c_reset, c_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
