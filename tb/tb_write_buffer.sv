// tb_write_buffer: self-checking testbench for the cache-line write buffer at
// its default size (512-bit lines, 6-bit addresses, 8 entries).
// A random producer and a random consumer (with long consumer stalls to fill
// the buffer and long producer pauses to drain it) are checked against a
// queue model: lines leave in arrival order with their addresses, the level
// output equals the model occupancy, in_ready is low exactly when 8 entries
// are held and out_valid is high exactly when at least one is. An entry
// written in one cycle must be able to leave in the next. The number of
// cycles with the buffer full (producer stalled) is counted and must be
// nonzero.
module tb_write_buffer;
  localparam int LB = 512, AW = 6, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic          in_valid = 1'b0, out_ready = 1'b0;
  logic          in_ready, out_valid;
  logic [AW-1:0] in_addr = '0, out_addr;
  logic [LB-1:0] in_line = '0, out_line;
  logic [3:0]    level;

  write_buffer dut (.*);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  logic [LB-1:0] ql[$];
  logic [AW-1:0] qa[$];
  int unsigned   qcyc[$];
  int full_cycles = 0, next_cycle_out = 0, moved = 0;

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
    int phase;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(level == 0 && !out_valid && in_ready, "empty after reset");
    for (int n = 0; n < 20000; n++) begin
      phase = (n / 500) % 3;   // 0: mixed, 1: consumer stalls, 2: producer pauses
      // check outputs of the state reached at the last edge
      chk(32'(level) == ql.size(), $sformatf("level %0d exp %0d", level, ql.size()));
      chk(in_ready == (ql.size() < D), "in_ready");
      chk(out_valid == (ql.size() > 0), "out_valid");
      if (out_valid && ql.size() > 0) begin
        chk(out_line == ql[0] && out_addr == qa[0], "head entry");
      end
      if (!in_ready) full_cycles++;
      // update the model with the handshakes of the coming edge
      in_valid  = (phase == 2) ? (($urandom % 8) == 0) : (($urandom % 4) != 0);
      out_ready = (phase == 1) ? (($urandom % 8) == 0) : (($urandom % 3) != 0);
      in_addr = AW'($urandom);
      in_line = rnd_line();
      if (out_valid && out_ready) begin
        if (qcyc[0] == cyc) next_cycle_out++;
        void'(ql.pop_front()); void'(qa.pop_front()); void'(qcyc.pop_front());
        moved++;
      end
      if (in_valid && in_ready) begin
        ql.push_back(in_line); qa.push_back(in_addr); qcyc.push_back(cyc + 1);
      end
      @(negedge clk);
    end
    chk(full_cycles > 0, "buffer became full");
    chk(next_cycle_out > 0, "entry left the cycle after it arrived");
    chk(moved > 1000, "traffic");
    $display("full cycles %0d, lines moved %0d", full_cycles, moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
