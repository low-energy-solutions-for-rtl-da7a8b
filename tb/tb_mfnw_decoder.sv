// tb_mfnw_decoder: self-checking testbench for the flip-n-write word decoder.
// The instance under test is plain MFNW (8 MLC cells + tag); MFNW2 and MFNW3
// instances see the same stored words with a transformation tag cell on top.
// Every output is compared with an independent model (data cells XORed with
// the tag cell, then the transformation named by the xtag cell undone: R by
// a left rotation, S1/S2 by themselves, any nonzero xtag meaning R in MFNW2)
// and must appear exactly one cycle after the input cycle. Words entered
// back to back and with gaps.
module tb_mfnw_decoder;
  localparam int N = 8, DW = 16, SW0 = 18, SW1 = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic           in_valid = 1'b0;
  logic [SW1-1:0] stored = '0;
  logic           v0, v2, v3;
  logic [DW-1:0]  d0, d2, d3;

  mfnw_decoder dut (.clk, .rst_n, .in_valid, .stored(stored[SW0-1:0]), .out_valid(v0), .data(d0));
  mfnw_decoder #(.NUM_XFORM(1)) dut2 (.clk, .rst_n, .in_valid, .stored, .out_valid(v2), .data(d2));
  mfnw_decoder #(.NUM_XFORM(3)) dut3 (.clk, .rst_n, .in_valid, .stored, .out_valid(v3), .data(d3));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic logic [DW-1:0] undo(int s, logic [DW-1:0] w);
    logic [DW-1:0] r;
    r = w;
    case (s)
      1: for (int k = 0; k < DW; k++) r[(k + 1) % DW] = w[k];
      2: for (int c = 0; c < N; c++)
           if (w[2*c +: 2] == 2'b10) r[2*c +: 2] = 2'b11; else if (w[2*c +: 2] == 2'b11) r[2*c +: 2] = 2'b10;
      3: for (int c = 0; c < N; c++)
           if (w[2*c +: 2] == 2'b01) r[2*c +: 2] = 2'b11; else if (w[2*c +: 2] == 2'b11) r[2*c +: 2] = 2'b01;
      default: ;
    endcase
    return r;
  endfunction

  logic [DW-1:0] q0[$], q2[$], q3[$];
  int unsigned qc[$];
  int xt_seen[4] = '{0, 0, 0, 0};

  always @(negedge clk) if (rst_n) begin
    chk(v0 == v2 && v0 == v3, "valid alignment");
    if (v0) begin
      if (qc.size() == 0) chk(1'b0, "unexpected out_valid");
      else begin
        chk(cyc == qc.pop_front() + 1, "read latency is one cycle");
        chk(d0 == q0.pop_front(), "MFNW data");
        chk(d2 == q2.pop_front(), "MFNW2 data");
        chk(d3 == q3.pop_front(), "MFNW3 data");
      end
    end
  end

  initial begin
    #100_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] u;
    logic [1:0] xt;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      if (($urandom % 4) != 0) begin
        stored = SW1'($urandom);
        u  = stored[DW-1:0] ^ {N{stored[DW +: 2]}};
        xt = stored[SW1-1 -: 2];
        xt_seen[xt]++;
        q0.push_back(u);
        q2.push_back(xt == 2'b00 ? u : undo(1, u));
        q3.push_back(undo(int'(xt), u));
        qc.push_back(cyc);
        in_valid = 1'b1;
      end else in_valid = 1'b0;
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    chk(qc.size() == 0, "all words returned");
    chk(xt_seen[1] > 0 && xt_seen[2] > 0 && xt_seen[3] > 0, "all transformation tags seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
