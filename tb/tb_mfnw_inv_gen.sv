// tb_mfnw_inv_gen: self-checking testbench for the MFNW inversions generator
// at its default size (8 MLC cells, 4 inversions).
// For random and directed words, every inversion i must be the tag cell i
// followed by each data cell XORed with i (checked cell by cell), and XORing
// the data cells of any inversion with its own tag must give the word back.
// The block is combinational; outputs are checked 1 ns after each input.
module tb_mfnw_inv_gen;
  localparam int N = 8, CB = 2, DW = N * CB, SW = DW + CB, NI = 4;
  int checks = 0, failures = 0;
  logic [DW-1:0] word = '0;
  logic [NI-1:0][SW-1:0] inv;

  mfnw_inv_gen dut (.word, .inv);

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic test(logic [DW-1:0] w);
    logic [DW-1:0] back;
    word = w;
    #1;
    for (int i = 0; i < NI; i++) begin
      chk(inv[i][SW-1 -: CB] == CB'(i), $sformatf("tag of inversion %0d", i));
      for (int c = 0; c < N; c++)
        chk(inv[i][c*CB +: CB] == (w[c*CB +: CB] ^ CB'(i)),
            $sformatf("cell %0d of inversion %0d for %h", c, i, w));
      back = inv[i][DW-1:0] ^ {N{inv[i][SW-1 -: CB]}};
      chk(back == w, "inversion is reversible");
    end
  endtask

  initial begin
    #10_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test('0); test('1); test(16'h1b1b); test(16'he4e4);
    for (int n = 0; n < 5000; n++) test(DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
