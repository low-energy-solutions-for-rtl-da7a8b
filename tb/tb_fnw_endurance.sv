// tb_fnw_endurance: workload testbench for the word-level, cost-aware
// endurance evaluation of the flip-n-write encodings. One word is rewritten
// with uniformly random data and every programmed cell ages by the energy of
// the state written, relative to the cheapest state (see fnw_wear_run).
// Encodings and word lengths n (data cells per word):
//   MLC PCM: MFNW, MFNW2 (rotation), MFNW3, each for n = 2, 4 and 8;
//   TLC RRAM: TFNW for n = 2, 4 and 8;
// every one against unencoded data-comparison write (DCW) on the same data.
// Checks: every stored word reads back, the encoder answers in 3 cycles, the
// mean age per cell (tag cells included) grows slower than under DCW, and
// for MFNW and TFNW the short word (n = 2) wears less per cell than the long
// one (n = 8), the advantage shrinking towards DCW as n grows. The relative
// wear rate of each run (DCW = 100) is printed; the number of writes a cell
// survives scales with its inverse.
module tb_fnw_endurance;
  import nvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 12;
  logic   [NR-1:0] done;
  int              chks [NR];
  int              fls  [NR];
  longint          aenc [NR];
  longint          adcw [NR];
  int              ncel [NR];
  int checks = 0, failures = 0;

  localparam int NS [3] = '{2, 4, 8};
  localparam int XF [3] = '{0, 1, 3};

  for (genvar x = 0; x < 3; x++) begin : g_mlc
    for (genvar i = 0; i < 3; i++) begin : g_n
      fnw_wear_run #(.CELL_BITS(2), .N_CELLS(NS[i]), .NUM_XFORM(XF[x]),
                     .TECH(TECH_MLC_PCM_SHIFT)) u_run (
        .clk, .rst_n, .done(done[3*x+i]), .checks(chks[3*x+i]), .failures(fls[3*x+i]),
        .age_enc(aenc[3*x+i]), .age_dcw(adcw[3*x+i]), .cells_enc(ncel[3*x+i]));
    end
  end
  for (genvar i = 0; i < 3; i++) begin : g_tlc
    fnw_wear_run #(.CELL_BITS(3), .N_CELLS(NS[i]), .NUM_XFORM(0),
                   .TECH(TECH_TLC_RRAM)) u_run (
      .clk, .rst_n, .done(done[9+i]), .checks(chks[9+i]), .failures(fls[9+i]),
      .age_enc(aenc[9+i]), .age_dcw(adcw[9+i]), .cells_enc(ncel[9+i]));
  end

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin
      checks += chks[i];
      failures += fls[i];
    end
  endtask

  // wear per cell relative to DCW, in percent
  function automatic int rel(int r);
    return int'((aenc[r] * NS[r % 3] * 100) / (adcw[r] * ncel[r]));
  endfunction

  initial begin
    #50_000_000;
    report();
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [4];
    names = '{"MFNW ", "MFNW2", "MFNW3", "TFNW "};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    report();
    for (int e = 0; e < 4; e++)
      $display("%s wear per cell vs DCW: n=2 %0d%%  n=4 %0d%%  n=8 %0d%%",
               names[e], rel(3*e), rel(3*e+1), rel(3*e+2));
    foreach (XF[x]) if (x != 1) begin
      checks++;
      if (rel(3*x) >= rel(3*x+2)) begin
        failures++;
        $display("FAIL: %s short words should wear less than long ones", names[x]);
      end
    end
    checks++;
    if (rel(9) >= rel(11)) begin
      failures++;
      $display("FAIL: TFNW short words should wear less than long ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
