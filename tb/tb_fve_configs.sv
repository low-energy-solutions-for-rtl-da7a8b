// tb_fve_configs: workload testbench for the frequent-value line codec in the
// line organisations the scheme is evaluated with besides the default
// (MLC, k = 8, 16 slices and 2 tag cells per word, 4 words per line, which
// tb_fve_line_codec and the top-level testbench cover):
//   MLC PCM, k = 2 and k = 4: 64-bit words (8 slices of 4 cells), 1 tag cell,
//       8 words per 512-bit line;
//   MLC PCM, k = 16: 128-bit words, 2 tag cells, 4 words per line;
//   TLC RRAM, k = 8: 9-bit slices of 3 cells, 19 slices (57 cells) and 1 tag
//       cell per word, 3 words per 513-bit line;
//   TLC RRAM, k = 16: the same with 2 tag cells.
// Each configuration runs in its own fve_cfg_check instance, all in
// parallel, on a synthetic workload (frequent values of random clusters,
// synthetic dictionaries built by the scheme's rule); see fve_cfg_check for
// the checks. The run also prints the write energy against unencoded
// data-comparison write for each configuration.
module tb_fve_configs;
  import nvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  logic   [NCFG-1:0] done;
  int                chks [NCFG];
  int                fls  [NCFG];
  longint            efve [NCFG];
  longint            edcw [NCFG];
  int checks = 0, failures = 0;

  fve_cfg_check #(.CELL_BITS(2), .FVL(8), .SLICES(8), .K(2), .TAG_CELLS(1), .WPL(8),
                  .TECH(TECH_MLC_PCM)) u_mlc_k2 (
    .clk, .rst_n, .done(done[0]), .checks(chks[0]), .failures(fls[0]),
    .e_fve(efve[0]), .e_dcw(edcw[0]));
  fve_cfg_check #(.CELL_BITS(2), .FVL(8), .SLICES(8), .K(4), .TAG_CELLS(1), .WPL(8),
                  .TECH(TECH_MLC_PCM)) u_mlc_k4 (
    .clk, .rst_n, .done(done[1]), .checks(chks[1]), .failures(fls[1]),
    .e_fve(efve[1]), .e_dcw(edcw[1]));
  fve_cfg_check #(.CELL_BITS(2), .FVL(8), .SLICES(16), .K(16), .TAG_CELLS(2), .WPL(4),
                  .TECH(TECH_MLC_PCM)) u_mlc_k16 (
    .clk, .rst_n, .done(done[2]), .checks(chks[2]), .failures(fls[2]),
    .e_fve(efve[2]), .e_dcw(edcw[2]));
  fve_cfg_check #(.CELL_BITS(3), .FVL(9), .SLICES(19), .K(8), .TAG_CELLS(1), .WPL(3),
                  .TECH(TECH_TLC_RRAM)) u_tlc_k8 (
    .clk, .rst_n, .done(done[3]), .checks(chks[3]), .failures(fls[3]),
    .e_fve(efve[3]), .e_dcw(edcw[3]));
  fve_cfg_check #(.CELL_BITS(3), .FVL(9), .SLICES(19), .K(16), .TAG_CELLS(2), .WPL(3),
                  .TECH(TECH_TLC_RRAM)) u_tlc_k16 (
    .clk, .rst_n, .done(done[4]), .checks(chks[4]), .failures(fls[4]),
    .e_fve(efve[4]), .e_dcw(edcw[4]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      checks += chks[i];
      failures += fls[i];
    end
  endtask

  initial begin
    #20_000_000;
    report();
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [NCFG];
    names = '{"MLC k=2", "MLC k=4", "MLC k=16", "TLC k=8", "TLC k=16"};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    report();
    for (int i = 0; i < NCFG; i++)
      $display("%-9s energy vs unencoded DCW: %0d / %0d = %0d%%", names[i], efve[i], edcw[i],
               (edcw[i] > 0) ? int'(efve[i] * 100 / edcw[i]) : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
