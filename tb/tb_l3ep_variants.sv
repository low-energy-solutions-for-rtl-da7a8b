// tb_l3ep_variants: workload testbench comparing configurations of the L3EP
// program-and-verify controller on the same kind of random TLC PCM write
// stream (see l3ep_variant_run for the cell model and per-write checks):
//   L3EP(3), eps = 370 kOhm  - the default: cubic first-amplitude predictor;
//   L3EP(1), eps = 370 kOhm  - linear predictor (4-cycle evaluation);
//   L3EP(3), eps = 150 kOhm  - tighter write margin.
// The three run in parallel. Besides each run's own checks, the tighter
// margin must cost more time per intermediate write than eps = 370 kOhm. The
// mean latency, pulse count and convergence rate of each are printed.
module tb_l3ep_variants;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NV = 3;
  logic   [NV-1:0] done;
  int              chks [NV];
  int              fls  [NV];
  int              nmid [NV];
  int              nconv [NV];
  longint          lat  [NV];
  longint          pls  [NV];
  int checks = 0, failures = 0;

  l3ep_variant_run #(.DEGREE(3), .EPS(370)) u_l3ep3 (
    .clk, .rst_n, .done(done[0]), .checks(chks[0]), .failures(fls[0]),
    .n_mid(nmid[0]), .n_conv(nconv[0]), .lat_mid(lat[0]), .pulses_mid(pls[0]));
  l3ep_variant_run #(.DEGREE(1), .EPS(370)) u_l3ep1 (
    .clk, .rst_n, .done(done[1]), .checks(chks[1]), .failures(fls[1]),
    .n_mid(nmid[1]), .n_conv(nconv[1]), .lat_mid(lat[1]), .pulses_mid(pls[1]));
  l3ep_variant_run #(.DEGREE(3), .EPS(150)) u_eps150 (
    .clk, .rst_n, .done(done[2]), .checks(chks[2]), .failures(fls[2]),
    .n_mid(nmid[2]), .n_conv(nconv[2]), .lat_mid(lat[2]), .pulses_mid(pls[2]));

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NV; i++) begin
      checks += chks[i];
      failures += fls[i];
    end
  endtask

  initial begin
    #200_000_000;
    report();
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [NV];
    names = '{"L3EP(3) eps=370", "L3EP(1) eps=370", "L3EP(3) eps=150"};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    report();
    for (int i = 0; i < NV; i++)
      $display("%s: %0d intermediate writes, %0d converged, mean %0d ns, mean %0d.%0d pulses",
               names[i], nmid[i], nconv[i], int'(lat[i] / nmid[i]),
               int'(pls[i] / nmid[i]), int'((pls[i] * 10 / nmid[i]) % 10));
    checks++;
    if (lat[2] * nmid[0] <= lat[0] * nmid[2]) begin
      failures++;
      $display("FAIL: eps = 150 kOhm should take longer per write than eps = 370 kOhm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
