// tb_l3ep_regression: self-checking testbench for the amorphization amplitude
// predictor. The instance under test is the cubic predictor (default); a
// linear instance runs beside it.
// For the six TLC state midpoints and random resistances from 0 to 5 MOhm the
// result must equal the polynomial evaluated in real arithmetic with the
// default coefficients (cubic 620 + 40x - 16x^2 + 3x^3 mV, linear 600 + 34x
// mV, x in MOhm) within 1 mV, it must arrive exactly 9 (cubic) or 4 (linear)
// cycles after the start cycle, busy must cover the evaluation, and the
// amplitude must not fall as the resistance rises.
module tb_l3ep_regression;
  import nvm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic        start = 1'b0;
  logic [15:0] rm_kohm = '0;
  logic        busy3, done3, busy1, done1;
  logic [11:0] v3, v1;

  l3ep_regression dut (.clk, .rst_n, .start, .rm_kohm, .busy(busy3), .done(done3), .v_mv(v3));
  l3ep_regression #(.DEGREE(1)) dut1 (.clk, .rst_n, .start, .rm_kohm, .busy(busy1), .done(done1), .v_mv(v1));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic real cubic(real x); return 620.0 + 40.0 * x - 16.0 * x * x + 3.0 * x * x * x; endfunction
  function automatic real lin(real x);   return 600.0 + 34.0 * x; endfunction
  function automatic bit near(logic [11:0] v, real r);
    real d = real'(v) - r;
    return (d <= 1.0) && (d >= -1.0);
  endfunction

  initial begin
    #10_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int unsigned r, output logic [11:0] o3);
    int unsigned c0;
    bit got1;
    real x;
    x = real'(r) / 1000.0;
    rm_kohm = 16'(r); start = 1'b1; c0 = cyc;
    @(negedge clk); start = 1'b0;
    got1 = 1'b0;
    while (!done3) begin
      chk(busy3, "busy during evaluation");
      if (done1) begin
        got1 = 1'b1;
        chk(cyc == c0 + 4, "linear latency 4 cycles");
        chk(near(v1, lin(x)), $sformatf("linear value %0d for %0d kOhm", v1, r));
      end
      @(negedge clk);
    end
    chk(got1, "linear result seen");
    chk(cyc == c0 + 9, $sformatf("cubic latency %0d", cyc - c0));
    chk(near(v3, cubic(x)), $sformatf("cubic value %0d for %0d kOhm", v3, r));
    o3 = v3;
    @(negedge clk);
    chk(!busy3 && !done3, "idle after result");
  endtask

  initial begin
    logic [11:0] v, vprev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 1; s <= 6; s++) run(tlc_mid_kohm(s), v);
    chk(tlc_mid_kohm(6) == 403 && tlc_mid_kohm(2) == 3506, "state midpoints 403 kOhm and 3.5 MOhm");
    vprev = '0;
    for (int r = 0; r <= 5000; r += 50) begin
      run(r, v);
      chk(v >= vprev, "amplitude does not fall with resistance");
      vprev = v;
    end
    for (int n = 0; n < 300; n++) begin
      run($urandom % 5001, v);
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
