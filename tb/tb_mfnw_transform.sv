// tb_mfnw_transform: self-checking testbench for the MFNW2/MFNW3 reversible
// transformations at the default word size (8 MLC cells).
// A forward instance and an inverse instance are checked for every select
// value against an independent model: R rotates the 16-bit word right by one
// bit, S1 swaps cell states 10 and 11, S2 swaps 01 and 11, select 0 passes the
// word. The inverse instance, fed with the forward output, must return the
// original word. Combinational; checked 1 ns after each input.
module tb_mfnw_transform;
  localparam int N = 8, DW = 2 * N;
  int checks = 0, failures = 0;
  logic [1:0]    sel = '0;
  logic [DW-1:0] din = '0, fwd, back;

  mfnw_transform dut (.sel, .din, .dout(fwd));
  mfnw_transform #(.INVERSE(1'b1)) dut_inv (.sel, .din(fwd), .dout(back));

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic logic [DW-1:0] model(logic [1:0] s, logic [DW-1:0] w);
    logic [DW-1:0] r;
    r = w;
    case (s)
      2'd1: for (int k = 0; k < DW; k++) r[k] = w[(k + 1) % DW];
      2'd2: for (int c = 0; c < N; c++)
              if (w[2*c +: 2] == 2'b10) r[2*c +: 2] = 2'b11;
              else if (w[2*c +: 2] == 2'b11) r[2*c +: 2] = 2'b10;
      2'd3: for (int c = 0; c < N; c++)
              if (w[2*c +: 2] == 2'b01) r[2*c +: 2] = 2'b11;
              else if (w[2*c +: 2] == 2'b11) r[2*c +: 2] = 2'b01;
      default: ;
    endcase
    return r;
  endfunction

  task automatic test(logic [DW-1:0] w);
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s); din = w;
      #1;
      chk(fwd == model(2'(s), w), $sformatf("forward sel %0d word %h got %h", s, w, fwd));
      chk(back == w, $sformatf("inverse sel %0d word %h", s, w));
    end
  endtask

  initial begin
    #10_000_000;
    $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    test(16'h0001); test(16'h8000); test(16'h1b1b); test(16'hffff);
    for (int n = 0; n < 5000; n++) test(DW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
