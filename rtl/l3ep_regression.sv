// l3ep_regression: amplitude predictor for the first amorphization pulse of
// the L3EP program-and-verify algorithm.
//
// Evaluates V = sum_{i=0..DEGREE} beta_i * R_M**i, where R_M is the midpoint
// resistance of the target TLC state, by Horner's rule, one multiply-add per
// cycle, in fixed point: R_M enters in kOhm and is converted to MOhm with 12
// fractional bits; the coefficients are mV per MOhm**i with 12 fractional bits
// (parameters B0..B3, 32-bit signed); the result is in mV, rounded and clipped
// to 0..4095. DEGREE = 1 is the linear predictor, DEGREE = 3 the cubic one
// (a quadratic fit is not monotonic over the range and is not offered).
//
// Timing: `start` high in clock cycle n (while idle); `done` is high for one
// cycle in cycle n+LATENCY with the result on v_mv, LATENCY = 4 (linear) or 9 (cubic)
// cycles, the documented evaluation times of the floating-point unit the
// algorithm was costed with; the Horner steps finish earlier and the result
// is held back to that latency. The fixed-point arithmetic replaces that
// floating-point unit. The default coefficients are this design's own: they
// follow the trend of a fitted amplitude-versus-resistance curve for a 32 nm
// cell (about 0.6 V near 0 MOhm rising to about 0.8 V near 5 MOhm) and must be
// refitted for a real cell; the cubic default is monotonic by construction.
module l3ep_regression #(
  parameter int unsigned DEGREE  = 3,
  parameter int signed   B0 = (DEGREE == 1) ? 600 * 4096 : 620 * 4096,
  parameter int signed   B1 = (DEGREE == 1) ?  34 * 4096 :  40 * 4096,
  parameter int signed   B2 = -16 * 4096,
  parameter int signed   B3 =   3 * 4096,
  localparam int unsigned LATENCY = (DEGREE == 1) ? 4 : 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] rm_kohm,
  output logic        busy,
  output logic        done,
  output logic [11:0] v_mv
);

  function automatic logic signed [31:0] beta(int unsigned i);
    case (i)
      0: return B0;
      1: return B1;
      2: return B2;
      default: return B3;
    endcase
  endfunction

  logic signed [47:0] acc;
  logic        [16:0] x_q12;      // R_M in MOhm, 12 fractional bits
  logic        [1:0]  step;       // index of the next coefficient to add
  logic        [3:0]  cnt;
  logic signed [63:0] prod;

  logic signed [47:0] r;           // accumulator rounded to mV

  assign prod = acc * $signed({47'd0, x_q12});
  assign r    = (acc + 48'sd2048) >>> 12;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      v_mv <= '0;
      acc  <= '0;
      step <= '0;
      cnt  <= '0;
      x_q12 <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        x_q12 <= 17'((32'(rm_kohm) * 4096 + 500) / 1000);
        acc   <= 48'(beta(DEGREE));
        step  <= 2'(DEGREE - 1);
        cnt   <= 4'd1;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt <= 4'(DEGREE)) begin
          acc  <= 48'(prod >>> 12) + 48'(beta(step));
          step <= step - 1'b1;
        end
        if (cnt == 4'(LATENCY - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (r < 0)          v_mv <= '0;
          else if (r > 4095)  v_mv <= 12'd4095;
          else                v_mv <= 12'(r);
        end
      end
    end
  end

endmodule
