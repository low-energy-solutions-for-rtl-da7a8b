// mfnw_transform: reversible word transformations used by MFNW2 and MFNW3
// to widen the flip-n-write search for MLC words (2-bit cells).
//
//   SEL 0  identity
//   SEL 1  R : rotate the word right by one logical bit
//   SEL 2  S1: swap MLC states 10 and 11 in every cell
//   SEL 3  S2: swap MLC states 01 and 11 in every cell
//
// INVERSE = 0 applies the transformation (encoder side); INVERSE = 1 applies
// its inverse (decoder side): R is undone by a left rotation, S1 and S2 are
// their own inverses. Combinational. The encodings of SEL are this design's
// choice.
module mfnw_transform #(
  parameter int unsigned N_CELLS = 8,
  parameter bit          INVERSE = 1'b0,
  localparam int unsigned DW = 2 * N_CELLS
) (
  input  logic [1:0]    sel,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  always_comb begin
    dout = din;
    case (sel)
      2'd1: dout = INVERSE ? {din[DW-2:0], din[DW-1]} : {din[0], din[DW-1:1]};
      2'd2:
        for (int c = 0; c < N_CELLS; c++)
          if (din[2*c+1]) dout[2*c] = ~din[2*c];              // 10 <-> 11
      2'd3:
        for (int c = 0; c < N_CELLS; c++)
          if (din[2*c]) dout[2*c+1] = ~din[2*c+1];            // 01 <-> 11
      default: ;
    endcase
  end

endmodule
