// tfnw_codec: TLC flip-n-write (TFNW) encoder and decoder for one word of
// 3-bit TLC cells.
//
// Writing: the eight cell inversions {i, {N{i}} ^ new} of the new word are
// costed against the stored word with the TLC RRAM state energies (tenths of
// a pJ: 2, 6.7, 19.3, 35.1, 35.6, 19.6, 8.5, 1.5 pJ for states 0..7), only
// for cells that change, and the cheapest one is returned (3-cycle pipeline,
// see min_energy_sel). Reading: the stored word is XORed with its tag cell
// replicated over the word (1 cycle). The encoder and the decoder are
// independent and may work in the same cycle. TFNW reuses the MFNW blocks with
// 3-bit cells, as documented; the word length of N_CELLS = 8 data cells is
// this design's choice, the same as the MLC word.
module tfnw_codec
  import nvm_pkg::*;
#(
  parameter int unsigned N_CELLS = 8,
  localparam int unsigned DW = 3 * N_CELLS,
  localparam int unsigned SW = DW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enc_valid,
  input  logic [DW-1:0] enc_new,
  input  logic [SW-1:0] enc_old,
  output logic          enc_out_valid,
  output logic [SW-1:0] enc_word,
  output logic [23:0]   enc_energy,
  input  logic          dec_valid,
  input  logic [SW-1:0] dec_stored,
  output logic          dec_out_valid,
  output logic [DW-1:0] dec_data
);

  mfnw_encoder #(
    .CELL_BITS(3), .N_CELLS(N_CELLS), .NUM_XFORM(0), .TECH(TECH_TLC_RRAM)
  ) u_enc (
    .clk, .rst_n,
    .in_valid(enc_valid), .new_word(enc_new), .old_word(enc_old),
    .out_valid(enc_out_valid), .out_word(enc_word), .out_choice(),
    .out_energy(enc_energy), .out_cell_writes()
  );

  mfnw_decoder #(
    .CELL_BITS(3), .N_CELLS(N_CELLS), .NUM_XFORM(0)
  ) u_dec (
    .clk, .rst_n,
    .in_valid(dec_valid), .stored(dec_stored),
    .out_valid(dec_out_valid), .data(dec_data)
  );

endmodule
