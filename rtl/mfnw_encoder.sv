// mfnw_encoder: write path of MLC/TLC flip-n-write (MFNW, MFNW2, MFNW3, TFNW)
// for one word.
//
// The new tag-less word of N_CELLS cells is expanded into candidates and the
// one that costs the least energy to write over the stored word (old_word,
// tags included) is returned, ready to be written back with data-comparison
// write:
//   * NUM_XFORM = 0 (MFNW, or TFNW with CELL_BITS = 3): the 2**CELL_BITS
//     inversions {i, {N{i}} ^ new}. Stored word = {itag, data}.
//   * NUM_XFORM = 1 (MFNW2) or 3 (MFNW3), MLC only: the new word and its
//     reversible transformations (R, S1, S2, see mfnw_transform) are each
//     inverted, giving 4*(1+NUM_XFORM) candidates. A second tag cell records
//     the transformation: stored word = {xtag, itag, data}. With one
//     transformation (XFORM2_SEL) the xtag cell is 00 (none) or 11 (applied),
//     the two cheapest MLC states; with three it is the transformation number
//     (00 none, 01 R, 10 S1, 11 S2).
// Candidate costs are computed by min_energy_sel, so in_valid high in clock
// cycle n gives out_valid in cycle n+3, and one word can be accepted every cycle.
// The inversion operator, the cost function and the three-cycle latency follow
// the documented design; the xtag encoding for MFNW3 and the choice of R as
// the MFNW2 transformation are this design's own.
module mfnw_encoder
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS  = 2,
  parameter int unsigned N_CELLS    = 8,
  parameter int unsigned NUM_XFORM  = 0,      // 0, 1 or 3 (1 and 3 need CELL_BITS = 2)
  parameter logic [1:0]  XFORM2_SEL = 2'd1,   // transformation used when NUM_XFORM = 1
  parameter tech_e       TECH       = TECH_MLC_PCM_SHIFT,
  parameter int unsigned EW         = 24,
  localparam int unsigned XT  = (NUM_XFORM > 0) ? 1 : 0,
  localparam int unsigned NI  = 1 << CELL_BITS,
  localparam int unsigned NC  = NI * (NUM_XFORM + 1),
  localparam int unsigned DW  = N_CELLS * CELL_BITS,
  localparam int unsigned SW  = DW + (1 + XT) * CELL_BITS,
  localparam int unsigned CW  = $clog2(N_CELLS + 2 + XT),
  localparam int unsigned IW  = $clog2(NC)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [DW-1:0]  new_word,
  input  logic [SW-1:0]  old_word,
  output logic           out_valid,
  output logic [SW-1:0]  out_word,
  output logic [IW-1:0]  out_choice,   // t*2**CELL_BITS + i of the chosen candidate
  output logic [EW-1:0]  out_energy,
  output logic [CW-1:0]  out_cell_writes
);

  logic [NC-1:0][SW-1:0] cand;

  for (genvar t = 0; t <= NUM_XFORM; t++) begin : g_xf
    localparam logic [1:0] SEL  = (NUM_XFORM == 1) ? ((t == 0) ? 2'd0 : XFORM2_SEL) : 2'(t);
    localparam logic [1:0] XTAG = (NUM_XFORM == 1) ? ((t == 0) ? 2'b00 : 2'b11) : 2'(t);
    logic [DW-1:0]                        xw;
    logic [NI-1:0][DW+CELL_BITS-1:0]      inv;

    if (NUM_XFORM == 0) begin : g_plain
      assign xw = new_word;
    end else begin : g_tr
      mfnw_transform #(.N_CELLS(N_CELLS), .INVERSE(1'b0)) u_tr (
        .sel(SEL), .din(new_word), .dout(xw));
    end

    mfnw_inv_gen #(.CELL_BITS(CELL_BITS), .N_CELLS(N_CELLS)) u_inv (
      .word(xw), .inv(inv));

    for (genvar i = 0; i < NI; i++) begin : g_c
      if (XT == 1) begin : g_xt
        assign cand[t*NI+i] = {XTAG, inv[i]};
      end else begin : g_nx
        assign cand[t*NI+i] = inv[i];
      end
    end
  end

  min_energy_sel #(
    .CELL_BITS(CELL_BITS), .WORD_CELLS(N_CELLS + 1 + XT), .NUM_CAND(NC),
    .TECH(TECH), .EW(EW)
  ) u_sel (
    .clk, .rst_n, .in_valid, .cand, .old_word,
    .out_valid, .out_idx(out_choice), .out_word, .out_energy, .out_cell_writes
  );

endmodule
