// fve_encoder: offline frequent-value encoder (FVE) for one MLC/TLC word.
//
// A word is SLICES data slices of FVL logical bits (a frequent value) plus
// TAG_CELLS tag cells. K dictionaries M(i, v), one per application cluster,
// map each value v to a codeword of the same width; dictionary i sends the
// most frequent values of cluster i to the cheapest codewords. The new word is
// encoded with all K dictionaries at once (one lookup per slice and
// dictionary), the K encoded versions, each prefixed with its tag i, are
// costed against the word stored at the destination (cells that change only),
// and the cheapest one is returned (min_energy_sel, 3-cycle pipeline).
//
// Dictionary storage: K x 2**FVL entries of FVL bits, written through the
// load port (ld_valid, ld_dict = i, ld_value = v, ld_code = M(i, v)); each
// dictionary must be a permutation of the values and must be loaded before
// use. The dictionaries come from offline clustering of application value
// profiles; a fixed product would hold them in read-only memory, and the
// same table serves every slice (one copy per slice in a physical layout).
// Stored word layout: {tag, slice[SLICES-1], ..., slice[0]}, tag = i in binary.
// in_valid high in clock cycle n gives out_valid in cycle n+3; one word per
// cycle.
module fve_encoder
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned FVL       = 8,
  parameter int unsigned SLICES    = 16,
  parameter int unsigned K         = 8,
  parameter int unsigned TAG_CELLS = 2,
  parameter tech_e       TECH      = TECH_MLC_PCM,
  localparam int unsigned FVN = 1 << FVL,
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW  = SLICES * FVL,
  localparam int unsigned TW  = TAG_CELLS * CELL_BITS,
  localparam int unsigned SW  = DW + TW,
  localparam int unsigned WC  = SW / CELL_BITS
) (
  input  logic           clk,
  input  logic           rst_n,
  // dictionary load port
  input  logic           ld_valid,
  input  logic [KW-1:0]  ld_dict,
  input  logic [FVL-1:0] ld_value,
  input  logic [FVL-1:0] ld_code,
  // encode
  input  logic           in_valid,
  input  logic [DW-1:0]  new_word,
  input  logic [SW-1:0]  old_word,
  output logic           out_valid,
  output logic [SW-1:0]  out_word,
  output logic [KW-1:0]  out_dict,
  output logic [31:0]    out_energy
);

  logic [FVL-1:0] enc_tab [K * FVN];

  always_ff @(posedge clk) begin
    if (ld_valid) enc_tab[{ld_dict, ld_value}] <= ld_code;
  end

  logic [K-1:0][SW-1:0] cand;

  always_comb begin
    for (int i = 0; i < K; i++) begin
      cand[i] = '0;
      cand[i][SW-1 -: TW] = TW'(i);
      for (int s = 0; s < SLICES; s++)
        cand[i][s*FVL +: FVL] = enc_tab[{KW'(i), new_word[s*FVL +: FVL]}];
    end
  end

  min_energy_sel #(
    .CELL_BITS(CELL_BITS), .WORD_CELLS(WC), .NUM_CAND(K), .TECH(TECH), .EW(32)
  ) u_sel (
    .clk, .rst_n, .in_valid, .cand, .old_word,
    .out_valid, .out_idx(out_dict), .out_word, .out_energy, .out_cell_writes()
  );

endmodule
