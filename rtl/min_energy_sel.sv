// min_energy_sel: picks, among NUM_CAND candidate encodings of a new word,
// the one whose write over the word already stored at the destination costs
// the least energy.
//
// Only cells that differ from the stored word are written (data-comparison
// write), so the cost of candidate i is sum_j C(i,j) * e(j), where C(i,j)
// counts the cells of candidate i that differ from the old word and hold
// state j, and e(j) is the state energy of nvm_pkg::state_energy(TECH, j).
// With TECH_MLC_PCM_SHIFT the weights are powers of two and each product is
// a shift. Ties go to the lowest candidate index.
//
// Pipeline (3 cycles, matching the three-cycle MFNW write path):
//   stage 1  per-candidate, per-state counters C(i,j) of written cells
//   stage 2  energy of every candidate, sum of C(i,j) * e(j)
//   stage 3  minimum search; result registered on the outputs
// in_valid high in clock cycle n gives out_valid in cycle n+3 (three register
// stages). A new word may enter every cycle. The counter/energy/minimum split into three stages is this design's
// choice; the cycle count is the documented one.
module min_energy_sel
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS  = 2,
  parameter int unsigned WORD_CELLS = 9,   // cells per stored word, tags included
  parameter int unsigned NUM_CAND   = 4,
  parameter tech_e       TECH       = TECH_MLC_PCM_SHIFT,
  parameter int unsigned EW         = 24,  // energy accumulator width
  localparam int unsigned W   = WORD_CELLS * CELL_BITS,
  localparam int unsigned NS  = 1 << CELL_BITS,
  localparam int unsigned CW  = $clog2(WORD_CELLS + 1),
  localparam int unsigned IW  = (NUM_CAND > 1) ? $clog2(NUM_CAND) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [NUM_CAND-1:0][W-1:0]   cand,
  input  logic [W-1:0]                 old_word,
  output logic                         out_valid,
  output logic [IW-1:0]                out_idx,
  output logic [W-1:0]                 out_word,
  output logic [EW-1:0]                out_energy,
  output logic [CW-1:0]                out_cell_writes
);

  // ---------------- stage 1: counters ----------------
  logic [NUM_CAND-1:0][NS-1:0][CW-1:0] cnt_d, cnt_q;
  logic [NUM_CAND-1:0][W-1:0]          cand_q1;
  logic                                v1;

  always_comb begin
    for (int i = 0; i < NUM_CAND; i++) begin
      for (int j = 0; j < NS; j++) cnt_d[i][j] = '0;
      for (int c = 0; c < WORD_CELLS; c++) begin
        logic [CELL_BITS-1:0] nc, oc;
        nc = cand[i][c*CELL_BITS +: CELL_BITS];
        oc = old_word[c*CELL_BITS +: CELL_BITS];
        if (nc != oc) cnt_d[i][nc] = cnt_d[i][nc] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
  end

  always_ff @(posedge clk) begin
    cnt_q   <= cnt_d;
    cand_q1 <= cand;
  end

  // ---------------- stage 2: energies ----------------
  logic [NUM_CAND-1:0][EW-1:0] en_d, en_q;
  logic [NUM_CAND-1:0][CW-1:0] nw_d, nw_q;
  logic [NUM_CAND-1:0][W-1:0]  cand_q2;
  logic                        v2;

  always_comb begin
    for (int i = 0; i < NUM_CAND; i++) begin
      en_d[i] = '0;
      nw_d[i] = '0;
      for (int j = 0; j < NS; j++) begin
        en_d[i] = en_d[i] + EW'(cnt_q[i][j] * state_energy(TECH, j));
        nw_d[i] = nw_d[i] + cnt_q[i][j];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  always_ff @(posedge clk) begin
    en_q    <= en_d;
    nw_q    <= nw_d;
    cand_q2 <= cand_q1;
  end

  // ---------------- stage 3: minimum ----------------
  logic [IW-1:0] best;

  always_comb begin
    best = '0;
    for (int i = 1; i < NUM_CAND; i++)
      if (en_q[i] < en_q[best]) best = IW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
  end

  always_ff @(posedge clk) begin
    out_idx         <= best;
    out_word        <= cand_q2[best];
    out_energy      <= en_q[best];
    out_cell_writes <= nw_q[best];
  end

endmodule
