// nvm_array: multi-level-cell non-volatile memory array with data-comparison
// write and write-energy accounting.
//
// LINES lines of LINE_CELLS cells of CELL_BITS bits each. A read (rd_en) returns
// the addressed line on rd_data one cycle later. A write (wr_en) programs only
// the cells whose new state differs from the stored one, as the program-and-
// verify write circuitry of an MLC/TLC array does; for every such cell the
// array adds the mean energy of the programmed state (nvm_pkg::state_energy
// with TECH) to `energy` and one to `cell_writes`, and counts the cell in
// `state_writes[state]`. stat_clr clears the three statistics. The array
// stands in for the physical memory; its programming circuits are not
// modelled, only the cells that change and what they cost. Contents start at
// all-zero cells. Reading and writing the same line in one cycle returns the
// old content.
module nvm_array
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS  = 2,
  parameter int unsigned LINE_CELLS = 288,
  parameter int unsigned LINES      = 64,
  parameter tech_e       TECH       = TECH_MLC_PCM,
  localparam int unsigned LW = LINE_CELLS * CELL_BITS,
  localparam int unsigned AW = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned NS = 1 << CELL_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [LW-1:0]        rd_data,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [LW-1:0]        wr_data,
  input  logic                 stat_clr,
  output logic [47:0]          energy,
  output logic [31:0]          cell_writes,
  output logic [NS-1:0][31:0]  state_writes
);

  logic [LW-1:0] mem [LINES];

  initial begin
    for (int l = 0; l < LINES; l++) mem[l] = '0;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // Cells changed by the current write and their cost.
  logic [LW-1:0]                 cur;
  logic [47:0]                   w_energy;
  logic [31:0]                   w_cells;
  logic [NS-1:0][31:0]           w_state;

  assign cur = mem[wr_addr];

  always_comb begin
    w_energy = '0;
    w_cells  = '0;
    w_state  = '0;
    for (int c = 0; c < LINE_CELLS; c++) begin
      logic [CELL_BITS-1:0] nc;
      nc = wr_data[c*CELL_BITS +: CELL_BITS];
      if (nc != cur[c*CELL_BITS +: CELL_BITS]) begin
        w_energy    = w_energy + 48'(state_energy(TECH, nc));
        w_cells     = w_cells + 1;
        w_state[nc] = w_state[nc] + 1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      energy       <= '0;
      cell_writes  <= '0;
      state_writes <= '0;
    end else if (stat_clr) begin
      energy       <= '0;
      cell_writes  <= '0;
      state_writes <= '0;
    end else if (wr_en) begin
      energy      <= energy + w_energy;
      cell_writes <= cell_writes + w_cells;
      for (int s = 0; s < NS; s++) state_writes[s] <= state_writes[s] + w_state[s];
    end
  end

endmodule
