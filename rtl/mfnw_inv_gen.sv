// mfnw_inv_gen: inversions generator of the MLC/TLC flip-n-write (MFNW/TFNW)
// write path.
//
// For an N_CELLS-cell word a of CELL_BITS-bit cells, the i-th inversion is
// {i, {N_CELLS{i}} ^ a}: every cell XORed with the cell value i, with i itself
// prepended as the tag cell. There are 2**CELL_BITS inversions (4 for MLC, 8
// for TLC). Inversion 0 is the word unchanged with tag 0. Purely
// combinational; the output is indexed by i.
module mfnw_inv_gen #(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned N_CELLS   = 8,
  localparam int unsigned NI = 1 << CELL_BITS,
  localparam int unsigned DW = N_CELLS * CELL_BITS,
  localparam int unsigned SW = DW + CELL_BITS
) (
  input  logic [DW-1:0]          word,
  output logic [NI-1:0][SW-1:0]  inv
);

  always_comb begin
    for (int i = 0; i < NI; i++)
      inv[i] = {CELL_BITS'(i), {N_CELLS{CELL_BITS'(i)}} ^ word};
  end

endmodule
