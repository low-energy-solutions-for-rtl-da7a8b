// fve_decoder: offline frequent-value decoder for one MLC/TLC word.
//
// The tag cells of the stored word name the dictionary i the word was encoded
// with; every slice is looked up in the inverse dictionary M^-1(i, .), which is
// addressed by {tag, encoded slice}, and the decoded values are registered:
// in_valid high in clock cycle n gives out_valid and the word in cycle n+1.
// The inverse dictionaries are written through the same load port as the
// encoder's (ld_dict = i, ld_value = v, ld_code = M(i, v) stores v at
// {i, M(i, v)}), so both sides stay consistent. Layout as in fve_encoder.
module fve_decoder #(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned FVL       = 8,
  parameter int unsigned SLICES    = 16,
  parameter int unsigned K         = 8,
  parameter int unsigned TAG_CELLS = 2,
  localparam int unsigned FVN = 1 << FVL,
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW  = SLICES * FVL,
  localparam int unsigned TW  = TAG_CELLS * CELL_BITS,
  localparam int unsigned SW  = DW + TW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ld_valid,
  input  logic [KW-1:0]  ld_dict,
  input  logic [FVL-1:0] ld_value,
  input  logic [FVL-1:0] ld_code,
  input  logic           in_valid,
  input  logic [SW-1:0]  stored,
  output logic           out_valid,
  output logic [DW-1:0]  data
);

  logic [FVL-1:0] dec_tab [K * FVN];

  always_ff @(posedge clk) begin
    if (ld_valid) dec_tab[{ld_dict, ld_code}] <= ld_value;
  end

  logic [KW-1:0] tag;
  assign tag = KW'(stored[SW-1 -: TW]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid)
      for (int s = 0; s < SLICES; s++)
        data[s*FVL +: FVL] <= dec_tab[{tag, stored[s*FVL +: FVL]}];
  end

endmodule
