// mfnw_decoder: read path of MLC/TLC flip-n-write for one word.
//
// The stored word {[xtag,] itag, data} is decoded by XORing every data cell
// with the inversion tag cell itag (the tag replicated N_CELLS times) and,
// for MFNW2/MFNW3 (NUM_XFORM = 1 or 3), undoing the transformation named by
// the xtag cell (see mfnw_encoder for the xtag encoding). The result is
// registered: in_valid high in clock cycle n gives out_valid and the tag-less
// word in cycle n+1, the single read cycle of the documented read path.
module mfnw_decoder #(
  parameter int unsigned CELL_BITS  = 2,
  parameter int unsigned N_CELLS    = 8,
  parameter int unsigned NUM_XFORM  = 0,
  parameter logic [1:0]  XFORM2_SEL = 2'd1,
  localparam int unsigned XT = (NUM_XFORM > 0) ? 1 : 0,
  localparam int unsigned DW = N_CELLS * CELL_BITS,
  localparam int unsigned SW = DW + (1 + XT) * CELL_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [SW-1:0] stored,
  output logic          out_valid,
  output logic [DW-1:0] data
);

  logic [CELL_BITS-1:0] itag;
  logic [DW-1:0]        unflipped, decoded;

  assign itag      = stored[DW +: CELL_BITS];
  assign unflipped = stored[DW-1:0] ^ {N_CELLS{itag}};

  if (XT == 1) begin : g_xt
    logic [1:0] xtag, sel;
    assign xtag = stored[SW-1 -: 2];
    // MFNW2 stores 00/11 in the xtag cell; any nonzero value means "applied".
    assign sel  = (NUM_XFORM == 1) ? ((xtag == 2'b00) ? 2'd0 : XFORM2_SEL) : xtag;
    mfnw_transform #(.N_CELLS(N_CELLS), .INVERSE(1'b1)) u_itr (
      .sel(sel), .din(unflipped), .dout(decoded));
  end else begin : g_nx
    assign decoded = unflipped;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) data <= decoded;
  end

endmodule
