// fve_line_codec: frequent-value codec for a whole memory line, with a single
// encoder and a single decoder shared by all words of the line.
//
// A line holds WPL words (see fve_encoder for the word layout). Encoding: an
// accepted line (enc_in_valid && enc_in_ready in clock cycle n) is fed to the
// pipelined fve_encoder one word per cycle, word 0 first, in cycles n+1 ..
// n+WPL; every word is costed against the matching word of old_line (the
// line stored at the destination). The encoded line and the sum of the word
// costs are presented with enc_out_valid for one cycle in cycle n+WPL+4 and
// the codec accepts the next line after it. Decoding: an accepted stored line
// is passed word by word through fve_decoder in cycles n+1 .. n+WPL, and the
// decoded line appears with dec_out_valid in cycle n+WPL+2, i.e. the read
// latency grows with the number of words, as documented for a shared decoder.
// The two directions are independent. ld_* load the dictionaries of both
// sides (see fve_encoder).
module fve_line_codec
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned FVL       = 8,
  parameter int unsigned SLICES    = 16,
  parameter int unsigned K         = 8,
  parameter int unsigned TAG_CELLS = 2,
  parameter int unsigned WPL       = 4,
  parameter tech_e       TECH      = TECH_MLC_PCM,
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW  = SLICES * FVL,
  localparam int unsigned SW  = DW + TAG_CELLS * CELL_BITS,
  localparam int unsigned WW  = $clog2(WPL + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ld_valid,
  input  logic [KW-1:0]      ld_dict,
  input  logic [FVL-1:0]     ld_value,
  input  logic [FVL-1:0]     ld_code,
  // line encoding
  input  logic               enc_in_valid,
  output logic               enc_in_ready,
  input  logic [WPL*DW-1:0]  new_line,
  input  logic [WPL*SW-1:0]  old_line,
  output logic               enc_out_valid,
  output logic [WPL*SW-1:0]  enc_line,
  output logic [31:0]        enc_energy,
  // line decoding
  input  logic               dec_in_valid,
  output logic               dec_in_ready,
  input  logic [WPL*SW-1:0]  stored_line,
  output logic               dec_out_valid,
  output logic [WPL*DW-1:0]  dec_line
);

  // ---------------- encoding ----------------
  logic [WPL*DW-1:0] nl_q;
  logic [WPL*SW-1:0] ol_q;
  logic              e_busy;
  logic [WW-1:0]     e_fed, e_got;
  logic              e_feed, e_ovalid;
  logic [SW-1:0]     e_oword;
  logic [31:0]       e_oen;

  assign enc_in_ready = !e_busy;
  assign e_feed       = e_busy && (e_fed != WW'(WPL));

  fve_encoder #(
    .CELL_BITS(CELL_BITS), .FVL(FVL), .SLICES(SLICES), .K(K),
    .TAG_CELLS(TAG_CELLS), .TECH(TECH)
  ) u_enc (
    .clk, .rst_n, .ld_valid, .ld_dict, .ld_value, .ld_code,
    .in_valid(e_feed),
    .new_word(nl_q[e_fed*DW +: DW]),
    .old_word(ol_q[e_fed*SW +: SW]),
    .out_valid(e_ovalid), .out_word(e_oword), .out_dict(), .out_energy(e_oen)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_busy        <= 1'b0;
      e_fed         <= '0;
      e_got         <= '0;
      enc_out_valid <= 1'b0;
      enc_energy    <= '0;
    end else begin
      enc_out_valid <= 1'b0;
      if (!e_busy && enc_in_valid) begin
        e_busy     <= 1'b1;
        e_fed      <= '0;
        e_got      <= '0;
        enc_energy <= '0;
      end else if (e_busy) begin
        if (e_feed) e_fed <= e_fed + 1'b1;
        if (e_ovalid) begin
          e_got      <= e_got + 1'b1;
          enc_energy <= enc_energy + e_oen;
          if (e_got == WW'(WPL - 1)) begin
            e_busy        <= 1'b0;
            enc_out_valid <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!e_busy && enc_in_valid) begin
      nl_q <= new_line;
      ol_q <= old_line;
    end
    if (e_busy && e_ovalid) enc_line[e_got*SW +: SW] <= e_oword;
  end

  // ---------------- decoding ----------------
  logic [WPL*SW-1:0] sl_q;
  logic              d_busy;
  logic [WW-1:0]     d_fed, d_got;
  logic              d_feed, d_ovalid;
  logic [DW-1:0]     d_oword;

  assign dec_in_ready = !d_busy;
  assign d_feed       = d_busy && (d_fed != WW'(WPL));

  fve_decoder #(
    .CELL_BITS(CELL_BITS), .FVL(FVL), .SLICES(SLICES), .K(K), .TAG_CELLS(TAG_CELLS)
  ) u_dec (
    .clk, .rst_n, .ld_valid, .ld_dict, .ld_value, .ld_code,
    .in_valid(d_feed),
    .stored(sl_q[d_fed*SW +: SW]),
    .out_valid(d_ovalid), .data(d_oword)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_busy        <= 1'b0;
      d_fed         <= '0;
      d_got         <= '0;
      dec_out_valid <= 1'b0;
    end else begin
      dec_out_valid <= 1'b0;
      if (!d_busy && dec_in_valid) begin
        d_busy <= 1'b1;
        d_fed  <= '0;
        d_got  <= '0;
      end else if (d_busy) begin
        if (d_feed) d_fed <= d_fed + 1'b1;
        if (d_ovalid) begin
          d_got <= d_got + 1'b1;
          if (d_got == WW'(WPL - 1)) begin
            d_busy        <= 1'b0;
            dec_out_valid <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!d_busy && dec_in_valid) sl_q <= stored_line;
    if (d_busy && d_ovalid) dec_line[d_got*DW +: DW] <= d_oword;
  end

endmodule
