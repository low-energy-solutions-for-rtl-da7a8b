// fnw_wear_run: testbench helper for the word-level, cost-aware endurance
// evaluation of flip-n-write encodings. Used by tb_fnw_endurance, once per
// encoding and word length.
//
// How it works: one memory word of N_CELLS data cells (plus its tag cells)
// is rewritten N_WRITES times with uniformly random data. The data goes
// through mfnw_encoder (MFNW, MFNW2, MFNW3 for MLC, TFNW for TLC) against the
// stored word, the result is stored, and every cell that changes ages by
// ceil(E(state) / E_min), the energy of the written state over the cheapest
// state's (MLC PCM 2, 16, 28, 1; TLC RRAM 2, 5, 13, 24, 24, 14, 6, 1). The
// same data written unencoded with data-comparison write (DCW: only changed
// cells, no tag) ages a second word. Each stored word is also read back
// through mfnw_decoder and must give the data written.
//
// Interface: clk, rst_n in; done rises at the end; checks and failures;
// age_enc and age_dcw are the summed ages of all cells of the encoded word
// (tags included) and of the DCW word; cells_enc is the number of cells of
// the encoded word.
module fnw_wear_run
  import nvm_pkg::*;
#(
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned N_CELLS   = 8,
  parameter int unsigned NUM_XFORM = 0,
  parameter tech_e       TECH      = TECH_MLC_PCM_SHIFT,
  parameter int unsigned N_WRITES  = 4000
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   done,
  output int     checks,
  output int     failures,
  output longint age_enc,
  output longint age_dcw,
  output int     cells_enc
);
  localparam int unsigned XT = (NUM_XFORM > 0) ? 1 : 0;
  localparam int unsigned DW = N_CELLS * CELL_BITS;
  localparam int unsigned SW = DW + (1 + XT) * CELL_BITS;
  localparam int unsigned NC = SW / CELL_BITS;

  int unsigned cyc;
  always @(posedge clk) cyc <= cyc + 1;

  logic          in_valid, out_valid, dec_valid, dec_out_valid;
  logic [DW-1:0] new_word, dec_data;
  logic [SW-1:0] old_word, out_word, stored;

  mfnw_encoder #(
    .CELL_BITS(CELL_BITS), .N_CELLS(N_CELLS), .NUM_XFORM(NUM_XFORM), .TECH(TECH)
  ) u_enc (
    .clk, .rst_n, .in_valid, .new_word, .old_word,
    .out_valid, .out_word, .out_choice(), .out_energy(), .out_cell_writes()
  );
  mfnw_decoder #(
    .CELL_BITS(CELL_BITS), .N_CELLS(N_CELLS), .NUM_XFORM(NUM_XFORM)
  ) u_dec (
    .clk, .rst_n, .in_valid(dec_valid), .stored, .out_valid(dec_out_valid), .data(dec_data)
  );

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %m @%0d: %s", cyc, msg);
    end
  endtask

  // cost-aware age increment of a cell written to state s
  function automatic int unsigned age_inc(int unsigned s);
    if (CELL_BITS == 2) begin
      case (s) 0: return 2; 1: return 16; 2: return 28; default: return 1; endcase
    end
    case (s)
      0: return 2;  1: return 5;  2: return 13; 3: return 24;
      4: return 24; 5: return 14; 6: return 6;  default: return 1;
    endcase
  endfunction

  initial begin
    logic [DW-1:0] dcw_word, data;
    int unsigned c0;
    done = 1'b0; checks = 0; failures = 0; age_enc = 0; age_dcw = 0; cells_enc = NC;
    cyc = 0; in_valid = 1'b0; dec_valid = 1'b0;
    new_word = '0; old_word = '0; stored = '0; dcw_word = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < N_WRITES; n++) begin
      data = DW'({$urandom, $urandom});
      // unencoded DCW word
      for (int c = 0; c < N_CELLS; c++)
        if (data[c*CELL_BITS +: CELL_BITS] != dcw_word[c*CELL_BITS +: CELL_BITS])
          age_dcw += longint'(age_inc(int'(data[c*CELL_BITS +: CELL_BITS])));
      dcw_word = data;
      // encoded word
      new_word = data;
      in_valid = 1'b1;
      c0 = cyc;
      @(negedge clk);
      in_valid = 1'b0;
      while (!out_valid && cyc < c0 + 10) @(negedge clk);
      chk(out_valid && cyc == c0 + 3, "encoder result in cycle n+3");
      for (int c = 0; c < NC; c++)
        if (out_word[c*CELL_BITS +: CELL_BITS] != old_word[c*CELL_BITS +: CELL_BITS])
          age_enc += longint'(age_inc(int'(out_word[c*CELL_BITS +: CELL_BITS])));
      old_word = out_word;
      // read back
      stored = out_word;
      dec_valid = 1'b1;
      @(negedge clk);
      dec_valid = 1'b0;
      chk(dec_out_valid && dec_data == data, "stored word reads back as the data");
    end
    chk(age_enc * N_CELLS < age_dcw * NC, "encoded cells age slower than DCW cells");
    done = 1'b1;
  end
endmodule
