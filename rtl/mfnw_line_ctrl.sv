// mfnw_line_ctrl: off-chip memory controller data path for MLC flip-n-write
// (MFNW), one cache line at a time.
//
// Write: a cache line of LINE_BITS bits (from the write buffer) is sliced into
// WORDS words of N_CELLS cells. The controller fetches the old line, tags
// included, from the NVM array; every slice has its own mfnw_encoder, which
// forms the candidates of the new word and picks the one cheapest to write
// over the old word. The encoded line is then written back (the array writes
// only the cells that change). Read: the stored line is fetched and every
// slice is decoded by its own mfnw_decoder.
//
// Timing, with a request accepted in clock cycle n (valid && ready; the
// array read is issued in the same cycle):
//   write  n+1 old line on mem_rd_data, encoders start; n+4 encoders done and
//          mem_wr_en high for one cycle; controller ready again in n+5.
//   read   n+1 stored line on mem_rd_data; n+2 rd_resp_valid with the line.
// The controller handles one request at a time; a waiting read is taken
// before a waiting write. last_energy is the summed selector cost (in the
// selector's energy units) of the last written line.
// Slicing, one encoder per slice and the three-cycle encoder follow the
// documented write path; the request arbitration and the handshakes are this
// design's choice.
module mfnw_line_ctrl
  import nvm_pkg::*;
#(
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned CELL_BITS = 2,
  parameter int unsigned N_CELLS   = 8,
  parameter int unsigned NUM_XFORM = 0,
  parameter tech_e       TECH      = TECH_MLC_PCM_SHIFT,
  parameter int unsigned ADDR_W    = 6,
  localparam int unsigned XT    = (NUM_XFORM > 0) ? 1 : 0,
  localparam int unsigned DW    = N_CELLS * CELL_BITS,
  localparam int unsigned SW    = DW + (1 + XT) * CELL_BITS,
  localparam int unsigned WORDS = LINE_BITS / DW,
  localparam int unsigned LSW   = WORDS * SW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // write requests (from the write buffer)
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [ADDR_W-1:0]    wr_addr,
  input  logic [LINE_BITS-1:0] wr_line,
  // read requests and responses
  input  logic                 rd_valid,
  output logic                 rd_ready,
  input  logic [ADDR_W-1:0]    rd_addr,
  output logic                 rd_resp_valid,
  output logic [LINE_BITS-1:0] rd_resp_line,
  // NVM array
  output logic                 mem_rd_en,
  output logic [ADDR_W-1:0]    mem_rd_addr,
  input  logic [LSW-1:0]       mem_rd_data,
  output logic                 mem_wr_en,
  output logic [ADDR_W-1:0]    mem_wr_addr,
  output logic [LSW-1:0]       mem_wr_data,
  // statistics
  output logic [31:0]          last_energy
);

  typedef enum logic [2:0] {S_IDLE, S_W_OLD, S_W_ENC, S_R_DATA, S_R_DEC} state_e;
  state_e state;

  logic [LINE_BITS-1:0] new_line;
  logic [ADDR_W-1:0]    cur_addr;
  logic                 enc_start, dec_start;
  logic [WORDS-1:0]     enc_done, dec_done;
  logic [LSW-1:0]       enc_line;
  logic [WORDS-1:0][31:0] enc_energy;

  assign rd_ready    = (state == S_IDLE);
  assign wr_ready    = (state == S_IDLE) && !rd_valid;
  assign mem_rd_en   = (state == S_IDLE) && (rd_valid || wr_valid);
  assign mem_rd_addr = rd_valid ? rd_addr : wr_addr;
  assign enc_start   = (state == S_W_OLD);
  assign dec_start   = (state == S_R_DATA);

  for (genvar w = 0; w < WORDS; w++) begin : g_slice
    logic [SW-1:0] ew;
    logic [23:0]   en;
    mfnw_encoder #(
      .CELL_BITS(CELL_BITS), .N_CELLS(N_CELLS), .NUM_XFORM(NUM_XFORM), .TECH(TECH)
    ) u_enc (
      .clk, .rst_n,
      .in_valid(enc_start),
      .new_word(new_line[w*DW +: DW]),
      .old_word(mem_rd_data[w*SW +: SW]),
      .out_valid(enc_done[w]),
      .out_word(ew),
      .out_choice(),
      .out_energy(en),
      .out_cell_writes()
    );
    assign enc_line[w*SW +: SW] = ew;
    assign enc_energy[w]        = 32'(en);

    mfnw_decoder #(
      .CELL_BITS(CELL_BITS), .N_CELLS(N_CELLS), .NUM_XFORM(NUM_XFORM)
    ) u_dec (
      .clk, .rst_n,
      .in_valid(dec_start),
      .stored(mem_rd_data[w*SW +: SW]),
      .out_valid(dec_done[w]),
      .data(rd_resp_line[w*DW +: DW])
    );
  end

  assign mem_wr_en     = (state == S_W_ENC) && (&enc_done);
  assign mem_wr_addr   = cur_addr;
  assign mem_wr_data   = enc_line;
  assign rd_resp_valid = (state == S_R_DEC) && (&dec_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
    end else begin
      case (state)
        S_IDLE:   if (rd_valid) state <= S_R_DATA;
                  else if (wr_valid) state <= S_W_OLD;
        S_W_OLD:  state <= S_W_ENC;
        S_W_ENC:  if (&enc_done) state <= S_IDLE;
        S_R_DATA: state <= S_R_DEC;
        S_R_DEC:  if (&dec_done) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_IDLE && wr_ready && wr_valid) begin
      new_line <= wr_line;
      cur_addr <= wr_addr;
    end
  end

  logic [31:0] line_energy;
  always_comb begin
    line_energy = '0;
    for (int w = 0; w < WORDS; w++) line_energy = line_energy + enc_energy[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last_energy <= '0;
    else if (mem_wr_en) last_energy <= line_energy;
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(mem_wr_en && rd_resp_valid));

endmodule
