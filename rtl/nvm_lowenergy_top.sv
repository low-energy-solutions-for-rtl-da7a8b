// nvm_lowenergy_top: the three low-energy write mechanisms for MLC/TLC
// non-volatile memory, side by side, each with its own ports.
//
//  1. MFNW memory subsystem (MLC PCM): cache-line writes enter a write
//     buffer, the MFNW line controller encodes every 16-bit (8-cell) slice of
//     a 512-bit line against the line stored in the NVM array and writes the
//     cheapest encoding back; reads return decoded lines. The array reports
//     the programmed cells and their energy (pJ, MLC PCM state energies).
//     MFNW_XFORM selects plain MFNW (0), MFNW2 (1) or MFNW3 (3).
//  2. TFNW codec (TLC RRAM): the TLC flip-n-write encoder and decoder for
//     one 8-cell word, with the stored word supplied from outside.
//  3. FVE line codec (MLC PCM, k = 8 dictionaries, 16 slices of 8 bits and
//     2 tag cells per word, 4 words per 512-bit line): one shared encoder and
//     decoder; dictionaries are loaded through ld_*.
//  4. L3EP program-and-verify controller for one TLC PCM cell driver: the
//     resistance estimator (sense_*) and the write driver (pulse_*) are
//     analog and sit outside, so their signals are ports.
// The blocks share only the clock and the active-low asynchronous reset.
// Parameters default to the documented sizes; the array depth NVM_LINES and
// the write-buffer depth WB_DEPTH are this design's choice.
module nvm_lowenergy_top
  import nvm_pkg::*;
#(
  parameter int unsigned LINE_BITS  = 512,
  parameter int unsigned MFNW_CELLS = 8,
  parameter int unsigned MFNW_XFORM = 0,
  parameter int unsigned NVM_LINES  = 64,
  parameter int unsigned WB_DEPTH   = 8,
  parameter int unsigned TFNW_CELLS = 8,
  parameter int unsigned FVE_K      = 8,
  parameter int unsigned FVE_SLICES = 16,
  parameter int unsigned FVE_TAGS   = 2,
  parameter int unsigned FVE_WPL    = 4,
  parameter int unsigned L3EP_DEGREE = 3,
  parameter int unsigned L3EP_EPS_KOHM = 370,
  localparam int unsigned AW      = $clog2(NVM_LINES),
  localparam int unsigned M_XT    = (MFNW_XFORM > 0) ? 1 : 0,
  localparam int unsigned M_SW    = (MFNW_CELLS + 1 + M_XT) * 2,
  localparam int unsigned M_LSW   = (LINE_BITS / (MFNW_CELLS * 2)) * M_SW,
  localparam int unsigned T_DW    = 3 * TFNW_CELLS,
  localparam int unsigned T_SW    = T_DW + 3,
  localparam int unsigned F_FVL   = 8,
  localparam int unsigned F_KW    = $clog2(FVE_K),
  localparam int unsigned F_DW    = FVE_SLICES * F_FVL,
  localparam int unsigned F_SW    = F_DW + 2 * FVE_TAGS,
  localparam int unsigned WBL     = $clog2(WB_DEPTH) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,

  // ---- MFNW memory subsystem ----
  input  logic                     m_wr_valid,
  output logic                     m_wr_ready,
  input  logic [AW-1:0]            m_wr_addr,
  input  logic [LINE_BITS-1:0]     m_wr_line,
  input  logic                     m_rd_valid,
  output logic                     m_rd_ready,
  input  logic [AW-1:0]            m_rd_addr,
  output logic                     m_rd_resp_valid,
  output logic [LINE_BITS-1:0]     m_rd_resp_line,
  output logic [WBL-1:0]           m_wb_level,
  input  logic                     m_stat_clr,
  output logic [47:0]              m_energy_pj,
  output logic [31:0]              m_cell_writes,
  output logic [3:0][31:0]         m_state_writes,
  output logic [31:0]              m_last_line_cost,

  // ---- TFNW codec ----
  input  logic                     t_enc_valid,
  input  logic [T_DW-1:0]          t_enc_new,
  input  logic [T_SW-1:0]          t_enc_old,
  output logic                     t_enc_out_valid,
  output logic [T_SW-1:0]          t_enc_word,
  output logic [23:0]              t_enc_energy,
  input  logic                     t_dec_valid,
  input  logic [T_SW-1:0]          t_dec_stored,
  output logic                     t_dec_out_valid,
  output logic [T_DW-1:0]          t_dec_data,

  // ---- FVE line codec ----
  input  logic                     f_ld_valid,
  input  logic [F_KW-1:0]          f_ld_dict,
  input  logic [F_FVL-1:0]         f_ld_value,
  input  logic [F_FVL-1:0]         f_ld_code,
  input  logic                     f_enc_in_valid,
  output logic                     f_enc_in_ready,
  input  logic [FVE_WPL*F_DW-1:0]  f_new_line,
  input  logic [FVE_WPL*F_SW-1:0]  f_old_line,
  output logic                     f_enc_out_valid,
  output logic [FVE_WPL*F_SW-1:0]  f_enc_line,
  output logic [31:0]              f_enc_energy,
  input  logic                     f_dec_in_valid,
  output logic                     f_dec_in_ready,
  input  logic [FVE_WPL*F_SW-1:0]  f_stored_line,
  output logic                     f_dec_out_valid,
  output logic [FVE_WPL*F_DW-1:0]  f_dec_line,

  // ---- L3EP controller ----
  input  logic                     l_start,
  input  logic [2:0]               l_target,
  output logic                     l_busy,
  output logic                     l_done,
  output logic                     l_converged,
  output logic [7:0]               l_n_amorph,
  output logic [7:0]               l_n_cryst,
  output logic [15:0]              l_op_cycles,
  output logic                     l_sense_req,
  input  logic                     l_sense_valid,
  input  logic [15:0]              l_sense_kohm,
  output logic                     l_pulse_valid,
  output pulse_e                   l_pulse_kind,
  output logic [11:0]              l_pulse_mv,
  output logic [7:0]               l_pulse_width
);

  // ================= MFNW subsystem =================
  logic                 wb_valid, wb_ready;
  logic [AW-1:0]        wb_addr;
  logic [LINE_BITS-1:0] wb_line;
  logic                 mem_rd_en, mem_wr_en;
  logic [AW-1:0]        mem_rd_addr, mem_wr_addr;
  logic [M_LSW-1:0]     mem_rd_data, mem_wr_data;

  write_buffer #(.LINE_BITS(LINE_BITS), .ADDR_W(AW), .DEPTH(WB_DEPTH)) u_wb (
    .clk, .rst_n,
    .in_valid(m_wr_valid), .in_ready(m_wr_ready), .in_addr(m_wr_addr), .in_line(m_wr_line),
    .out_valid(wb_valid), .out_ready(wb_ready), .out_addr(wb_addr), .out_line(wb_line),
    .level(m_wb_level)
  );

  mfnw_line_ctrl #(
    .LINE_BITS(LINE_BITS), .CELL_BITS(2), .N_CELLS(MFNW_CELLS),
    .NUM_XFORM(MFNW_XFORM), .TECH(TECH_MLC_PCM_SHIFT), .ADDR_W(AW)
  ) u_mfnw (
    .clk, .rst_n,
    .wr_valid(wb_valid), .wr_ready(wb_ready), .wr_addr(wb_addr), .wr_line(wb_line),
    .rd_valid(m_rd_valid), .rd_ready(m_rd_ready), .rd_addr(m_rd_addr),
    .rd_resp_valid(m_rd_resp_valid), .rd_resp_line(m_rd_resp_line),
    .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .last_energy(m_last_line_cost)
  );

  nvm_array #(
    .CELL_BITS(2), .LINE_CELLS(M_LSW / 2), .LINES(NVM_LINES), .TECH(TECH_MLC_PCM)
  ) u_arr (
    .clk, .rst_n,
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .stat_clr(m_stat_clr), .energy(m_energy_pj), .cell_writes(m_cell_writes),
    .state_writes(m_state_writes)
  );

  // ================= TFNW codec =================
  tfnw_codec #(.N_CELLS(TFNW_CELLS)) u_tfnw (
    .clk, .rst_n,
    .enc_valid(t_enc_valid), .enc_new(t_enc_new), .enc_old(t_enc_old),
    .enc_out_valid(t_enc_out_valid), .enc_word(t_enc_word), .enc_energy(t_enc_energy),
    .dec_valid(t_dec_valid), .dec_stored(t_dec_stored),
    .dec_out_valid(t_dec_out_valid), .dec_data(t_dec_data)
  );

  // ================= FVE line codec =================
  fve_line_codec #(
    .CELL_BITS(2), .FVL(F_FVL), .SLICES(FVE_SLICES), .K(FVE_K),
    .TAG_CELLS(FVE_TAGS), .WPL(FVE_WPL), .TECH(TECH_MLC_PCM)
  ) u_fve (
    .clk, .rst_n,
    .ld_valid(f_ld_valid), .ld_dict(f_ld_dict), .ld_value(f_ld_value), .ld_code(f_ld_code),
    .enc_in_valid(f_enc_in_valid), .enc_in_ready(f_enc_in_ready),
    .new_line(f_new_line), .old_line(f_old_line),
    .enc_out_valid(f_enc_out_valid), .enc_line(f_enc_line), .enc_energy(f_enc_energy),
    .dec_in_valid(f_dec_in_valid), .dec_in_ready(f_dec_in_ready),
    .stored_line(f_stored_line), .dec_out_valid(f_dec_out_valid), .dec_line(f_dec_line)
  );

  // ================= L3EP controller =================
  l3ep_controller #(.DEGREE(L3EP_DEGREE), .EPS_KOHM(L3EP_EPS_KOHM)) u_l3ep (
    .clk, .rst_n,
    .start(l_start), .target(l_target), .busy(l_busy), .done(l_done),
    .converged(l_converged), .n_amorph(l_n_amorph), .n_cryst(l_n_cryst),
    .op_cycles(l_op_cycles),
    .sense_req(l_sense_req), .sense_valid(l_sense_valid), .sense_kohm(l_sense_kohm),
    .pulse_valid(l_pulse_valid), .pulse_kind(l_pulse_kind), .pulse_mv(l_pulse_mv),
    .pulse_width(l_pulse_width)
  );

endmodule
