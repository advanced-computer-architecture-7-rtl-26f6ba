// aca_top: the register renaming hardware and the four branch direction
// predictors, side by side.
//
// The six parts are independent and share only the clock and the reset:
//   * pl_*  : a six-stage in-order RV32I pipeline (IF, ID, RN, EX, MA, WB)
//             whose RN stage renames every instruction with a one-way rename
//             unit and reads a 128-entry physical register file;
//   * rn_*  : a WAYS-way rename stage (map table 32 x 7 bits, free tag buffer
//             of 128 tags) that renames a group of instructions per cycle
//             and stalls when the free tag buffer runs short;
//   * gs_*  : a gshare predictor (global history XOR PC into 2-bit counters);
//   * pc_*  : a perceptron predictor (28-bit history, 8-bit weights);
//   * pcr_* : a prophet/critic hybrid (perceptron prophet, tagged gshare
//             critic with 4 future bits, 12-entry fetch target queue);
//   * pm_*  : a pattern-matching predictor (majority vote over the bits that
//             followed earlier copies of the newest history bits).
// All ports are plain signals or unpacked arrays; see the modules for the
// timing of each part. The default 2-way width is the widest organisation
// worked out in full in the reference description. That the parts stand
// side by side is this design's choice; the reference treats them as
// separate topics.
module aca_top #(
  parameter int unsigned WAYS = 2,
  localparam int unsigned LOG_W  = rename_pkg::LOG_W,
  localparam int unsigned TAG_W  = rename_pkg::TAG_W,
  localparam int unsigned CNT_W  = $clog2(rename_pkg::NUM_PHYS_REGS + 1),
  localparam int unsigned GS_BITS = 12,
  localparam int unsigned GS_HIST = 12,
  localparam int unsigned PC_HIST = 28,
  localparam int unsigned PC_YW   = 8 + $clog2(PC_HIST + 1) + 1,
  localparam int unsigned PCR_BOR = 8 + 4,
  localparam int unsigned PM_H    = 64,
  localparam int unsigned PM_LW   = $clog2(PM_H + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // rename stage
  input  logic             rn_in_valid   [WAYS],
  input  logic             rn_in_has_dst [WAYS],
  input  logic [LOG_W-1:0] rn_in_dst     [WAYS],
  input  logic [LOG_W-1:0] rn_in_src1    [WAYS],
  input  logic [LOG_W-1:0] rn_in_src2    [WAYS],
  output logic             rn_in_ready,
  input  logic             rn_in_hold,
  output logic             rn_out_valid        [WAYS],
  output logic             rn_out_dst_en       [WAYS],
  output logic [TAG_W-1:0] rn_out_dst_tag      [WAYS],
  output logic [TAG_W-1:0] rn_out_src1_tag     [WAYS],
  output logic             rn_out_src1_renamed [WAYS],
  output logic [TAG_W-1:0] rn_out_src2_tag     [WAYS],
  output logic             rn_out_src2_renamed [WAYS],
  input  logic             rn_free_valid [WAYS],
  input  logic [TAG_W-1:0] rn_free_tag   [WAYS],
  input  logic             rn_clr_valid  [WAYS],
  input  logic [LOG_W-1:0] rn_clr_log    [WAYS],
  input  logic [TAG_W-1:0] rn_clr_tag    [WAYS],
  output logic [CNT_W-1:0] rn_free_count,
  // gshare predictor
  input  logic [31:0]        gs_pred_pc,
  output logic               gs_pred_taken,
  output logic [GS_BITS-1:0] gs_pred_idx,
  input  logic               gs_hist_valid,
  input  logic               gs_hist_taken,
  output logic [GS_HIST-1:0] gs_bhr,
  input  logic               gs_upd_valid,
  input  logic [GS_BITS-1:0] gs_upd_idx,
  input  logic               gs_upd_taken,
  output logic               gs_ready,
  // perceptron predictor
  input  logic [31:0]              pc_pred_pc,
  output logic                     pc_pred_taken,
  output logic signed [PC_YW-1:0]  pc_pred_y,
  input  logic                     pc_hist_valid,
  input  logic                     pc_hist_taken,
  output logic [PC_HIST-1:0]       pc_ghist,
  input  logic                     pc_upd_valid,
  input  logic [31:0]              pc_upd_pc,
  input  logic [PC_HIST-1:0]       pc_upd_hist,
  input  logic                     pc_upd_taken,
  output logic                     pc_upd_trained,
  // prophet/critic hybrid
  output logic                     pcr_ready,
  input  logic                     pcr_br_valid,
  input  logic [31:0]              pcr_br_pc,
  output logic                     pcr_br_ready,
  output logic [15:0]              pcr_br_id,
  output logic                     pcr_redirect_valid,
  output logic [15:0]              pcr_redirect_id,
  output logic                     pcr_override,
  output logic                     pcr_f_valid,
  input  logic                     pcr_f_ready,
  output logic [15:0]              pcr_f_id,
  output logic [31:0]              pcr_f_pc,
  output logic                     pcr_f_pred,
  output logic                     pcr_f_prophet_pred,
  output logic [PC_HIST-1:0]       pcr_f_phist,
  output logic [PCR_BOR-1:0]       pcr_f_bor,
  input  logic                     pcr_res_valid,
  input  logic [15:0]              pcr_res_id,
  input  logic [31:0]              pcr_res_pc,
  input  logic [PC_HIST-1:0]       pcr_res_phist,
  input  logic [PCR_BOR-1:0]       pcr_res_bor,
  input  logic                     pcr_res_prophet_pred,
  input  logic                     pcr_res_pred,
  input  logic                     pcr_res_taken,
  output logic                     pcr_mispredict,
  output logic [3:0]               pcr_ftq_count,
  // pattern-matching predictor
  input  logic                     pm_hist_valid,
  input  logic                     pm_hist_taken,
  output logic [PM_H-1:0]          pm_hist,
  output logic                     pm_pred_taken,
  output logic [PM_LW-1:0]         pm_pred_longest,
  output logic [PM_LW-1:0]         pm_pred_sel_len,
  output logic [PM_LW-1:0]         pm_pred_ones,
  output logic [PM_LW-1:0]         pm_pred_zeros,
  // six-stage RV32I pipeline with renaming
  input  logic                     pl_prog_we,
  input  logic [31:0]              pl_prog_addr,
  input  logic [31:0]              pl_prog_data,
  output logic                     pl_retire_valid,
  output logic [31:0]              pl_retire_pc,
  output logic                     pl_retire_dst_en,
  output logic [TAG_W-1:0]         pl_retire_dst_tag,
  output logic [31:0]              pl_retire_value,
  output logic                     pl_stall_load_use,
  output logic                     pl_stall_no_tag,
  output logic                     pl_redirect,
  output logic                     pl_fwd_ma,
  output logic                     pl_fwd_wb
);
  rename_unit #(.WAYS(WAYS)) u_rename (
    .clk, .rst_n,
    .in_valid(rn_in_valid), .in_has_dst(rn_in_has_dst), .in_dst(rn_in_dst),
    .in_src1(rn_in_src1), .in_src2(rn_in_src2), .in_ready(rn_in_ready), .in_hold(rn_in_hold),
    .now_dst_en(), .now_dst_tag(), .now_old_tag(), .now_src1_tag(), .now_src2_tag(),
    .out_valid(rn_out_valid), .out_dst_en(rn_out_dst_en), .out_dst_tag(rn_out_dst_tag),
    .out_src1_tag(rn_out_src1_tag), .out_src1_renamed(rn_out_src1_renamed),
    .out_src2_tag(rn_out_src2_tag), .out_src2_renamed(rn_out_src2_renamed),
    .free_valid(rn_free_valid), .free_tag(rn_free_tag),
    .clr_valid(rn_clr_valid), .clr_log(rn_clr_log), .clr_tag(rn_clr_tag),
    .free_count(rn_free_count)
  );

  gshare_predictor #(.PHT_BITS(GS_BITS), .HIST_LEN(GS_HIST)) u_gshare (
    .clk, .rst_n,
    .pred_pc(gs_pred_pc), .pred_taken(gs_pred_taken), .pred_idx(gs_pred_idx),
    .hist_valid(gs_hist_valid), .hist_taken(gs_hist_taken), .bhr(gs_bhr),
    .upd_valid(gs_upd_valid), .upd_idx(gs_upd_idx), .upd_taken(gs_upd_taken), .ready(gs_ready)
  );

  perceptron_predictor #(.HIST_LEN(PC_HIST)) u_perceptron (
    .clk, .rst_n,
    .pred_pc(pc_pred_pc), .pred_taken(pc_pred_taken), .pred_y(pc_pred_y),
    .hist_valid(pc_hist_valid), .hist_taken(pc_hist_taken), .ghist(pc_ghist),
    .hist_restore(1'b0), .hist_restore_value('0),
    .upd_valid(pc_upd_valid), .upd_pc(pc_upd_pc), .upd_hist(pc_upd_hist),
    .upd_taken(pc_upd_taken), .upd_trained(pc_upd_trained)
  );

  prophet_critic #(.HIST_LEN(PC_HIST)) u_prophet_critic (
    .clk, .rst_n, .ready(pcr_ready),
    .br_valid(pcr_br_valid), .br_pc(pcr_br_pc), .br_ready(pcr_br_ready), .br_id(pcr_br_id),
    .redirect_valid(pcr_redirect_valid), .redirect_id(pcr_redirect_id),
    .crit_override(pcr_override),
    .f_valid(pcr_f_valid), .f_ready(pcr_f_ready), .f_id(pcr_f_id), .f_pc(pcr_f_pc),
    .f_pred(pcr_f_pred), .f_prophet_pred(pcr_f_prophet_pred), .f_phist(pcr_f_phist),
    .f_bor(pcr_f_bor),
    .res_valid(pcr_res_valid), .res_id(pcr_res_id), .res_pc(pcr_res_pc),
    .res_phist(pcr_res_phist), .res_bor(pcr_res_bor), .res_prophet_pred(pcr_res_prophet_pred),
    .res_pred(pcr_res_pred), .res_taken(pcr_res_taken), .mispredict(pcr_mispredict),
    .ftq_count(pcr_ftq_count)
  );

  pattern_match_predictor #(.H(PM_H)) u_pattern_match (
    .clk, .rst_n,
    .hist_valid(pm_hist_valid), .hist_taken(pm_hist_taken), .hist(pm_hist),
    .pred_taken(pm_pred_taken), .pred_longest(pm_pred_longest), .pred_sel_len(pm_pred_sel_len),
    .pred_ones(pm_pred_ones), .pred_zeros(pm_pred_zeros)
  );

  rv_pipeline6 u_pipeline (
    .clk, .rst_n,
    .prog_we(pl_prog_we), .prog_addr(pl_prog_addr), .prog_data(pl_prog_data),
    .retire_valid(pl_retire_valid), .retire_pc(pl_retire_pc), .retire_dst_en(pl_retire_dst_en),
    .retire_dst_tag(pl_retire_dst_tag), .retire_value(pl_retire_value),
    .stall_load_use(pl_stall_load_use), .stall_no_tag(pl_stall_no_tag), .redirect(pl_redirect),
    .fwd_ma(pl_fwd_ma), .fwd_wb(pl_fwd_wb)
  );
endmodule
