// detection_system: the learning-based JTAG intrusion detector.
//
// Connects the four parts of the detector around one system clock:
//   data_collector  - extracts the eight features of each instruction from
//                     the TAP signals and starts a prediction on Update-IR,
//   rf_classifier   - 11-tree parallel random forest, majority vote,
//   transition_lut  - 256 x 32 table of legal instruction successors,
//   feature_adapt   - groups predictions by four, drives the alert and alert
//                     counter, and inserts/removes LUT transitions.
// The partitioning and the connections follow the document's system
// architecture. The tree and LUT configuration ports are this design's, for
// loading a trained forest and the chip's instruction transitions.
//
// Timing: a prediction starts two system clocks after update_ir rises
// (edge detection, then registered features) and the alert follows the
// classifier's done flag by one clock at the end of each group of four.
module detection_system
  import jtag_sec_pkg::*;
#(
  parameter int unsigned NT    = N_TREES,
  parameter int unsigned DEPTH = TREE_DEPTH,
  parameter int unsigned CNT_W = 32,
  localparam int unsigned TAW  = $clog2(DEPTH),
  localparam int unsigned SELW = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // from the TAP controller
  input  logic              tck_en,
  input  logic              tms,
  input  logic [IR_W-1:0]   instr,
  input  logic [IR_W-1:0]   next_instr,
  input  tap_state_e        tap_state,
  input  logic              update_ir,
  input  logic              shift_dr,
  // configuration
  input  logic              tree_we,
  input  logic [SELW-1:0]   tree_sel,
  input  logic [TAW-1:0]    tree_waddr,
  input  logic [NODE_W-1:0] tree_wdata,
  input  logic              lut_cfg_we,
  input  logic [IR_W-1:0]   lut_cfg_addr,
  input  logic [31:0]       lut_cfg_wdata,
  // results
  output logic              alert,
  output logic [CNT_W-1:0]  alert_count,
  output logic              pred_start,
  output logic              pred_done,
  output logic              pred,
  output features_t         feat,
  output logic              remove_req,
  output logic              insert_req
);
  logic [IR_W-1:0] dc_addr, fa_addr, cur_instr, nxt_instr;
  logic            dc_rd_en, fa_addr_vld, fa_rd_en, fa_wr_en;
  logic [31:0]     fa_wdata, lut_rdata;
  logic [SELW:0]   votes;

  data_collector u_dc (
    .clk       (clk),
    .rst       (rst),
    .tck_en    (tck_en),
    .tms       (tms),
    .instr     (instr),
    .next_instr(next_instr),
    .tap_state (tap_state),
    .update_ir (update_ir),
    .shift_dr  (shift_dr),
    .lut_addr  (dc_addr),
    .lut_rd_en (dc_rd_en),
    .lut_rdata (lut_rdata),
    .feat      (feat),
    .pred_start(pred_start),
    .cur_instr (cur_instr),
    .nxt_instr (nxt_instr)
  );

  transition_lut u_lut (
    .clk        (clk),
    .rst        (rst),
    .dc_addr    (dc_addr),
    .dc_rd_en   (dc_rd_en),
    .fa_addr    (fa_addr),
    .fa_addr_vld(fa_addr_vld),
    .fa_rd_en   (fa_rd_en),
    .fa_wr_en   (fa_wr_en),
    .fa_wdata   (fa_wdata),
    .cfg_we     (lut_cfg_we),
    .cfg_addr   (lut_cfg_addr),
    .cfg_wdata  (lut_cfg_wdata),
    .rdata      (lut_rdata)
  );

  rf_classifier #(.NT(NT), .DEPTH(DEPTH)) u_rf (
    .clk       (clk),
    .rst       (rst),
    .start     (pred_start),
    .feat      (feat),
    .done      (pred_done),
    .pred      (pred),
    .votes     (votes),
    .tree_we   (tree_we),
    .tree_sel  (tree_sel),
    .tree_waddr(tree_waddr),
    .tree_wdata(tree_wdata)
  );

  feature_adapt #(.CNT_W(CNT_W)) u_fa (
    .clk         (clk),
    .rst         (rst),
    .cur_instr   (cur_instr),
    .nxt_instr   (nxt_instr),
    .pred_done   (pred_done),
    .pred        (pred),
    .lut_addr    (fa_addr),
    .lut_addr_vld(fa_addr_vld),
    .lut_rd_en   (fa_rd_en),
    .lut_wr_en   (fa_wr_en),
    .lut_wdata   (fa_wdata),
    .lut_rdata   (lut_rdata),
    .alert       (alert),
    .alert_count (alert_count),
    .remove_req  (remove_req),
    .insert_req  (insert_req)
  );

  // the vote count is only an observation point of the classifier
  logic unused_votes;
  assign unused_votes = ^votes;
endmodule
