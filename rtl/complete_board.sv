// complete_board: top level of the JTAG intrusion-detection system.
//
// A recorded JTAG session (TDI, TMS and TRST bit streams, one memory each) is
// replayed by the global control FSM into an IEEE 1149.1 TAP controller; the
// detection system watches the TAP and classifies every instruction loaded
// into the instruction register with an 11-tree random forest, raising an
// alert after a group of four mostly illegitimate predictions and adapting
// its table of legal instruction transitions. The host-side handshake
// (reset -> got_reset, start, out, finish) and the alert/alert-counter
// results follow the document.
//
// This design runs everything on one clock: the TAP advances once every
// TCK_DIV cycles through a clock enable, reproducing the document's 30 MHz
// JTAG / 150 MHz detection clock pair with TCK_DIV = 5. The bus interface of
// the host processor is not part of this module; its registers map onto the
// plain ports below. Load the pin memories (stim_*), the forest (tree_*) and
// the transition table (lut_cfg_*) while the FSM is idle and reset is low,
// then pulse start; out rises after the last bit at address last_addr.
module complete_board
  import jtag_sec_pkg::*;
#(
  parameter int unsigned TCK_DIV    = 5,
  parameter int unsigned STIM_DEPTH = 32768,
  parameter int unsigned NT         = N_TREES,
  parameter int unsigned DEPTH      = TREE_DEPTH,
  parameter int unsigned CNT_W      = 32,
  localparam int unsigned SAW       = $clog2(STIM_DEPTH),
  localparam int unsigned TAW       = $clog2(DEPTH),
  localparam int unsigned SELW      = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // host handshake
  input  logic              start,
  input  logic              finish,
  output logic              out,
  output logic              got_reset,
  output logic              alert,
  output logic [CNT_W-1:0]  alert_count,
  // instruction-set memories
  input  logic              stim_we,
  input  logic [SAW-1:0]    stim_waddr,
  input  logic              stim_tdi,
  input  logic              stim_tms,
  input  logic              stim_trst_n,
  input  logic [SAW-1:0]    last_addr,
  // forest and transition table loading
  input  logic              tree_we,
  input  logic [SELW-1:0]   tree_sel,
  input  logic [TAW-1:0]    tree_waddr,
  input  logic [NODE_W-1:0] tree_wdata,
  input  logic              lut_cfg_we,
  input  logic [IR_W-1:0]   lut_cfg_addr,
  input  logic [31:0]       lut_cfg_wdata,
  // observation
  output logic              tdo,
  output logic              pred_done,
  output logic              pred,
  output logic              remove_req,
  output logic              insert_req
);
  logic            tck_en, reading;
  logic [SAW-1:0]  mem_addr;
  logic            m_tdi, m_tms, m_trst_n;
  logic            j_tdi, j_tms, j_trst_n;
  tap_state_e      tap_state;
  logic [IR_W-1:0] instr, next_instr;
  logic            update_ir, shift_dr, pred_start;
  features_t       feat;

  global_ctrl #(.TCK_DIV(TCK_DIV), .AW(SAW)) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .start      (start),
    .finish     (finish),
    .last_addr  (last_addr),
    .tck_en     (tck_en),
    .mem_addr   (mem_addr),
    .mem_tdi    (m_tdi),
    .mem_tms    (m_tms),
    .mem_trst_n (m_trst_n),
    .jtag_tdi   (j_tdi),
    .jtag_tms   (j_tms),
    .jtag_trst_n(j_trst_n),
    .reading    (reading),
    .out        (out),
    .got_reset  (got_reset)
  );

  stim_mem #(.DEPTH(STIM_DEPTH)) u_tdi_mem (
    .clk(clk), .we(stim_we), .waddr(stim_waddr), .wdata(stim_tdi),
    .raddr(mem_addr), .rdata(m_tdi));
  stim_mem #(.DEPTH(STIM_DEPTH)) u_tms_mem (
    .clk(clk), .we(stim_we), .waddr(stim_waddr), .wdata(stim_tms),
    .raddr(mem_addr), .rdata(m_tms));
  stim_mem #(.DEPTH(STIM_DEPTH)) u_trst_mem (
    .clk(clk), .we(stim_we), .waddr(stim_waddr), .wdata(stim_trst_n),
    .raddr(mem_addr), .rdata(m_trst_n));

  jtag_tap u_tap (
    .clk       (clk),
    .rst       (rst),
    .tck_en    (tck_en),
    .trst_n    (j_trst_n),
    .tms       (j_tms),
    .tdi       (j_tdi),
    .tdo       (tdo),
    .state     (tap_state),
    .instr     (instr),
    .next_instr(next_instr),
    .update_ir (update_ir),
    .shift_dr  (shift_dr)
  );

  detection_system #(.NT(NT), .DEPTH(DEPTH), .CNT_W(CNT_W)) u_det (
    .clk          (clk),
    .rst          (rst),
    .tck_en       (tck_en),
    .tms          (j_tms),
    .instr        (instr),
    .next_instr   (next_instr),
    .tap_state    (tap_state),
    .update_ir    (update_ir),
    .shift_dr     (shift_dr),
    .tree_we      (tree_we),
    .tree_sel     (tree_sel),
    .tree_waddr   (tree_waddr),
    .tree_wdata   (tree_wdata),
    .lut_cfg_we   (lut_cfg_we),
    .lut_cfg_addr (lut_cfg_addr),
    .lut_cfg_wdata(lut_cfg_wdata),
    .alert        (alert),
    .alert_count  (alert_count),
    .pred_start   (pred_start),
    .pred_done    (pred_done),
    .pred         (pred),
    .feat         (feat),
    .remove_req   (remove_req),
    .insert_req   (insert_req)
  );

  logic unused;
  assign unused = reading ^ pred_start ^ (^feat);
endmodule
