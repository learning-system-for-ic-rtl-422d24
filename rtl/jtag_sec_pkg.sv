// jtag_sec_pkg: types and constants shared by the JTAG intrusion-detection design.
//
// The detection system watches a JTAG test access port and classifies every
// instruction loaded into the instruction register as normal (0) or
// illegitimate (1) with a random forest. This package holds:
//   * the TAP controller state encoding (16 states of IEEE 1149.1),
//   * the 42-bit feature vector handed from the data collector to the forest,
//   * the 40-bit tree-memory word layout and the field positions inside it.
// The feature list, the 8-bit opcodes, the 512 x 40-bit tree memories and the
// word layout follow the document; the numeric state encoding is this design's.
package jtag_sec_pkg;

  // ---------------- JTAG ----------------
  localparam int unsigned IR_W = 8;  // opcode width (8-bit instructions)

  typedef enum logic [3:0] {
    TAP_TLR        = 4'h0,  // Test-Logic-Reset
    TAP_RTI        = 4'h1,  // Run-Test/Idle
    TAP_SEL_DR     = 4'h2,
    TAP_CAPTURE_DR = 4'h3,
    TAP_SHIFT_DR   = 4'h4,
    TAP_EXIT1_DR   = 4'h5,
    TAP_PAUSE_DR   = 4'h6,
    TAP_EXIT2_DR   = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SEL_IR     = 4'h9,
    TAP_CAPTURE_IR = 4'hA,
    TAP_SHIFT_IR   = 4'hB,
    TAP_EXIT1_IR   = 4'hC,
    TAP_PAUSE_IR   = 4'hD,
    TAP_EXIT2_IR   = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_e;

  localparam logic [IR_W-1:0] OPC_BYPASS = 8'hFF;  // all-ones opcode = BYPASS

  // ---------------- features ----------------
  // Features 1..8 of the document, 42 bits in all.
  typedef struct packed {
    logic [3:0] f1_opc_msb;   // 1: four MSBs of the instruction
    logic [3:0] f2_opc_lsb;   // 2: four LSBs of the instruction
    logic [7:0] f3_shift_dr;  // 3: Shift-DR cycles
    logic [7:0] f4_rti;       // 4: Run-Test/Idle cycles
    logic [7:0] f5_tlr;       // 5: Test-Logic-Reset cycles
    logic [7:0] f6_tms_tog;   // 6: TMS transitions
    logic       f7_undef;     // 7: instruction undefined (1 = undefined)
    logic       f8_miss;      // 8: transition miss (1 = miss)
  } features_t;

  // ---------------- random forest ----------------
  localparam int unsigned N_TREES    = 11;
  localparam int unsigned TREE_DEPTH = 512;  // words per tree
  localparam int unsigned TREE_AW    = 9;
  localparam int unsigned NODE_W     = 40;

  // First line of a node (Fig. "structure of positions of memory").
  typedef struct packed {
    logic [3:0]  feat_idx;   // [39:36] feature 1..8
    logic [1:0]  lbl_rsvd;   // [35:34] unused label bits
    logic        is_leaf;    // [33]    label[1]
    logic        pred;       // [32]    label[0]
    logic [7:0]  threshold;  // [31:24] threshold / valid-value mask
    logic [11:0] left;       // [23:12] left son address
    logic [11:0] right;      // [11:0]  right son address
  } node_line1_t;

  // Second line of a categorical node: eight 4-bit candidate values.
  typedef struct packed {
    logic [7:0]      empty;  // [39:32]
    logic [7:0][3:0] value;  // value[k] at [4k+3:4k]
  } node_line2_t;

  // Features 1, 2, 7 and 8 are categorical, the rest numerical.
  function automatic logic is_categorical(input logic [3:0] idx);
    return (idx == 4'd1) || (idx == 4'd2) || (idx == 4'd7) || (idx == 4'd8);
  endfunction

  // Feature selected by a 1-based feature index; 0 for indices outside 1..8.
  function automatic logic [7:0] select_feature(input features_t f, input logic [3:0] idx);
    case (idx)
      4'd1:    return {4'h0, f.f1_opc_msb};
      4'd2:    return {4'h0, f.f2_opc_lsb};
      4'd3:    return f.f3_shift_dr;
      4'd4:    return f.f4_rti;
      4'd5:    return f.f5_tlr;
      4'd6:    return f.f6_tms_tog;
      4'd7:    return {7'h0, f.f7_undef};
      4'd8:    return {7'h0, f.f8_miss};
      default: return 8'h00;
    endcase
  endfunction

endpackage
