// decision_tree: universal-node evaluator of one decision tree.
//
// A single programmable node walks the tree held in an external tree_mem,
// from the root (address 0) down to a leaf, one node at a time. Two small
// state machines do the work, as in the document: an IDLE/ACTIVE machine and
// a two-phase read machine that always fetches two words per node (the node
// word, then the following word, which holds the candidate values when the
// node is categorical).
//   * Numerical node (features 3..6): go left when feature < threshold.
//   * Categorical node (features 1, 2, 7, 8): go left when the feature's four
//     LSBs equal one of the candidate values whose bit is set in the threshold
//     field (bit k enables value k); otherwise go right.
//   * Leaf (label[1] = 1): label[0] is the tree's prediction.
// The node layout and the comparison rules follow the document. This design's
// own choices: the root is at address 0, the node type is taken from the
// feature index, and son addresses use the low 9 of their 12 bits.
//
// Interface: 'start' (one-cycle pulse) begins a classification of 'feat' and
// may restart one in progress; 'done' is cleared by start and set, together
// with 'pred', when the leaf is reached, then held until the next start.
// Timing: a path of N nodes (leaf included) takes 2N cycles, i.e. 'done' is
// high 2N clock edges after the edge that sampled 'start'.
module decision_tree
  import jtag_sec_pkg::*;
#(
  parameter int unsigned AW = 9
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  features_t        feat,
  output logic [AW-1:0]    mem_addr,
  input  logic [NODE_W-1:0] mem_rdata,
  output logic             done,
  output logic             pred
);
  typedef enum logic {ST_IDLE, ST_ACTIVE} run_e;
  typedef enum logic {RD_LINE1, RD_LINE2} rd_e;

  run_e        run_q;
  rd_e         rd_q;
  logic [AW-1:0] node_q;
  node_line1_t line1_q;      // current_numerical/categorical_data
  node_line2_t cand;         // current_categorical_candidates
  logic [7:0]  node_feat;    // current_node_feature
  logic        go_left;

  assign mem_addr = (rd_q == RD_LINE2) ? AW'(node_q + 1'b1) : node_q;
  assign cand     = node_line2_t'(mem_rdata);

  always_comb begin
    node_feat = select_feature(feat, line1_q.feat_idx);
    go_left   = 1'b0;
    if (is_categorical(line1_q.feat_idx)) begin
      for (int k = 0; k < 8; k++)
        if (line1_q.threshold[k] && (cand.value[k] == node_feat[3:0])) go_left = 1'b1;
    end else begin
      go_left = node_feat < line1_q.threshold;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q   <= ST_IDLE;
      rd_q    <= RD_LINE1;
      node_q  <= '0;
      line1_q <= '0;
      done    <= 1'b0;
      pred    <= 1'b0;
    end else if (start) begin
      run_q  <= ST_ACTIVE;
      rd_q   <= RD_LINE1;
      node_q <= '0;
      done   <= 1'b0;
    end else if (run_q == ST_ACTIVE) begin
      if (rd_q == RD_LINE1) begin
        line1_q <= node_line1_t'(mem_rdata);
        rd_q    <= RD_LINE2;
      end else begin
        rd_q <= RD_LINE1;
        if (line1_q.is_leaf) begin
          done  <= 1'b1;
          pred  <= line1_q.pred;
          run_q <= ST_IDLE;
        end else begin
          node_q <= go_left ? line1_q.left[AW-1:0] : line1_q.right[AW-1:0];
        end
      end
    end
  end
endmodule
