// rf_classifier: parallel random-forest classifier (on-chip classifier).
//
// N_TREES universal-node decision trees run side by side, each with its own
// 512 x 40-bit tree memory, so all trees classify the same feature vector at
// once. A three-state control FSM (INITIAL, TREES, FINAL) starts them on
// 'start', collects every tree's prediction and completion flag (vectors
// 'class_v' and 'done_v'), and, once all trees are done, the majority vote
// sets the final class: illegitimate (1) when the number of trees voting 1 is
// greater than N_TREES/2 (integer division). This structure and the 11-tree
// forest follow the document; the tree-memory load port (tree_we/tree_sel/
// tree_waddr/tree_wdata) is this design's way of loading a trained forest.
//
// Interface: 'start' is a one-cycle pulse, 'feat' must be stable from it
// until 'done'. 'done' is cleared by 'start' and set together with 'pred';
// it stays high until the next start. 'votes' is the number of trees that
// voted 1 in the last classification.
// Timing: with Nmax the longest root-to-leaf path (in nodes) taken by any
// tree, 'done' rises 2*Nmax + 2 clock edges after the edge sampling 'start'.
module rf_classifier
  import jtag_sec_pkg::*;
#(
  parameter int unsigned NT     = N_TREES,
  parameter int unsigned DEPTH  = TREE_DEPTH,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned SELW  = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  features_t         feat,
  output logic              done,
  output logic              pred,
  output logic [SELW:0]     votes,
  // tree-memory load port
  input  logic              tree_we,
  input  logic [SELW-1:0]   tree_sel,
  input  logic [AW-1:0]     tree_waddr,
  input  logic [NODE_W-1:0] tree_wdata
);
  typedef enum logic [1:0] {ST_INITIAL, ST_TREES, ST_FINAL} ctrl_e;
  ctrl_e state_q;

  logic [NT-1:0]     t_done, t_pred;
  logic [NT-1:0]     done_v, class_v;
  logic [SELW:0]     sum;

  for (genvar t = 0; t < NT; t++) begin : g_tree
    logic [AW-1:0]     raddr;
    logic [NODE_W-1:0] rdata;

    tree_mem #(.DEPTH(DEPTH), .WIDTH(NODE_W)) u_mem (
      .clk  (clk),
      .we   (tree_we && (tree_sel == SELW'(t))),
      .waddr(tree_waddr),
      .wdata(tree_wdata),
      .raddr(raddr),
      .rdata(rdata)
    );

    decision_tree #(.AW(AW)) u_tree (
      .clk      (clk),
      .rst      (rst),
      .start    (start),
      .feat     (feat),
      .mem_addr (raddr),
      .mem_rdata(rdata),
      .done     (t_done[t]),
      .pred     (t_pred[t])
    );
  end

  // class/done vectors: a tree's entry is valid once its done flag is set
  assign done_v  = t_done;
  assign class_v = t_pred & t_done;

  always_comb begin
    sum = '0;
    for (int t = 0; t < NT; t++) sum += (SELW+1)'(class_v[t]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= ST_INITIAL;
      done    <= 1'b0;
      pred    <= 1'b0;
      votes   <= '0;
    end else begin
      if (start) done <= 1'b0;
      unique case (state_q)
        ST_INITIAL: if (start) state_q <= ST_TREES;
        ST_TREES: begin
          if (start)          state_q <= ST_TREES;  // restart
          else if (&done_v)   state_q <= ST_FINAL;
        end
        ST_FINAL: begin
          // majority vote unit
          done    <= 1'b1;
          pred    <= (sum > (SELW+1)'(NT / 2));
          votes   <= sum;
          state_q <= start ? ST_TREES : ST_INITIAL;
          if (start) done <= 1'b0;
        end
        default: state_q <= ST_INITIAL;
      endcase
    end
  end
endmodule
