// tb_decision_tree: self-checking test of the universal-node tree evaluator.
// Several random trees are generated by tb_forest_pkg and loaded into a
// tree_mem; for each tree, random feature vectors are classified and the
// prediction is compared with the software walk. The latency is checked too:
// done must rise exactly 2*N edges after start, N being the path length.
module tb_decision_tree;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, done, pred;
  features_t   feat;
  logic [8:0]  mem_addr, waddr;
  logic [39:0] rdata, wdata;
  logic        we;
  int checks = 0, failures = 0;

  tree_mem u_mem (.clk, .we, .waddr, .wdata, .raddr(mem_addr), .rdata);
  decision_tree dut (.clk, .rst, .start, .feat, .mem_addr, .mem_rdata(rdata), .done, .pred);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    forest_model fm;
    bit [41:0]   f;
    bit          exp_pred;
    int unsigned nodes, cyc, max_nodes;
    rst = 1; start = 0; we = 0; waddr = 0; wdata = 0; feat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    max_nodes = 0;
    for (int trial = 0; trial < 8; trial++) begin
      fm = new(1, 12);
      fm.build();
      for (int a = 0; a < 512; a++) begin
        @(negedge clk);
        we = 1; waddr = 9'(a); wdata = fm.mem[0][a];
      end
      @(negedge clk) we = 0;
      for (int i = 0; i < 150; i++) begin
        f = forest_model::rand_features();
        exp_pred = fm.eval_tree(0, f, nodes);
        if (nodes > max_nodes) max_nodes = nodes;
        @(negedge clk);
        feat = features_t'(f);
        start = 1;
        @(negedge clk);
        start = 0;
        cyc = 0;  // edges after the one that sampled start
        while (!done && cyc < 2000) begin
          @(negedge clk);
          cyc++;
        end
        checks++;
        if (pred !== exp_pred) begin
          failures++;
          $display("tree %0d vec %0d: pred %0b expected %0b", trial, i, pred, exp_pred);
        end
        checks++;
        if (cyc != 2 * nodes) begin
          failures++;
          $display("tree %0d vec %0d: latency %0d expected %0d", trial, i, cyc, 2 * nodes);
        end
      end
    end
    checks++;
    if (max_nodes < 4) begin
      failures++;
      $display("trees too shallow to exercise the walk");
    end
    $display("longest path %0d nodes", max_nodes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
