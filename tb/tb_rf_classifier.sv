// tb_rf_classifier: self-checking test of the 11-tree parallel random forest.
// A random forest is generated and loaded through the tree load port. For
// random feature vectors the final class and the number of trees voting 1
// are compared with a software majority vote, and the latency with
// 2*Nmax + 2 cycles (Nmax = longest path taken by any tree). Vectors are
// also classified back to back, restarting during a classification once.
module tb_rf_classifier;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;

  localparam int NT = 11;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, done, pred;
  features_t   feat;
  logic [4:0]  votes;
  logic        tree_we;
  logic [3:0]  tree_sel;
  logic [8:0]  tree_waddr;
  logic [39:0] tree_wdata;
  int checks = 0, failures = 0;
  int n_ill = 0, n_norm = 0;

  rf_classifier dut (.clk, .rst, .start, .feat, .done, .pred, .votes,
                     .tree_we, .tree_sel, .tree_waddr, .tree_wdata);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic classify(input bit [41:0] f, output int unsigned cyc);
    @(negedge clk);
    feat = features_t'(f);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    while (!done && cyc < 5000) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    forest_model fm;
    bit [41:0]   f;
    bit          exp_pred;
    int unsigned exp_votes, maxn, cyc;
    rst = 1; start = 0; tree_we = 0; tree_sel = 0; tree_waddr = 0; tree_wdata = 0; feat = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int trial = 0; trial < 3; trial++) begin
      fm = new(NT, 11);
      fm.build();
      for (int t = 0; t < NT; t++)
        for (int a = 0; a < 512; a++) begin
          @(negedge clk);
          tree_we = 1; tree_sel = 4'(t); tree_waddr = 9'(a); tree_wdata = fm.mem[t][a];
        end
      @(negedge clk) tree_we = 0;
      for (int i = 0; i < 200; i++) begin
        f = forest_model::rand_features();
        exp_pred = fm.eval_forest(f, exp_votes, maxn);
        classify(f, cyc);
        if (exp_pred) n_ill++; else n_norm++;
        checks++;
        if (pred !== exp_pred || votes !== 5'(exp_votes)) begin
          failures++;
          $display("vec %0d: pred %0b votes %0d, expected %0b / %0d", i, pred, votes, exp_pred, exp_votes);
        end
        checks++;
        if (cyc != 2 * maxn + 2) begin
          failures++;
          $display("vec %0d: latency %0d expected %0d", i, cyc, 2 * maxn + 2);
        end
      end
      // restart while busy: the second vector's result must be reported
      f = forest_model::rand_features();
      @(negedge clk);
      feat = features_t'(forest_model::rand_features());
      start = 1;
      @(negedge clk);
      start = 0;
      repeat (3) @(negedge clk);
      exp_pred = fm.eval_forest(f, exp_votes, maxn);
      classify(f, cyc);
      checks++;
      if (pred !== exp_pred || votes !== 5'(exp_votes) || cyc != 2 * maxn + 2) begin
        failures++;
        $display("restart: pred %0b votes %0d cyc %0d", pred, votes, cyc);
      end
    end
    checks++;
    if (n_ill == 0 || n_norm == 0) begin
      failures++;
      $display("only one class seen: %0d illegitimate, %0d normal", n_ill, n_norm);
    end
    $display("classified %0d illegitimate, %0d normal", n_ill, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
