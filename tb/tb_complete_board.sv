// tb_complete_board: end-to-end test of the complete system at its default
// parameters (11 trees of 512 words, 32768-bit pin memories, TCK = clk/5).
//
// A random forest, a random transition table and a random JTAG session of
// instruction scans, data scans, idle cycles, pauses, TMS resets, TRST pulses
// and long shifts are generated; the session is loaded into the pin memories
// and replayed with the host handshake (reset -> got_reset, start, out,
// finish). An independent model (tb_system_pkg) predicts every prediction,
// the alert, the alert count and the number of LUT removals and insertions.
// A second, shorter session is then run after a reset to exercise the return
// from FINAL and the learned table. Every mechanism must occur at least once.
module tb_complete_board;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;
  import tb_system_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, finish, out, got_reset, alert;
  logic [31:0] alert_count;
  logic        stim_we, stim_tdi, stim_tms, stim_trst_n;
  logic [14:0] stim_waddr, last_addr;
  logic        tree_we;
  logic [3:0]  tree_sel;
  logic [8:0]  tree_waddr;
  logic [39:0] tree_wdata;
  logic        lut_cfg_we;
  logic [7:0]  lut_cfg_addr;
  logic [31:0] lut_cfg_wdata;
  logic        tdo, pred_done, pred, remove_req, insert_req;

  complete_board dut (.*);

  int checks = 0, failures = 0;
  int n_pred = 0, n_ill = 0, n_norm = 0, n_rm = 0, n_ins = 0, n_aset = 0, n_aclr = 0;
  int n_tdo = 0, tot_rm = 0, tot_ins = 0;
  bit monitor_on = 0;
  system_model sm;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitor: every prediction against the model, and event counts
  logic pd_q = 0, rm_q = 0, ins_q = 0, al_q = 0;
  always @(posedge clk) begin
    pd_q <= pred_done; rm_q <= remove_req; ins_q <= insert_req; al_q <= alert;
    if (monitor_on && !rst) begin
      if (tdo) n_tdo++;
      if (remove_req && !rm_q) n_rm++;
      if (insert_req && !ins_q) n_ins++;
      if (alert && !al_q) n_aset++;
      if (!alert && al_q) n_aclr++;
      if (pred_done && !pd_q) begin
        checks++;
        if (n_pred >= sm.preds.size()) begin
          failures++;
          $display("FAIL: extra prediction %0d", n_pred);
        end else if (pred !== sm.preds[n_pred]) begin
          failures++;
          $display("FAIL: prediction %0d is %0b, expected %0b (features %h)", n_pred, pred,
                   sm.preds[n_pred], sm.feats[n_pred]);
        end
        if (pred) n_ill++; else n_norm++;
        n_pred++;
      end
    end
  end

  task automatic run_session(jtag_session s, int first_pred);
    int n = s.tms.size();
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      stim_we = 1; stim_waddr = 15'(a);
      stim_tdi = s.tdi[a]; stim_tms = s.tms[a]; stim_trst_n = s.trst_n[a];
    end
    @(negedge clk);
    stim_we = 0; last_addr = 15'(n - 1);
    // reset handshake, then let Test-Logic-Reset saturate its counter
    rst = 1;
    @(negedge clk) rst = 0;
    check(got_reset && !out, "got_reset after reset");
    repeat (5 * 300) @(negedge clk);
    n_pred = first_pred;
    monitor_on = 1;
    start = 1;
    @(negedge clk) start = 0;
    check(!got_reset, "got_reset cleared by start");
    while (!out) @(negedge clk);
    repeat (100) @(negedge clk);
    monitor_on = 0;
    finish = 1;
    @(negedge clk) finish = 0;
    check(!out, "finish clears out");
    check(n_pred == sm.preds.size(), $sformatf("%0d predictions, expected %0d", n_pred, sm.preds.size()));
    check(alert == sm.alert, "final alert");
    check(alert_count == 32'(sm.alert_count), $sformatf("alert count %0d expected %0d", alert_count, sm.alert_count));
  endtask

  initial begin
    forest_model fm;
    jtag_session s1, s2;
    rst = 1; start = 0; finish = 0; stim_we = 0; stim_waddr = 0; stim_tdi = 0;
    stim_tms = 0; stim_trst_n = 1; last_addr = 0; tree_we = 0; tree_sel = 0;
    tree_waddr = 0; tree_wdata = 0; lut_cfg_we = 0; lut_cfg_addr = 0; lut_cfg_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    fm = new(11, 9);
    fm.build();
    sm = new(fm);
    for (int t = 0; t < 11; t++)
      for (int a = 0; a < 512; a++) begin
        @(negedge clk);
        tree_we = 1; tree_sel = 4'(t); tree_waddr = 9'(a); tree_wdata = fm.mem[t][a];
      end
    @(negedge clk) tree_we = 0;
    for (int a = 0; a < 256; a++) begin
      bit [31:0] w;
      case ($urandom_range(3))
        0: w = 32'hFFFF_FFFF;
        1: w = {8'($urandom_range(15)), 8'($urandom_range(15)), 8'($urandom_range(15)), 8'h00};
        default: w = {8'($urandom_range(1, 15)), 8'($urandom_range(1, 15)),
                      8'($urandom_range(1, 15)), 8'($urandom_range(1, 15))};
      endcase
      sm.lut[a] = w;
      @(negedge clk);
      lut_cfg_we = 1; lut_cfg_addr = 8'(a); lut_cfg_wdata = w;
    end
    @(negedge clk) lut_cfg_we = 0;

    s1 = new();
    s1.build(150);
    sm.run(s1, 255);
    $display("session 1: %0d TCK, %0d predictions", s1.tms.size(), sm.preds.size());
    run_session(s1, 0);
    tot_rm += n_rm; tot_ins += n_ins;
    check(n_rm == sm.n_remove && n_ins == sm.n_insert,
          $sformatf("LUT removals %0d/%0d insertions %0d/%0d", n_rm, sm.n_remove, n_ins, sm.n_insert));

    // second session on the adapted table
    s2 = new();
    s2.build(40);
    sm.preds.delete(); sm.feats.delete();
    sm.n_remove = 0; sm.n_insert = 0;
    n_rm = 0; n_ins = 0;
    sm.run(s2, 255);
    run_session(s2, 0);
    check(n_rm == sm.n_remove && n_ins == sm.n_insert,
          $sformatf("LUT removals %0d/%0d insertions %0d/%0d", n_rm, sm.n_remove, n_ins, sm.n_insert));
    tot_rm += n_rm; tot_ins += n_ins;

    // every mechanism must have happened
    check(n_ill > 0 && n_norm > 0, $sformatf("both classes (%0d/%0d)", n_ill, n_norm));
    check(n_aset > 0 && n_aclr > 0, $sformatf("alert raised %0d cleared %0d", n_aset, n_aclr));
    check(tot_rm > 0 && tot_ins > 0, $sformatf("LUT removals %0d, insertions %0d", tot_rm, tot_ins));
    check(sm.n_undef > 0 && sm.n_miss > 0 && sm.n_hit > 0,
          $sformatf("undefined %0d miss %0d hit %0d", sm.n_undef, sm.n_miss, sm.n_hit));
    check(sm.n_sat > 0, "saturated counter");
    check(s1.n_trst > 0 && s1.n_tms_reset > 0 && s1.n_pause > 0, "TRST, TMS reset and IR pause");
    check(n_tdo > 0, "TDO activity");
    $display("predictions: %0d illegitimate, %0d normal; alert set %0d cleared %0d",
             n_ill, n_norm, n_aset, n_aclr);
    $display("undefined %0d, miss %0d, hit %0d, saturated %0d, TRST %0d, TMS resets %0d, pauses %0d",
             sm.n_undef, sm.n_miss, sm.n_hit, sm.n_sat, s1.n_trst, s1.n_tms_reset, s1.n_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
