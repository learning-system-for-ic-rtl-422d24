// tb_detection_system: self-checking test of the detector without the TAP.
// A random JTAG session is run through the reference model, whose per-TCK
// trace of TAP state, instruction register and instruction shift register is
// then driven on the detector's TAP inputs (TCK = 5 system clocks). Each
// prediction start is checked against the model's feature vector, each
// completed prediction against the model's forest vote, and the alert, the
// alert count and the number of LUT removals/insertions at the end. The
// latency from Update-IR to the adapted LUT write stays within one TCK
// window, which the test also checks by counting the clocks to each done.
module tb_detection_system;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;
  import tb_system_pkg::*;

  localparam int DIV = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, tck_en, tms, update_ir, shift_dr;
  logic [7:0]  instr, next_instr;
  tap_state_e  tap_state;
  logic        tree_we;
  logic [3:0]  tree_sel;
  logic [8:0]  tree_waddr;
  logic [39:0] tree_wdata;
  logic        lut_cfg_we;
  logic [7:0]  lut_cfg_addr;
  logic [31:0] lut_cfg_wdata;
  logic        alert, pred_start, pred_done, pred, remove_req, insert_req;
  logic [31:0] alert_count;
  features_t   feat;

  detection_system dut (.*);

  int checks = 0, failures = 0;
  int n_start = 0, n_done = 0, n_rm = 0, n_ins = 0, max_lat = 0, lat = 0;
  system_model sm;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pd_q = 0, rm_q = 0, ins_q = 0;
  always @(posedge clk) begin
    pd_q <= pred_done; rm_q <= remove_req; ins_q <= insert_req;
    lat <= pred_start ? 1 : lat + 1;
    if (remove_req && !rm_q) n_rm++;
    if (insert_req && !ins_q) n_ins++;
    if (pred_start) begin
      checks++;
      if (n_start >= sm.feats.size() || feat !== features_t'(sm.feats[n_start])) begin
        failures++;
        $display("FAIL: features %0d = %h", n_start, feat);
      end
      n_start++;
    end
    if (pred_done && !pd_q) begin
      checks++;
      if (lat > max_lat) max_lat = lat;
      if (n_done >= sm.preds.size() || pred !== sm.preds[n_done]) begin
        failures++;
        $display("FAIL: prediction %0d = %0b", n_done, pred);
      end
      n_done++;
    end
  end

  task automatic period(input int st, input logic [7:0] ir, input logic [7:0] sr, input logic m);
    @(negedge clk);
    tap_state = tap_state_e'(st); instr = ir; next_instr = sr; tms = m;
    update_ir = (st == 15); shift_dr = (st == 4);
    repeat (DIV - 2) @(negedge clk);
    tck_en = 1;
    @(negedge clk) tck_en = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    forest_model fm;
    jtag_session s;
    rst = 1; tck_en = 0; tms = 1; update_ir = 0; shift_dr = 0; instr = 8'hFF;
    next_instr = 0; tap_state = TAP_TLR; tree_we = 0; tree_sel = 0; tree_waddr = 0;
    tree_wdata = 0; lut_cfg_we = 0; lut_cfg_addr = 0; lut_cfg_wdata = 0;
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
      w = ($urandom_range(3) == 0) ? 32'hFFFF_FFFF :
          {8'($urandom_range(15)), 8'($urandom_range(15)), 8'($urandom_range(15)), 8'h00};
      sm.lut[a] = w;
      @(negedge clk);
      lut_cfg_we = 1; lut_cfg_addr = 8'(a); lut_cfg_wdata = w;
    end
    @(negedge clk) lut_cfg_we = 0;
    s = new();
    s.build(120);
    sm.run(s, 255);
    // saturate the Test-Logic-Reset counter first, as the model assumes
    for (int p = 0; p < 300; p++) period(0, 8'hFF, 8'h00, 1'b1);
    for (int p = 0; p < s.tms.size(); p++)
      period(sm.st_tr[p], sm.ir_tr[p], sm.sr_tr[p], s.tms[p]);
    repeat (100) @(negedge clk);
    check(n_start == sm.feats.size(), $sformatf("%0d prediction starts, expected %0d", n_start, sm.feats.size()));
    check(n_done == sm.preds.size(), $sformatf("%0d predictions, expected %0d", n_done, sm.preds.size()));
    check(alert == sm.alert, "final alert");
    check(alert_count == 32'(sm.alert_count), "alert count");
    check(n_rm == sm.n_remove && n_ins == sm.n_insert,
          $sformatf("removals %0d/%0d insertions %0d/%0d", n_rm, sm.n_remove, n_ins, sm.n_insert));
    check(n_rm > 0 && n_ins > 0 && sm.n_alert_set > 0, "removal, insertion and alert all seen");
    // a prediction must finish well inside the shortest Update-IR spacing (13 TCK)
    check(max_lat + 4 < 13 * DIV, $sformatf("worst prediction latency %0d clocks", max_lat));
    $display("worst prediction latency %0d clocks; removals %0d insertions %0d", max_lat, n_rm, n_ins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
