// tb_instruction_sets: the four evaluation sessions, sized as the published
// evaluation sets, run at three JTAG clock rates.
//
// The instruction sets themselves are not available, so each session is
// random but has the set's number of instructions and exactly its number of
// bits per pin: one boundary-scan instruction followed by one long data
// shift (24 924 bits), and 66, 89 and 129 instructions in 5 980, 5 770 and
// 6 813 bits. Three copies of the complete system are fed the same
// forest, table and sessions, with TCK_DIV = 12, 6 and 5, that is a JTAG
// clock of 12.5, 25 and 30 MHz next to a 150 MHz detector. For every copy
// and every set the testbench checks each prediction, the final alert and
// the alert count against the reference model, and the run time from start
// to out: it must be one TCK period per stored bit. The time in
// microseconds at 150 MHz is printed next to the published execution time,
// which also includes the host's reset handshake, so the simulated time must
// lie a little below it (within 10 %). The table adapts from set to set, as
// in a continuous run.
module tb_instruction_sets;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;
  import tb_system_pkg::*;

  localparam int NR = 3;
  localparam int DIVS [NR] = '{12, 6, 5};
  localparam int NS = 4;
  localparam int SET_INSTR [NS] = '{1, 66, 89, 129};
  localparam int SET_BITS  [NS] = '{24924, 5980, 5770, 6813};
  // published execution times in microseconds, per set and per JTAG clock
  localparam real PUB_US [NS][NR] = '{'{2003.0, 1006.0, 840.0}, '{488.0, 248.0, 209.0},
                                      '{471.0, 240.0, 202.0}, '{554.0, 282.0, 236.0}};

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, start, finish;
  logic        stim_we, stim_tdi, stim_tms, stim_trst_n;
  logic [14:0] stim_waddr, last_addr;
  logic        tree_we;
  logic [3:0]  tree_sel;
  logic [8:0]  tree_waddr;
  logic [39:0] tree_wdata;
  logic        lut_cfg_we;
  logic [7:0]  lut_cfg_addr;
  logic [31:0] lut_cfg_wdata;

  logic [NR-1:0] out, got_reset, alert, tdo, pred_done, pred, remove_req, insert_req;
  logic [31:0]   alert_count [NR];

  int checks = 0, failures = 0;
  int n_pred [NR];
  longint out_cycle [NR];
  longint cycle = 0;
  bit monitor_on = 0;
  system_model sm;

  always @(posedge clk) cycle <= cycle + 1;

  for (genvar i = 0; i < NR; i++) begin : g_sys
    complete_board #(.TCK_DIV(DIVS[i])) u_sys (
      .clk, .rst, .start, .finish,
      .out(out[i]), .got_reset(got_reset[i]), .alert(alert[i]), .alert_count(alert_count[i]),
      .stim_we, .stim_waddr, .stim_tdi, .stim_tms, .stim_trst_n, .last_addr,
      .tree_we, .tree_sel, .tree_waddr, .tree_wdata,
      .lut_cfg_we, .lut_cfg_addr, .lut_cfg_wdata,
      .tdo(tdo[i]), .pred_done(pred_done[i]), .pred(pred[i]),
      .remove_req(remove_req[i]), .insert_req(insert_req[i]));

    logic pd_q = 0, out_q = 0;
    always @(posedge clk) begin
      pd_q <= pred_done[i]; out_q <= out[i];
      if (monitor_on) begin
        if (out[i] && !out_q) out_cycle[i] = cycle;
        if (pred_done[i] && !pd_q) begin
          checks++;
          if (n_pred[i] >= sm.preds.size()) begin
            failures++;
            $display("FAIL: TCK_DIV %0d: extra prediction %0d", DIVS[i], n_pred[i]);
          end else if (pred[i] !== sm.preds[n_pred[i]]) begin
            failures++;
            $display("FAIL: TCK_DIV %0d: prediction %0d is %0b, expected %0b",
                     DIVS[i], n_pred[i], pred[i], sm.preds[n_pred[i]]);
          end
          n_pred[i]++;
        end
      end
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  // a session of n_instr instructions in exactly n_bits TCK periods
  function automatic jtag_session make_set(int n_instr, int n_bits);
    jtag_session s;
    if (n_instr == 1) begin
      // one boundary-scan style instruction and one long shift
      s = new();
      s.tck(0);
      s.ir_scan(8'h00);
      s.dr_scan(n_bits - s.tms.size() - 5 - 2);
      s.idle(n_bits - s.tms.size());
      return s;
    end
    for (int tries = 0; tries < 100; tries++) begin
      s = new();
      s.build(n_instr, 100);
      if (s.tms.size() <= n_bits) begin
        s.idle(n_bits - s.tms.size());
        return s;
      end
    end
    $display("FAIL: could not fit %0d instructions in %0d bits", n_instr, n_bits);
    failures++;
    return s;
  endfunction

  task automatic run_set(int k, jtag_session s);
    int n = s.tms.size();
    longint t0;
    check(n == SET_BITS[k], $sformatf("set %0d: %0d bits, expected %0d", k + 1, n, SET_BITS[k]));
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      stim_we = 1; stim_waddr = 15'(a);
      stim_tdi = s.tdi[a]; stim_tms = s.tms[a]; stim_trst_n = s.trst_n[a];
    end
    @(negedge clk);
    stim_we = 0; last_addr = 15'(n - 1);
    rst = 1;
    @(negedge clk) rst = 0;
    check(&got_reset, "got_reset after reset");
    repeat (12 * 300) @(negedge clk);
    for (int i = 0; i < NR; i++) begin
      n_pred[i] = 0;
      out_cycle[i] = 0;
    end
    monitor_on = 1;
    start = 1;
    t0 = cycle;
    @(negedge clk) start = 0;
    while (!(&out)) @(negedge clk);
    repeat (100) @(negedge clk);
    monitor_on = 0;
    for (int i = 0; i < NR; i++) begin
      longint run = out_cycle[i] - t0;
      real us = real'(run) / 150.0;
      check(n_pred[i] == sm.preds.size(),
            $sformatf("set %0d, TCK_DIV %0d: %0d predictions, expected %0d",
                      k + 1, DIVS[i], n_pred[i], sm.preds.size()));
      check(alert[i] == sm.alert, $sformatf("set %0d, TCK_DIV %0d: final alert", k + 1, DIVS[i]));
      check(alert_count[i] == 32'(sm.alert_count),
            $sformatf("set %0d, TCK_DIV %0d: alert count %0d expected %0d",
                      k + 1, DIVS[i], alert_count[i], sm.alert_count));
      // one TCK period per bit; the first period may start part-way
      check(run > longint'(n - 1) * DIVS[i] && run <= longint'(n) * DIVS[i] + 1,
            $sformatf("set %0d, TCK_DIV %0d: %0d clocks for %0d bits", k + 1, DIVS[i], run, n));
      check(us <= PUB_US[k][i] && us >= 0.9 * PUB_US[k][i],
            $sformatf("set %0d, TCK_DIV %0d: %.1f us against %.0f us published",
                      k + 1, DIVS[i], us, PUB_US[k][i]));
      $display("set %0d  %4.1f MHz JTAG: %6.1f us (published %6.0f us), %0d predictions, %0d illegitimate",
               k + 1, 150.0 / DIVS[i], us, PUB_US[k][i], n_pred[i], alert_count[i]);
    end
    finish = 1;
    @(negedge clk) finish = 0;
    check(!(|out), "finish clears out");
  endtask

  initial begin
    forest_model fm;
    jtag_session s;
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

    for (int k = 0; k < NS; k++) begin
      s = make_set(SET_INSTR[k], SET_BITS[k]);
      sm.preds.delete(); sm.feats.delete();
      sm.run(s, 255);
      run_set(k, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
