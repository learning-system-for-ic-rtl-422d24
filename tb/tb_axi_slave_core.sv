// tb_axi_slave_core: end-to-end test of the bus-attached system at its default
// parameters (11 trees of 512 words, 32768-bit pin memories, TCK = clk/5).
//
// The testbench plays the host program: it loads a random forest, a random
// transition table and a random JTAG session through the load ports, then
// drives the run only through the three bus registers - reset bit set and
// cleared, got_reset polled, start written, STATUS polled until out, finish
// written, ALERT_COUNT read. An independent model (tb_system_pkg) gives every
// prediction, the final alert, the alert count and the number of table
// removals and insertions. The bus itself is checked too: CONTROL read-back,
// the unused address reading zero, writes to read-only registers and with
// byte lane 0 off being ignored, responses held while the master stalls,
// and a bus reset in the middle of a session. Two sessions are run, the
// second on the adapted table; every mechanism must occur at least once.
module tb_axi_slave_core;
  import jtag_sec_pkg::*;
  import tb_forest_pkg::*;
  import tb_system_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        s_axi_aresetn;
  logic [3:0]  s_axi_awaddr, s_axi_araddr, s_axi_wstrb;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [31:0] s_axi_wdata, s_axi_rdata;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;
  logic        stim_we, stim_tdi, stim_tms, stim_trst_n;
  logic [14:0] stim_waddr, last_addr;
  logic        tree_we;
  logic [3:0]  tree_sel;
  logic [8:0]  tree_waddr;
  logic [39:0] tree_wdata;
  logic        lut_cfg_we;
  logic [7:0]  lut_cfg_addr;
  logic [31:0] lut_cfg_wdata;
  logic        alert, tdo, pred_done, pred, remove_req, insert_req;
  wire         s_axi_aclk = clk;

  axi_slave_core dut (.*);

  localparam logic [3:0] A_CTRL = 4'h0, A_STAT = 4'h4, A_CNT = 4'h8, A_NONE = 4'hC;

  int checks = 0, failures = 0;
  int n_pred = 0, n_ill = 0, n_norm = 0, n_rm = 0, n_ins = 0, n_aset = 0, n_aclr = 0;
  int n_tdo = 0, tot_rm = 0, tot_ins = 0, n_bstall = 0, n_rstall = 0, n_polls = 0;
  bit monitor_on = 0;
  system_model sm;

  initial begin
    repeat (2_500_000) @(posedge clk);
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

  // ---- bus master ---------------------------------------------------------
  // 'stall' keeps BREADY / RREADY low for a few cycles after the response is
  // offered; the response must stay put meanwhile.
  task automatic bus_write(input logic [3:0] addr, input logic [31:0] data,
                           input logic [3:0] strb = 4'hF, input bit stall = 0);
    int guard = 0;
    @(negedge clk);
    s_axi_awaddr = addr; s_axi_awvalid = 1;
    s_axi_wdata = data; s_axi_wstrb = strb; s_axi_wvalid = 1;
    s_axi_bready = !stall;
    #1;
    while (!(s_axi_awready && s_axi_wready) && guard < 50) begin
      @(negedge clk) #1;
      guard++;
    end
    check(s_axi_awready && s_axi_wready, "write accepted");
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    check(s_axi_bvalid && s_axi_bresp == 2'b00, "write response OKAY");
    if (stall) begin
      repeat (3) begin
        @(negedge clk);
        check(s_axi_bvalid, "BVALID held while BREADY is low");
        check(!s_axi_awready, "no new write while a response is pending");
      end
      n_bstall++;
      s_axi_bready = 1;
    end
    while (s_axi_bvalid) @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic bus_read(input logic [3:0] addr, output logic [31:0] data,
                          input bit stall = 0);
    int guard = 0;
    @(negedge clk);
    s_axi_araddr = addr; s_axi_arvalid = 1; s_axi_rready = !stall;
    #1;
    while (!s_axi_arready && guard < 50) begin
      @(negedge clk) #1;
      guard++;
    end
    check(s_axi_arready, "read address accepted");
    @(negedge clk);
    s_axi_arvalid = 0;
    check(s_axi_rvalid && s_axi_rresp == 2'b00, "read response OKAY");
    data = s_axi_rdata;
    if (stall) begin
      repeat (3) begin
        @(negedge clk);
        check(s_axi_rvalid && s_axi_rdata == data, "read data held while RREADY is low");
        check(!s_axi_arready, "no new read while data is pending");
      end
      n_rstall++;
      s_axi_rready = 1;
    end
    while (s_axi_rvalid) @(negedge clk);
    s_axi_rready = 0;
  endtask

  // ---- prediction monitor -------------------------------------------------
  logic pd_q = 0, rm_q = 0, ins_q = 0, al_q = 0;
  always @(posedge clk) begin
    pd_q <= pred_done; rm_q <= remove_req; ins_q <= insert_req; al_q <= alert;
    if (monitor_on) begin
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
          $display("FAIL: prediction %0d is %0b, expected %0b", n_pred, pred, sm.preds[n_pred]);
        end
        if (pred) n_ill++; else n_norm++;
        n_pred++;
      end
    end
  end

  task automatic load_session(jtag_session s);
    int n = s.tms.size();
    for (int a = 0; a < n; a++) begin
      @(negedge clk);
      stim_we = 1; stim_waddr = 15'(a);
      stim_tdi = s.tdi[a]; stim_tms = s.tms[a]; stim_trst_n = s.trst_n[a];
    end
    @(negedge clk);
    stim_we = 0; last_addr = 15'(n - 1);
  endtask

  // the host program of one run
  task automatic host_run(jtag_session s);
    logic [31:0] r;
    int guard;
    load_session(s);
    bus_write(A_CTRL, 32'h1);                       // reset
    bus_read(A_STAT, r);
    check(r[0] && !r[1], "got_reset while reset is held");
    bus_write(A_CTRL, 32'h0);
    bus_read(A_STAT, r);
    check(r[0], "got_reset kept after reset");
    bus_read(A_CNT, r);
    check(r == 0, "alert count cleared by reset");
    repeat (5 * 300) @(negedge clk);                // Test-Logic-Reset counter saturates
    n_pred = 0;
    monitor_on = 1;
    bus_write(A_CTRL, 32'h2);                       // start
    bus_read(A_STAT, r);
    check(!r[0], "got_reset cleared by start");
    guard = 0;
    do begin
      repeat (200) @(negedge clk);
      bus_read(A_STAT, r);
      n_polls++;
      guard++;
    end while (!r[1] && guard < 20000);
    check(r[1], "out raised at the end of the set");
    repeat (100) @(negedge clk);
    monitor_on = 0;
    bus_write(A_CTRL, 32'h4);                       // finish
    bus_read(A_STAT, r);
    check(!r[1], "finish clears out");
    check(r[2] == sm.alert, "final alert in STATUS");
    bus_read(A_CNT, r, 1);
    check(r == 32'(sm.alert_count), $sformatf("alert count %0d expected %0d", r, sm.alert_count));
    check(n_pred == sm.preds.size(), $sformatf("%0d predictions, expected %0d", n_pred, sm.preds.size()));
    check(n_rm == sm.n_remove && n_ins == sm.n_insert,
          $sformatf("LUT removals %0d/%0d insertions %0d/%0d", n_rm, sm.n_remove, n_ins, sm.n_insert));
    tot_rm += n_rm; tot_ins += n_ins;
    n_rm = 0; n_ins = 0;
  endtask

  initial begin
    forest_model fm;
    jtag_session s1, s2;
    logic [31:0] r;
    s_axi_aresetn = 0;
    s_axi_awaddr = 0; s_axi_awvalid = 0; s_axi_wdata = 0; s_axi_wstrb = 0; s_axi_wvalid = 0;
    s_axi_bready = 0; s_axi_araddr = 0; s_axi_arvalid = 0; s_axi_rready = 0;
    stim_we = 0; stim_waddr = 0; stim_tdi = 0; stim_tms = 0; stim_trst_n = 1; last_addr = 0;
    tree_we = 0; tree_sel = 0; tree_waddr = 0; tree_wdata = 0;
    lut_cfg_we = 0; lut_cfg_addr = 0; lut_cfg_wdata = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) s_axi_aresetn = 1;

    // register behaviour
    bus_read(A_STAT, r);
    check(r[0] && !r[1] && !r[2], "STATUS after bus reset");
    bus_write(A_CTRL, 32'hFFFF_FFF8, 4'hF, 1);       // flag bits zero, others dropped
    bus_read(A_CTRL, r, 1);
    check(r == 32'h0, "CONTROL keeps only its three flags");
    bus_write(A_CTRL, 32'h1, 4'hE);                  // byte lane 0 off: ignored
    bus_read(A_CTRL, r);
    check(r == 32'h0, "write without byte lane 0 ignored");
    bus_write(A_STAT, 32'h7);
    bus_write(A_CNT, 32'hDEAD_BEEF);
    bus_read(A_CNT, r);
    check(r == 32'h0, "ALERT_COUNT is read only");
    bus_read(A_NONE, r);
    check(r == 32'h0, "unused address reads zero");

    // a bus reset in the middle of a run returns the system to INITIAL; done
    // before the tables are loaded, since a run adapts the transition table
    last_addr = 15'h7FFF;
    bus_write(A_CTRL, 32'h2);
    repeat (2000) @(negedge clk);
    bus_read(A_STAT, r);
    check(!r[0] && !r[1], "run in progress before the bus reset");
    @(negedge clk) s_axi_aresetn = 0;
    @(negedge clk) s_axi_aresetn = 1;
    bus_read(A_STAT, r);
    check(r[0] && !r[1], "bus reset acknowledged through got_reset");
    bus_read(A_CTRL, r);
    check(r == 32'h0, "bus reset clears CONTROL");
    repeat (5 * 400) @(negedge clk);
    bus_read(A_STAT, r);
    check(r[0] && !r[1], "system stays idle after bus reset");

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
    host_run(s1);

    // second session; the learned table survives resets
    s2 = new();
    s2.build(40);
    sm.preds.delete(); sm.feats.delete();
    sm.n_remove = 0; sm.n_insert = 0;
    sm.run(s2, 255);
    host_run(s2);

    check(n_ill > 0 && n_norm > 0, $sformatf("both classes (%0d/%0d)", n_ill, n_norm));
    check(n_aset > 0 && n_aclr > 0, $sformatf("alert raised %0d cleared %0d", n_aset, n_aclr));
    check(tot_rm > 0 && tot_ins > 0, $sformatf("LUT removals %0d, insertions %0d", tot_rm, tot_ins));
    check(sm.n_undef > 0 && sm.n_miss > 0 && sm.n_hit > 0,
          $sformatf("undefined %0d miss %0d hit %0d", sm.n_undef, sm.n_miss, sm.n_hit));
    check(sm.n_sat > 0, "saturated counter");
    check(s1.n_trst > 0 && s1.n_tms_reset > 0 && s1.n_pause > 0, "TRST, TMS reset and IR pause");
    check(n_tdo > 0, "TDO activity");
    check(n_bstall > 0 && n_rstall > 0, "stalled bus responses");
    $display("predictions: %0d illegitimate, %0d normal; alert set %0d cleared %0d; %0d polls",
             n_ill, n_norm, n_aset, n_aclr, n_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
