// tb_data_collector: self-checking test of feature extraction.
// The TAP outputs are driven directly: every TCK period (5 system clocks,
// tck_en in the last one) the testbench picks a TAP state, a TMS value and,
// now and then, an Update-IR period with random current/next opcodes. An
// independent model counts Shift-DR, Run-Test/Idle and Test-Logic-Reset
// periods and TMS toggles (8-bit, saturating) and derives the "undefined" and
// "transition miss" features from a random transition table. At every
// pred_start pulse the registered feature vector and opcode pair are compared
// with the model. One window is made long enough to saturate a counter.
module tb_data_collector;
  import jtag_sec_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic            rst, tck_en, tms, update_ir, shift_dr;
  logic [7:0]      instr, next_instr, lut_addr, cur_instr, nxt_instr;
  tap_state_e      tap_state;
  logic            lut_rd_en, pred_start;
  logic [31:0]     lut_rdata;
  features_t       feat;
  logic [31:0]     lut [256];
  int checks = 0, failures = 0;
  int n_undef = 0, n_miss = 0, n_hit = 0, n_sat = 0;

  data_collector dut (.clk, .rst, .tck_en, .tms, .instr, .next_instr, .tap_state,
                      .update_ir, .shift_dr, .lut_addr, .lut_rd_en, .lut_rdata,
                      .feat, .pred_start, .cur_instr, .nxt_instr);

  assign lut_rdata = lut[lut_addr];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  int c_shift, c_rti, c_tlr, c_tog;
  bit tms_prev;
  features_t exp_feat;
  logic [7:0] exp_cur, exp_nxt;
  bit pending;

  function automatic int sat(int v);
    return v > 255 ? 255 : v;
  endfunction

  // checker: compare on every pred_start pulse
  always @(negedge clk) begin
    if (pred_start) begin
      checks++;
      if (!pending) begin
        failures++;
        $display("unexpected pred_start");
      end else if (feat !== exp_feat || cur_instr !== exp_cur || nxt_instr !== exp_nxt) begin
        failures++;
        $display("features %h expected %h (cur %h/%h nxt %h/%h)", feat, exp_feat,
                 cur_instr, exp_cur, nxt_instr, exp_nxt);
      end
      pending = 0;
    end
  end

  task automatic tck_period(input tap_state_e st, input logic t, input bit upd,
                            input logic [7:0] cur, input logic [7:0] nxt);
    @(negedge clk);
    tap_state = st; tms = t; update_ir = upd; shift_dr = (st == TAP_SHIFT_DR);
    instr = cur; next_instr = nxt;
    if (upd) begin
      logic [31:0] w;
      bit miss;
      w = lut[cur];
      miss = 1;
      for (int b = 0; b < 4; b++) if (w[8*b +: 8] == nxt) miss = 0;
      exp_feat = '{f1_opc_msb: cur[7:4], f2_opc_lsb: cur[3:0], f3_shift_dr: 8'(sat(c_shift)),
                   f4_rti: 8'(sat(c_rti)), f5_tlr: 8'(sat(c_tlr)), f6_tms_tog: 8'(sat(c_tog)),
                   f7_undef: (w == 32'hFFFF_FFFF), f8_miss: miss};
      if (w == 32'hFFFF_FFFF) n_undef++;
      if (miss) n_miss++; else n_hit++;
      if (c_rti > 255 || c_tlr > 255 || c_shift > 255) n_sat++;
      exp_cur = cur; exp_nxt = nxt;
      pending = 1;
      c_shift = 0; c_rti = 0; c_tlr = 0; c_tog = 0;
    end
    repeat (3) @(negedge clk);
    tck_en = 1;
    if (st == TAP_SHIFT_DR) c_shift++;
    if (st == TAP_RTI)      c_rti++;
    if (st == TAP_TLR)      c_tlr++;
    if (t != tms_prev)      c_tog++;
    tms_prev = t;
    @(negedge clk);
    tck_en = 0;
  endtask

  initial begin
    tap_state_e st;
    logic [7:0] cur, nxt;
    int r;
    rst = 1; tck_en = 0; tms = 1; update_ir = 0; shift_dr = 0; instr = 8'hFF;
    next_instr = 0; tap_state = TAP_TLR;
    c_shift = 0; c_rti = 0; c_tlr = 0; c_tog = 0; tms_prev = 1; pending = 0;
    for (int a = 0; a < 256; a++) begin
      r = $urandom_range(9);
      if (r < 2) lut[a] = 32'hFFFF_FFFF;
      else       lut[a] = {8'($urandom_range(15)), 8'($urandom_range(15)),
                           8'($urandom_range(15)), 8'($urandom_range(15))};
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int w = 0; w < 300; w++) begin
      int len;
      len = (w == 5) ? 300 : $urandom_range(40, 4);  // a TAP needs 4+ TCKs between Update-IRs
      for (int p = 0; p < len; p++) begin
        r = $urandom_range(9);
        st = (w == 5) ? TAP_RTI :
             (r < 3) ? TAP_SHIFT_DR : (r < 5) ? TAP_RTI : (r < 6) ? TAP_TLR :
             tap_state_e'($urandom_range(14));
        if (st == TAP_UPDATE_IR) st = TAP_PAUSE_DR;
        tck_period(st, 1'($urandom), 0, 8'($urandom), 8'($urandom));
      end
      cur = 8'($urandom_range(15));
      nxt = 8'($urandom_range(15));
      tck_period(TAP_UPDATE_IR, 1'($urandom), 1, cur, nxt);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (pending) begin
      failures++;
      $display("last update produced no prediction start");
    end
    checks++;
    if (n_undef == 0 || n_miss == 0 || n_hit == 0 || n_sat == 0) begin
      failures++;
      $display("coverage: undef %0d miss %0d hit %0d saturated %0d", n_undef, n_miss, n_hit, n_sat);
    end
    $display("undefined %0d, miss %0d, hit %0d, saturated windows %0d", n_undef, n_miss, n_hit, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
