// tb_system_pkg: JTAG session generator and reference model of the whole
// detection flow, shared by the system-level testbenches.
//
// 'jtag_session' builds TDI/TMS/TRST_N bit streams (one entry per TCK) out of
// instruction-register scans, data-register scans, idle cycles, TMS resets
// and TRST pulses, always starting and ending in Run-Test/Idle or
// Test-Logic-Reset. 'system_model' replays such a stream through an
// independent model of the TAP state diagram, the feature extraction, the
// random forest (tb_forest_pkg) and the feature adapt rules, and records the
// per-TCK TAP trace, every prediction, the alert and the alert count.
package tb_system_pkg;
  import tb_forest_pkg::*;

  class jtag_session;
    bit tdi[$], tms[$], trst_n[$];
    int n_trst = 0, n_tms_reset = 0, n_pause = 0;

    function void tck(bit m, bit d = 0, bit r = 1);
      tms.push_back(m); tdi.push_back(d); trst_n.push_back(r);
    endfunction

    // from Run-Test/Idle back to Run-Test/Idle, optionally pausing midway
    function void ir_scan(bit [7:0] op);
      bit pause = ($urandom_range(4) == 0);
      tck(1); tck(1); tck(0); tck(0);            // Sel-DR, Sel-IR, Capture-IR, Shift-IR
      for (int i = 0; i < 8; i++) begin
        tck(i == 7 || (pause && i == 3), op[i]); // TMS=1 moves to Exit1-IR
        if (pause && i == 3) begin
          tck(0); tck(1); tck(0);                // Pause-IR, Exit2-IR, Shift-IR
          n_pause++;
        end
      end
      tck(1); tck(0);                            // Update-IR, Run-Test/Idle
    endfunction

    function void dr_scan(int n);
      tck(1); tck(0); tck(0);                    // Sel-DR, Capture-DR, Shift-DR
      for (int i = 0; i < n; i++) tck(i == n - 1, 1'($urandom));
      tck(1); tck(0);                            // Update-DR, Run-Test/Idle
    endfunction

    function void idle(int n);
      for (int i = 0; i < n; i++) tck(0);
    endfunction

    function void tms_reset();
      for (int i = 0; i < 5; i++) tck(1);
      tck(0);
      n_tms_reset++;
    endfunction

    function void trst_pulse();
      tck(0, 0, 0);
      tck(0);
      n_trst++;
    endfunction

    // a random session of n instructions drawn from opcodes 0..15 and 8'hFF
    function void build(int n_instr, int long_dr = 0);
      tck(0);  // leave Test-Logic-Reset
      for (int k = 0; k < n_instr; k++) begin
        bit [7:0] op = ($urandom_range(19) == 0) ? 8'hFF : 8'($urandom_range(15));
        ir_scan(op);
        case ($urandom_range(9))
          0, 1, 2, 3: dr_scan($urandom_range(40, 1));
          4:          dr_scan(long_dr > 0 ? long_dr : $urandom_range(300, 200));
          5:          tms_reset();
          6:          trst_pulse();
          default:    ;
        endcase
        idle($urandom_range(12));
      end
      idle(2);
    endfunction
  endclass

  class system_model;
    forest_model fm;
    bit [31:0]   lut [256];
    // per-TCK trace (state during the period, IR, IR shift register)
    int unsigned st_tr[$];
    bit [7:0]    ir_tr[$], sr_tr[$];
    // per prediction
    bit          preds[$];
    bit [41:0]   feats[$];
    bit          alert;
    int unsigned alert_count;
    int n_remove = 0, n_insert = 0, n_keep = 0, n_alert_set = 0, n_alert_clear = 0;
    int n_undef = 0, n_miss = 0, n_hit = 0, n_sat = 0;

    int unsigned nxt1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
    int unsigned nxt0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};

    function new(forest_model f);
      fm = f;
    endfunction

    static function int sat(int v);
      return v > 255 ? 255 : v;
    endfunction

    function bit [31:0] adapt(bit [31:0] w, bit [7:0] nxt, bit remove);
      bit present = 0;
      for (int b = 0; b < 4; b++) if (w[8*b +: 8] == nxt) present = 1;
      if (remove) begin
        for (int b = 0; b < 4; b++) if (w[8*b +: 8] == nxt) w[8*b +: 8] = 8'h00;
      end else if (!present) begin
        for (int b = 0; b < 4; b++)
          if (w[8*b +: 8] == 8'h00 || w[8*b +: 8] == 8'hFF) begin
            w[8*b +: 8] = nxt;
            return w;
          end
      end
      return w;
    endfunction

    // tlr0: Test-Logic-Reset periods counted before the stream starts
    function void run(jtag_session s, int tlr0);
      int unsigned st = 0;
      bit [7:0] ir = 8'hFF, sr = 8'h00;
      bit tms_prev = 1;
      int c_sh = 0, c_rti = 0, c_tlr = tlr0, c_tog = 0;
      int n_in_group = 0, n_ill = 0;
      alert = 0; alert_count = 0;
      for (int p = 0; p < s.tms.size(); p++) begin
        bit m = s.tms[p], d = s.tdi[p];
        if (!s.trst_n[p]) begin
          // TRST acts at once: the period is spent in Test-Logic-Reset
          st = 0; ir = 8'hFF; sr = 8'h00;
        end
        st_tr.push_back(st); ir_tr.push_back(ir); sr_tr.push_back(sr);
        if (st == 15) begin
          bit [31:0] w = lut[ir];
          bit miss = 1, undef, pr;
          bit [41:0] f;
          int unsigned votes, maxn;
          for (int b = 0; b < 4; b++) if (w[8*b +: 8] == sr) miss = 0;
          undef = (w == 32'hFFFF_FFFF);
          if (undef) n_undef++;
          if (miss) n_miss++; else n_hit++;
          if (c_sh > 255 || c_tlr > 255 || c_rti > 255 || c_tog > 255) n_sat++;
          f = {ir[7:4], ir[3:0], 8'(sat(c_sh)), 8'(sat(c_rti)), 8'(sat(c_tlr)),
               8'(sat(c_tog)), undef, miss};
          pr = fm.eval_forest(f, votes, maxn);
          feats.push_back(f);
          preds.push_back(pr);
          alert_count += pr;
          n_ill += pr;
          n_in_group++;
          if (n_in_group == 4) begin
            if (n_ill >= 3) begin
              if (!alert) n_alert_set++;
              alert = 1; n_remove++;
              lut[ir] = adapt(lut[ir], sr, 1);
            end else if (n_ill <= 1) begin
              if (alert) n_alert_clear++;
              alert = 0; n_insert++;
              lut[ir] = adapt(lut[ir], sr, 0);
            end else n_keep++;
            n_in_group = 0; n_ill = 0;
          end
          c_sh = 0; c_rti = 0; c_tlr = 0; c_tog = 0;
        end
        // end of the period: count, then the TAP moves
        if (st == 4) c_sh++;
        if (st == 1) c_rti++;
        if (st == 0) c_tlr++;
        if (m != tms_prev) c_tog++;
        tms_prev = m;
        if (s.trst_n[p]) begin
          case (st)
            0:  ir = 8'hFF;
            10: sr = 8'h01;
            11: sr = {d, sr[7:1]};
            15: ir = sr;
            default: ;
          endcase
          st = m ? nxt1[st] : nxt0[st];
        end
      end
    endfunction
  endclass

endpackage
