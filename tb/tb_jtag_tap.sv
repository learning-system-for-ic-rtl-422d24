// tb_jtag_tap: self-checking test of the TAP controller.
// A table model of the IEEE 1149.1 state diagram (next state for TMS = 0 and
// TMS = 1) tracks the state under a random TMS/TDI walk with TCK as a
// one-in-three clock enable. The model also keeps the instruction shift
// register, the instruction register and the bypass register and predicts
// TDO. Directed IR scans load chosen opcodes, and TRST is pulsed once.
module tb_jtag_tap;
  import jtag_sec_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, tck_en, trst_n, tms, tdi, tdo, update_ir, shift_dr;
  tap_state_e state;
  logic [7:0] instr, next_instr;
  int checks = 0, failures = 0;
  int visits [16];

  jtag_tap dut (.clk, .rst, .tck_en, .trst_n, .tms, .tdi, .tdo, .state, .instr,
                .next_instr, .update_ir, .shift_dr);

  // state-diagram table: {next if TMS=1, next if TMS=0}
  int unsigned nxt_tab [16][2];
  int unsigned m_state;
  logic [7:0]  m_sr, m_ir;
  logic        m_byp, m_tdo;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tck(input logic t, input logic d);
    int unsigned s;
    @(negedge clk);
    tms = t; tdi = d;
    @(negedge clk);
    tck_en = 1;
    // model update
    s = m_state;
    m_tdo = (s == 11) ? m_sr[0] : (s == 4) ? m_byp : 1'b0;
    case (s)
      0:  m_ir = 8'hFF;
      10: m_sr = 8'h01;
      11: m_sr = {d, m_sr[7:1]};
      15: m_ir = m_sr;
      3:  m_byp = 0;
      4:  m_byp = d;
      default: ;
    endcase
    m_state = nxt_tab[s][t ? 0 : 1];
    @(negedge clk);
    tck_en = 0;
    visits[m_state]++;
    checks++;
    if (int'(state) != int'(m_state) || instr !== m_ir || next_instr !== m_sr ||
        tdo !== m_tdo || update_ir !== (m_state == 15) || shift_dr !== (m_state == 4)) begin
      failures++;
      $display("state %0d/%0d instr %h/%h sr %h/%h tdo %0b/%0b", state, m_state,
               instr, m_ir, next_instr, m_sr, tdo, m_tdo);
    end
  endtask

  task automatic load_ir(input logic [7:0] op);
    // from Run-Test/Idle: Select-DR, Select-IR, Capture-IR, Shift-IR
    tck(1, 0); tck(1, 0); tck(0, 0); tck(0, 0);
    for (int i = 0; i < 8; i++) tck(i == 7, op[i]);  // last bit leaves to Exit1-IR
    tck(1, 0);  // Update-IR
    tck(0, 0);  // Run-Test/Idle
    checks++;
    if (instr !== op) begin
      failures++;
      $display("IR scan of %h gave %h", op, instr);
    end
  endtask

  initial begin
    // TLR RTI SELDR CAPDR SHDR EX1DR PSDR EX2DR UPDR SELIR CAPIR SHIR EX1IR PSIR EX2IR UPIR
    int unsigned t1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
    int unsigned t0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
    for (int i = 0; i < 16; i++) begin
      nxt_tab[i][0] = t1[i];
      nxt_tab[i][1] = t0[i];
    end
    m_state = 0; m_sr = 0; m_ir = 8'hFF; m_byp = 0; m_tdo = 0;
    rst = 1; tck_en = 0; trst_n = 1; tms = 1; tdi = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    tck(0, 0);
    load_ir(8'h5A);
    load_ir(8'h03);
    for (int i = 0; i < 3000; i++)
      tck(($urandom_range(99) < 40), 1'($urandom));
    repeat (5) tck(1, 0);  // five TMS=1 reach Test-Logic-Reset from anywhere
    tck(0, 0);
    load_ir(8'hC7);
    // TRST
    @(negedge clk) trst_n = 0;
    @(negedge clk) trst_n = 1;
    m_state = 0; m_ir = 8'hFF; m_sr = 0; m_byp = 0; m_tdo = 0;
    checks++;
    if (state != TAP_TLR || instr !== 8'hFF) begin
      failures++;
      $display("TRST did not reset the TAP");
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (visits[i] == 0) begin
        failures++;
        $display("state %0d never visited", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
