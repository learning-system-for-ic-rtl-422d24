// data_collector: turns JTAG activity into the eight features of the
// instruction being replaced, and starts a prediction.
//
// Between two Update-IR events it counts, once per TCK period (tck_en), the
// cycles spent in Shift-DR, Run-Test/Idle and Test-Logic-Reset and the number
// of TMS toggles. On the rising edge of 'update_ir' it reads the transition
// LUT at the current opcode (asynchronous read) and registers the feature
// vector:
//   1/2  four MSBs / four LSBs of the current opcode,
//   3-6  the four counters (which then restart from zero),
//   7    1 when the LUT word is all 8'hFF (instruction undefined),
//   8    1 when the next opcode (the one being loaded) matches none of the
//        four bytes of that word (transition miss).
// One cycle later it pulses 'pred_start' and presents the current/next
// opcode pair to the feature adapt logic. The feature set, the counting
// between Update-IR events and the LUT tests follow the document. This
// design's own choices: the counters are 8 bits wide and saturate at 255,
// they advance once per TCK period rather than per system clock, and the
// edge detection of update_ir is done here in the system clock domain.
//
// Timing: features, cur_instr and nxt_instr are valid from the cycle in which
// pred_start is high until the next Update-IR.
module data_collector
  import jtag_sec_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             tck_en,      // one system-clock cycle per TCK period
  input  logic             tms,
  input  logic [IR_W-1:0]  instr,       // instruction register (current)
  input  logic [IR_W-1:0]  next_instr,  // instruction shift register (next)
  input  tap_state_e       tap_state,
  input  logic             update_ir,
  input  logic             shift_dr,
  // transition LUT read port
  output logic [IR_W-1:0]  lut_addr,
  output logic             lut_rd_en,
  input  logic [31:0]      lut_rdata,
  // to the classifier and the feature adapt logic
  output features_t        feat,
  output logic             pred_start,
  output logic [IR_W-1:0]  cur_instr,
  output logic [IR_W-1:0]  nxt_instr
);
  logic       upd_q, upd_rise;
  logic       tms_q;
  logic [7:0] cnt_shift, cnt_rti, cnt_tlr, cnt_tog;
  logic       undef, miss;

  assign upd_rise  = update_ir && !upd_q;
  assign lut_addr  = instr;
  assign lut_rd_en = upd_rise;

  always_comb begin
    undef = (lut_rdata == 32'hFFFF_FFFF);
    miss  = 1'b1;
    for (int b = 0; b < 4; b++)
      if (lut_rdata[8*b +: 8] == next_instr) miss = 1'b0;
  end

  function automatic logic [7:0] sat_inc(input logic [7:0] v);
    return (v == 8'hFF) ? v : v + 8'd1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      upd_q      <= 1'b0;
      tms_q      <= 1'b1;
      cnt_shift  <= '0;
      cnt_rti    <= '0;
      cnt_tlr    <= '0;
      cnt_tog    <= '0;
      feat       <= '0;
      pred_start <= 1'b0;
      cur_instr  <= '0;
      nxt_instr  <= '0;
    end else begin
      upd_q      <= update_ir;
      pred_start <= upd_rise;
      if (upd_rise) begin
        feat.f1_opc_msb  <= instr[7:4];
        feat.f2_opc_lsb  <= instr[3:0];
        feat.f3_shift_dr <= cnt_shift;
        feat.f4_rti      <= cnt_rti;
        feat.f5_tlr      <= cnt_tlr;
        feat.f6_tms_tog  <= cnt_tog;
        feat.f7_undef    <= undef;
        feat.f8_miss     <= miss;
        cur_instr        <= instr;
        nxt_instr        <= next_instr;
        cnt_shift        <= '0;
        cnt_rti          <= '0;
        cnt_tlr          <= '0;
        cnt_tog          <= '0;
      end else if (tck_en) begin
        if (shift_dr)              cnt_shift <= sat_inc(cnt_shift);
        if (tap_state == TAP_RTI)  cnt_rti   <= sat_inc(cnt_rti);
        if (tap_state == TAP_TLR)  cnt_tlr   <= sat_inc(cnt_tlr);
        if (tms != tms_q)          cnt_tog   <= sat_inc(cnt_tog);
      end
      if (tck_en) tms_q <= tms;
    end
  end
endmodule
