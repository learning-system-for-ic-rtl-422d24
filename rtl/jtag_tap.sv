// jtag_tap: IEEE 1149.1 test access port controller.
//
// The 16-state TAP state machine advances on TMS once per TCK period. Here
// TCK is represented by 'tck_en', a one-cycle enable in the system clock
// domain (TCK = clk / N), so the TAP and the detection system share one clock
// and the TAP outputs need no synchronizer. The controller holds an 8-bit
// instruction shift register ('next_instr', loaded with 8'b0000_0001 in
// Capture-IR and shifted LSB first from TDI in Shift-IR), the 8-bit
// instruction register ('instr', loaded in Update-IR and set to BYPASS,
// 8'hFF, in Test-Logic-Reset) and the one-bit BYPASS data register. TDO
// carries the IR shift register in Shift-IR and the bypass register in
// Shift-DR. Active-low TRST forces Test-Logic-Reset.
// From the document: the 16-state machine, the 8-bit opcodes and the
// update-IR / shift-DR flags. The document takes this block from an existing
// processor design; the capture value, the BYPASS opcode, using the bypass
// register for every instruction and the registered TDO are this design's.
//
// Timing: every register changes only on clock edges where tck_en is high;
// 'update_ir' and 'shift_dr' are decodes of the current state and last one
// TCK period. 'instr' changes at the TCK edge that leaves Update-IR.
module jtag_tap
  import jtag_sec_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            tck_en,
  input  logic            trst_n,
  input  logic            tms,
  input  logic            tdi,
  output logic            tdo,
  output tap_state_e      state,
  output logic [IR_W-1:0] instr,
  output logic [IR_W-1:0] next_instr,
  output logic            update_ir,
  output logic            shift_dr
);
  tap_state_e nxt;
  logic       bypass_q;

  always_comb begin
    unique case (state)
      TAP_TLR:        nxt = tms ? TAP_TLR       : TAP_RTI;
      TAP_RTI:        nxt = tms ? TAP_SEL_DR    : TAP_RTI;
      TAP_SEL_DR:     nxt = tms ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: nxt = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   nxt = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   nxt = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   nxt = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   nxt = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  nxt = tms ? TAP_SEL_DR    : TAP_RTI;
      TAP_SEL_IR:     nxt = tms ? TAP_TLR       : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: nxt = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   nxt = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   nxt = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   nxt = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   nxt = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  nxt = tms ? TAP_SEL_DR    : TAP_RTI;
      default:        nxt = TAP_TLR;
    endcase
  end

  assign update_ir = (state == TAP_UPDATE_IR);
  assign shift_dr  = (state == TAP_SHIFT_DR);

  always_ff @(posedge clk) begin
    if (rst || !trst_n) begin
      state      <= TAP_TLR;
      instr      <= OPC_BYPASS;
      next_instr <= '0;
      bypass_q   <= 1'b0;
      tdo        <= 1'b0;
    end else if (tck_en) begin
      state <= nxt;
      unique case (state)
        TAP_TLR:        instr      <= OPC_BYPASS;
        TAP_CAPTURE_IR: next_instr <= 8'b0000_0001;
        TAP_SHIFT_IR:   next_instr <= {tdi, next_instr[IR_W-1:1]};
        TAP_UPDATE_IR:  instr      <= next_instr;
        TAP_CAPTURE_DR: bypass_q   <= 1'b0;
        TAP_SHIFT_DR:   bypass_q   <= tdi;
        default: ;
      endcase
      tdo <= (state == TAP_SHIFT_IR) ? next_instr[0] :
             (state == TAP_SHIFT_DR) ? bypass_q      : 1'b0;
    end
  end
endmodule
