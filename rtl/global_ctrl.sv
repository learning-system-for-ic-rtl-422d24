// global_ctrl: replays a stored JTAG instruction set into the TAP controller.
//
// A three-state FSM: INITIAL waits for 'start'; READ steps the address of
// the three pin memories once per TCK period and drives the read bits onto
// the TAP pins; when the last address ('last_addr', the set length minus one)
// has been applied it goes to FINAL, which raises 'out' until 'finish'
// returns it to INITIAL. Reset returns it to INITIAL from any state and sets
// 'got_reset', the acknowledge of a reset, which start clears. The FSM and
// the start/finish/out/got_reset flags follow the document.
// This design's choices: TCK is not a separate clock but a one-cycle enable
// 'tck_en' every TCK_DIV system clocks (5 = 150 MHz / 30 MHz, the document's
// clock pair), and outside READ the pins idle at TMS = 1, TDI = 0, TRST_N = 1.
//
// Timing: the bit at address a is on the pins for the TCK period that ends
// with the a-th tck_en pulse after start; out rises in the cycle after the
// pulse that consumed the last bit.
module global_ctrl #(
  parameter int unsigned TCK_DIV = 5,
  parameter int unsigned AW      = 15
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          finish,
  input  logic [AW-1:0] last_addr,
  output logic          tck_en,
  output logic [AW-1:0] mem_addr,
  input  logic          mem_tdi,
  input  logic          mem_tms,
  input  logic          mem_trst_n,
  output logic          jtag_tdi,
  output logic          jtag_tms,
  output logic          jtag_trst_n,
  output logic          reading,
  output logic          out,
  output logic          got_reset
);
  typedef enum logic [1:0] {GC_INITIAL, GC_READ, GC_FINAL} gc_e;
  gc_e state_q;

  localparam int unsigned DW = (TCK_DIV > 1) ? $clog2(TCK_DIV) : 1;
  logic [DW-1:0] div_q;

  assign tck_en      = (div_q == DW'(TCK_DIV - 1));
  assign reading     = (state_q == GC_READ);
  assign out         = (state_q == GC_FINAL);
  assign jtag_tdi    = reading ? mem_tdi    : 1'b0;
  assign jtag_tms    = reading ? mem_tms    : 1'b1;
  assign jtag_trst_n = reading ? mem_trst_n : 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      div_q     <= '0;
      state_q   <= GC_INITIAL;
      mem_addr  <= '0;
      got_reset <= 1'b1;
    end else begin
      div_q <= tck_en ? '0 : div_q + 1'b1;
      unique case (state_q)
        GC_INITIAL: if (start) begin
          state_q   <= GC_READ;
          mem_addr  <= '0;
          got_reset <= 1'b0;
        end
        GC_READ: if (tck_en) begin
          if (mem_addr == last_addr) state_q  <= GC_FINAL;
          else                       mem_addr <= mem_addr + 1'b1;
        end
        GC_FINAL: if (finish) state_q <= GC_INITIAL;
        default: state_q <= GC_INITIAL;
      endcase
    end
  end
endmodule
