// feature_adapt: turns per-instruction predictions into the security alert
// and adapts the transition LUT.
//
// Predictions are taken in groups of four consecutive ones (one per rising
// edge of the classifier's done flag). At the end of a group:
//   * three or four illegitimate votes raise the remove request and set the
//     alert to 1,
//   * zero or one raise the insert request and clear the alert,
//   * two leave the alert unchanged and raise no request.
// The alert therefore changes at most once every four instructions. A
// four-state FSM (IDLE, READ, ADAPT, WRITE; one cycle each in the last three)
// serves a request: READ fetches the LUT word of the current opcode, ADAPT
// builds the new word, WRITE stores it. Removal zeroes every byte equal to
// the next opcode; insertion, when the next opcode is not yet present, puts
// it in the lowest byte that is free (8'h00 or 8'hFF). While the FSM is
// away from IDLE, 'lut_addr_vld' gives this block the LUT's address port.
// 'alert_count' counts every illegitimate prediction.
// From the document: the groups of four, the alert and insert/remove
// semantics, the FSM and the byte removal. This design's own choices: the
// 3-of-4 threshold for removal, the free-slot rule for insertion, holding a
// request until its WRITE cycle, and what alert_count counts.
//
// Timing: a request is served in four cycles after the prediction that ends
// its group; alert changes in the cycle after that prediction's done edge.
module feature_adapt
  import jtag_sec_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [IR_W-1:0]  cur_instr,
  input  logic [IR_W-1:0]  nxt_instr,
  input  logic             pred_done,
  input  logic             pred,
  // transition LUT port
  output logic [IR_W-1:0]  lut_addr,
  output logic             lut_addr_vld,
  output logic             lut_rd_en,
  output logic             lut_wr_en,
  output logic [31:0]      lut_wdata,
  input  logic [31:0]      lut_rdata,
  // outputs
  output logic             alert,
  output logic [CNT_W-1:0] alert_count,
  output logic             remove_req,
  output logic             insert_req
);
  typedef enum logic [1:0] {FA_IDLE, FA_READ, FA_ADAPT, FA_WRITE} fa_e;
  fa_e state_q;

  logic       done_q, done_rise;
  logic [1:0] n_pred;
  logic [2:0] n_ill;
  logic [2:0] total;
  logic [31:0] rd_q, new_word;

  assign done_rise = pred_done && !done_q;
  assign total     = n_ill + 3'(pred);

  assign lut_addr     = cur_instr;
  assign lut_addr_vld = (state_q != FA_IDLE);
  assign lut_rd_en    = (state_q == FA_READ);
  assign lut_wr_en    = (state_q == FA_WRITE);

  // ADAPT: build the word to write back
  always_comb begin
    logic present, placed;
    new_word = rd_q;
    present  = 1'b0;
    placed   = 1'b0;
    for (int b = 0; b < 4; b++)
      if (rd_q[8*b +: 8] == nxt_instr) present = 1'b1;
    if (remove_req) begin
      for (int b = 0; b < 4; b++)
        if (rd_q[8*b +: 8] == nxt_instr) new_word[8*b +: 8] = 8'h00;
    end else if (insert_req && !present) begin
      for (int b = 0; b < 4; b++)
        if (!placed && (rd_q[8*b +: 8] == 8'h00 || rd_q[8*b +: 8] == 8'hFF)) begin
          new_word[8*b +: 8] = nxt_instr;
          placed = 1'b1;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q     <= FA_IDLE;
      done_q      <= 1'b0;
      n_pred      <= '0;
      n_ill       <= '0;
      alert       <= 1'b0;
      alert_count <= '0;
      remove_req  <= 1'b0;
      insert_req  <= 1'b0;
      rd_q        <= '0;
      lut_wdata   <= '0;
    end else begin
      done_q <= pred_done;
      unique case (state_q)
        FA_IDLE:  if (remove_req || insert_req) state_q <= FA_READ;
        FA_READ: begin
          rd_q    <= lut_rdata;
          state_q <= FA_ADAPT;
        end
        FA_ADAPT: begin
          lut_wdata <= new_word;
          state_q   <= FA_WRITE;
        end
        FA_WRITE: begin
          state_q <= FA_IDLE;
          // a group ending in this same cycle overrides the clear below
          remove_req <= 1'b0;
          insert_req <= 1'b0;
        end
        default: state_q <= FA_IDLE;
      endcase
      if (done_rise) begin
        if (pred) alert_count <= alert_count + 1'b1;
        if (n_pred == 2'd3) begin
          n_pred <= '0;
          n_ill  <= '0;
          if (total >= 3'd3) begin
            remove_req <= 1'b1;
            insert_req <= 1'b0;
            alert      <= 1'b1;
          end else if (total <= 3'd1) begin
            insert_req <= 1'b1;
            remove_req <= 1'b0;
            alert      <= 1'b0;
          end
        end else begin
          n_pred <= n_pred + 1'b1;
          n_ill  <= total;
        end
      end

    end
  end
endmodule
