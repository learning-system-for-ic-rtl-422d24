// tb_feature_adapt: self-checking test of the alert logic and LUT adaptation.
// Random predictions (a rising edge of pred_done with a class) arrive for
// random current/next opcode pairs while the testbench plays the transition
// table. An independent model forms groups of four: 3-4 illegitimate votes
// remove the next opcode from the current opcode's word and set the alert,
// 0-1 insert it (lowest free byte, 8'h00 or 8'hFF) and clear the alert, 2
// changes nothing. After each prediction the alert, the alert counter and
// the adapted table word are compared, and the write is checked to happen
// four cycles after the prediction that closes a group.
module tb_feature_adapt;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, pred_done, pred;
  logic [7:0]  cur_instr, nxt_instr, lut_addr;
  logic        lut_addr_vld, lut_rd_en, lut_wr_en, alert, remove_req, insert_req;
  logic [31:0] lut_wdata, lut_rdata;
  logic [31:0] alert_count;
  logic [31:0] lut [256];
  logic [31:0] ref_lut [256];
  int checks = 0, failures = 0;
  int n_remove = 0, n_insert = 0, n_keep = 0, n_full = 0;
  int cyc = 0, wr_cyc = -1;

  feature_adapt dut (.clk, .rst, .cur_instr, .nxt_instr, .pred_done, .pred,
                     .lut_addr, .lut_addr_vld, .lut_rd_en, .lut_wr_en, .lut_wdata,
                     .lut_rdata, .alert, .alert_count, .remove_req, .insert_req);

  assign lut_rdata = (lut_rd_en && lut_addr_vld) ? lut[lut_addr] : 32'h0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (lut_wr_en && lut_addr_vld) begin
      lut[lut_addr] <= lut_wdata;
      wr_cyc <= cyc;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] adapt(logic [31:0] w, logic [7:0] nxt, bit remove);
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
      n_full++;
    end
    return w;
  endfunction

  initial begin
    int n_in_group = 0, n_ill = 0, exp_count = 0, done_cyc;
    bit exp_alert = 0;
    rst = 1; pred_done = 0; pred = 0; cur_instr = 0; nxt_instr = 0;
    for (int a = 0; a < 256; a++) begin
      case ($urandom_range(3))
        0: lut[a] = 32'hFFFF_FFFF;
        1: lut[a] = {8'($urandom_range(7)), 8'($urandom_range(7)), 8'($urandom_range(7)), 8'h00};
        default: lut[a] = {8'($urandom_range(1, 7)), 8'($urandom_range(1, 7)),
                           8'($urandom_range(1, 7)), 8'($urandom_range(1, 7))};
      endcase
      ref_lut[a] = lut[a];
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      cur_instr = 8'($urandom_range(15));
      nxt_instr = 8'($urandom_range(1, 7));
      pred = ($urandom_range(99) < 55);
      pred_done = 1;
      done_cyc = cyc;
      exp_count += pred;
      n_ill += pred;
      n_in_group++;
      if (n_in_group == 4) begin
        if (n_ill >= 3) begin
          exp_alert = 1; n_remove++;
          ref_lut[cur_instr] = adapt(ref_lut[cur_instr], nxt_instr, 1);
        end else if (n_ill <= 1) begin
          exp_alert = 0; n_insert++;
          ref_lut[cur_instr] = adapt(ref_lut[cur_instr], nxt_instr, 0);
        end else n_keep++;
      end
      @(negedge clk);
      checks++;
      if (alert !== exp_alert || alert_count !== 32'(exp_count)) begin
        failures++;
        $display("pred %0d: alert %0b count %0d expected %0b %0d", i, alert, alert_count,
                 exp_alert, exp_count);
      end
      repeat (6) @(negedge clk);
      pred_done = 0;
      if (n_in_group == 4 && n_ill != 2) begin
        checks++;
        if (wr_cyc != done_cyc + 4) begin
          failures++;
          $display("pred %0d: write at cycle %0d, expected %0d", i, wr_cyc, done_cyc + 4);
        end
      end
      checks++;
      if (lut[cur_instr] !== ref_lut[cur_instr]) begin
        failures++;
        $display("pred %0d: LUT[%h] = %h expected %h", i, cur_instr, lut[cur_instr], ref_lut[cur_instr]);
      end
      if (n_in_group == 4) begin
        n_in_group = 0; n_ill = 0;
      end
      repeat ($urandom_range(3)) @(negedge clk);
    end
    for (int a = 0; a < 256; a++) begin
      checks++;
      if (lut[a] !== ref_lut[a]) begin
        failures++;
        $display("final LUT[%0d] = %h expected %h", a, lut[a], ref_lut[a]);
      end
    end
    checks++;
    if (n_remove == 0 || n_insert == 0 || n_keep == 0) begin
      failures++;
      $display("coverage: remove %0d insert %0d keep %0d", n_remove, n_insert, n_keep);
    end
    $display("groups: remove %0d, insert %0d, unchanged %0d; insert into full word %0d",
             n_remove, n_insert, n_keep, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
