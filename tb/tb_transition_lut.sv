// tb_transition_lut: self-checking test of the transition table and its
// address/enable multiplexing. Preloads random words through the
// configuration port, then checks: data-collector reads, read data forced to
// zero without a read enable, feature-adapt reads and writes once its
// address-valid bit takes the address port, that a feature-adapt write
// without address-valid is ignored, and that reset blanks the read data.
module tb_transition_lut;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst;
  logic [7:0]  dc_addr, fa_addr, cfg_addr;
  logic        dc_rd_en, fa_addr_vld, fa_rd_en, fa_wr_en, cfg_we;
  logic [31:0] fa_wdata, cfg_wdata, rdata;
  logic [31:0] ref_mem [256];
  int checks = 0, failures = 0;

  transition_lut dut (.clk, .rst, .dc_addr, .dc_rd_en, .fa_addr, .fa_addr_vld,
                      .fa_rd_en, .fa_wr_en, .fa_wdata, .cfg_we, .cfg_addr,
                      .cfg_wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(input logic [31:0] exp, input string what);
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    rst = 1; dc_addr = 0; fa_addr = 0; cfg_addr = 0; dc_rd_en = 0; fa_addr_vld = 0;
    fa_rd_en = 0; fa_wr_en = 0; cfg_we = 0; fa_wdata = 0; cfg_wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = 8'(a); cfg_wdata = $urandom; ref_mem[a] = cfg_wdata;
    end
    @(negedge clk) cfg_we = 0;
    // data collector reads
    for (int i = 0; i < 100; i++) begin
      dc_addr = 8'($urandom); dc_rd_en = 1; fa_addr = 8'($urandom);
      expect_rd(ref_mem[dc_addr], "dc read");
    end
    dc_rd_en = 0;
    expect_rd(32'h0, "no read enable");
    // feature adapt read/write through the address mux
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      fa_addr_vld = 1; fa_addr = 8'($urandom); dc_addr = ~fa_addr; fa_rd_en = 1;
      expect_rd(ref_mem[fa_addr], "fa read");
      fa_wr_en = 1; fa_wdata = $urandom;
      ref_mem[fa_addr] = fa_wdata;
      @(negedge clk);
      fa_wr_en = 0;
      expect_rd(ref_mem[fa_addr], "fa write-back");
    end
    // write without address-valid is ignored
    @(negedge clk);
    fa_addr_vld = 0; fa_rd_en = 0; fa_addr = 8'h10; fa_wr_en = 1; fa_wdata = 32'hDEAD_BEEF;
    @(negedge clk);
    fa_wr_en = 0; dc_addr = 8'h10; dc_rd_en = 1;
    expect_rd(ref_mem[8'h10], "write without address-valid");
    // reset gates the output
    rst = 1;
    expect_rd(32'h0, "reset");
    @(negedge clk) rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
