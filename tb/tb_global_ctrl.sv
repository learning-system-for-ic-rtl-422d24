// tb_global_ctrl: self-checking test of the replay FSM.
// With a 64-entry address space and a 21-bit set, checks that: got_reset is
// set by reset and cleared by start; tck_en pulses every TCK_DIV clocks;
// during READ each address is applied to the pins for exactly one TCK period,
// in order, with the memory's bits; out rises after the last bit and stays
// until finish; idle pins are TMS=1, TDI=0, TRST_N=1; a reset during READ
// returns to the initial state.
module tb_global_ctrl;
  localparam int DIV = 5;
  localparam int AW  = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst, start, finish, tck_en, reading, out, got_reset;
  logic [AW-1:0] last_addr, mem_addr;
  logic          mem_tdi, mem_tms, mem_trst_n, jtag_tdi, jtag_tms, jtag_trst_n;
  logic [2:0]    mem [64];
  int checks = 0, failures = 0;

  global_ctrl #(.TCK_DIV(DIV), .AW(AW)) dut (.clk, .rst, .start, .finish, .last_addr,
    .tck_en, .mem_addr, .mem_tdi, .mem_tms, .mem_trst_n, .jtag_tdi, .jtag_tms,
    .jtag_trst_n, .reading, .out, .got_reset);

  assign {mem_tdi, mem_tms, mem_trst_n} = mem[mem_addr];

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    int n_tck, last_tck, gap;
    int seen [64];
    for (int a = 0; a < 64; a++) mem[a] = 3'($urandom);
    rst = 1; start = 0; finish = 0; last_addr = 6'd20;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check(got_reset && !out && !reading, "reset acknowledge");
    check(jtag_tms && !jtag_tdi && jtag_trst_n, "idle pins");
    repeat (7) @(negedge clk);
    start = 1;
    @(negedge clk) start = 0;
    check(reading && !got_reset, "start enters READ");
    n_tck = 0; last_tck = -1;
    for (int c = 0; c < 400 && !out; c++) begin
      if (tck_en) begin
        if (last_tck >= 0) check(c - last_tck == DIV, "tck_en period");
        last_tck = c;
        check({jtag_tdi, jtag_tms, jtag_trst_n} == mem[mem_addr], "pins carry memory bits");
        check(int'(mem_addr) == n_tck, "addresses in order");
        n_tck++;
      end
      @(negedge clk);
    end
    check(out && !reading, "out after the last bit");
    check(n_tck == 21, $sformatf("21 bits applied (%0d)", n_tck));
    repeat (10) @(negedge clk);
    check(out, "out held until finish");
    finish = 1;
    @(negedge clk) finish = 0;
    check(!out && !reading, "finish returns to INITIAL");
    // reset in the middle of READ
    start = 1;
    @(negedge clk) start = 0;
    repeat (30) @(negedge clk);
    check(reading, "second run reading");
    rst = 1;
    @(negedge clk) rst = 0;
    check(!reading && !out && got_reset, "reset during READ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
