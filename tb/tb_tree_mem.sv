// tb_tree_mem: self-checking test of the 512 x 40-bit tree memory.
// Writes random words to every address through the write port, then reads
// them all back through the asynchronous read port and compares with a copy
// kept in the testbench; also checks that a read sees a write one edge later.
module tb_tree_mem;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [8:0]  waddr, raddr;
  logic [39:0] wdata, rdata;
  logic [39:0] ref_mem [512];
  int checks = 0, failures = 0;

  tree_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = {8'($urandom), $urandom};
      ref_mem[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 511; a >= 0; a--) begin
      raddr = 9'(a);
      #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("addr %0d: got %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    // write then read in the following cycle
    @(negedge clk);
    we = 1; waddr = 9'd77; wdata = 40'hA5_1234_5678; raddr = 9'd77;
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== 40'hA5_1234_5678) begin
      failures++;
      $display("write-through read failed: %h", rdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
