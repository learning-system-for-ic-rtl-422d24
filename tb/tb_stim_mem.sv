// tb_stim_mem: self-checking test of a pin bit-stream memory at its full
// depth: fills every address with a random bit, reads all back.
module tb_stim_mem;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int DEPTH = 32768;
  logic        we;
  logic [14:0] waddr, raddr;
  logic [0:0]  wdata, rdata;
  int checks = 0, failures = 0;

  stim_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  bit ref_bits [DEPTH];

  function automatic logic bit_at(int a);
    return ref_bits[a];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int a = 0; a < DEPTH; a++) ref_bits[a] = 1'($urandom);
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 15'(a); wdata = bit_at(a);
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 15'(a);
      #1;
      checks++;
      if (rdata[0] !== bit_at(a)) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0b", a, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
