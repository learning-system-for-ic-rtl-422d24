// lut_mem: the 256 x 32-bit instruction-transition memory (LUTMEM).
//
// Each word, addressed by an 8-bit opcode, holds four 8-bit opcodes that may
// legally follow that instruction. Reads are asynchronous and gated: data_out
// shows the addressed word while read_enable is high and is zero otherwise or
// during reset. Writes happen on the rising clock edge when write_enable is
// high and reset is low. The gating follows the register-transfer schematic
// of the document; the memory contents themselves are not reset.
module lut_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    address,
  input  logic [WIDTH-1:0] data_in,
  input  logic             read_enable,
  input  logic             write_enable,
  output logic [WIDTH-1:0] data_out
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (write_enable && !rst) mem[address] <= data_in;
  end

  assign data_out = (rst || !read_enable) ? '0 : mem[address];
endmodule
