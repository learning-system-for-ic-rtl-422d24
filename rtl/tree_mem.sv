// tree_mem: storage for the structure of one decision tree.
//
// A 512-word by 40-bit memory with an asynchronous (combinational) read port
// and a synchronous write port. On an FPGA it maps to distributed LUT RAM, as
// in the document, where every tree of the parallel forest has a memory of
// its own. Word layout (see jtag_sec_pkg): numerical nodes use one word,
// categorical nodes two consecutive words (node line, then candidate values).
// The write port, used to load a trained forest, is this design's addition:
// the document fills the memories from the FPGA bitstream.
//
// Timing: rdata follows raddr in the same cycle; a write lands on the rising
// clock edge where we is high. Contents are not reset.
module tree_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
