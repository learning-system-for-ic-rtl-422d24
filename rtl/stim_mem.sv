// stim_mem: memory holding one JTAG pin's bit stream (TDI, TMS or TRST).
//
// The complete system replays a recorded instruction set from three such
// memories, one per pin, as the document does. Each is DEPTH x WIDTH with a
// synchronous write port (used to load a set) and an asynchronous read port
// (addressed by the global control FSM). DEPTH defaults to 32768, enough for
// the largest instruction set the document reports (24 924 bits); that size
// is this design's choice. Contents are not reset.
module stim_mem #(
  parameter int unsigned DEPTH = 32768,
  parameter int unsigned WIDTH = 1,
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
