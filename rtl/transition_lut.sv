// transition_lut: the look-up table of legal instruction transitions with its
// access logic.
//
// Two clients share one 256 x 32 memory (lut_mem). The data collector only
// reads, addressed by the current opcode, to derive the "instruction
// undefined" and "transition miss" features. The feature adapt logic reads
// and writes it to learn or forget transitions. As in the document, the
// 'fa_addr_vld' bit from the feature adapt logic steers the address and
// write-data multiplexers to the adapt side, and the two read enables are
// ORed. A word whose four opcodes are all 8'hFF marks an undefined
// instruction.
//
// This design adds a configuration write port (cfg_*), with priority over
// both clients, so the table can be preloaded with the chip's instruction set
// after power-up; the document loads it with the FPGA bitstream.
//
// Timing: rdata is combinational from the selected address and enables; a
// write takes effect at the next rising clock edge.
module transition_lut #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  // data collector (read only)
  input  logic [AW-1:0]    dc_addr,
  input  logic             dc_rd_en,
  // feature adapt logic
  input  logic [AW-1:0]    fa_addr,
  input  logic             fa_addr_vld,
  input  logic             fa_rd_en,
  input  logic             fa_wr_en,
  input  logic [WIDTH-1:0] fa_wdata,
  // configuration preload
  input  logic             cfg_we,
  input  logic [AW-1:0]    cfg_addr,
  input  logic [WIDTH-1:0] cfg_wdata,
  // shared read data
  output logic [WIDTH-1:0] rdata
);
  logic [AW-1:0]    addr;
  logic [WIDTH-1:0] wdata;
  logic             rd_en, wr_en;

  always_comb begin
    if (cfg_we) begin
      addr  = cfg_addr;
      wdata = cfg_wdata;
    end else if (fa_addr_vld) begin
      addr  = fa_addr;
      wdata = fa_wdata;
    end else begin
      addr  = dc_addr;
      wdata = fa_wdata;
    end
    rd_en = fa_rd_en || dc_rd_en;
    wr_en = cfg_we || (fa_wr_en && fa_addr_vld);
  end

  lut_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_lutmem (
    .clk         (clk),
    .rst         (rst),
    .address     (addr),
    .data_in     (wdata),
    .read_enable (rd_en),
    .write_enable(wr_en),
    .data_out    (rdata)
  );
endmodule
