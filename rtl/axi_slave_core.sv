// axi_slave_core: the detector packaged as a bus slave for a host processor.
//
// The host reaches the system through three 32-bit registers on an
// AXI4-Lite slave port; the complete system (complete_board) sits inside.
// One register carries the host's inputs and two carry the system's outputs:
//
//   0x0 CONTROL      read/write  bit 0 reset, bit 1 start, bit 2 finish
//   0x4 STATUS       read only   bit 0 got_reset, bit 1 out, bit 2 alert
//   0x8 ALERT_COUNT  read only   number of illegitimate predictions
//   0xC              reads zero
//
// The system is held in reset while the bus reset is active or CONTROL bit 0
// is set. A host runs a session by setting and clearing the reset bit and
// checking got_reset, writing start alone, polling STATUS until out is set,
// writing finish alone, and reading ALERT_COUNT. CONTROL is written as a
// whole word (byte lane 0), so each write replaces all three flags.
//
// Write channel: AWREADY and WREADY rise together, in the cycle in which
// both AWVALID and WVALID are high and no write response is pending; BVALID
// follows one cycle later and holds until BREADY. Read channel: ARREADY is
// high while no read data is pending; RVALID follows one cycle later and
// holds until RREADY. Every response is OKAY. The protection signals are
// not used and are left out. Everything runs on the bus clock.
//
// Packaging the system as a slave with a set of 32-bit registers, the split
// into one input and two output registers, and the flags in them follow the
// published design. The register map, the bit positions, the channel timing
// and the running of the system on the bus clock are this design's. The
// memory load ports (pin memories, forest, transition table) and the
// observation outputs of complete_board are passed through as plain ports;
// the alert is also brought out as a pin, next to its STATUS bit.
module axi_slave_core
  import jtag_sec_pkg::*;
#(
  parameter int unsigned TCK_DIV    = 5,
  parameter int unsigned STIM_DEPTH = 32768,
  parameter int unsigned NT         = N_TREES,
  parameter int unsigned DEPTH      = TREE_DEPTH,
  localparam int unsigned SAW       = $clog2(STIM_DEPTH),
  localparam int unsigned TAW       = $clog2(DEPTH),
  localparam int unsigned SELW      = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic              s_axi_aclk,
  input  logic              s_axi_aresetn,
  // write address and data
  input  logic [3:0]        s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  // read address and data
  input  logic [3:0]        s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // memory loading, passed to the system
  input  logic              stim_we,
  input  logic [SAW-1:0]    stim_waddr,
  input  logic              stim_tdi,
  input  logic              stim_tms,
  input  logic              stim_trst_n,
  input  logic [SAW-1:0]    last_addr,
  input  logic              tree_we,
  input  logic [SELW-1:0]   tree_sel,
  input  logic [TAW-1:0]    tree_waddr,
  input  logic [NODE_W-1:0] tree_wdata,
  input  logic              lut_cfg_we,
  input  logic [IR_W-1:0]   lut_cfg_addr,
  input  logic [31:0]       lut_cfg_wdata,
  // observation
  output logic              alert,
  output logic              tdo,
  output logic              pred_done,
  output logic              pred,
  output logic              remove_req,
  output logic              insert_req
);
  localparam logic [1:0] RESP_OKAY = 2'b00;

  logic        clk;
  logic [2:0]  ctrl_q;
  logic        sys_rst, out, got_reset;
  logic [31:0] alert_count;
  logic        wr_fire, rd_fire;

  assign clk     = s_axi_aclk;
  assign sys_rst = !s_axi_aresetn || ctrl_q[0];

  // write channel: address and data are accepted together
  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!s_axi_aresetn) begin
      ctrl_q       <= '0;
      s_axi_bvalid <= 1'b0;
    end else begin
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        if (s_axi_awaddr[3:2] == 2'd0 && s_axi_wstrb[0]) ctrl_q <= s_axi_wdata[2:0];
      end else if (s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // read channel
  assign rd_fire       = s_axi_arvalid && s_axi_arready;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_rresp   = RESP_OKAY;

  always_ff @(posedge clk) begin
    if (!s_axi_aresetn) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
    end else if (rd_fire) begin
      s_axi_rvalid <= 1'b1;
      unique case (s_axi_araddr[3:2])
        2'd0:    s_axi_rdata <= {29'd0, ctrl_q};
        2'd1:    s_axi_rdata <= {29'd0, alert, out, got_reset};
        2'd2:    s_axi_rdata <= alert_count;
        default: s_axi_rdata <= '0;
      endcase
    end else if (s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  complete_board #(
    .TCK_DIV(TCK_DIV), .STIM_DEPTH(STIM_DEPTH), .NT(NT), .DEPTH(DEPTH), .CNT_W(32)
  ) u_board (
    .clk          (clk),
    .rst          (sys_rst),
    .start        (ctrl_q[1]),
    .finish       (ctrl_q[2]),
    .out          (out),
    .got_reset    (got_reset),
    .alert        (alert),
    .alert_count  (alert_count),
    .stim_we      (stim_we),
    .stim_waddr   (stim_waddr),
    .stim_tdi     (stim_tdi),
    .stim_tms     (stim_tms),
    .stim_trst_n  (stim_trst_n),
    .last_addr    (last_addr),
    .tree_we      (tree_we),
    .tree_sel     (tree_sel),
    .tree_waddr   (tree_waddr),
    .tree_wdata   (tree_wdata),
    .lut_cfg_we   (lut_cfg_we),
    .lut_cfg_addr (lut_cfg_addr),
    .lut_cfg_wdata(lut_cfg_wdata),
    .tdo          (tdo),
    .pred_done    (pred_done),
    .pred         (pred),
    .remove_req   (remove_req),
    .insert_req   (insert_req)
  );

  // a response, once offered, is held until the master takes it
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!s_axi_aresetn)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
