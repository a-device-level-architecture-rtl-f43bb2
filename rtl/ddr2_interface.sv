// ddr2_interface: multi-port wrapper around the DDR2 memory controller.
//
// All transfers to and from external memory pass through here. Three port
// controllers give each internal component its own control and data FIFOs:
//   port 0: OCM controller, 128-bit data
//   port 1: RapidIO initiator side, 64-bit data
//   port 2: RapidIO target side, 64-bit data
// A round-robin port arbiter grants the controller to one port for a whole
// command, and the granted port's user-interface signals are multiplexed onto
// the controller (whose core is outside this module; its user interface is the
// app_*/rd_* port list). A read command gives the controller back as soon as
// its last burst is requested: a small FIFO records the port of every read
// burst issued, and returning read data (two words per burst, in request
// order, as the controller core returns it) goes to that port. Ports work
// concurrently on their FIFOs, but DDR2 accesses are still serialized.
// Until phy_init_done every port sees the controller's FIFOs as full.
// The controller core at 128 bits, the three ports and round-robin
// arbitration follow the architecture; the rest is this design's choice.
module ddr2_interface
  import fcp_pkg::*;
#(
  parameter int DATA_DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  // port 0 (OCM, 128-bit)
  input  logic            p0_cmd_valid,
  output logic            p0_cmd_ready,
  input  mem_cmd_t        p0_cmd,
  input  logic            p0_wr_valid,
  output logic            p0_wr_ready,
  input  logic [DW-1:0]   p0_wr_data,
  output logic            p0_rd_valid,
  input  logic            p0_rd_ready,
  output logic [DW-1:0]   p0_rd_data,
  output logic            p0_rsp_valid,
  input  logic            p0_rsp_ready,
  output logic            p0_rsp_wr,
  // port 1 (RapidIO initiator, 64-bit)
  input  logic            p1_cmd_valid,
  output logic            p1_cmd_ready,
  input  mem_cmd_t        p1_cmd,
  input  logic            p1_wr_valid,
  output logic            p1_wr_ready,
  input  logic [SW-1:0]   p1_wr_data,
  output logic            p1_rd_valid,
  input  logic            p1_rd_ready,
  output logic [SW-1:0]   p1_rd_data,
  output logic            p1_rsp_valid,
  input  logic            p1_rsp_ready,
  output logic            p1_rsp_wr,
  // port 2 (RapidIO target, 64-bit)
  input  logic            p2_cmd_valid,
  output logic            p2_cmd_ready,
  input  mem_cmd_t        p2_cmd,
  input  logic            p2_wr_valid,
  output logic            p2_wr_ready,
  input  logic [SW-1:0]   p2_wr_data,
  output logic            p2_rd_valid,
  input  logic            p2_rd_ready,
  output logic [SW-1:0]   p2_rd_data,
  output logic            p2_rsp_valid,
  input  logic            p2_rsp_ready,
  output logic            p2_rsp_wr,
  // DDR2 controller core user interface
  input  logic            phy_init_done,
  output logic            app_af_wren,
  output logic [2:0]      app_af_cmd,
  output logic [30:0]     app_af_addr,
  input  logic            app_af_afull,
  output logic            app_wdf_wren,
  output logic [DW-1:0]   app_wdf_data,
  output logic [DW/8-1:0] app_wdf_mask_data,
  input  logic            app_wdf_afull,
  input  logic            rd_data_valid,
  input  logic [DW-1:0]   rd_data_fifo_out
);
  localparam int NP = 3;

  logic [NP-1:0]    req, gnt, done, af_wren, wdf_wren;
  logic [1:0]       gnt_idx;
  logic [2:0]       af_cmd  [NP];
  logic [30:0]      af_addr [NP];
  logic [DW-1:0]    wdf_data[NP];
  logic [DW/8-1:0]  wdf_mask[NP];
  logic             busy;
  logic [1:0]       rd_owner;   // port that issued the oldest read burst in flight
  logic             own_valid, own_in_ready, rd_second;

  // The controller is unusable until its PHY has calibrated.
  wire af_afull_i  = app_af_afull  || !phy_init_done;
  wire wdf_afull_i = app_wdf_afull || !phy_init_done;

  ddr2_port_ctrl #(.UW(DW), .DATA_DEPTH(DATA_DEPTH)) u_port0 (
    .clk, .rst_n,
    .cmd_valid(p0_cmd_valid), .cmd_ready(p0_cmd_ready), .cmd(p0_cmd),
    .wr_valid(p0_wr_valid), .wr_ready(p0_wr_ready), .wr_data(p0_wr_data),
    .rd_valid(p0_rd_valid), .rd_ready(p0_rd_ready), .rd_data(p0_rd_data),
    .rsp_valid(p0_rsp_valid), .rsp_ready(p0_rsp_ready), .rsp_wr(p0_rsp_wr),
    .req(req[0]), .gnt(gnt[0]), .done(done[0]),
    .af_wren(af_wren[0]), .af_cmd(af_cmd[0]), .af_addr(af_addr[0]), .af_afull(af_afull_i),
    .wdf_wren(wdf_wren[0]), .wdf_data(wdf_data[0]), .wdf_mask(wdf_mask[0]), .wdf_afull(wdf_afull_i),
    .rd_data_valid(rd_data_valid && rd_owner == 2'd0), .rd_data_in(rd_data_fifo_out));

  ddr2_port_ctrl #(.UW(SW), .DATA_DEPTH(DATA_DEPTH)) u_port1 (
    .clk, .rst_n,
    .cmd_valid(p1_cmd_valid), .cmd_ready(p1_cmd_ready), .cmd(p1_cmd),
    .wr_valid(p1_wr_valid), .wr_ready(p1_wr_ready), .wr_data(p1_wr_data),
    .rd_valid(p1_rd_valid), .rd_ready(p1_rd_ready), .rd_data(p1_rd_data),
    .rsp_valid(p1_rsp_valid), .rsp_ready(p1_rsp_ready), .rsp_wr(p1_rsp_wr),
    .req(req[1]), .gnt(gnt[1]), .done(done[1]),
    .af_wren(af_wren[1]), .af_cmd(af_cmd[1]), .af_addr(af_addr[1]), .af_afull(af_afull_i),
    .wdf_wren(wdf_wren[1]), .wdf_data(wdf_data[1]), .wdf_mask(wdf_mask[1]), .wdf_afull(wdf_afull_i),
    .rd_data_valid(rd_data_valid && rd_owner == 2'd1), .rd_data_in(rd_data_fifo_out));

  ddr2_port_ctrl #(.UW(SW), .DATA_DEPTH(DATA_DEPTH)) u_port2 (
    .clk, .rst_n,
    .cmd_valid(p2_cmd_valid), .cmd_ready(p2_cmd_ready), .cmd(p2_cmd),
    .wr_valid(p2_wr_valid), .wr_ready(p2_wr_ready), .wr_data(p2_wr_data),
    .rd_valid(p2_rd_valid), .rd_ready(p2_rd_ready), .rd_data(p2_rd_data),
    .rsp_valid(p2_rsp_valid), .rsp_ready(p2_rsp_ready), .rsp_wr(p2_rsp_wr),
    .req(req[2]), .gnt(gnt[2]), .done(done[2]),
    .af_wren(af_wren[2]), .af_cmd(af_cmd[2]), .af_addr(af_addr[2]), .af_afull(af_afull_i),
    .wdf_wren(wdf_wren[2]), .wdf_data(wdf_data[2]), .wdf_mask(wdf_mask[2]), .wdf_afull(wdf_afull_i),
    .rd_data_valid(rd_data_valid && rd_owner == 2'd2), .rd_data_in(rd_data_fifo_out));

  // Read data comes back in request order: a FIFO of the port that issued
  // each read burst steers every returning pair of words to its port.
  // at most DATA_DEPTH/2 bursts in flight per port: 3*DATA_DEPTH/2 in all
  localparam int OWN_DEPTH = 2 * DATA_DEPTH;
  wire        rd_issue = app_af_wren && app_af_cmd == 3'b001;
  sync_fifo #(.W(2), .DEPTH(OWN_DEPTH)) u_owner_fifo (
    .clk, .rst_n, .in_valid(rd_issue), .in_ready(own_in_ready), .in_data(gnt_idx),
    .out_valid(own_valid), .out_ready(rd_data_valid && rd_second), .out_data(rd_owner),
    .count());
  always_ff @(posedge clk) begin
    if (!rst_n)             rd_second <= 1'b0;
    else if (rd_data_valid) rd_second <= !rd_second;
  end

  a_owner: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_issue |-> own_in_ready) and (rd_data_valid |-> own_valid));

  ddr2_port_arbiter #(.N(NP)) u_arb (
    .clk, .rst_n, .req, .done, .gnt, .gnt_idx, .busy);

  // user-interface multiplexer: only the granted port drives the controller
  always_comb begin
    app_af_wren       = busy && af_wren[gnt_idx];
    app_af_cmd        = af_cmd[gnt_idx];
    app_af_addr       = af_addr[gnt_idx];
    app_wdf_wren      = busy && wdf_wren[gnt_idx];
    app_wdf_data      = wdf_data[gnt_idx];
    app_wdf_mask_data = wdf_mask[gnt_idx];
  end
endmodule
