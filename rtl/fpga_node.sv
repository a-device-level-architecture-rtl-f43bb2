// fpga_node: device-level architecture of one FPGA co-processor node.
//
// The node is a slave co-processor of a host on a Serial RapidIO fabric. Most
// of it is a fixed framework for moving data; only the co-processors change
// from application to application.
//   ddr2_interface  - multi-port wrapper of the external DDR2 controller
//                     (128-bit @ 200 MHz internally), round-robin arbitration
//   srio_interface  - simplified command wrapper of the RapidIO endpoint
//                     (64-bit @ 125 MHz): initiator half driven by the node
//                     controller, independent target half that makes DDR2
//                     and the control BRAM remotely accessible
//   ocm_controller  - moves data DDR2 <-> on-chip SRAMs (four interfaces)
//   coproc_wrapper  - NCP co-processors on OCM interfaces 0..NCP-1
//   node_controller - executes instruction bundles from the control BRAM;
//                     its SRAM is OCM interface 3
// The DDR2 controller core and the RapidIO endpoint (PHY and logical layer)
// are outside: their user interfaces are this module's ports. One clock
// drives everything here (the original design ran the RapidIO side at 125 MHz
// and the memory side at 200 MHz); rst_n is synchronous, active low.
module fpga_node
  import fcp_pkg::*;
#(
  parameter int NCP        = 3,
  parameter int BUF_WORDS  = 4096,
  parameter int NC_WORDS   = 8192,
  parameter int CB_WORDS   = 1024,
  parameter int DATA_DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      dev_id,
  output logic            nc_running,
  // RapidIO endpoint user ports
  output logic            ireq_valid,
  input  logic            ireq_ready,
  output pkt_beat_t       ireq,
  input  logic            iresp_valid,
  output logic            iresp_ready,
  input  pkt_beat_t       iresp,
  input  logic            treq_valid,
  output logic            treq_ready,
  input  pkt_beat_t       treq,
  output logic            tresp_valid,
  input  logic            tresp_ready,
  output pkt_beat_t       tresp,
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
  localparam int NS = 4;
  localparam int CBW = $clog2(CB_WORDS);

  // DDR2 port wiring
  logic          p0_cmd_valid, p0_cmd_ready, p0_wr_valid, p0_wr_ready, p0_rd_valid, p0_rd_ready;
  logic          p0_rsp_valid, p0_rsp_ready, p0_rsp_wr;
  mem_cmd_t      p0_cmd;
  logic [DW-1:0] p0_wr_data, p0_rd_data;
  logic          p1_cmd_valid, p1_cmd_ready, p1_wr_valid, p1_wr_ready, p1_rd_valid, p1_rd_ready;
  logic          p1_rsp_valid, p1_rsp_ready, p1_rsp_wr;
  mem_cmd_t      p1_cmd;
  logic [SW-1:0] p1_wr_data, p1_rd_data;
  logic          p2_cmd_valid, p2_cmd_ready, p2_wr_valid, p2_wr_ready, p2_rd_valid, p2_rd_ready;
  logic          p2_rsp_valid, p2_rsp_ready, p2_rsp_wr;
  mem_cmd_t      p2_cmd;
  logic [SW-1:0] p2_wr_data, p2_rd_data;

  ddr2_interface #(.DATA_DEPTH(DATA_DEPTH)) u_ddr2 (
    .clk, .rst_n,
    .p0_cmd_valid, .p0_cmd_ready, .p0_cmd, .p0_wr_valid, .p0_wr_ready, .p0_wr_data,
    .p0_rd_valid, .p0_rd_ready, .p0_rd_data, .p0_rsp_valid, .p0_rsp_ready, .p0_rsp_wr,
    .p1_cmd_valid, .p1_cmd_ready, .p1_cmd, .p1_wr_valid, .p1_wr_ready, .p1_wr_data,
    .p1_rd_valid, .p1_rd_ready, .p1_rd_data, .p1_rsp_valid, .p1_rsp_ready, .p1_rsp_wr,
    .p2_cmd_valid, .p2_cmd_ready, .p2_cmd, .p2_wr_valid, .p2_wr_ready, .p2_wr_data,
    .p2_rd_valid, .p2_rd_ready, .p2_rd_data, .p2_rsp_valid, .p2_rsp_ready, .p2_rsp_wr,
    .phy_init_done, .app_af_wren, .app_af_cmd, .app_af_addr, .app_af_afull,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data, .app_wdf_afull,
    .rd_data_valid, .rd_data_fifo_out);

  // node controller <-> RapidIO interface
  logic           s_cmd_valid, s_cmd_ready, s_cpl_valid, s_cpl_ready;
  srio_cmd_t      s_cmd;
  srio_cpl_t      s_cpl;
  logic           imem_en, nc_start;
  logic [CBW-1:0] imem_addr;
  logic [SW-1:0]  imem_rdata, nc_status;
  logic [15:0]    nc_start_pc;

  srio_interface #(.CB_WORDS(CB_WORDS)) u_srio (
    .clk, .rst_n, .dev_id,
    .cmd_valid(s_cmd_valid), .cmd_ready(s_cmd_ready), .cmd(s_cmd),
    .cpl_valid(s_cpl_valid), .cpl_ready(s_cpl_ready), .cpl(s_cpl),
    .imem_addr, .imem_en, .imem_rdata, .nc_start, .nc_start_pc, .nc_status,
    .ireq_valid, .ireq_ready, .ireq, .iresp_valid, .iresp_ready, .iresp,
    .treq_valid, .treq_ready, .treq, .tresp_valid, .tresp_ready, .tresp,
    .p1_cmd_valid, .p1_cmd_ready, .p1_cmd, .p1_wr_valid, .p1_wr_ready, .p1_wr_data,
    .p1_rd_valid, .p1_rd_ready, .p1_rd_data, .p1_rsp_valid, .p1_rsp_ready, .p1_rsp_wr,
    .p2_cmd_valid, .p2_cmd_ready, .p2_cmd, .p2_wr_valid, .p2_wr_ready, .p2_wr_data,
    .p2_rd_valid, .p2_rd_ready, .p2_rd_data, .p2_rsp_valid, .p2_rsp_ready, .p2_rsp_wr);

  // OCM controller and its SRAM interfaces
  logic              o_cmd_valid, o_cmd_ready, o_rsp_valid, o_rsp_ready;
  ocm_cmd_t          o_cmd;
  ocm_rsp_t          o_rsp;
  logic [DW-1:0]     sram_data_i;
  logic [OCM_AW-1:0] sram_addr_i;
  logic [NS-1:0]     sram_cs_i;
  logic              sram_we_i;
  logic [DW-1:0]     sram_data_o [NS];

  ocm_controller #(.NS(NS), .RD_LAT(2)) u_ocm (
    .clk, .rst_n,
    .cmd_valid(o_cmd_valid), .cmd_ready(o_cmd_ready), .cmd(o_cmd),
    .rsp_valid(o_rsp_valid), .rsp_ready(o_rsp_ready), .rsp(o_rsp),
    .d_cmd_valid(p0_cmd_valid), .d_cmd_ready(p0_cmd_ready), .d_cmd(p0_cmd),
    .d_wr_valid(p0_wr_valid), .d_wr_ready(p0_wr_ready), .d_wr_data(p0_wr_data),
    .d_rd_valid(p0_rd_valid), .d_rd_ready(p0_rd_ready), .d_rd_data(p0_rd_data),
    .d_rsp_valid(p0_rsp_valid), .d_rsp_ready(p0_rsp_ready), .d_rsp_wr(p0_rsp_wr),
    .sram_data_i, .sram_addr_i, .sram_cs_i, .sram_we_i, .sram_data_o);

  // co-processors on OCM interfaces 0 .. NCP-1
  logic [NCP-1:0]    cp_start, cp_cfg_we, cp_busy;
  logic [OCM_AW-1:0] cp_len;
  logic [3:0]        cp_cfg_addr;
  logic [31:0]       cp_cfg_data;

  for (genvar i = 0; i < NCP; i++) begin : g_cp
    coproc_wrapper #(.BUF_WORDS(BUF_WORDS)) u_cp (
      .clk, .rst_n,
      .data_i(sram_data_i), .addr_i(sram_addr_i), .cs_i(sram_cs_i[i]), .we_i(sram_we_i),
      .data_o(sram_data_o[i]),
      .cfg_we(cp_cfg_we[i]), .cfg_addr(cp_cfg_addr), .cfg_data(cp_cfg_data),
      .start(cp_start[i]), .len(cp_len), .busy(cp_busy[i]), .done());
  end
  for (genvar i = NCP; i < NS - 1; i++) begin : g_unused
    assign sram_data_o[i] = '0;
  end

  node_controller #(.NCP(NCP), .CB_WORDS(CB_WORDS), .NC_WORDS(NC_WORDS)) u_nc (
    .clk, .rst_n,
    .start(nc_start), .start_pc(nc_start_pc), .status(nc_status), .running(nc_running),
    .imem_en, .imem_addr, .imem_rdata,
    .ocm_cmd_valid(o_cmd_valid), .ocm_cmd_ready(o_cmd_ready), .ocm_cmd(o_cmd),
    .ocm_rsp_valid(o_rsp_valid), .ocm_rsp_ready(o_rsp_ready),
    .srio_cmd_valid(s_cmd_valid), .srio_cmd_ready(s_cmd_ready), .srio_cmd(s_cmd),
    .srio_cpl_valid(s_cpl_valid), .srio_cpl_ready(s_cpl_ready), .srio_cpl(s_cpl),
    .cp_start, .cp_len, .cp_cfg_we, .cp_cfg_addr, .cp_cfg_data, .cp_busy,
    .data_i(sram_data_i), .addr_i(sram_addr_i), .cs_i(sram_cs_i[NS-1]), .we_i(sram_we_i),
    .data_o(sram_data_o[NS-1]));

  initial assert (NCP >= 1 && NCP <= NS - 1) else $error("fpga_node: NCP must be 1..3");
endmodule
