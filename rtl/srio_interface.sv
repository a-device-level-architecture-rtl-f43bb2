// srio_interface: wrapper around the Serial RapidIO endpoint.
//
// Gives the rest of the node a simplified command interface to the
// endpoint's four user ports (initiator request/response, target
// request/response). Two independent halves:
//   initiator: command FIFO (from the node controller) -> IREQ CTRL ->
//              outstanding queue -> RESP CTRL -> completion FIFO; data moves
//              through DDR2 port 1 (IREQ reads, RESP writes).
//   target   : TREQ CTRL -> response queue -> TRESP CTRL; data moves through
//              DDR2 port 2 (TREQ writes, TRESP reads). Remote writes to
//              control space fill the control BRAM, the node controller's
//              instruction memory, whose second port the node controller reads.
// The target half needs no help from local control logic, which makes local
// memory transparently accessible to remote devices. Each DDR2 port's command
// input is shared by the two controllers of a half (writer has priority), and
// port responses are routed by direction. Single clock domain.
module srio_interface
  import fcp_pkg::*;
#(
  parameter int CB_WORDS  = 1024,
  parameter int CMD_DEPTH = 4,
  parameter int TRK_DEPTH = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   dev_id,
  // node controller side
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  srio_cmd_t    cmd,
  output logic         cpl_valid,
  input  logic         cpl_ready,
  output srio_cpl_t    cpl,
  input  logic [$clog2(CB_WORDS)-1:0] imem_addr,
  input  logic         imem_en,
  output logic [SW-1:0] imem_rdata,
  output logic         nc_start,
  output logic [15:0]  nc_start_pc,
  input  logic [SW-1:0] nc_status,
  // endpoint user ports
  output logic         ireq_valid,
  input  logic         ireq_ready,
  output pkt_beat_t    ireq,
  input  logic         iresp_valid,
  output logic         iresp_ready,
  input  pkt_beat_t    iresp,
  input  logic         treq_valid,
  output logic         treq_ready,
  input  pkt_beat_t    treq,
  output logic         tresp_valid,
  input  logic         tresp_ready,
  output pkt_beat_t    tresp,
  // DDR2 port 1 (initiator)
  output logic         p1_cmd_valid,
  input  logic         p1_cmd_ready,
  output mem_cmd_t     p1_cmd,
  output logic         p1_wr_valid,
  input  logic         p1_wr_ready,
  output logic [SW-1:0] p1_wr_data,
  input  logic         p1_rd_valid,
  output logic         p1_rd_ready,
  input  logic [SW-1:0] p1_rd_data,
  input  logic         p1_rsp_valid,
  output logic         p1_rsp_ready,
  input  logic         p1_rsp_wr,
  // DDR2 port 2 (target)
  output logic         p2_cmd_valid,
  input  logic         p2_cmd_ready,
  output mem_cmd_t     p2_cmd,
  output logic         p2_wr_valid,
  input  logic         p2_wr_ready,
  output logic [SW-1:0] p2_wr_data,
  input  logic         p2_rd_valid,
  output logic         p2_rd_ready,
  input  logic [SW-1:0] p2_rd_data,
  input  logic         p2_rsp_valid,
  output logic         p2_rsp_ready,
  input  logic         p2_rsp_wr
);
  localparam int TRKW = $bits(ttype_e) + 8 + AW + 9 + 1;
  localparam int TQW  = 2 + 8 + 8 + 29 + 6;
  localparam int CBW  = $clog2(CB_WORDS);

  // ---------------- initiator half ----------------
  logic      icf_valid, icf_ready;
  srio_cmd_t icf_data;
  sync_fifo #(.W($bits(srio_cmd_t)), .DEPTH(CMD_DEPTH)) u_icmd_fifo (
    .clk, .rst_n, .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(icf_valid), .out_ready(icf_ready), .out_data(icf_data), .count());

  logic            trk_in_valid, trk_in_ready, trk_out_valid, trk_out_ready;
  logic [TRKW-1:0] trk_in, trk_out;
  sync_fifo #(.W(TRKW), .DEPTH(TRK_DEPTH)) u_trk_fifo (
    .clk, .rst_n, .in_valid(trk_in_valid), .in_ready(trk_in_ready), .in_data(trk_in),
    .out_valid(trk_out_valid), .out_ready(trk_out_ready), .out_data(trk_out), .count());

  logic      cq_valid, cq_ready;
  srio_cpl_t cq_data;
  sync_fifo #(.W($bits(srio_cpl_t)), .DEPTH(CMD_DEPTH)) u_cpl_fifo (
    .clk, .rst_n, .in_valid(cq_valid), .in_ready(cq_ready), .in_data(cq_data),
    .out_valid(cpl_valid), .out_ready(cpl_ready), .out_data(cpl), .count());

  logic     ir_cmd_valid, ir_cmd_ready, rs_cmd_valid, rs_cmd_ready;
  mem_cmd_t ir_cmd, rs_cmd;
  logic     rs_rsp_ready;

  srio_ireq_ctrl u_ireq (
    .clk, .rst_n, .dev_id,
    .cmd_valid(icf_valid), .cmd_ready(icf_ready), .cmd(icf_data),
    .ireq_valid, .ireq_ready, .ireq,
    .m_cmd_valid(ir_cmd_valid), .m_cmd_ready(ir_cmd_ready), .m_cmd(ir_cmd),
    .m_rd_valid(p1_rd_valid), .m_rd_ready(p1_rd_ready), .m_rd_data(p1_rd_data),
    .trk_valid(trk_in_valid), .trk_ready(trk_in_ready), .trk(trk_in));

  srio_resp_ctrl u_resp (
    .clk, .rst_n,
    .trk_valid(trk_out_valid), .trk_ready(trk_out_ready), .trk(trk_out),
    .iresp_valid, .iresp_ready, .iresp,
    .m_cmd_valid(rs_cmd_valid), .m_cmd_ready(rs_cmd_ready), .m_cmd(rs_cmd),
    .m_wr_valid(p1_wr_valid), .m_wr_ready(p1_wr_ready), .m_wr_data(p1_wr_data),
    .m_rsp_valid(p1_rsp_valid && p1_rsp_wr), .m_rsp_ready(rs_rsp_ready),
    .cpl_valid(cq_valid), .cpl_ready(cq_ready), .cpl(cq_data));

  assign p1_cmd_valid = rs_cmd_valid || ir_cmd_valid;
  assign p1_cmd       = rs_cmd_valid ? rs_cmd : ir_cmd;
  assign rs_cmd_ready = p1_cmd_ready;
  assign ir_cmd_ready = p1_cmd_ready && !rs_cmd_valid;
  // read confirmations are not needed by IREQ: the data itself is the answer
  assign p1_rsp_ready = p1_rsp_wr ? rs_rsp_ready : 1'b1;

  // ---------------- target half ----------------
  logic           tq_in_valid, tq_in_ready, tq_out_valid, tq_out_ready;
  logic [TQW-1:0] tq_in, tq_out;
  sync_fifo #(.W(TQW), .DEPTH(TRK_DEPTH)) u_tq_fifo (
    .clk, .rst_n, .in_valid(tq_in_valid), .in_ready(tq_in_ready), .in_data(tq_in),
    .out_valid(tq_out_valid), .out_ready(tq_out_ready), .out_data(tq_out), .count());

  logic     tr_cmd_valid, tr_cmd_ready, ts_cmd_valid, ts_cmd_ready;
  mem_cmd_t tr_cmd, ts_cmd;
  logic     tr_rsp_ready, ts_rsp_ready;
  logic     cb_we;
  logic [CBW-1:0] cb_addr;
  logic [SW-1:0]  cb_wdata;

  srio_treq_ctrl #(.CB_WORDS(CB_WORDS)) u_treq (
    .clk, .rst_n,
    .treq_valid, .treq_ready, .treq,
    .m_cmd_valid(tr_cmd_valid), .m_cmd_ready(tr_cmd_ready), .m_cmd(tr_cmd),
    .m_wr_valid(p2_wr_valid), .m_wr_ready(p2_wr_ready), .m_wr_data(p2_wr_data),
    .m_rsp_valid(p2_rsp_valid && p2_rsp_wr), .m_rsp_ready(tr_rsp_ready),
    .cb_we, .cb_addr, .cb_wdata,
    .start(nc_start), .start_pc(nc_start_pc),
    .q_valid(tq_in_valid), .q_ready(tq_in_ready), .q(tq_in));

  srio_tresp_ctrl u_tresp (
    .clk, .rst_n, .dev_id, .status(nc_status),
    .q_valid(tq_out_valid), .q_ready(tq_out_ready), .q(tq_out),
    .tresp_valid, .tresp_ready, .tresp,
    .m_cmd_valid(ts_cmd_valid), .m_cmd_ready(ts_cmd_ready), .m_cmd(ts_cmd),
    .m_rd_valid(p2_rd_valid), .m_rd_ready(p2_rd_ready), .m_rd_data(p2_rd_data),
    .m_rsp_valid(p2_rsp_valid && !p2_rsp_wr), .m_rsp_ready(ts_rsp_ready));

  assign p2_cmd_valid = tr_cmd_valid || ts_cmd_valid;
  assign p2_cmd       = tr_cmd_valid ? tr_cmd : ts_cmd;
  assign tr_cmd_ready = p2_cmd_ready;
  assign ts_cmd_ready = p2_cmd_ready && !tr_cmd_valid;
  assign p2_rsp_ready = p2_rsp_wr ? tr_rsp_ready : ts_rsp_ready;

  // control BRAM: port A written from the link, port B read by the node controller
  dp_ram #(.W(SW), .DEPTH(CB_WORDS)) u_ctrl_bram (
    .clk,
    .a_en(cb_we), .a_we(cb_we), .a_addr(cb_addr), .a_wdata(cb_wdata), .a_rdata(),
    .b_en(imem_en), .b_we(1'b0), .b_addr(imem_addr), .b_wdata('0), .b_rdata(imem_rdata));
endmodule
