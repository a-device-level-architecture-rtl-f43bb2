// ddr2_port_ctrl: one port of the multi-port DDR2 wrapper.
//
// Each internal client (OCM controller, RapidIO initiator, RapidIO target)
// gets a dedicated port with four FIFOs, as the architecture prescribes: a
// command FIFO and a response FIFO (control), a write-data FIFO and a
// read-data FIFO (data). The client side is UW bits wide (128 for the OCM,
// 64 for RapidIO); the port packs/unpacks to the 128-bit controller word,
// lower-addressed UW-bit word in the low bits.
//
// A command (mem_cmd_t) moves len bytes at a byte address; len must be a
// non-zero multiple of 32 bytes (one DDR2 burst = two 128-bit words). The port
// raises req to the port arbiter once the command can move without waiting
// (all its write data, or room for all its read data, up to a full FIFO) and,
// once granted, owns the DDR2 controller user interface until all bursts of
// the command are issued (done pulses for one cycle), so transfers are
// serialized at command granularity.
//   write: per burst, two wdf_wren beats, the second with the address command.
//   read : read bursts are issued only while the read-data FIFO has room for
//          all data in flight, so returning data is never dropped. The port
//          gives the controller back once its last burst is requested; the
//          wrapper steers returning data to the port that asked for it, so the
//          next owner need not wait out the read latency.
// When all data has moved, one response word (rsp_wr = direction) is queued.
// The controller user-interface names and the 8-byte address unit follow the
// usual Virtex-5 DDR2 controller user interface; that, the FIFO depths and the
// burst size are this design's choices.
module ddr2_port_ctrl
  import fcp_pkg::*;
#(
  parameter int UW         = 128,
  parameter int CMD_DEPTH  = 4,
  parameter int DATA_DEPTH = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  // client side
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  mem_cmd_t       cmd,
  input  logic           wr_valid,
  output logic           wr_ready,
  input  logic [UW-1:0]  wr_data,
  output logic           rd_valid,
  input  logic           rd_ready,
  output logic [UW-1:0]  rd_data,
  output logic           rsp_valid,
  input  logic           rsp_ready,
  output logic           rsp_wr,
  // arbiter
  output logic           req,
  input  logic           gnt,
  output logic           done,
  // DDR2 controller user interface (valid while granted)
  output logic           af_wren,
  output logic [2:0]     af_cmd,
  output logic [30:0]    af_addr,
  input  logic           af_afull,
  output logic           wdf_wren,
  output logic [DW-1:0]  wdf_data,
  output logic [DW/8-1:0] wdf_mask,
  input  logic           wdf_afull,
  input  logic           rd_data_valid,
  input  logic [DW-1:0]  rd_data_in
);
  localparam int RATIO = DW / UW;
  localparam int DPW   = $clog2(DATA_DEPTH);

  // ---------------- command FIFO ----------------
  mem_cmd_t cf_data;
  logic     cf_valid, cf_pop;
  sync_fifo #(.W($bits(mem_cmd_t)), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(cf_valid), .out_ready(cf_pop), .out_data(cf_data), .count());

  // ---------------- write data: packer + FIFO ----------------
  logic          wf_in_valid, wf_in_ready, wf_out_valid, wf_pop;
  logic [DW-1:0] wf_in_data, wf_out_data;
  logic [DPW:0]  wf_count;

  generate
    if (RATIO == 1) begin : g_wr_direct
      assign wf_in_valid = wr_valid;
      assign wf_in_data  = wr_data;
      assign wr_ready    = wf_in_ready;
    end else begin : g_wr_pack
      logic [DW-UW-1:0]          pk;
      logic [$clog2(RATIO)-1:0]  pk_cnt;
      wire last_part = (pk_cnt == ($clog2(RATIO))'(RATIO-1));
      assign wf_in_valid = wr_valid && last_part;
      assign wf_in_data  = {wr_data, pk};
      assign wr_ready    = last_part ? wf_in_ready : 1'b1;
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          pk_cnt <= '0;
          pk     <= '0;
        end else if (wr_valid && wr_ready) begin
          pk_cnt <= last_part ? '0 : pk_cnt + 1'b1;
          if (RATIO > 2) pk <= (DW-UW)'({wr_data, pk} >> UW);
          else           pk <= wr_data[DW-UW-1:0];
        end
      end
    end
  endgenerate

  sync_fifo #(.W(DW), .DEPTH(DATA_DEPTH)) u_wdata_fifo (
    .clk, .rst_n, .in_valid(wf_in_valid), .in_ready(wf_in_ready), .in_data(wf_in_data),
    .out_valid(wf_out_valid), .out_ready(wf_pop), .out_data(wf_out_data), .count(wf_count));

  // ---------------- read data: FIFO + unpacker ----------------
  logic          rf_in_valid, rf_out_valid, rf_pop, rf_in_ready;
  logic [DW-1:0] rf_out_data;
  logic [DPW:0]  rf_count;

  sync_fifo #(.W(DW), .DEPTH(DATA_DEPTH)) u_rdata_fifo (
    .clk, .rst_n, .in_valid(rf_in_valid), .in_ready(rf_in_ready), .in_data(rd_data_in),
    .out_valid(rf_out_valid), .out_ready(rf_pop), .out_data(rf_out_data), .count(rf_count));

  generate
    if (RATIO == 1) begin : g_rd_direct
      assign rd_valid = rf_out_valid;
      assign rd_data  = rf_out_data;
      assign rf_pop   = rd_ready;
    end else begin : g_rd_unpack
      logic [$clog2(RATIO)-1:0] uk_cnt;
      wire last_part = (uk_cnt == ($clog2(RATIO))'(RATIO-1));
      assign rd_valid = rf_out_valid;
      assign rd_data  = rf_out_data[uk_cnt*UW +: UW];
      assign rf_pop   = rd_ready && last_part;
      always_ff @(posedge clk) begin
        if (!rst_n)                    uk_cnt <= '0;
        else if (rd_valid && rd_ready) uk_cnt <= last_part ? '0 : uk_cnt + 1'b1;
      end
    end
  endgenerate

  // ---------------- response FIFO ----------------
  logic rsp_push, rsp_in_ready;
  logic cur_wr;
  sync_fifo #(.W(1), .DEPTH(CMD_DEPTH)) u_rsp_fifo (
    .clk, .rst_n, .in_valid(rsp_push), .in_ready(rsp_in_ready), .in_data(cur_wr),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp_wr), .count());

  // ---------------- sequencer ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAITG, S_W0, S_W1, S_RD, S_FIN, S_RDW} state_e;
  state_e state;
  logic [LEN_W-6:0] bursts;     // bursts still to issue
  logic [30:0]      cur_addr;   // 8-byte units
  logic [DPW:0]     inflight;   // read words requested, not yet returned

  wire can_wr_burst = (wf_count >= (DPW+1)'(2)) && !wdf_afull && !af_afull;
  wire can_rd_burst = (bursts != '0) && !af_afull &&
                      (int'(rf_count) + int'(inflight) + 2 <= DATA_DEPTH);

  // Ask for the controller only when the whole command, or a full FIFO of it,
  // can move without waiting: all its write data is here, or there is room
  // for all its read data. A granted port then never holds the controller
  // while it waits for its client.
  wire [LEN_W-5:0] cmd_words = cf_data.len[LEN_W-1:4];
  wire [DPW:0]     need      = (cmd_words >= (LEN_W-4)'(DATA_DEPTH)) ? (DPW+1)'(DATA_DEPTH)
                                                                    : (DPW+1)'(cmd_words);
  wire             room_ok   = cf_data.wr ? (wf_count >= need)
                                          : ((DPW+1)'(DATA_DEPTH) - rf_count >= need);
  assign req      = (state == S_WAITG) && room_ok;
  assign cf_pop   = (state == S_WAITG) && gnt;
  assign wdf_mask = '0;
  assign wdf_data = wf_out_data;
  assign af_addr  = cur_addr;
  assign rf_in_valid = rd_data_valid;

  always_comb begin
    af_wren  = 1'b0;
    af_cmd   = 3'b000;
    wdf_wren = 1'b0;
    wf_pop   = 1'b0;
    unique case (state)
      S_W0: if (can_wr_burst) begin wdf_wren = 1'b1; wf_pop = 1'b1; end
      S_W1: begin wdf_wren = 1'b1; wf_pop = 1'b1; af_wren = 1'b1; af_cmd = 3'b000; end
      S_RD: if (can_rd_burst) begin af_wren = 1'b1; af_cmd = 3'b001; end
      default: ;
    endcase
  end

  assign rsp_push = (state == S_FIN);
  // A write gives the controller back when its last burst is in; a read as
  // soon as its last burst is requested, while its data is still on the way.
  assign done     = ((state == S_FIN) && rsp_in_ready && cur_wr) ||
                    ((state == S_RD) && (bursts == '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      bursts   <= '0;
      cur_addr <= '0;
      inflight <= '0;
      cur_wr   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (cf_valid) state <= S_WAITG;
        S_WAITG: if (gnt) begin
          cur_wr   <= cf_data.wr;
          bursts   <= cf_data.len[LEN_W-1:5];
          cur_addr <= 31'(cf_data.addr >> 3);
          state    <= cf_data.wr ? S_W0 : S_RD;
        end
        S_W0: if (can_wr_burst) state <= S_W1;
        S_W1: begin
          cur_addr <= cur_addr + 31'd4;
          bursts   <= bursts - 1'b1;
          state    <= (bursts == 1) ? S_FIN : S_W0;
        end
        S_RD: begin
          if (can_rd_burst) begin
            cur_addr <= cur_addr + 31'd4;
            bursts   <= bursts - 1'b1;
          end
          if (bursts == '0) state <= S_RDW;
        end
        S_RDW: if (inflight == '0) state <= S_FIN;
        S_FIN: if (rsp_in_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      inflight <= inflight + ((state == S_RD && can_rd_burst) ? (DPW+1)'(2) : '0)
                           - (DPW+1)'(rf_in_valid);
    end
  end

  // Commands must move a whole number of bursts.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> cmd.len != '0 && cmd.len[4:0] == '0);
  // Read data only arrives for a read this port has requested.
  a_rd: assert property (@(posedge clk) disable iff (!rst_n)
    rf_in_valid |-> inflight != '0 && rf_in_ready);
endmodule
