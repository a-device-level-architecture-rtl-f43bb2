// ocm_controller: on-chip memory (OCM) controller.
//
// Moves data between external DDR2 (through DDR2 port 0) and the on-chip
// SRAMs of the co-processors. One pair of FIFOs (command in, response out) is
// multiplexed over NS SRAM interfaces; by default four, the last one reserved
// for the node controller, leaving three for co-processors. A command names
// the SRAM, a 16-byte-word SRAM address, a DDR2 byte address, a length in
// bytes (multiple of 32, at most 128 KB) and a direction. The controller
// issues the matching DDR2 read or write and streams the data:
//   DDR2 -> SRAM: each 128-bit word returned by DDR2 is written at once
//                 (cs/we) to consecutive SRAM addresses;
//   SRAM -> DDR2: SRAM reads are pipelined; data comes back RD_LAT cycles
//                 after cs (SRAM interfaces match that latency with pipeline
//                 registers) into a small skid FIFO that feeds the DDR2 port.
// A response is queued only after all data has been transferred, i.e. when
// DDR2 port 0 confirms the command. The SRAM interface signals (data_i,
// addr_i, cs_i, we_i, data_o) are the architecture's; write data, address and
// we are shared by all SRAMs, cs selects one, and data_o is multiplexed.
// Commands are processed one at a time, in order (this design's choice).
module ocm_controller
  import fcp_pkg::*;
#(
  parameter int NS        = 4,
  parameter int RD_LAT    = 2,
  parameter int CMD_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // command / response FIFO pair
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  ocm_cmd_t          cmd,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output ocm_rsp_t          rsp,
  // DDR2 port 0
  output logic              d_cmd_valid,
  input  logic              d_cmd_ready,
  output mem_cmd_t          d_cmd,
  output logic              d_wr_valid,
  input  logic              d_wr_ready,
  output logic [DW-1:0]     d_wr_data,
  input  logic              d_rd_valid,
  output logic              d_rd_ready,
  input  logic [DW-1:0]     d_rd_data,
  input  logic              d_rsp_valid,
  output logic              d_rsp_ready,
  input  logic              d_rsp_wr,
  // SRAM interfaces
  output logic [DW-1:0]     sram_data_i,
  output logic [OCM_AW-1:0] sram_addr_i,
  output logic [NS-1:0]     sram_cs_i,
  output logic              sram_we_i,
  input  logic [DW-1:0]     sram_data_o [NS]
);
  localparam int SKID = 4;
  localparam int SW_  = $clog2(NS);

  // command FIFO
  ocm_cmd_t cf_data;
  logic     cf_valid, cf_pop;
  sync_fifo #(.W($bits(ocm_cmd_t)), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd),
    .out_valid(cf_valid), .out_ready(cf_pop), .out_data(cf_data), .count());

  // response FIFO
  logic     rf_push, rf_ready;
  ocm_rsp_t rf_in;
  sync_fifo #(.W($bits(ocm_rsp_t)), .DEPTH(CMD_DEPTH)) u_rsp_fifo (
    .clk, .rst_n, .in_valid(rf_push), .in_ready(rf_ready), .in_data(rf_in),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp), .count());

  // skid FIFO for SRAM read data on its way to DDR2
  logic          sk_push;
  logic [DW-1:0] sk_in;
  logic [$clog2(SKID):0] sk_count;
  sync_fifo #(.W(DW), .DEPTH(SKID)) u_skid (
    .clk, .rst_n, .in_valid(sk_push), .in_ready(), .in_data(sk_in),
    .out_valid(d_wr_valid), .out_ready(d_wr_ready), .out_data(d_wr_data), .count(sk_count));

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_D2S, S_S2D, S_WAITRSP} state_e;
  state_e            state;
  ocm_cmd_t          cur;
  logic [OCM_AW-1:0] ptr;
  logic [OCM_LEN_W-4:0] words;     // 16-byte words left to transfer/issue
  logic [RD_LAT-1:0] rd_pipe;      // SRAM reads in flight
  logic [$clog2(RD_LAT+1)-1:0] inflight;

  always_comb begin
    inflight = '0;
    for (int i = 0; i < RD_LAT; i++) inflight += rd_pipe[i];
  end

  wire s2d_issue = (state == S_S2D) && (words != '0) &&
                   (32'(sk_count) + 32'(inflight) < SKID);

  assign cf_pop      = (state == S_IDLE) && cf_valid;
  assign d_cmd_valid = (state == S_ISSUE);
  assign d_cmd       = '{wr: cur.to_ddr, addr: cur.ddr_addr, len: LEN_W'(cur.len)};
  assign d_rd_ready  = (state == S_D2S);
  assign d_rsp_ready = (state == S_WAITRSP) && rf_ready;
  assign rf_push     = (state == S_WAITRSP) && d_rsp_valid;
  assign rf_in       = '{to_ddr: cur.to_ddr, sram: cur.sram};

  // SRAM access
  wire d2s_write = (state == S_D2S) && d_rd_valid;
  assign sram_data_i = d_rd_data;
  assign sram_addr_i = ptr;
  assign sram_we_i   = d2s_write;
  always_comb begin
    sram_cs_i = '0;
    if (d2s_write || s2d_issue) sram_cs_i[cur.sram[SW_-1:0]] = 1'b1;
  end

  assign sk_push = rd_pipe[RD_LAT-1];
  assign sk_in   = sram_data_o[cur.sram[SW_-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cur     <= '0;
      ptr     <= '0;
      words   <= '0;
      rd_pipe <= '0;
    end else begin
      rd_pipe <= {rd_pipe[RD_LAT-2:0], s2d_issue};
      unique case (state)
        S_IDLE: if (cf_valid) begin
          cur   <= cf_data;
          ptr   <= cf_data.sram_addr;
          words <= {1'b0, cf_data.len[OCM_LEN_W-1:4]};
          state <= S_ISSUE;
        end
        S_ISSUE: if (d_cmd_ready) state <= cur.to_ddr ? S_S2D : S_D2S;
        S_D2S: if (d2s_write) begin
          ptr   <= ptr + 1'b1;
          words <= words - 1'b1;
          if (words == 1) state <= S_WAITRSP;
        end
        S_S2D: if (s2d_issue) begin
          ptr   <= ptr + 1'b1;
          words <= words - 1'b1;
          if (words == 1) state <= S_WAITRSP;
        end
        S_WAITRSP: if (d_rsp_valid && rf_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_sel: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> 32'(cmd.sram) < NS && cmd.len != '0 && cmd.len[4:0] == '0);
  a_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    rf_push |-> d_rsp_wr == cur.to_ddr);
  initial assert (RD_LAT >= 2 && RD_LAT <= 3) else $error("ocm_controller: RD_LAT must be 2 or 3");
endmodule
