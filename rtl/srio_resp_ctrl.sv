// srio_resp_ctrl: RapidIO initiator response controller (RESP CTRL).
//
// Retires the packets the request controller sent, in order, using the
// outstanding-transaction queue. NWRITE and SWRITE expect no response and
// retire at once. NWRITE_R waits for a DONE response; NREAD waits for a data
// response, writes its payload into local DDR2 through DDR2 port 1 and waits
// until the port confirms the write. A response whose transaction ID or type
// does not match the oldest outstanding packet sets the error flag of the
// transfer. When the last packet of a transfer retires, one completion
// (srio_cpl_t) goes to the completion FIFO read by the node controller.
// Responses are assumed to return in request order (one path, one switch).
module srio_resp_ctrl
  import fcp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // outstanding-transaction queue
  input  logic         trk_valid,
  output logic         trk_ready,
  input  logic [$bits(ttype_e)+8+AW+9+1-1:0] trk,
  // initiator response port of the endpoint
  input  logic         iresp_valid,
  output logic         iresp_ready,
  input  pkt_beat_t    iresp,
  // DDR2 port 1 (writes)
  output logic         m_cmd_valid,
  input  logic         m_cmd_ready,
  output mem_cmd_t     m_cmd,
  output logic         m_wr_valid,
  input  logic         m_wr_ready,
  output logic [SW-1:0] m_wr_data,
  input  logic         m_rsp_valid,
  output logic         m_rsp_ready,
  // completions to the node controller
  output logic         cpl_valid,
  input  logic         cpl_ready,
  output srio_cpl_t    cpl
);
  typedef enum logic [2:0] {S_IDLE, S_DISPATCH, S_WAITHDR, S_WCMD, S_PAY, S_WRSP, S_CPL} state_e;
  state_e        state;
  ttype_e        ttype;
  logic [7:0]    tid;
  logic [AW-1:0] laddr;
  logic [8:0]    bytes;
  logic          last, err;

  pkt_hdr_t rh;
  assign rh = pkt_hdr_t'(iresp.data);

  assign trk_ready   = (state == S_IDLE);
  assign iresp_ready = (state == S_WAITHDR) || ((state == S_PAY) && m_wr_ready);
  assign m_cmd_valid = (state == S_WCMD);
  assign m_cmd       = '{wr: 1'b1, addr: laddr, len: LEN_W'(bytes)};
  assign m_wr_valid  = (state == S_PAY) && iresp_valid;
  assign m_wr_data   = iresp.data;
  assign m_rsp_ready = (state == S_WRSP);
  assign cpl_valid   = (state == S_CPL);
  assign cpl         = '{ttype: ttype, err: err};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ttype <= TT_NREAD;
      tid   <= '0;
      laddr <= '0;
      bytes <= '0;
      last  <= 1'b0;
      err   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (trk_valid) begin
          {ttype, tid, laddr, bytes, last} <= trk;
          state <= S_DISPATCH;
        end
        S_DISPATCH:
          if (ttype == TT_NREAD || ttype == TT_NWRITE_R) state <= S_WAITHDR;
          else state <= last ? S_CPL : S_IDLE;
        S_WAITHDR: if (iresp_valid) begin
          if (rh.tid != tid ||
              rh.ttype != ((ttype == TT_NREAD) ? TT_RESP_DATA : TT_RESP_DONE))
            err <= 1'b1;
          if (ttype == TT_NREAD && !iresp.last) state <= S_WCMD;
          else state <= last ? S_CPL : S_IDLE;
        end
        S_WCMD: if (m_cmd_ready) state <= S_PAY;
        S_PAY: if (iresp_valid && m_wr_ready && iresp.last) state <= S_WRSP;
        S_WRSP: if (m_rsp_valid) state <= last ? S_CPL : S_IDLE;
        S_CPL: if (cpl_ready) begin
          err   <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
