// srio_tresp_ctrl: RapidIO target response controller (TRESP CTRL).
//
// Builds the responses to remote requests from the queue filled by the target
// request controller, in order:
//   DONE   - a one-beat TT_RESP_DONE packet (answer to NWRITE_R);
//   DATA   - NREAD of DDR2: reads the data through DDR2 port 2 and sends a
//            TT_RESP_DATA header followed by the payload;
//   STATUS - NREAD of the start/status register: every payload dword is the
//            node controller status word.
// The response header carries the request's transaction ID and is addressed
// to the requester. Packet format: fcp_pkg pkt_hdr_t.
module srio_tresp_ctrl
  import fcp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   dev_id,
  input  logic [SW-1:0] status,
  // queue from the request controller: {kind[1:0], tid, dest, addr(29), dwords}
  input  logic         q_valid,
  output logic         q_ready,
  input  logic [2+8+8+29+6-1:0] q,
  // target response port of the endpoint
  output logic         tresp_valid,
  input  logic         tresp_ready,
  output pkt_beat_t    tresp,
  // DDR2 port 2 (reads)
  output logic         m_cmd_valid,
  input  logic         m_cmd_ready,
  output mem_cmd_t     m_cmd,
  input  logic         m_rd_valid,
  output logic         m_rd_ready,
  input  logic [SW-1:0] m_rd_data,
  input  logic         m_rsp_valid,
  output logic         m_rsp_ready
);
  localparam logic [1:0] K_DONE = 2'd0, K_DATA = 2'd1, K_STATUS = 2'd2;
  typedef enum logic [2:0] {S_IDLE, S_RCMD, S_HDR, S_PAY, S_RRSP} state_e;
  state_e      state;
  logic [1:0]  kind;
  logic [7:0]  tid, dest;
  logic [28:0] addr;
  logic [5:0]  dwords, beat;

  pkt_hdr_t hdr;
  always_comb begin
    hdr        = '0;
    hdr.ttype  = (kind == K_DONE) ? TT_RESP_DONE : TT_RESP_DATA;
    hdr.tid    = tid;
    hdr.dest   = dest;
    hdr.src    = dev_id;
    hdr.dwords = (kind == K_DONE) ? 6'd0 : dwords;
  end

  assign q_ready     = (state == S_IDLE);
  assign m_cmd_valid = (state == S_RCMD);
  assign m_cmd       = '{wr: 1'b0, addr: AW'({addr, 3'b000}), len: LEN_W'({dwords, 3'b000})};
  assign m_rd_ready  = (state == S_PAY) && (kind == K_DATA) && tresp_ready;
  assign m_rsp_ready = (state == S_RRSP);

  always_comb begin
    tresp_valid = 1'b0;
    tresp       = '0;
    if (state == S_HDR) begin
      tresp_valid = 1'b1;
      tresp       = '{data: hdr, last: (kind == K_DONE)};
    end else if (state == S_PAY) begin
      tresp_valid = (kind == K_DATA) ? m_rd_valid : 1'b1;
      tresp       = '{data: (kind == K_DATA) ? m_rd_data : status, last: (beat == dwords - 1'b1)};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      kind   <= K_DONE;
      tid    <= '0;
      dest   <= '0;
      addr   <= '0;
      dwords <= '0;
      beat   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (q_valid) begin
          {kind, tid, dest, addr, dwords} <= q;
          state <= (q[2+8+8+29+6-1 -: 2] == K_DATA) ? S_RCMD : S_HDR;
        end
        S_RCMD: if (m_cmd_ready) state <= S_HDR;
        S_HDR: if (tresp_ready) begin
          beat  <= '0;
          state <= (kind == K_DONE) ? S_IDLE : S_PAY;
        end
        S_PAY: if (tresp_valid && tresp_ready) begin
          beat <= beat + 1'b1;
          if (tresp.last) state <= (kind == K_DATA) ? S_RRSP : S_IDLE;
        end
        S_RRSP: if (m_rsp_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
