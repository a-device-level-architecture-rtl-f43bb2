// srio_ireq_ctrl: RapidIO initiator request controller (IREQ CTRL).
//
// Takes transfer commands (srio_cmd_t) from the initiator command FIFO and
// turns each into request packets on the endpoint's initiator request port.
// A transfer is split into packets of at most 256 bytes (the RapidIO payload
// limit). For NWRITE, NWRITE_R and SWRITE the payload is read from local DDR2
// through DDR2 port 1, one read command per packet, issued up to two packets
// ahead of the packet being sent so that the DDR2 read latency is hidden
// behind the previous packet. A header goes out once the first payload word
// is at hand, and the payload follows it; NREAD sends a header only. Every packet sent is also pushed into the
// outstanding-transaction queue read by the response controller, with its
// transaction ID, local address and size and whether it ends its transfer.
// Transaction IDs count up per packet. The packet format is fcp_pkg's
// pkt_hdr_t (this design's own); splitting at 256 bytes follows RapidIO.
module srio_ireq_ctrl
  import fcp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [7:0]   dev_id,
  // command FIFO
  input  logic         cmd_valid,
  output logic         cmd_ready,
  input  srio_cmd_t    cmd,
  // initiator request port of the endpoint
  output logic         ireq_valid,
  input  logic         ireq_ready,
  output pkt_beat_t    ireq,
  // DDR2 port 1 (reads)
  output logic         m_cmd_valid,
  input  logic         m_cmd_ready,
  output mem_cmd_t     m_cmd,
  input  logic         m_rd_valid,
  output logic         m_rd_ready,
  input  logic [SW-1:0] m_rd_data,
  // outstanding-transaction queue
  output logic         trk_valid,
  input  logic         trk_ready,
  output logic [$bits(ttype_e)+8+AW+9+1-1:0] trk
);
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_NEXT} state_e;
  state_e           state;
  srio_cmd_t        cur;
  logic [LEN_W-1:0] remaining;
  logic [7:0]       tid;
  logic [5:0]       beat;
  logic [LEN_W-1:0] rd_left;    // payload bytes not yet requested from DDR2
  logic [AW-1:0]    rd_addr;
  logic [1:0]       ahead;      // packets requested from DDR2, not yet sent

  wire [8:0]  pkt_bytes  = (remaining >= LEN_W'(PKT_MAX_B)) ? 9'(PKT_MAX_B) : 9'(remaining);
  wire [5:0]  pkt_dwords = 6'(pkt_bytes >> 3);
  wire        is_read    = (cur.ttype == TT_NREAD);
  wire        last_pkt   = (remaining == LEN_W'(pkt_bytes));

  pkt_hdr_t hdr;
  always_comb begin
    hdr        = '0;
    hdr.ttype  = cur.ttype;
    hdr.tid    = tid;
    hdr.dest   = cur.dest;
    hdr.src    = dev_id;
    hdr.dwords = pkt_dwords;
    hdr.addr   = cur.raddr[31:3];
  end

  wire [8:0]  rd_bytes  = (rd_left >= LEN_W'(PKT_MAX_B)) ? 9'(PKT_MAX_B) : 9'(rd_left);
  wire        have_data = is_read || m_rd_valid;
  wire        pay_end   = (state == S_PAY) && ireq_valid && ireq_ready && ireq.last;

  assign cmd_ready   = (state == S_IDLE);
  assign m_cmd_valid = (rd_left != '0) && (ahead != 2'd2);
  assign m_cmd       = '{wr: 1'b0, addr: rd_addr, len: LEN_W'(rd_bytes)};
  assign m_rd_ready  = (state == S_PAY) && ireq_ready;

  always_comb begin
    ireq_valid = 1'b0;
    ireq       = '0;
    if (state == S_HDR) begin
      ireq_valid = trk_ready && have_data;
      ireq       = '{data: hdr, last: is_read};
    end else if (state == S_PAY) begin
      ireq_valid = m_rd_valid;
      ireq       = '{data: m_rd_data, last: (beat == pkt_dwords - 1'b1)};
    end
  end

  assign trk_valid = (state == S_HDR) && ireq_ready && have_data;
  assign trk       = {cur.ttype, tid, cur.laddr, pkt_bytes, last_pkt};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      remaining <= '0;
      tid       <= '0;
      beat      <= '0;
      rd_left   <= '0;
      rd_addr   <= '0;
      ahead     <= '0;
    end else begin
      if (m_cmd_valid && m_cmd_ready) begin
        rd_left <= rd_left - LEN_W'(rd_bytes);
        rd_addr <= rd_addr + AW'(rd_bytes);
      end
      ahead <= ahead + 2'(m_cmd_valid && m_cmd_ready) - 2'(pay_end);
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur       <= cmd;
          remaining <= cmd.len;
          rd_left   <= (cmd.ttype == TT_NREAD) ? '0 : cmd.len;
          rd_addr   <= cmd.laddr;
          state     <= S_HDR;
        end
        S_HDR: if (ireq_valid && ireq_ready) begin
          beat  <= '0;
          state <= is_read ? S_NEXT : S_PAY;
        end
        S_PAY: if (ireq_valid && ireq_ready) begin
          beat <= beat + 1'b1;
          if (ireq.last) state <= S_NEXT;
        end
        S_NEXT: begin
          remaining <= remaining - LEN_W'(pkt_bytes);
          cur.laddr <= cur.laddr + AW'(pkt_bytes);
          cur.raddr <= cur.raddr + 32'(pkt_bytes);
          tid       <= tid + 1'b1;
          if (last_pkt) state <= S_IDLE;
          else          state <= S_HDR;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ahead: assert property (@(posedge clk) disable iff (!rst_n) ahead != 2'd3);
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> cmd.len != '0 && cmd.len[4:0] == '0);
endmodule
