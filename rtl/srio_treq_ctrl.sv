// srio_treq_ctrl: RapidIO target request controller (TREQ CTRL).
//
// Serves requests that remote devices send to this node, independently of
// the node controller, so local memory is transparently reachable. The byte
// address of a request selects (see fcp_pkg):
//   DDR2          - NWRITE/NWRITE_R/SWRITE payloads are written through DDR2
//                   port 2. The next request is taken as soon as the payload
//                   is in the port's FIFO; only NWRITE_R waits until the port
//                   has confirmed all writes so far. Port 2 keeps commands in
//                   order, so a later NREAD still sees the written data;
//                   NREAD is queued for the response controller.
//   control BRAM  - payload dwords are written into the node controller's
//                   instruction memory (CTRL BRAM), one per cycle.
//   start register- the first payload dword is the start PC: start pulses
//                   for one cycle with start_pc. An NREAD here returns status.
// NWRITE_R requests queue a DONE response once the write has completed.
// Requests of any other type are dropped. The address map is this design's
// choice; the control BRAM on the target side follows the architecture.
module srio_treq_ctrl
  import fcp_pkg::*;
#(
  parameter int CB_WORDS = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  // target request port of the endpoint
  input  logic         treq_valid,
  output logic         treq_ready,
  input  pkt_beat_t    treq,
  // DDR2 port 2 (writes)
  output logic         m_cmd_valid,
  input  logic         m_cmd_ready,
  output mem_cmd_t     m_cmd,
  output logic         m_wr_valid,
  input  logic         m_wr_ready,
  output logic [SW-1:0] m_wr_data,
  input  logic         m_rsp_valid,
  output logic         m_rsp_ready,
  // control BRAM write port
  output logic         cb_we,
  output logic [$clog2(CB_WORDS)-1:0] cb_addr,
  output logic [SW-1:0] cb_wdata,
  // node controller start
  output logic         start,
  output logic [15:0]  start_pc,
  // queue to the response controller: {kind[1:0], tid, dest, addr(29), dwords}
  output logic         q_valid,
  input  logic         q_ready,
  output logic [2+8+8+29+6-1:0] q
);
  localparam int CBW = $clog2(CB_WORDS);
  typedef enum logic [2:0] {S_IDLE, S_WCMD, S_WPAY, S_WRSP, S_CPAY, S_QUEUE, S_DROP} state_e;
  // response kinds
  localparam logic [1:0] K_DONE = 2'd0, K_DATA = 2'd1, K_STATUS = 2'd2;

  state_e    state;
  pkt_hdr_t  h;
  logic [1:0] kind;
  logic [CBW-1:0] cptr;
  logic       first;

  pkt_hdr_t nh;
  assign nh = pkt_hdr_t'(treq.data);
  wire ctrl  = h.addr[28];       // byte address bit 31
  wire sreg  = h.addr[27];       // byte address bit 30
  wire is_wr = (h.ttype == TT_NWRITE) || (h.ttype == TT_NWRITE_R) || (h.ttype == TT_SWRITE);

  assign treq_ready  = (state == S_IDLE) || (state == S_CPAY) || (state == S_DROP) ||
                       ((state == S_WPAY) && m_wr_ready);
  assign m_cmd_valid = (state == S_WCMD);
  assign m_cmd       = '{wr: 1'b1, addr: AW'({h.addr, 3'b000}), len: LEN_W'({h.dwords, 3'b000})};
  assign m_wr_valid  = (state == S_WPAY) && treq_valid;
  assign m_wr_data   = treq.data;
  // Write confirmations are always taken; pend counts the writes not yet
  // confirmed. Only NWRITE_R waits for them, before its DONE is queued.
  logic [3:0] pend;
  wire  [3:0] pend_nx = pend + 4'(m_cmd_valid && m_cmd_ready) - 4'(m_rsp_valid);
  assign m_rsp_ready = 1'b1;

  wire cpay_beat = (state == S_CPAY) && treq_valid;
  assign cb_we    = cpay_beat && !sreg;
  assign cb_addr  = cptr;
  assign cb_wdata = treq.data;

  assign q_valid = (state == S_QUEUE);
  assign q       = {kind, h.tid, h.src, h.addr, h.dwords};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      h        <= '0;
      kind     <= K_DONE;
      cptr     <= '0;
      first    <= 1'b0;
      start    <= 1'b0;
      start_pc <= '0;
      pend     <= '0;
    end else begin
      start <= 1'b0;
      pend  <= pend_nx;
      unique case (state)
        S_IDLE: if (treq_valid) begin
          h     <= nh;
          cptr  <= CBW'(nh.addr);
          first <= 1'b1;
          if (nh.ttype == TT_NWRITE || nh.ttype == TT_NWRITE_R || nh.ttype == TT_SWRITE) begin
            if (treq.last)        state <= S_IDLE;   // malformed: no payload
            else if (nh.addr[28]) state <= S_CPAY;
            else                  state <= S_WCMD;
          end else if (nh.ttype == TT_NREAD) begin
            kind  <= nh.addr[28] ? K_STATUS : K_DATA;
            state <= treq.last ? S_QUEUE : S_DROP;
          end else begin
            state <= treq.last ? S_IDLE : S_DROP;
          end
        end
        S_WCMD: if (m_cmd_ready) state <= S_WPAY;
        S_WPAY: if (treq_valid && m_wr_ready && treq.last)
          state <= (h.ttype == TT_NWRITE_R) ? S_WRSP : S_IDLE;
        S_WRSP: if (pend_nx == '0) begin
          kind  <= K_DONE;
          state <= (h.ttype == TT_NWRITE_R) ? S_QUEUE : S_IDLE;
        end
        S_CPAY: if (treq_valid) begin
          cptr  <= cptr + 1'b1;
          first <= 1'b0;
          if (sreg && first) begin
            start    <= 1'b1;
            start_pc <= treq.data[15:0];
          end
          if (treq.last) begin
            kind  <= K_DONE;
            state <= (h.ttype == TT_NWRITE_R) ? S_QUEUE : S_IDLE;
          end
        end
        S_QUEUE: if (q_ready) state <= S_IDLE;
        S_DROP: if (treq_valid && treq.last) state <= (h.ttype == TT_NREAD) ? S_QUEUE : S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_pend: assert property (@(posedge clk) disable iff (!rst_n)
    m_rsp_valid |-> pend != '0);
  a_wr_only: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_WCMD |-> is_wr && !ctrl);
endmodule
