// tb_fpga_node: end-to-end test of two FPGA nodes at default parameters.
//
// Node A and node B sit on a RapidIO fabric modelled as wires with random
// stalls: A's initiator talks to B's target. The testbench plays the host:
// it sends packets to A's target port to load an instruction bundle into A's
// control BRAM, writes the start register and polls the status register.
// Each node has a DDR2 controller model. The bundle processes one 600x800
// video frame (480,000 bytes) in 20 chunks of 24,000 bytes, spread over the
// three co-processors (DDR2 -> SRAM, run, SRAM -> DDR2 per chunk), and checks
// the frame time against the 480 us the architecture reports (96,000 cycles
// at 200 MHz) using the node's own timestamps. It then processes the frame
// again, sending each finished chunk to B with SWRITE while the next chunk is
// processed, reads a block from B with NREAD, writes one with NWRITE_R, runs
// a timestamp loop, jumps, stores its timestamps to DDR2 and halts.
// Checks all memory contents against a model and that each mechanism
// (arbiter contention, packet splitting, link stalls, read-credit stalls,
// waits, SYNC, loops, jumps, every transaction and response type, status
// reads, concurrent units) happened at least once.
module tb_fpga_node;
  import fcp_pkg::*;
  import nc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int FRAME_B = 480000, CHUNK_B = 24000, NCHUNK = 20;
  localparam int IN_A = 'h000000, OUT_A = 'h080000, RD_A = 'h100000, TS_A = 'h110000;
  localparam int SRC_B = 'h100000, WR_B = 'h120000;

  // ---------------- node A ----------------
  logic a_ireq_valid, a_ireq_ready, a_iresp_valid, a_iresp_ready;
  logic a_treq_valid, a_treq_ready, a_tresp_valid, a_tresp_ready, a_running;
  pkt_beat_t a_ireq, a_iresp, a_treq, a_tresp;
  logic a_phy, a_af_wren, a_af_afull, a_wdf_wren, a_wdf_afull, a_rdv;
  logic [2:0] a_af_cmd; logic [30:0] a_af_addr; logic [127:0] a_wdf_data, a_rdd; logic [15:0] a_mask;

  fpga_node u_a (
    .clk, .rst_n, .dev_id(8'd1), .nc_running(a_running),
    .ireq_valid(a_ireq_valid), .ireq_ready(a_ireq_ready), .ireq(a_ireq),
    .iresp_valid(a_iresp_valid), .iresp_ready(a_iresp_ready), .iresp(a_iresp),
    .treq_valid(a_treq_valid), .treq_ready(a_treq_ready), .treq(a_treq),
    .tresp_valid(a_tresp_valid), .tresp_ready(a_tresp_ready), .tresp(a_tresp),
    .phy_init_done(a_phy), .app_af_wren(a_af_wren), .app_af_cmd(a_af_cmd), .app_af_addr(a_af_addr),
    .app_af_afull(a_af_afull), .app_wdf_wren(a_wdf_wren), .app_wdf_data(a_wdf_data),
    .app_wdf_mask_data(a_mask), .app_wdf_afull(a_wdf_afull), .rd_data_valid(a_rdv), .rd_data_fifo_out(a_rdd));

  ddr2_mig_model #(.MEM_WORDS(131072)) mig_a (
    .clk, .rst_n, .phy_init_done(a_phy), .app_af_wren(a_af_wren), .app_af_cmd(a_af_cmd),
    .app_af_addr(a_af_addr), .app_af_afull(a_af_afull), .app_wdf_wren(a_wdf_wren),
    .app_wdf_data(a_wdf_data), .app_wdf_mask_data(a_mask), .app_wdf_afull(a_wdf_afull),
    .rd_data_valid(a_rdv), .rd_data_fifo_out(a_rdd));

  // ---------------- node B ----------------
  logic b_ireq_valid, b_iresp_ready, b_treq_valid, b_treq_ready, b_tresp_valid, b_tresp_ready, b_running;
  pkt_beat_t b_ireq, b_treq, b_tresp;
  logic b_phy, b_af_wren, b_af_afull, b_wdf_wren, b_wdf_afull, b_rdv;
  logic [2:0] b_af_cmd; logic [30:0] b_af_addr; logic [127:0] b_wdf_data, b_rdd; logic [15:0] b_mask;

  fpga_node u_b (
    .clk, .rst_n, .dev_id(8'd2), .nc_running(b_running),
    .ireq_valid(b_ireq_valid), .ireq_ready(1'b0), .ireq(b_ireq),
    .iresp_valid(1'b0), .iresp_ready(b_iresp_ready), .iresp('0),
    .treq_valid(b_treq_valid), .treq_ready(b_treq_ready), .treq(b_treq),
    .tresp_valid(b_tresp_valid), .tresp_ready(b_tresp_ready), .tresp(b_tresp),
    .phy_init_done(b_phy), .app_af_wren(b_af_wren), .app_af_cmd(b_af_cmd), .app_af_addr(b_af_addr),
    .app_af_afull(b_af_afull), .app_wdf_wren(b_wdf_wren), .app_wdf_data(b_wdf_data),
    .app_wdf_mask_data(b_mask), .app_wdf_afull(b_wdf_afull), .rd_data_valid(b_rdv), .rd_data_fifo_out(b_rdd));

  ddr2_mig_model #(.MEM_WORDS(131072)) mig_b (
    .clk, .rst_n, .phy_init_done(b_phy), .app_af_wren(b_af_wren), .app_af_cmd(b_af_cmd),
    .app_af_addr(b_af_addr), .app_af_afull(b_af_afull), .app_wdf_wren(b_wdf_wren),
    .app_wdf_data(b_wdf_data), .app_wdf_mask_data(b_mask), .app_wdf_afull(b_wdf_afull),
    .rd_data_valid(b_rdv), .rd_data_fifo_out(b_rdd));

  // ---------------- fabric: A initiator <-> B target, random stalls ----------------
  logic go_req, go_rsp;
  always @(posedge clk) begin go_req <= ($urandom % 8 != 0); go_rsp <= ($urandom % 8 != 0); end
  assign b_treq_valid  = a_ireq_valid && go_req;
  assign a_ireq_ready  = b_treq_ready && go_req;
  assign b_treq        = a_ireq;
  assign a_iresp_valid = b_tresp_valid && go_rsp;
  assign b_tresp_ready = a_iresp_ready && go_rsp;
  assign a_iresp       = b_tresp;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int m_contention = 0, m_pkts = 0, m_link_stall = 0, m_credit_stall = 0, m_wait = 0, m_sync = 0;
  int m_loop = 0, m_jump = 0, m_resp_data = 0, m_resp_done = 0, m_status = 0, m_concurrent = 0;
  int m_ocm_in = 0, m_ocm_out = 0, m_runs = 0, m_swrite = 0, m_nread = 0, m_nwrite_r = 0;
  logic in_pkt = 0;
  pkt_hdr_t ah, bh;
  assign ah = pkt_hdr_t'(a_ireq.data);
  assign bh = pkt_hdr_t'(b_tresp.data);
  logic b_in_rsp = 0;
  always @(posedge clk) if (rst_n) begin
    // a port waits for the arbiter while another port owns the controller
    if ((u_a.u_ddr2.req & ~u_a.u_ddr2.gnt) != 0 && u_a.u_ddr2.busy) m_contention++;
    if (a_ireq_valid && a_ireq_ready) begin
      if (!in_pkt) begin
        m_pkts++;
        if (ah.ttype == TT_SWRITE) m_swrite++;
        if (ah.ttype == TT_NREAD) m_nread++;
        if (ah.ttype == TT_NWRITE_R) m_nwrite_r++;
      end
      in_pkt <= !a_ireq.last;
    end
    if (a_ireq_valid && !a_ireq_ready) m_link_stall++;
    if (b_tresp_valid && b_tresp_ready) begin
      if (!b_in_rsp && bh.ttype == TT_RESP_DATA) m_resp_data++;
      if (!b_in_rsp && bh.ttype == TT_RESP_DONE) m_resp_done++;
      b_in_rsp <= !b_tresp.last;
    end
    if (u_a.u_ddr2.u_port0.state == 3'd4 && u_a.u_ddr2.u_port0.bursts != 0 &&
        !u_a.u_ddr2.u_port0.can_rd_burst && !u_a.u_ddr2.app_af_afull) m_credit_stall++;
    if (u_a.u_nc.state == 3'd6) m_wait++;
    if (u_a.u_nc.state == 3'd3 && u_a.u_nc.op == OP_SYNC) m_sync++;
    if (u_a.u_nc.state == 3'd3 && u_a.u_nc.op == OP_LOOP && u_a.u_nc.cnt[u_a.u_nc.cix] != 1) m_loop++;
    if (u_a.u_nc.state == 3'd3 && u_a.u_nc.op == OP_JUMP) m_jump++;
    if (u_a.u_ocm.rsp_valid && u_a.u_ocm.rsp_ready) begin
      if (u_a.u_ocm.rsp.to_ddr) m_ocm_out++; else m_ocm_in++;
    end
    if (|u_a.cp_start) m_runs++;
    if (u_a.u_ocm.state != 0 && u_a.u_srio.u_ireq.state != 0) m_concurrent++;
  end

  // ---------------- host: packets into A's target port ----------------
  logic [7:0] host_tid = 0;
  task automatic host_send(input ttype_e t, input logic [31:0] addr, input logic [63:0] pl [$], input int nread_dw);
    pkt_hdr_t h;
    h = '0; h.ttype = t; h.tid = host_tid; h.dest = 8'd1; h.src = 8'd0;
    h.dwords = (t == TT_NREAD) ? 6'(nread_dw) : 6'(pl.size()); h.addr = addr[31:3];
    host_tid++;
    @(negedge clk);
    a_treq_valid = 1; a_treq = '{data: h, last: (pl.size() == 0)};
    do @(posedge clk); while (!a_treq_ready);
    foreach (pl[i]) begin
      @(negedge clk);
      a_treq = '{data: pl[i], last: (i == pl.size() - 1)};
      do @(posedge clk); while (!a_treq_ready);
    end
    @(negedge clk); a_treq_valid = 0;
  endtask

  // status register read: returns the first payload dword of the response
  task automatic host_status(output logic [63:0] st);
    logic [63:0] none [$];
    host_send(TT_NREAD, 32'hC000_0000, none, 4);
    a_tresp_ready = 1;
    do @(posedge clk); while (!(a_tresp_valid));        // header
    @(posedge clk);
    while (!a_tresp_valid) @(posedge clk);
    st = a_tresp.data;
    while (!(a_tresp_valid && a_tresp.last)) @(posedge clk);
    @(negedge clk); a_tresp_ready = 0;
    m_status++;
  endtask

  // ---------------- data model ----------------
  function automatic logic [127:0] fpat(input int w);
    return {32'(w * 32'h9E3779B1), 32'(w ^ 32'hA5A5_1234), 32'(w + 7), 32'(w * 13)};
  endfunction
  function automatic logic [127:0] proc(input logic [127:0] x, input int k);
    logic [127:0] y;
    for (int l = 0; l < 8; l++) y[l*16 +: 16] = 16'(x[l*16 +: 16] * 16'(3 + 2 * k)) + 16'(k + 1);
    return y;
  endfunction

  logic [63:0] prog [$];
  logic [63:0] st;
  int errs;
  initial begin
    a_treq_valid = 0; a_treq = '0; a_tresp_ready = 0;
    // frame in A, a source block in B
    for (int w = 0; w < FRAME_B / 16; w++) mig_a.mem[IN_A / 16 + w] = fpat(w);
    for (int w = 0; w < 256; w++) mig_b.mem[SRC_B / 16 + w] = fpat(w + 100000);

    // ---- instruction bundle ----
    for (int k = 0; k < 3; k++) begin
      prog.push_back(i_cfg(k, 0, 3 + 2 * k));
      prog.push_back(i_cfg(k, 1, k + 1));
    end
    prog.push_back(i_ts(0));
    // phase 1, timed: process the frame
    for (int c = 0; c < NCHUNK; c++) begin
      prog.push_back(i_ocm(1, 0, c % 3, 0, CHUNK_B / 32, (IN_A + c * CHUNK_B) / 32));
      prog.push_back(i_run(1, c % 3, CHUNK_B / 16));
      prog.push_back(i_ocm(0, 1, c % 3, 4096, CHUNK_B / 32, (OUT_A + c * CHUNK_B) / 32));
    end
    prog.push_back(i_sync());
    prog.push_back(i_ts(1));
    // phase 2: process it again and send each chunk to B while the next one
    // is being processed
    for (int c = 0; c < NCHUNK; c++) begin
      prog.push_back(i_ocm(1, 0, c % 3, 0, CHUNK_B / 32, (IN_A + c * CHUNK_B) / 32));
      prog.push_back(i_run(1, c % 3, CHUNK_B / 16));
      prog.push_back(i_ocm(1, 1, c % 3, 4096, CHUNK_B / 32, (OUT_A + c * CHUNK_B) / 32));
      prog.push_back(i_srio0(0, TT_SWRITE, 2, CHUNK_B / 32));
      prog.push_back(i_srio1(OUT_A + c * CHUNK_B, OUT_A + c * CHUNK_B));
    end
    prog.push_back(i_srio0(1, TT_NREAD, 2, 4096 / 32));
    prog.push_back(i_srio1(SRC_B, RD_A));
    prog.push_back(i_srio0(0, TT_NWRITE_R, 2, 1024 / 32));
    prog.push_back(i_srio1(WR_B, IN_A));
    prog.push_back(i_sync());
    prog.push_back(i_ts(2));
    prog.push_back(i_ts(3));
    prog.push_back(i_ts(4));
    prog.push_back(i_setcnt(1, 4));
    prog.push_back(i_ts(8));                       // loop body
    prog.push_back(i_loop(1, prog.size() - 1));
    prog.push_back(i_jump(prog.size() + 2));
    prog.push_back(i_halt());                      // jumped over
    prog.push_back(i_ts(9));
    prog.push_back(i_ocm(1, 1, 3, 0, 5, TS_A / 32));
    prog.push_back(i_halt());

    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (a_phy && b_phy);
    // load the bundle, 32 instructions per packet
    for (int p = 0; p < prog.size(); p += 32) begin
      logic [63:0] pl [$];
      pl.delete();
      for (int i = p; i < prog.size() && i < p + 32; i++) pl.push_back(prog[i]);
      host_send(TT_NWRITE, 32'h8000_0000 + 32'(p * 8), pl, 0);
    end
    repeat (20) @(posedge clk);
    checks++;
    if (u_a.u_srio.u_ctrl_bram.mem[5] != prog[5]) begin failures++; $display("program not loaded"); end
    begin
      logic [63:0] pl [$];
      pl.push_back(64'd0);
      host_send(TT_NWRITE, 32'hC000_0000, pl, 0);
    end
    // poll status until halted
    do begin
      repeat (2000) @(posedge clk);
      host_status(st);
    end while (!st[16]);
    $display("halted at pc %0d after %0d status reads", st[15:0], m_status);
    checks++;
    if (st[15:0] != 16'(prog.size() - 1) || st[63]) begin failures++; $display("bad status %h", st); end
    repeat (100) @(posedge clk);

    // processed frame in A and in B
    errs = 0;
    for (int c = 0; c < NCHUNK; c++)
      for (int w = 0; w < CHUNK_B / 16; w++) begin
        logic [127:0] y;
        y = proc(fpat(c * (CHUNK_B / 16) + w), c % 3);
        if (mig_a.mem[(OUT_A + c * CHUNK_B) / 16 + w] != y) errs++;
        if (mig_b.mem[(OUT_A + c * CHUNK_B) / 16 + w] != y) errs++;
      end
    checks++; if (errs) begin failures++; $display("frame: %0d words wrong", errs); end
    errs = 0;
    for (int w = 0; w < 256; w++) if (mig_a.mem[RD_A / 16 + w] != fpat(w + 100000)) errs++;
    checks++; if (errs) begin failures++; $display("NREAD: %0d words wrong", errs); end
    errs = 0;
    for (int w = 0; w < 64; w++) if (mig_b.mem[WR_B / 16 + w] != fpat(w)) errs++;
    checks++; if (errs) begin failures++; $display("NWRITE_R: %0d words wrong", errs); end

    // timestamps, moved from the node controller SRAM to DDR2
    begin
      logic [63:0] ts [10];
      for (int i = 0; i < 10; i++) ts[i] = mig_a.mem[TS_A / 16 + i][63:0];
      $display("frame processing: %0d cycles (%0d us at 200 MHz)", ts[1] - ts[0], (ts[1] - ts[0]) / 200);
      checks++;
      if (ts[1] - ts[0] > 96000 || ts[1] <= ts[0]) begin failures++; $display("frame too slow"); end
      checks++;
      if (ts[3] - ts[2] != 3 || ts[4] - ts[3] != 3 || ts[8] <= ts[4] || ts[9] <= ts[8]) begin
        failures++; $display("timestamp sequence wrong");
      end
    end

    // mechanisms
    $display("contention %0d pkts %0d link_stall %0d credit_stall %0d wait %0d sync %0d loop %0d jump %0d",
             m_contention, m_pkts, m_link_stall, m_credit_stall, m_wait, m_sync, m_loop, m_jump);
    $display("resp_data %0d resp_done %0d status %0d ocm_in %0d ocm_out %0d runs %0d concurrent %0d swrite %0d nread %0d nwrite_r %0d",
             m_resp_data, m_resp_done, m_status, m_ocm_in, m_ocm_out, m_runs, m_concurrent, m_swrite, m_nread, m_nwrite_r);
    checks++; if (m_contention == 0)   begin failures++; $display("no arbiter contention"); end
    checks++; if (m_pkts != NCHUNK * ((CHUNK_B + 255) / 256) + 16 + 4) begin failures++; $display("packet count %0d", m_pkts); end
    checks++; if (m_link_stall == 0)   begin failures++; $display("no link stall"); end
    checks++; if (m_credit_stall == 0) begin failures++; $display("no read-credit stall"); end
    checks++; if (m_wait == 0 || m_sync != 2) begin failures++; $display("waits/syncs"); end
    checks++; if (m_loop != 3 || m_jump != 1) begin failures++; $display("loop/jump"); end
    checks++; if (m_resp_data != 16 || m_resp_done != 4) begin failures++; $display("responses"); end
    checks++; if (m_ocm_in != 2 * NCHUNK || m_ocm_out != 2 * NCHUNK + 1 || m_runs != 2 * NCHUNK || m_swrite != NCHUNK * ((CHUNK_B + 255) / 256)) begin failures++; $display("ocm/runs"); end
    checks++; if (m_concurrent == 0) begin failures++; $display("no concurrency"); end
    checks++; if (m_status == 0) begin failures++; $display("no status read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
