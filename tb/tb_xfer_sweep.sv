// tb_xfer_sweep: transfer-size sweeps for the RapidIO link and the local
// memory path, at default parameters.
//
// Runs the two transfer evaluations of the architecture on two nodes joined by
// a link with no stalls. Node A is the initiator and node B the target. The
// testbench loads one bundle into node A's control BRAM and starts it:
//   1. RapidIO: SWRITE, NWRITE, NWRITE_R and NREAD of 32 B, 128 B, ... 8 MB
//      and 16 MB (sizes step by 4x, with 16 MB added at the end), each with
//      the wait bit set so that one transfer runs at a time;
//   2. local memory: OCM transfers of 32 B ... 128 KB from DDR2 into the node
//      controller SRAM and then from that SRAM back to DDR2.
// Each transfer is timed from the node's side: from the cycle the command is
// accepted by the RapidIO interface (or OCM controller) to the cycle its
// completion is returned. For writes that is when the last byte has left the
// initiator (NWRITE_R: when the target's DONE arrives); for NREAD it is when
// the last byte is in the initiator's DDR2 queue.
// Memory regions (byte addresses):
//   node A: 0 source pattern (16 MB), 16 MB NREAD target, 32 MB OCM output
//   node B: 0 SWRITE, 16 MB NWRITE, 32 MB NWRITE_R targets, 48 MB NREAD source
// Checks:
//   - every completion is error-free;
//   - the 16 MB destination of every transaction type and the 128 KB OCM
//     output hold the right data;
//   - the 16 MB SWRITE reaches 7 Gb/s with the link clock at 125 MHz
//     (bytes per cycle >= 7);
//   - a 32 B local transfer finishes within 500 ns at 200 MHz (100 cycles).
// Prints a table of cycles and rate for every transfer.
module tb_xfer_sweep;
  import fcp_pkg::*;
  import nc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MEM_WORDS = 4194304;                   // 64 MB of 128-bit words per node
  localparam int MB = 1048576;
  localparam int NSZ = 11, NOCM = 7;
  localparam int SZ [NSZ] = '{32, 128, 512, 2048, 8192, 32768, 131072, 524288, 2097152, 8388608, 16777216};
  localparam ttype_e TT [4] = '{TT_SWRITE, TT_NWRITE, TT_NWRITE_R, TT_NREAD};
  localparam int B_DST [4] = '{0, 16 * MB, 32 * MB, 16 * MB};  // remote address per type
  localparam int A_LOC [4] = '{0, 0, 0, 16 * MB};               // local address per type
  localparam int B_SRC = 48 * MB, A_OCM_OUT = 32 * MB;

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

  ddr2_mig_model #(.MEM_WORDS(MEM_WORDS)) mig_a (
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

  ddr2_mig_model #(.MEM_WORDS(MEM_WORDS)) mig_b (
    .clk, .rst_n, .phy_init_done(b_phy), .app_af_wren(b_af_wren), .app_af_cmd(b_af_cmd),
    .app_af_addr(b_af_addr), .app_af_afull(b_af_afull), .app_wdf_wren(b_wdf_wren),
    .app_wdf_data(b_wdf_data), .app_wdf_mask_data(b_mask), .app_wdf_afull(b_wdf_afull),
    .rd_data_valid(b_rdv), .rd_data_fifo_out(b_rdd));

  // ---------------- link: A initiator <-> B target, no stalls ----------------
  assign b_treq_valid  = a_ireq_valid;
  assign a_ireq_ready  = b_treq_ready;
  assign b_treq        = a_ireq;
  assign a_iresp_valid = b_tresp_valid;
  assign b_tresp_ready = a_iresp_ready;
  assign a_iresp       = b_tresp;

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- timing monitors ----------------
  longint s_t0, o_t0;
  longint s_cyc [4][NSZ];
  longint o_cyc [2][NOCM];
  int s_n = 0, o_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_a.s_cmd_valid && u_a.s_cmd_ready) s_t0 <= cyc;
    if (u_a.s_cpl_valid && u_a.s_cpl_ready) begin
      if (s_n < 4 * NSZ) s_cyc[s_n / NSZ][s_n % NSZ] <= cyc - s_t0;
      checks++;
      if (u_a.s_cpl.err) begin failures++; $display("transfer %0d: completion error", s_n); end
      s_n <= s_n + 1;
    end
    if (u_a.o_cmd_valid && u_a.o_cmd_ready) o_t0 <= cyc;
    if (u_a.o_rsp_valid && u_a.o_rsp_ready) begin
      if (o_n < 2 * NOCM) o_cyc[o_n / NOCM][o_n % NOCM] <= cyc - o_t0;
      o_n <= o_n + 1;
    end
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

  // ---------------- data ----------------
  function automatic logic [127:0] pat(input int w, input int s);
    return {32'(w * 32'h9E3779B1 + s), 32'(w ^ 32'h5A5A_4321), 32'(w + 11 + s), 32'(w * 7)};
  endfunction

  function automatic int cmp(input bit on_b, input int dst, input bit from_b, input int bytes);
    int e;
    logic [127:0] want;
    e = 0;
    for (int w = 0; w < bytes / 16; w++) begin
      want = from_b ? pat(w, 1) : pat(w, 0);
      if ((on_b ? mig_b.mem[dst / 16 + w] : mig_a.mem[dst / 16 + w]) != want) e++;
    end
    return e;
  endfunction

  logic [63:0] prog [$];
  int e;
  initial begin
    a_treq_valid = 0; a_treq = '0; a_tresp_ready = 1; b_ireq_valid = 0; b_ireq = '0; b_iresp_ready = 1;
    for (int w = 0; w < 16 * MB / 16; w++) begin
      mig_a.mem[w] = pat(w, 0);
      mig_b.mem[B_SRC / 16 + w] = pat(w, 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (a_phy && b_phy);

    for (int t = 0; t < 4; t++)
      for (int i = 0; i < NSZ; i++) begin
        prog.push_back(i_srio0(1, TT[t], 2, SZ[i] / 32));
        prog.push_back(i_srio1(TT[t] == TT_NREAD ? B_SRC : B_DST[t], A_LOC[t]));
      end
    for (int d = 0; d < 2; d++)
      for (int i = 0; i < NOCM; i++)
        prog.push_back(i_ocm(1, d[0], 3, 0, SZ[i] / 32, d ? A_OCM_OUT / 32 : 0));
    prog.push_back(i_halt());
    for (int p = 0; p < prog.size(); p += 32) begin
      logic [63:0] pl [$];
      pl.delete();
      for (int i = p; i < prog.size() && i < p + 32; i++) pl.push_back(prog[i]);
      host_send(TT_NWRITE, 32'h8000_0000 + 32'(p * 8), pl, 0);
    end
    repeat (8) @(posedge clk);
    begin
      logic [63:0] pl [$];
      pl.push_back(64'd0);
      host_send(TT_NWRITE, 32'hC000_0000, pl, 0);
    end
    wait (a_running);
    wait (!a_running);
    repeat (4) @(posedge clk);

    checks++;
    if (s_n != 4 * NSZ || o_n != 2 * NOCM) begin
      failures++; $display("%0d RapidIO and %0d OCM completions", s_n, o_n);
    end

    $display("RapidIO transfers, cycles and Gb/s at 125 MHz:");
    $display("  %9s %10s %10s %10s %10s", "bytes", "SWRITE", "NWRITE", "NWRITE_R", "NREAD");
    for (int i = 0; i < NSZ; i++)
      $display("  %9d %10d %10d %10d %10d    %5.2f %5.2f %5.2f %5.2f", SZ[i],
               s_cyc[0][i], s_cyc[1][i], s_cyc[2][i], s_cyc[3][i],
               real'(SZ[i]) / s_cyc[0][i], real'(SZ[i]) / s_cyc[1][i],
               real'(SZ[i]) / s_cyc[2][i], real'(SZ[i]) / s_cyc[3][i]);
    $display("Local transfers, cycles and us at 200 MHz:");
    $display("  %9s %10s %10s", "bytes", "DDR2->SRAM", "SRAM->DDR2");
    for (int i = 0; i < NOCM; i++)
      $display("  %9d %10d %10d    %8.3f %8.3f", SZ[i], o_cyc[0][i], o_cyc[1][i],
               o_cyc[0][i] / 200.0, o_cyc[1][i] / 200.0);

    for (int t = 0; t < 4; t++) begin
      e = (TT[t] == TT_NREAD) ? cmp(0, A_LOC[t], 1, 16 * MB) : cmp(1, B_DST[t], 0, 16 * MB);
      checks++;
      if (e) begin failures++; $display("type %0d: %0d destination words wrong", t, e); end
    end
    e = cmp(0, A_OCM_OUT, 0, 131072);
    checks++;
    if (e) begin failures++; $display("OCM output: %0d words wrong", e); end

    checks++;
    if (s_cyc[0][NSZ-1] * 7 > SZ[NSZ-1]) begin
      failures++; $display("16 MB SWRITE below 7 Gb/s: %0d cycles", s_cyc[0][NSZ-1]);
    end
    checks++;
    if (o_cyc[0][0] > 100 || o_cyc[1][0] > 100) begin
      failures++; $display("32 B local transfer over 500 ns");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
