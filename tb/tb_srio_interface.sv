// tb_srio_interface: the RapidIO wrapper with its initiator ports looped back
// to its own target ports through a link model that stalls at random, on top
// of the DDR2 wrapper and controller model. Every transaction type is issued
// from the command side: NWRITE, SWRITE, NWRITE_R, NREAD between DDR2
// regions; NWRITE into the control BRAM and to the start register; NREAD of
// the status register. Checks memory contents, control BRAM contents, the
// start pulse and PC, packet splitting at 256 bytes, one completion per
// command with the right type and no error, and that DONE responses were
// sent for NWRITE_R only. Finally measures the payload rate of a 64 KB SWRITE
// over a link without stalls.
module tb_srio_interface;
  import fcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, cpl_valid, cpl_ready, imem_en, nc_start;
  srio_cmd_t cmd; srio_cpl_t cpl;
  logic [9:0] imem_addr; logic [63:0] imem_rdata; logic [15:0] nc_start_pc;
  logic [63:0] nc_status;
  logic ireq_valid, ireq_ready, iresp_valid, iresp_ready, treq_valid, treq_ready, tresp_valid, tresp_ready;
  pkt_beat_t ireq, iresp, treq, tresp;
  logic p1_cmd_valid, p1_cmd_ready, p1_wr_valid, p1_wr_ready, p1_rd_valid, p1_rd_ready, p1_rsp_valid, p1_rsp_ready, p1_rsp_wr;
  logic p2_cmd_valid, p2_cmd_ready, p2_wr_valid, p2_wr_ready, p2_rd_valid, p2_rd_ready, p2_rsp_valid, p2_rsp_ready, p2_rsp_wr;
  mem_cmd_t p1_cmd, p2_cmd;
  logic [63:0] p1_wr_data, p1_rd_data, p2_wr_data, p2_rd_data;
  logic phy_init_done, app_af_wren, app_af_afull, app_wdf_wren, app_wdf_afull, rd_data_valid;
  logic [2:0] app_af_cmd; logic [30:0] app_af_addr; logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0] app_wdf_mask_data;
  logic [7:0] dev_id = 8'd5;

  srio_interface dut (.*);

  ddr2_interface u_ddr (
    .clk, .rst_n,
    .p0_cmd_valid(1'b0), .p0_cmd_ready(), .p0_cmd('0), .p0_wr_valid(1'b0), .p0_wr_ready(), .p0_wr_data('0),
    .p0_rd_valid(), .p0_rd_ready(1'b0), .p0_rd_data(), .p0_rsp_valid(), .p0_rsp_ready(1'b1), .p0_rsp_wr(),
    .p1_cmd_valid, .p1_cmd_ready, .p1_cmd, .p1_wr_valid, .p1_wr_ready, .p1_wr_data,
    .p1_rd_valid, .p1_rd_ready, .p1_rd_data, .p1_rsp_valid, .p1_rsp_ready, .p1_rsp_wr,
    .p2_cmd_valid, .p2_cmd_ready, .p2_cmd, .p2_wr_valid, .p2_wr_ready, .p2_wr_data,
    .p2_rd_valid, .p2_rd_ready, .p2_rd_data, .p2_rsp_valid, .p2_rsp_ready, .p2_rsp_wr,
    .phy_init_done, .app_af_wren, .app_af_cmd, .app_af_addr, .app_af_afull,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data, .app_wdf_afull,
    .rd_data_valid, .rd_data_fifo_out);

  ddr2_mig_model #(.MEM_WORDS(32768)) mig (.*);

  // loop-back link with random stalls
  logic go_req, go_rsp, stall_off = 0;
  always @(posedge clk) begin
    go_req <= stall_off || ($urandom % 5 != 0);
    go_rsp <= stall_off || ($urandom % 5 != 0);
  end
  assign treq_valid  = ireq_valid && go_req;
  assign ireq_ready  = treq_ready && go_req;
  assign treq        = ireq;
  assign iresp_valid = tresp_valid && go_rsp;
  assign tresp_ready = iresp_ready && go_rsp;
  assign iresp       = tresp;
  assign nc_status   = 64'hABCD_0000_0001_0042;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link statistics
  int n_hdr = 0, n_done = 0, n_starts = 0, n_stall = 0;
  longint cyc = 0, t_first = 0, t_last = 0;
  int n_beats = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic in_pkt = 0;
  pkt_hdr_t th;
  assign th = pkt_hdr_t'(tresp.data);
  logic [15:0] last_pc;
  always @(posedge clk) if (rst_n) begin
    if (ireq_valid && ireq_ready) begin
      if (n_beats == 0) t_first <= cyc;
      t_last <= cyc;
      n_beats++;
      if (!in_pkt) n_hdr++;
      in_pkt <= !ireq.last;
    end
    if (ireq_valid && !ireq_ready) n_stall++;
    if (tresp_valid && tresp_ready && th.ttype == TT_RESP_DONE && tresp.last) n_done++;
    if (nc_start) begin n_starts++; last_pc <= nc_start_pc; end
  end

  function automatic logic [127:0] pat(input int w);
    return {32'(w), 32'(w * 32'h2545F491), 32'(w + 32'h77), 32'(~w)};
  endfunction

  task automatic xfer(input ttype_e t, input logic [31:0] raddr, input int laddr, input int len);
    int h0;
    h0 = n_hdr;
    @(negedge clk);
    cmd_valid = 1; cmd = '{ttype: t, dest: 8'd5, raddr: raddr, laddr: AW'(laddr), len: LEN_W'(len)};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
    while (!cpl_valid) @(posedge clk);
    checks++;
    if (cpl.ttype != t || cpl.err) begin failures++; $display("completion %p for %s", cpl, t.name()); end
    // response-less writes complete when sent: let the target finish
    if (t == TT_NWRITE || t == TT_SWRITE) repeat (300) @(posedge clk);
    else @(posedge clk);
    checks++;
    if (n_hdr - h0 != (len + 255) / 256) begin
      failures++; $display("%s: %0d packets for %0d bytes", t.name(), n_hdr - h0, len);
    end
  endtask

  function automatic int cmp_region(input int src_w, input int dst_w, input int words);
    int e = 0;
    for (int i = 0; i < words; i++) if (mig.mem[dst_w + i] != mig.mem[src_w + i]) e++;
    return e;
  endfunction

  int e;
  initial begin
    cmd_valid = 0; cpl_ready = 1; cmd = '0; imem_en = 0; imem_addr = 0;
    for (int w = 0; w < 4096; w++) mig.mem[w] = pat(w);
    mig.mem['h1100 / 16] = 128'h1234;     // start PC
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (phy_init_done);

    xfer(TT_NWRITE, 32'h10000, 0, 1024);
    checks++; e = cmp_region(0, 'h10000 / 16, 64); if (e) begin failures++; $display("NWRITE: %0d wrong", e); end
    xfer(TT_SWRITE, 32'h20000, 'h400, 96);
    checks++; e = cmp_region('h40, 'h20000 / 16, 6); if (e) begin failures++; $display("SWRITE: %0d wrong", e); end
    checks++; if (n_done != 0) begin failures++; $display("DONE sent for a write without response"); end
    xfer(TT_NWRITE_R, 32'h30000, 'h800, 512);
    checks++; e = cmp_region('h80, 'h30000 / 16, 32); if (e) begin failures++; $display("NWRITE_R: %0d wrong", e); end
    checks++; if (n_done != 2) begin failures++; $display("DONE responses %0d", n_done); end
    xfer(TT_NREAD, 32'h0, 'h40000, 768);
    checks++; e = cmp_region(0, 'h40000 / 16, 48); if (e) begin failures++; $display("NREAD: %0d wrong", e); end
    // control BRAM words 10..17 from DDR2 bytes 0x1000..0x103f
    xfer(TT_NWRITE, 32'h8000_0000 + 8 * 10, 'h1000, 64);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (dut.u_ctrl_bram.mem[10 + i] != mig.mem['h100 + i / 2][64 * (i % 2) +: 64]) begin
        failures++; $display("control BRAM word %0d wrong", 10 + i);
      end
    end
    // read back through the node controller's port
    @(negedge clk); imem_en = 1; imem_addr = 13;
    @(negedge clk); imem_en = 0;
    checks++; if (imem_rdata != mig.mem['h101][127:64]) begin failures++; $display("imem port read wrong"); end
    // start register
    xfer(TT_NWRITE, 32'hC000_0000, 'h1100, 32);
    checks++; if (n_starts != 1 || last_pc != 16'h1234) begin failures++; $display("start %0d pc %h", n_starts, last_pc); end
    // status register read
    xfer(TT_NREAD, 32'hC000_0000, 'h50000, 32);
    checks++;
    if (mig.mem['h5000] != {nc_status, nc_status} || mig.mem['h5001] != {nc_status, nc_status}) begin
      failures++; $display("status read %h", mig.mem['h5000]);
    end
    checks++; if (n_stall == 0) begin failures++; $display("link never stalled"); end
    // throughput: 64 KB SWRITE over a link that never stalls. IREQ CTRL must
    // keep the link busy although the same DDR2 also takes the target side's
    // writes: at least 9 beats in 10 cycles, 7.3 Gb/s of payload at 125 MHz,
    // against the 7 Gb/s best-case SWRITE throughput reported for the
    // original.
    stall_off = 1;
    repeat (2) @(posedge clk);
    n_beats = 0;
    xfer(TT_SWRITE, 32'h60000, 0, 65536);
    checks++; e = cmp_region(0, 'h60000 / 16, 4096); if (e) begin failures++; $display("64 KB SWRITE: %0d wrong", e); end
    $display("64 KB SWRITE: %0d beats in %0d cycles, %0d Mb/s payload at 125 MHz",
             n_beats, t_last - t_first + 1, 64'(65536 * 8) * 125 / (t_last - t_first + 1));
    checks++;
    if (n_beats != 8192 + 256 || (t_last - t_first + 1) * 9 > n_beats * 10) begin
      failures++; $display("SWRITE throughput too low");
    end
    $display("packets %0d, link stall cycles %0d", n_hdr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
