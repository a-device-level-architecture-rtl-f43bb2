// tb_ocm_controller: OCM controller with the DDR2 wrapper, the DDR2
// controller model and four SRAM models. Moves 128 KB DDR2 -> SRAM 1 and
// checks every word and the time taken (the architecture reports about 44 us
// for 128 KB, i.e. at most 8800 cycles at 200 MHz); moves 4 KB SRAM 2 -> DDR2
// and checks DDR2; checks a 32-byte move finishes within 100 cycles (about
// 500 ns best case); uses SRAMs 0 and 3 and checks responses arrive only
// after the data, with the right SRAM and direction.
module tb_ocm_controller;
  import fcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid, cmd_ready, rsp_valid, rsp_ready;
  ocm_cmd_t cmd; ocm_rsp_t rsp;
  logic d_cmd_valid, d_cmd_ready, d_wr_valid, d_wr_ready, d_rd_valid, d_rd_ready;
  logic d_rsp_valid, d_rsp_ready, d_rsp_wr;
  mem_cmd_t d_cmd; logic [127:0] d_wr_data, d_rd_data;
  logic [127:0] sram_data_i; logic [12:0] sram_addr_i; logic [3:0] sram_cs_i; logic sram_we_i;
  logic [127:0] sram_data_o [4];

  logic phy_init_done, app_af_wren, app_af_afull, app_wdf_wren, app_wdf_afull, rd_data_valid;
  logic [2:0] app_af_cmd; logic [30:0] app_af_addr; logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0] app_wdf_mask_data;

  ocm_controller dut (.*);

  ddr2_interface u_ddr (
    .clk, .rst_n,
    .p0_cmd_valid(d_cmd_valid), .p0_cmd_ready(d_cmd_ready), .p0_cmd(d_cmd),
    .p0_wr_valid(d_wr_valid), .p0_wr_ready(d_wr_ready), .p0_wr_data(d_wr_data),
    .p0_rd_valid(d_rd_valid), .p0_rd_ready(d_rd_ready), .p0_rd_data(d_rd_data),
    .p0_rsp_valid(d_rsp_valid), .p0_rsp_ready(d_rsp_ready), .p0_rsp_wr(d_rsp_wr),
    .p1_cmd_valid(1'b0), .p1_cmd_ready(), .p1_cmd('0), .p1_wr_valid(1'b0), .p1_wr_ready(), .p1_wr_data('0),
    .p1_rd_valid(), .p1_rd_ready(1'b0), .p1_rd_data(), .p1_rsp_valid(), .p1_rsp_ready(1'b1), .p1_rsp_wr(),
    .p2_cmd_valid(1'b0), .p2_cmd_ready(), .p2_cmd('0), .p2_wr_valid(1'b0), .p2_wr_ready(), .p2_wr_data('0),
    .p2_rd_valid(), .p2_rd_ready(1'b0), .p2_rd_data(), .p2_rsp_valid(), .p2_rsp_ready(1'b1), .p2_rsp_wr(),
    .phy_init_done, .app_af_wren, .app_af_cmd, .app_af_addr, .app_af_afull,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data, .app_wdf_afull,
    .rd_data_valid, .rd_data_fifo_out);

  ddr2_mig_model #(.MEM_WORDS(32768)) mig (.*);

  for (genvar i = 0; i < 4; i++) begin : g_sram
    ocm_sram_model u_sram (.clk, .data_i(sram_data_i), .addr_i(sram_addr_i), .cs_i(sram_cs_i[i]),
                           .we_i(sram_we_i), .data_o(sram_data_o[i]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] pat(input int w, input int s);
    return {32'(s), 32'(w), 32'(w * 32'h01000193), 32'(~w)};
  endfunction

  // issue a command and wait for its response; returns cycles taken
  task automatic run(input logic to_ddr, input int sram, input int saddr, input int daddr,
                     input int len, output int cycles);
    int t0;
    @(negedge clk);
    cmd_valid = 1;
    cmd = '{to_ddr: to_ddr, sram: 2'(sram), sram_addr: 13'(saddr), ddr_addr: AW'(daddr), len: 18'(len)};
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    t0 = $time;
    @(negedge clk); cmd_valid = 0;
    while (!rsp_valid) @(posedge clk);
    cycles = ($time - t0) / 10;
    checks++;
    if (rsp.to_ddr != to_ddr || rsp.sram != 2'(sram)) begin
      failures++; $display("bad response %p", rsp);
    end
  endtask

  int cyc, errs;
  initial begin
    cmd_valid = 0; rsp_ready = 1; cmd = '0;
    for (int w = 0; w < 8192; w++) mig.mem[w] = pat(w, 7);
    for (int w = 0; w < 256; w++)  g_sram[2].u_sram.mem[100 + w] = pat(w, 2);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (phy_init_done);
    // 128 KB DDR2 -> SRAM 1
    run(0, 1, 0, 0, 131072, cyc);
    $display("128 KB DDR2->SRAM: %0d cycles", cyc);
    errs = 0;
    for (int w = 0; w < 8192; w++) if (g_sram[1].u_sram.mem[w] != pat(w, 7)) errs++;
    checks++; if (errs != 0) begin failures++; $display("%0d words wrong in SRAM 1", errs); end
    checks++; if (cyc > 8800) begin failures++; $display("128 KB took too long"); end
    // 4 KB SRAM 2 (from word 100) -> DDR2 at 1 MB-ish offset (word 16384)
    run(1, 2, 100, 16384 * 16, 4096, cyc);
    $display("4 KB SRAM->DDR2: %0d cycles", cyc);
    errs = 0;
    for (int w = 0; w < 256; w++) if (mig.mem[16384 + w] != pat(w, 2)) errs++;
    checks++; if (errs != 0) begin failures++; $display("%0d words wrong in DDR2", errs); end
    checks++; if (cyc > 256 + 100) begin failures++; $display("4 KB read too slow"); end
    // 32 B into SRAM 0 and SRAM 3
    run(0, 0, 5, 64, 32, cyc);
    $display("32 B DDR2->SRAM: %0d cycles", cyc);
    checks++; if (cyc > 100) begin failures++; $display("small move too slow"); end
    run(0, 3, 8000, 96, 32, cyc);
    checks++;
    if (g_sram[0].u_sram.mem[5] != pat(4, 7) || g_sram[0].u_sram.mem[6] != pat(5, 7) ||
        g_sram[3].u_sram.mem[8000] != pat(6, 7) || g_sram[3].u_sram.mem[8001] != pat(7, 7)) begin
      failures++; $display("small moves wrong");
    end
    // SRAM 0 -> DDR2 round trip of the small block
    run(1, 0, 5, 200 * 16, 32, cyc);
    checks++;
    if (mig.mem[200] != pat(4, 7) || mig.mem[201] != pat(5, 7)) begin
      failures++; $display("round trip wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
