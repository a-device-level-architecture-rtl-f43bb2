// tb_ddr2_interface: the three-port DDR2 wrapper on the controller model.
// All three ports write and then read back their own regions at the same
// time, so the arbiter sees contention. Checks every word read, that each
// port got its responses, that grants overlapped requests from several ports
// (contention happened) and the sustained write rate of port 0: one 128-bit
// word per cycle (25.6 Gb/s at 200 MHz) less the per-command overhead.
module tb_ddr2_interface;
  import fcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid [3], cmd_ready [3], wr_valid [3], wr_ready [3], rd_valid [3], rd_ready [3];
  logic rsp_valid [3], rsp_ready [3], rsp_wr [3];
  mem_cmd_t cmd [3];
  logic [127:0] wr0, rd0;
  logic [63:0]  wr1, rd1, wr2, rd2;

  logic phy_init_done, app_af_wren, app_af_afull, app_wdf_wren, app_wdf_afull, rd_data_valid;
  logic [2:0] app_af_cmd; logic [30:0] app_af_addr; logic [127:0] app_wdf_data, rd_data_fifo_out;
  logic [15:0] app_wdf_mask_data;

  ddr2_interface dut (
    .clk, .rst_n,
    .p0_cmd_valid(cmd_valid[0]), .p0_cmd_ready(cmd_ready[0]), .p0_cmd(cmd[0]),
    .p0_wr_valid(wr_valid[0]), .p0_wr_ready(wr_ready[0]), .p0_wr_data(wr0),
    .p0_rd_valid(rd_valid[0]), .p0_rd_ready(rd_ready[0]), .p0_rd_data(rd0),
    .p0_rsp_valid(rsp_valid[0]), .p0_rsp_ready(rsp_ready[0]), .p0_rsp_wr(rsp_wr[0]),
    .p1_cmd_valid(cmd_valid[1]), .p1_cmd_ready(cmd_ready[1]), .p1_cmd(cmd[1]),
    .p1_wr_valid(wr_valid[1]), .p1_wr_ready(wr_ready[1]), .p1_wr_data(wr1),
    .p1_rd_valid(rd_valid[1]), .p1_rd_ready(rd_ready[1]), .p1_rd_data(rd1),
    .p1_rsp_valid(rsp_valid[1]), .p1_rsp_ready(rsp_ready[1]), .p1_rsp_wr(rsp_wr[1]),
    .p2_cmd_valid(cmd_valid[2]), .p2_cmd_ready(cmd_ready[2]), .p2_cmd(cmd[2]),
    .p2_wr_valid(wr_valid[2]), .p2_wr_ready(wr_ready[2]), .p2_wr_data(wr2),
    .p2_rd_valid(rd_valid[2]), .p2_rd_ready(rd_ready[2]), .p2_rd_data(rd2),
    .p2_rsp_valid(rsp_valid[2]), .p2_rsp_ready(rsp_ready[2]), .p2_rsp_wr(rsp_wr[2]),
    .phy_init_done, .app_af_wren, .app_af_cmd, .app_af_addr, .app_af_afull,
    .app_wdf_wren, .app_wdf_data, .app_wdf_mask_data, .app_wdf_afull,
    .rd_data_valid, .rd_data_fifo_out);

  ddr2_mig_model #(.MEM_WORDS(8192)) mig (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data pattern: function of port, byte address
  function automatic logic [63:0] pat(input int p, input int dw);
    return {8'(p), 24'(dw), 32'(dw * 32'h9E3779B1 + p)};
  endfunction

  int contention = 0, nrsp [3];
  always @(posedge clk) if (rst_n) begin
    if ($countones(dut.req) > 1) contention++;
    for (int p = 0; p < 3; p++) if (rsp_valid[p] && rsp_ready[p]) nrsp[p]++;
  end

  task automatic send_cmd(input int p, input logic w, input int addr, input int len);
    @(negedge clk);
    cmd_valid[p] = 1; cmd[p] = '{wr: w, addr: AW'(addr), len: LEN_W'(len)};
    do @(posedge clk); while (!cmd_ready[p]);
    @(negedge clk); cmd_valid[p] = 0;
  endtask

  // port p writes len bytes at base then reads them back
  task automatic port_run(input int p, input int base, input int len, input int reps);
    int dws;
    dws = (p == 0) ? len / 16 : len / 8;
    for (int r = 0; r < reps; r++) begin
      fork
        send_cmd(p, 1, base + r * len, len);
        for (int i = 0; i < dws; i++) begin
          int dw;
          dw = (base + r * len) / 8 + ((p == 0) ? 2 * i : i);
          @(negedge clk);
          wr_valid[p] = 1;
          if (p == 0) wr0 = {pat(p, dw + 1), pat(p, dw)};
          else if (p == 1) wr1 = pat(p, dw);
          else wr2 = pat(p, dw);
          do @(posedge clk); while (!wr_ready[p]);
          @(negedge clk); wr_valid[p] = 0;
        end
      join
    end
    for (int r = 0; r < reps; r++) begin
      fork
        send_cmd(p, 0, base + r * len, len);
        for (int i = 0; i < dws; i++) begin
          int dw;
          logic ok;
          dw = (base + r * len) / 8 + ((p == 0) ? 2 * i : i);
          @(negedge clk); rd_ready[p] = 1;
          do @(posedge clk); while (!rd_valid[p]);
          ok = (p == 0) ? (rd0 == {pat(p, dw + 1), pat(p, dw)}) :
               (p == 1) ? (rd1 == pat(p, dw)) : (rd2 == pat(p, dw));
          checks++;
          if (!ok) begin failures++; $display("port %0d mismatch at dword %0d", p, dw); end
          @(negedge clk); rd_ready[p] = 0;
        end
      join
    end
  endtask

  int t0, t1;
  initial begin
    for (int p = 0; p < 3; p++) begin
      cmd_valid[p] = 0; wr_valid[p] = 0; rd_ready[p] = 0; rsp_ready[p] = 1; cmd[p] = '0; nrsp[p] = 0;
    end
    wr0 = 0; wr1 = 0; wr2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (phy_init_done);
    fork
      port_run(0, 0,     1024, 4);
      port_run(1, 32768, 256,  6);
      port_run(2, 65536, 96,   6);
    join
    repeat (50) @(posedge clk);
    for (int p = 0; p < 3; p++) begin
      checks++;
      if (nrsp[p] != ((p == 0) ? 8 : 12)) begin failures++; $display("port %0d responses %0d", p, nrsp[p]); end
    end
    checks++;
    if (contention == 0) begin failures++; $display("no contention seen"); end
    // throughput of port 0 alone: 4 KB write with data pre-queued in bursts
    @(negedge clk);
    fork
      send_cmd(0, 1, 0, 4096);
      begin
        for (int i = 0; i < 256; i++) begin
          @(negedge clk); wr_valid[0] = 1; wr0 = 128'(i);
          do @(posedge clk); while (!wr_ready[0]);
        end
        @(negedge clk); wr_valid[0] = 0;
      end
    join_none
    wait (dut.u_port0.state == 3'd2);   // first write beat
    t0 = $time;
    wait (rsp_valid[0]);
    t1 = $time;
    $display("4 KB write: %0d cycles; contention cycles %0d", (t1 - t0) / 10, contention);
    checks++;
    // 256 words: at most one word per cycle plus a small overhead
    if ((t1 - t0) / 10 < 256 || (t1 - t0) / 10 > 256 + 64) begin
      failures++; $display("write rate out of range");
    end
    repeat (20) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
