// tb_ddr2_port_ctrl: a 64-bit port controller alone on the DDR2 controller
// model. Writes random transfers of 32 B .. 1 KB, reads them back with random
// back-pressure on the read-data side, and checks the data, the packing order
// in memory (lower word in the low half), one response per command with the
// right direction, and that the controller is held for exactly one command.
module tb_ddr2_port_ctrl;
  import fcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          cmd_valid, cmd_ready, wr_valid, wr_ready, rd_valid, rd_ready;
  logic          rsp_valid, rsp_ready, rsp_wr, req, gnt, done;
  mem_cmd_t      cmd;
  logic [63:0]   wr_data, rd_data;
  logic          af_wren, af_afull, wdf_wren, wdf_afull, rd_data_valid, phy_init_done;
  logic [2:0]    af_cmd;
  logic [30:0]   af_addr;
  logic [127:0]  wdf_data, rd_data_in;
  logic [15:0]   wdf_mask;

  ddr2_port_ctrl #(.UW(64)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .wr_valid, .wr_ready, .wr_data,
    .rd_valid, .rd_ready, .rd_data, .rsp_valid, .rsp_ready, .rsp_wr,
    .req, .gnt, .done, .af_wren, .af_cmd, .af_addr, .af_afull(af_afull || !phy_init_done),
    .wdf_wren, .wdf_data, .wdf_mask, .wdf_afull(wdf_afull || !phy_init_done),
    .rd_data_valid, .rd_data_in);

  ddr2_mig_model #(.MEM_WORDS(4096)) mig (
    .clk, .rst_n, .phy_init_done, .app_af_wren(af_wren), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_afull(af_afull), .app_wdf_wren(wdf_wren),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(wdf_mask), .app_wdf_afull(wdf_afull),
    .rd_data_valid, .rd_data_fifo_out(rd_data_in));

  // grant: one cycle after req, released after done
  int ngrants = 0;
  always_ff @(posedge clk) begin
    if (!rst_n) gnt <= 0;
    else if (done) gnt <= 0;
    else if (req && !gnt) begin gnt <= 1; ngrants <= ngrants + 1; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] ref_mem [2048];   // 16 KB in dwords
  int nrsp_w = 0, nrsp_r = 0;
  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    if (rsp_wr) nrsp_w++; else nrsp_r++;
  end

  task automatic do_cmd(input logic w, input int addr, input int len);
    @(negedge clk);
    cmd_valid = 1; cmd = '{wr: w, addr: AW'(addr), len: LEN_W'(len)};
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic push_data(input int addr, input int len);
    for (int i = 0; i < len / 8; i++) begin
      @(negedge clk);
      wr_valid = 1;
      wr_data = {$urandom, $urandom};
      ref_mem[addr / 8 + i] = wr_data;
      do @(posedge clk); while (!wr_ready);
      @(negedge clk); wr_valid = 0;
    end
  endtask

  task automatic pull_data(input int addr, input int len);
    for (int i = 0; i < len / 8; i++) begin
      @(negedge clk);
      rd_ready = ($urandom % 3 != 0);
      while (!(rd_valid && rd_ready)) begin
        @(negedge clk);
        rd_ready = ($urandom % 3 != 0);
      end
      checks++;
      if (rd_data !== ref_mem[addr / 8 + i]) begin
        failures++;
        $display("read mismatch at dword %0d: %h vs %h", addr / 8 + i, rd_data, ref_mem[addr / 8 + i]);
      end
      @(posedge clk);
    end
    @(negedge clk); rd_ready = 0;
  endtask

  int addrs [8], lens [8];
  initial begin
    cmd_valid = 0; wr_valid = 0; rd_ready = 0; rsp_ready = 1; cmd = '0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      addrs[t] = t * 2048;
      lens[t]  = 32 * (1 + $urandom % 32);
      fork
        do_cmd(1, addrs[t], lens[t]);
        push_data(addrs[t], lens[t]);
      join
    end
    repeat (100) @(posedge clk);
    // memory image: dword pairs packed low-first into 128-bit words
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (mig.mem[addrs[t] / 16] !== {ref_mem[addrs[t] / 8 + 1], ref_mem[addrs[t] / 8]}) begin
        failures++;
        $display("packing wrong at %0d", addrs[t]);
      end
    end
    for (int t = 7; t >= 0; t--) begin
      fork
        do_cmd(0, addrs[t], lens[t]);
        pull_data(addrs[t], lens[t]);
      join
    end
    repeat (50) @(posedge clk);
    checks++;
    if (nrsp_w != 8 || nrsp_r != 8 || ngrants != 16) begin
      failures++;
      $display("responses w=%0d r=%0d grants=%0d", nrsp_w, nrsp_r, ngrants);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
