// tb_node_controller: runs an instruction bundle on the node controller with
// behavioural models of its units (OCM controller, RapidIO interface and
// three co-processors, each finishing some cycles after a command). Checks
// every command's fields, loop and jump control flow, that waits and SYNC
// hold execution until the units are done, that non-waiting commands overlap,
// the timestamps written to the controller's SRAM (read through its OCM SRAM
// interface), the instruction rate (three cycles per timestamp instruction)
// and the status word after HALT.
module tb_node_controller;
  import fcp_pkg::*;
  import nc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, running, imem_en;
  logic [15:0] start_pc;
  logic [63:0] status, imem_rdata;
  logic [9:0]  imem_addr;
  logic ocm_cmd_valid, ocm_cmd_ready, ocm_rsp_valid, ocm_rsp_ready;
  ocm_cmd_t ocm_cmd;
  logic srio_cmd_valid, srio_cmd_ready, srio_cpl_valid, srio_cpl_ready;
  srio_cmd_t srio_cmd; srio_cpl_t srio_cpl;
  logic [2:0] cp_start, cp_cfg_we, cp_busy;
  logic [12:0] cp_len; logic [3:0] cp_cfg_addr; logic [31:0] cp_cfg_data;
  logic [127:0] data_i, data_o; logic [12:0] addr_i; logic cs_i, we_i;

  node_controller dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [63:0] I_SYNC = i_sync();
  localparam logic [63:0] I_HALT = i_halt();

  logic [63:0] imem [1024];
  always_ff @(posedge clk) if (imem_en) imem_rdata <= imem[imem_addr];

  // ---------------- unit models ----------------
  int ocm_due [$], srio_due [$], cyc = 0;
  int n_ocm = 0, n_srio = 0, n_cfg = 0, n_run = 0;
  int cp_left [3];
  int max_concurrent = 0;
  ocm_cmd_t  ocm_log [$];
  srio_cmd_t srio_log [$];
  assign cp_busy = {cp_left[2] > 0, cp_left[1] > 0, cp_left[0] > 0};
  assign ocm_rsp_valid  = ocm_due.size() > 0 && ocm_due[0] <= cyc;
  assign srio_cpl_valid = srio_due.size() > 0 && srio_due[0] <= cyc;
  assign srio_cpl = '{ttype: TT_NWRITE, err: 1'b0};

  always @(posedge clk) if (rst_n) begin
    int c;
    cyc <= cyc + 1;
    ocm_cmd_ready  <= ($urandom % 4 != 0);
    srio_cmd_ready <= ($urandom % 4 != 0);
    if (ocm_rsp_valid && ocm_rsp_ready) void'(ocm_due.pop_front());
    if (srio_cpl_valid && srio_cpl_ready) void'(srio_due.pop_front());
    if (ocm_cmd_valid && ocm_cmd_ready) begin ocm_due.push_back(cyc + 20); ocm_log.push_back(ocm_cmd); n_ocm++; end
    if (srio_cmd_valid && srio_cmd_ready) begin srio_due.push_back(cyc + 40); srio_log.push_back(srio_cmd); n_srio++; end
    for (int k = 0; k < 3; k++) begin
      if (cp_left[k] > 0) cp_left[k] <= cp_left[k] - 1;
      if (cp_start[k]) begin
        cp_left[k] <= int'(cp_len) + 3; n_run++;
        if (cp_busy[k]) begin failures++; $display("start while busy"); end
      end
      if (cp_cfg_we[k]) begin
        n_cfg++; checks++;
        if (k != 1 || cp_cfg_addr != 0 || cp_cfg_data != 5) begin failures++; $display("bad cfg"); end
      end
    end
    c = (ocm_due.size() > 0) + (srio_due.size() > 0) + (cp_busy != 0);
    if (c > max_concurrent) max_concurrent = c;
  end

  function automatic logic [127:0] sram_rd(int a);
    return dut.u_nc_sram.mem[a];
  endfunction

  int t_halt;
  initial begin
    start = 0; start_pc = 0; cs_i = 0; we_i = 0; addr_i = 0; data_i = 0;
    ocm_cmd_ready = 0; srio_cmd_ready = 0;
    foreach (cp_left[k]) cp_left[k] = 0;
    foreach (imem[i]) imem[i] = I_HALT;
    for (int a = 0; a < 64; a++) dut.u_nc_sram.mem[a] = '0;
    imem[100] = i_cfg(1, 0, 5);
    imem[101] = i_setcnt(2, 3);
    imem[102] = i_ts(20);
    imem[103] = i_ts(21);
    imem[104] = i_ts(22);
    imem[105] = i_ocm(1, 0, 1, 'h100, 4, 'h55);
    imem[106] = i_loop(2, 105);
    imem[107] = i_srio0(0, TT_NWRITE, 2, 10);
    imem[108] = i_srio1('h1000, 'h2000);
    imem[109] = i_run(0, 0, 50);
    imem[110] = i_ocm(0, 1, 3, 20, 1, 'h77);
    imem[111] = I_SYNC;
    imem[112] = i_ts(23);
    imem[113] = i_jump(115);
    imem[114] = i_ts(30);
    imem[115] = i_run(1, 2, 20);
    imem[116] = I_HALT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    checks++; if (running || !status[16]) begin failures++; $display("not halted after reset"); end
    @(negedge clk); start = 1; start_pc = 100;
    @(negedge clk); start = 0;
    while (running) @(posedge clk);
    t_halt = cyc;
    // commands
    checks++; if (n_ocm != 4) begin failures++; $display("OCM commands %0d", n_ocm); end
    for (int i = 0; i < 3 && i < ocm_log.size(); i++) begin
      checks++;
      if (ocm_log[i] != '{to_ddr: 0, sram: 1, sram_addr: 'h100, ddr_addr: AW'('h55 * 32), len: 128})
        begin failures++; $display("OCM cmd %0d wrong %p", i, ocm_log[i]); end
    end
    checks++;
    if (ocm_log.size() < 4 || ocm_log[3] != '{to_ddr: 1, sram: 3, sram_addr: 20, ddr_addr: AW'('h77 * 32), len: 32})
      begin failures++; $display("last OCM cmd wrong"); end
    checks++;
    if (n_srio != 1 || srio_log[0] != '{ttype: TT_NWRITE, dest: 2, raddr: 'h1000, laddr: 'h2000, len: 320})
      begin failures++; $display("SRIO cmd wrong"); end
    checks++; if (n_run != 2 || n_cfg != 1) begin failures++; $display("run %0d cfg %0d", n_run, n_cfg); end
    checks++; if (max_concurrent < 3) begin failures++; $display("no overlap of units"); end
    // timestamps: consecutive TSTAMP instructions three cycles apart
    checks++;
    if (sram_rd(21)[63:0] - sram_rd(20)[63:0] != 3 || sram_rd(22)[63:0] - sram_rd(21)[63:0] != 3 ||
        sram_rd(20)[79:64] != 102 || sram_rd(22)[79:64] != 104) begin
      failures++; $display("timestamps %0d %0d %0d", sram_rd(20)[63:0], sram_rd(21)[63:0], sram_rd(22)[63:0]);
    end
    // SYNC: TSTAMP 23 only after the 40-cycle RapidIO job and 53-cycle run
    checks++;
    if (sram_rd(23)[63:0] < sram_rd(22)[63:0] + 60) begin failures++; $display("SYNC did not wait"); end
    checks++; if (sram_rd(30) != 0) begin failures++; $display("JUMP not taken"); end
    checks++; if (cp_busy != 0) begin failures++; $display("halted before waited run ended"); end
    checks++;
    if (status[15:0] != 116 || !status[16] || status[17]) begin failures++; $display("status %h", status); end
    // timestamp readable through the OCM SRAM interface (two-cycle latency)
    @(negedge clk); cs_i = 1; addr_i = 22;
    @(negedge clk); cs_i = 0;
    @(negedge clk);
    checks++; if (data_o != sram_rd(22)) begin failures++; $display("SRAM port read wrong"); end
    $display("ran in %0d cycles", t_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
