// ddr2_mig_model: behavioural model of the user interface of a DDR2 memory
// controller core (not synthesizable; for testbenches only).
//
// Address commands (app_af_*) and write data (app_wdf_*) go into queues. A
// write command takes two 128-bit words from the write-data queue (one BL4
// burst on a 64-bit device); a read command returns two words on
// rd_data_valid/rd_data_fifo_out RD_LAT cycles after it is accepted. The
// address is in 8-byte units; memory holds MEM_WORDS 128-bit words and wraps.
// phy_init_done rises INIT_CYCLES after reset. Almost-full flags assert at
// QMAX entries. Counters report reads and writes for the testbench.
module ddr2_mig_model #(
  parameter int MEM_WORDS   = 4096,
  parameter int RD_LAT      = 12,
  parameter int INIT_CYCLES = 20,
  parameter int QMAX        = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic         phy_init_done,
  input  logic         app_af_wren,
  input  logic [2:0]   app_af_cmd,
  input  logic [30:0]  app_af_addr,
  output logic         app_af_afull,
  input  logic         app_wdf_wren,
  input  logic [127:0] app_wdf_data,
  input  logic [15:0]  app_wdf_mask_data,
  output logic         app_wdf_afull,
  output logic         rd_data_valid,
  output logic [127:0] rd_data_fifo_out
);
  logic [127:0] mem [MEM_WORDS];
  logic [33:0]  cmdq [$];     // {cmd[2:0], addr[30:0]}
  logic [127:0] wdq  [$];
  int           rdq_t [$];    // release time of each read word
  logic [127:0] rdq_d [$];
  int           cyc, init_cnt;
  int           n_wr_bursts, n_rd_bursts;

  function automatic int widx(input logic [30:0] a8, input int k);
    return int'(((a8 >> 1) + 31'(k)) % 31'(MEM_WORDS));
  endfunction

  assign app_af_afull  = cmdq.size() >= QMAX;
  assign app_wdf_afull = wdq.size()  >= QMAX;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmdq.delete(); wdq.delete(); rdq_t.delete(); rdq_d.delete();
      cyc <= 0; init_cnt <= 0; phy_init_done <= 1'b0;
      rd_data_valid <= 1'b0; rd_data_fifo_out <= '0;
      n_wr_bursts <= 0; n_rd_bursts <= 0;
    end else begin
      cyc <= cyc + 1;
      if (init_cnt < INIT_CYCLES) init_cnt <= init_cnt + 1;
      else phy_init_done <= 1'b1;
      if (app_af_wren)  cmdq.push_back({app_af_cmd, app_af_addr});
      if (app_wdf_wren) wdq.push_back(app_wdf_data);
      // serve one command per cycle when possible
      if (cmdq.size() > 0) begin
        logic [33:0] c;
        c = cmdq[0];
        if (c[33:31] == 3'b000) begin
          if (wdq.size() >= 2) begin
            mem[widx(c[30:0], 0)] <= wdq[0];
            mem[widx(c[30:0], 1)] <= wdq[1];
            void'(wdq.pop_front()); void'(wdq.pop_front());
            void'(cmdq.pop_front());
            n_wr_bursts <= n_wr_bursts + 1;
          end
        end else begin
          rdq_t.push_back(cyc + RD_LAT);     rdq_d.push_back(mem[widx(c[30:0], 0)]);
          rdq_t.push_back(cyc + RD_LAT + 1); rdq_d.push_back(mem[widx(c[30:0], 1)]);
          void'(cmdq.pop_front());
          n_rd_bursts <= n_rd_bursts + 1;
        end
      end
      rd_data_valid <= 1'b0;
      if (rdq_t.size() > 0 && rdq_t[0] <= cyc) begin
        rd_data_valid    <= 1'b1;
        rd_data_fifo_out <= rdq_d[0];
        void'(rdq_t.pop_front()); void'(rdq_d.pop_front());
      end
    end
  end
endmodule
