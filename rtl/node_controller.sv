// node_controller: hardware control processor of the FPGA node.
//
// Software on the host sends "bundles" of instructions over RapidIO into the
// control BRAM and writes the start register; the node controller then runs
// them on its own, so the host need not be involved in each step. It fetches
// 64-bit instructions from the control BRAM (read latency one cycle), decodes
// and executes them:
//   OCM    move data between DDR2 and an SRAM (command to the OCM controller)
//   SRIO   RapidIO transfer (two words; command to the RapidIO interface)
//   RUN    process X words on co-processor k;  CFG  write its config register
//   TSTAMP store {pc, 64-bit cycle counter} in the node controller SRAM
//   SETCNT/LOOP/JUMP  loop counters and branches;  SYNC  wait for all units
//   HALT / NOP
// OCM, SRIO and RUN carry a wait bit: with it the controller waits for that
// unit to finish; without it, it goes on and the unit works concurrently
// (outstanding OCM and RapidIO operations are counted; SYNC waits for all).
// A simple instruction (TSTAMP, CFG, SETCNT, LOOP, ...) takes three cycles:
// fetch, BRAM read, execute.
// The node controller's own SRAM (NC_WORDS x 128 bits) is the fourth OCM SRAM
// interface, so timestamps can be moved to DDR2 and read by the host. Its
// data_o has RD_LAT = 2.
// The instruction kinds follow the architecture's examples ("move data from A
// to B", "process X amount of data", "take timestamp", loops); the encoding
// (see fcp_pkg opcode_e and the field layout below) is this design's own.
//   OCM   : [59] wait [58] to_ddr [57:56] sram [55:43] sram_addr
//           [42:30] len/32 B [29:8] ddr_addr/32 B
//   SRIO  : w0 [59] wait [58:55] ttype [54:47] dest [46:27] len/32 B
//           w1 [63:32] remote byte addr [26:0] local byte addr
//   RUN   : [59] wait [58:57] coproc [12:0] words
//   CFG   : [58:57] coproc [56:53] reg [31:0] value
//   TSTAMP: [12:0] SRAM word address
//   SETCNT: [57:56] counter [31:0] value;  LOOP: [57:56] counter [15:0] target
//   JUMP  : [15:0] target
module node_controller
  import fcp_pkg::*;
#(
  parameter int NCP      = 3,
  parameter int CB_WORDS = 1024,
  parameter int NC_WORDS = 8192
) (
  input  logic              clk,
  input  logic              rst_n,
  // start from the RapidIO target side, status back to it
  input  logic              start,
  input  logic [15:0]       start_pc,
  output logic [SW-1:0]     status,
  output logic              running,
  // instruction memory (control BRAM read port)
  output logic              imem_en,
  output logic [$clog2(CB_WORDS)-1:0] imem_addr,
  input  logic [SW-1:0]     imem_rdata,
  // OCM controller
  output logic              ocm_cmd_valid,
  input  logic              ocm_cmd_ready,
  output ocm_cmd_t          ocm_cmd,
  input  logic              ocm_rsp_valid,
  output logic              ocm_rsp_ready,
  // RapidIO interface
  output logic              srio_cmd_valid,
  input  logic              srio_cmd_ready,
  output srio_cmd_t         srio_cmd,
  input  logic              srio_cpl_valid,
  output logic              srio_cpl_ready,
  input  srio_cpl_t         srio_cpl,
  // co-processor control ports
  output logic [NCP-1:0]    cp_start,
  output logic [OCM_AW-1:0] cp_len,
  output logic [NCP-1:0]    cp_cfg_we,
  output logic [3:0]        cp_cfg_addr,
  output logic [31:0]       cp_cfg_data,
  input  logic [NCP-1:0]    cp_busy,
  // OCM SRAM interface of the node controller SRAM
  input  logic [DW-1:0]     data_i,
  input  logic [OCM_AW-1:0] addr_i,
  input  logic              cs_i,
  input  logic              we_i,
  output logic [DW-1:0]     data_o
);
  localparam int IAW = $clog2(CB_WORDS);
  localparam int NAW = $clog2(NC_WORDS);

  typedef enum logic [2:0] {S_HALT, S_FETCH, S_MEM, S_EXEC, S_FETCH2, S_MEM2, S_WAIT} state_e;
  typedef enum logic [1:0] {W_OCM, W_SRIO, W_CP, W_ALL} wait_e;

  state_e      state;
  wait_e       wfor;
  logic [1:0]  wcp;
  logic [15:0] pc;
  logic [63:0] ir, ir2;
  logic [63:0] tstamp;
  logic [31:0] cnt [4];
  logic [7:0]  ocm_out, srio_out;
  logic        srio_err;

  opcode_e op;
  assign op = opcode_e'(ir[63:60]);
  wire [1:0] k   = ir[58:57];
  wire [1:0] cix = ir[57:56];

  // ---------------- node controller SRAM ----------------
  logic           ts_we;
  logic [DW-1:0]  ts_data, sram_q;
  dp_ram #(.W(DW), .DEPTH(NC_WORDS)) u_nc_sram (
    .clk,
    .a_en(cs_i), .a_we(we_i), .a_addr(addr_i[NAW-1:0]), .a_wdata(data_i), .a_rdata(sram_q),
    .b_en(ts_we), .b_we(ts_we), .b_addr(ir[NAW-1:0]), .b_wdata(ts_data), .b_rdata());
  always_ff @(posedge clk) data_o <= sram_q;   // read latency matching
  assign ts_data = {48'd0, pc, tstamp};

  // ---------------- unit commands ----------------
  assign ocm_cmd = '{to_ddr: ir[58], sram: ir[57:56], sram_addr: ir[55:43],
                     ddr_addr: AW'({ir[29:8], 5'd0}), len: OCM_LEN_W'({ir[42:30], 5'd0})};
  assign srio_cmd = '{ttype: ttype_e'(ir[58:55]), dest: ir[54:47], raddr: ir2[63:32],
                      laddr: ir2[AW-1:0], len: LEN_W'({ir[46:27], 5'd0})};
  assign cp_len      = ir[OCM_AW-1:0];
  assign cp_cfg_addr = ir[56:53];
  assign cp_cfg_data = ir[31:0];

  wire exec = (state == S_EXEC);
  wire cp_free = !cp_busy[k];
  assign ocm_cmd_valid  = exec && op == OP_OCM;
  assign srio_cmd_valid = exec && op == OP_SRIO;
  assign ocm_rsp_ready  = 1'b1;
  assign srio_cpl_ready = 1'b1;
  assign ts_we          = exec && op == OP_TSTAMP;
  always_comb begin
    cp_start  = '0;
    cp_cfg_we = '0;
    if (exec && op == OP_RUN && cp_free) cp_start[k] = 1'b1;
    if (exec && op == OP_CFG)            cp_cfg_we[k] = 1'b1;
  end

  assign imem_en   = (state == S_FETCH) || (state == S_FETCH2);
  assign imem_addr = IAW'(pc);
  assign running   = (state != S_HALT);
  assign status    = {srio_err, 45'd0, running, state == S_HALT, pc};

  // completion of what is being waited for
  logic wait_done;
  always_comb
    unique case (wfor)
      W_OCM:  wait_done = (ocm_out == 0);
      W_SRIO: wait_done = (srio_out == 0);
      W_CP:   wait_done = !cp_busy[wcp];
      default: wait_done = (ocm_out == 0) && (srio_out == 0) && (cp_busy == '0);
    endcase

  wire ocm_issue  = ocm_cmd_valid && ocm_cmd_ready;
  wire srio_issue = srio_cmd_valid && srio_cmd_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_HALT;
      wfor     <= W_ALL;
      wcp      <= '0;
      pc       <= '0;
      ir       <= '0;
      ir2      <= '0;
      tstamp   <= '0;
      ocm_out  <= '0;
      srio_out <= '0;
      srio_err <= 1'b0;
      for (int i = 0; i < 4; i++) cnt[i] <= '0;
    end else begin
      tstamp   <= tstamp + 1'b1;
      ocm_out  <= ocm_out  + 8'(ocm_issue)  - 8'(ocm_rsp_valid);
      srio_out <= srio_out + 8'(srio_issue) - 8'(srio_cpl_valid);
      if (srio_cpl_valid && srio_cpl.err) srio_err <= 1'b1;
      unique case (state)
        S_HALT: if (start) begin
          pc       <= start_pc;
          srio_err <= 1'b0;
          state    <= S_FETCH;
        end
        S_FETCH:  state <= S_MEM;
        S_MEM: begin
          ir <= imem_rdata;
          if (opcode_e'(imem_rdata[63:60]) == OP_SRIO) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH2;
          end else state <= S_EXEC;
        end
        S_FETCH2: state <= S_MEM2;
        S_MEM2: begin
          ir2   <= imem_rdata;
          state <= S_EXEC;
        end
        S_EXEC: begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
          unique case (op)
            OP_HALT: begin pc <= pc; state <= S_HALT; end
            OP_OCM: if (!ocm_cmd_ready) begin
                pc <= pc; state <= S_EXEC;
              end else if (ir[59]) begin
                wfor <= W_OCM; state <= S_WAIT;
              end
            OP_SRIO: if (!srio_cmd_ready) begin
                pc <= pc; state <= S_EXEC;
              end else if (ir[59]) begin
                wfor <= W_SRIO; state <= S_WAIT;
              end
            OP_RUN: if (!cp_free) begin
                pc <= pc; state <= S_EXEC;
              end else if (ir[59]) begin
                wfor <= W_CP; wcp <= k; state <= S_WAIT;
              end
            OP_SETCNT: cnt[cix] <= ir[31:0];
            OP_LOOP: begin
              cnt[cix] <= cnt[cix] - 1'b1;
              if (cnt[cix] != 32'd1) pc <= ir[15:0];
            end
            OP_JUMP: pc <= ir[15:0];
            OP_SYNC: begin wfor <= W_ALL; state <= S_WAIT; end
            default: ;
          endcase
        end
        S_WAIT: if (wait_done) state <= S_FETCH;
        default: state <= S_HALT;
      endcase
    end
  end

  a_ocm_rsp: assert property (@(posedge clk) disable iff (!rst_n)
    ocm_rsp_valid |-> ocm_out != 0 || ocm_issue);
endmodule
