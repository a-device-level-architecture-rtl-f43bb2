// tb_frame_stream: 100 video frames through one FPGA node at default parameters.
//
// Runs the sustained-processing workload: 100 frames of 600x800 bytes,
// 480,000 bytes each and 48,000,000 bytes in all. The frames sit in DDR2 one
// after another and the results go to a second 48 MB region, so the DDR2
// model is the full 128 MB. The testbench plays the host. For every frame it
// does three things:
//   1. writes a bundle into the control BRAM over the target port. The bundle
//      configures the three co-processors, takes a timestamp, then for each
//      of the 20 chunks of 24,000 bytes moves DDR2 -> SRAM, runs and moves
//      SRAM -> DDR2. It ends with SYNC, a timestamp and HALT;
//   2. writes the start register;
//   3. polls the status register until the node halts.
// Checks:
//   - every output word of every frame against a model of the example engine;
//   - each frame's processing time, from the node's own timestamps, against
//     the 480 us per frame the architecture reports (96,000 cycles at
//     200 MHz).
// Prints the total time for the 100 frames, including loading and polling.
// The RapidIO link is not modelled here: the host drives the target port
// directly.
module tb_frame_stream;
  import fcp_pkg::*;
  import nc_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NFRAME = 100, FRAME_B = 480000, CHUNK_B = 24000, NCHUNK = 20;
  localparam int IN_A = 'h0000000, OUT_A = 'h3000000;   // 48 MB apart
  localparam int MEM_WORDS = 8388608;                   // 128 MB of 128-bit words

  logic ireq_valid, iresp_ready, treq_valid, treq_ready, tresp_valid, tresp_ready, running;
  pkt_beat_t ireq, treq, tresp;
  logic phy, af_wren, af_afull, wdf_wren, wdf_afull, rdv;
  logic [2:0] af_cmd; logic [30:0] af_addr; logic [127:0] wdf_data, rdd; logic [15:0] mask;

  fpga_node u_a (
    .clk, .rst_n, .dev_id(8'd1), .nc_running(running),
    .ireq_valid, .ireq_ready(1'b1), .ireq,
    .iresp_valid(1'b0), .iresp_ready, .iresp('0),
    .treq_valid, .treq_ready, .treq,
    .tresp_valid, .tresp_ready, .tresp,
    .phy_init_done(phy), .app_af_wren(af_wren), .app_af_cmd(af_cmd), .app_af_addr(af_addr),
    .app_af_afull(af_afull), .app_wdf_wren(wdf_wren), .app_wdf_data(wdf_data),
    .app_wdf_mask_data(mask), .app_wdf_afull(wdf_afull), .rd_data_valid(rdv), .rd_data_fifo_out(rdd));

  ddr2_mig_model #(.MEM_WORDS(MEM_WORDS)) mig (
    .clk, .rst_n, .phy_init_done(phy), .app_af_wren(af_wren), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_afull(af_afull), .app_wdf_wren(wdf_wren),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(mask), .app_wdf_afull(wdf_afull),
    .rd_data_valid(rdv), .rd_data_fifo_out(rdd));

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host ----------------
  logic [7:0] host_tid = 0;
  task automatic host_send(input ttype_e t, input logic [31:0] addr, input logic [63:0] pl [$], input int nread_dw);
    pkt_hdr_t h;
    h = '0; h.ttype = t; h.tid = host_tid; h.dest = 8'd1; h.src = 8'd0;
    h.dwords = (t == TT_NREAD) ? 6'(nread_dw) : 6'(pl.size()); h.addr = addr[31:3];
    host_tid++;
    @(negedge clk);
    treq_valid = 1; treq = '{data: h, last: (pl.size() == 0)};
    do @(posedge clk); while (!treq_ready);
    foreach (pl[i]) begin
      @(negedge clk);
      treq = '{data: pl[i], last: (i == pl.size() - 1)};
      do @(posedge clk); while (!treq_ready);
    end
    @(negedge clk); treq_valid = 0;
  endtask

  task automatic host_status(output logic [63:0] st);
    logic [63:0] none [$];
    host_send(TT_NREAD, 32'hC000_0000, none, 4);
    tresp_ready = 1;
    do @(posedge clk); while (!tresp_valid);             // header
    @(posedge clk);
    while (!tresp_valid) @(posedge clk);
    st = tresp.data;
    while (!(tresp_valid && tresp.last)) @(posedge clk);
    @(negedge clk); tresp_ready = 0;
  endtask

  // ---------------- data model ----------------
  function automatic logic [127:0] fpat(input int w);
    return {32'(w * 32'h9E3779B1), 32'(w ^ 32'h5A5A_4321), 32'(w + 11), 32'(w * 7)};
  endfunction
  function automatic logic [127:0] proc(input logic [127:0] x, input int k);
    logic [127:0] y;
    for (int l = 0; l < 8; l++) y[l*16 +: 16] = 16'(x[l*16 +: 16] * 16'(5 + k)) + 16'(3 * k + 2);
    return y;
  endfunction

  logic [63:0] prog [$];
  logic [63:0] st;
  longint t_start, t_end, ft, ft_max;
  int errs;
  initial begin
    treq_valid = 0; treq = '0; tresp_ready = 0;
    for (int w = 0; w < NFRAME * FRAME_B / 16; w++) mig.mem[IN_A / 16 + w] = fpat(w);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (phy);
    t_start = cyc;
    ft_max = 0;
    for (int f = 0; f < NFRAME; f++) begin
      int fin, fout;
      fin  = IN_A + f * FRAME_B;
      fout = OUT_A + f * FRAME_B;
      prog.delete();
      for (int k = 0; k < 3; k++) begin
        prog.push_back(i_cfg(k, 0, 5 + k));
        prog.push_back(i_cfg(k, 1, 3 * k + 2));
      end
      prog.push_back(i_ts(0));
      for (int c = 0; c < NCHUNK; c++) begin
        prog.push_back(i_ocm(1, 0, c % 3, 0, CHUNK_B / 32, (fin + c * CHUNK_B) / 32));
        prog.push_back(i_run(1, c % 3, CHUNK_B / 16));
        prog.push_back(i_ocm(0, 1, c % 3, 4096, CHUNK_B / 32, (fout + c * CHUNK_B) / 32));
      end
      prog.push_back(i_sync());
      prog.push_back(i_ts(1));
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
      do begin
        repeat (500) @(posedge clk);
        host_status(st);
      end while (!st[16]);
      checks++;
      if (st[15:0] != 16'(prog.size() - 1) || st[63]) begin
        failures++; $display("frame %0d: bad status %h", f, st);
      end
      ft = longint'(u_a.u_nc.u_nc_sram.mem[1][63:0]) - longint'(u_a.u_nc.u_nc_sram.mem[0][63:0]);
      if (ft > ft_max) ft_max = ft;
      checks++;
      if (ft <= 0 || ft > 96000) begin failures++; $display("frame %0d: %0d cycles", f, ft); end
    end
    t_end = cyc;

    errs = 0;
    for (int f = 0; f < NFRAME; f++)
      for (int w = 0; w < FRAME_B / 16; w++) begin
        int g;
        g = f * (FRAME_B / 16) + w;
        if (mig.mem[OUT_A / 16 + g] != proc(fpat(g), (w / (CHUNK_B / 16)) % 3)) errs++;
      end
    checks++;
    if (errs) begin failures++; $display("%0d output words wrong", errs); end

    $display("%0d frames, %0d bytes: %0d cycles (%0d us at 200 MHz), slowest frame %0d cycles",
             NFRAME, NFRAME * FRAME_B, t_end - t_start, (t_end - t_start) / 200, ft_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
