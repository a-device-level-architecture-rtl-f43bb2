// tb_coproc_wrapper: fills the input buffer through the SRAM interface,
// writes the config registers, runs the engine on 1500 words (one 24,000-byte
// chunk of a 600x800 frame cut into 20 chunks), checks it takes one cycle per
// word plus a few cycles, then reads the output buffer through the SRAM
// interface (two-cycle read latency) and compares with y = x*scale + offset
// per 16-bit lane. A second, short run checks start is ignored while busy.
module tb_coproc_wrapper;
  import fcp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [127:0] data_i, data_o;
  logic [12:0]  addr_i, len;
  logic         cs_i, we_i, cfg_we, start, busy, done;
  logic [3:0]   cfg_addr;
  logic [31:0]  cfg_data;

  coproc_wrapper dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] inword(input int w);
    return {32'(w * 7 + 1), 32'(w ^ 32'h5a5a), 32'(w * 32'h10001), 32'($urandom)};
  endfunction
  function automatic logic [127:0] model(input logic [127:0] x, input logic [15:0] s, input logic [15:0] o);
    logic [127:0] y;
    for (int l = 0; l < 8; l++) y[l*16 +: 16] = 16'(x[l*16 +: 16] * s) + o;
    return y;
  endfunction

  logic [127:0] src [1500];
  int t0, cyc, errs, starts;
  always @(posedge clk) if (rst_n && start && !busy) starts++;

  task automatic run_and_check(input int n, input logic [15:0] s, input logic [15:0] o);
    @(negedge clk); cfg_we = 1; cfg_addr = 0; cfg_data = 32'(s);
    @(negedge clk); cfg_addr = 1; cfg_data = 32'(o);
    @(negedge clk); cfg_we = 0; start = 1; len = 13'(n);
    t0 = $time;
    @(negedge clk); start = 1;       // held high while busy: must be ignored
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    cyc = ($time - t0) / 10;
    $display("%0d words in %0d cycles", n, cyc);
    checks++;
    if (cyc < n || cyc > n + 4) begin failures++; $display("engine rate wrong"); end
    // read back through the SRAM interface, address MSB selects output buffer
    errs = 0;
    for (int w = 0; w < n + 2; w++) begin
      @(negedge clk);
      cs_i = (w < n); we_i = 0; addr_i = 13'(4096 + w);
      if (w >= 2) begin
        checks++;
        if (data_o != model(src[w - 2], s, o)) errs++;
      end
    end
    @(negedge clk); cs_i = 0;
    if (errs != 0) begin failures++; $display("%0d output words wrong", errs); end
  endtask

  initial begin
    cs_i = 0; we_i = 0; addr_i = 0; data_i = 0; cfg_we = 0; cfg_addr = 0; cfg_data = 0;
    start = 0; len = 0; starts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 1500; w++) begin
      src[w] = inword(w);
      @(negedge clk); cs_i = 1; we_i = 1; addr_i = 13'(w); data_i = src[w];
    end
    @(negedge clk); cs_i = 0; we_i = 0;
    // input buffer readable too
    @(negedge clk); cs_i = 1; addr_i = 13'd77;
    @(negedge clk); cs_i = 0;
    @(negedge clk);
    checks++; if (data_o != src[77]) begin failures++; $display("input buffer readback wrong"); end
    run_and_check(1500, 16'd3, 16'd100);
    run_and_check(10, 16'hFFFF, 16'd7);
    checks++; if (starts != 2) begin failures++; $display("starts %0d", starts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
