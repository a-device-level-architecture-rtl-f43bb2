// tb_ddr2_port_arbiter: random request patterns with commands of random
// length; checks one grant at a time, grants only to requesters, round-robin
// order (first requester after the previous owner) and that no waiting port
// is passed over more than N-1 times.
module tb_ddr2_port_arbiter;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] req, done, gnt;
  logic [1:0]   gnt_idx;
  logic         busy;
  int           hold, last, passed [N];
  int           grants [N];

  ddr2_port_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected winner: first requester after 'last'
  function automatic int expect_pick(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return (l + k) % N;
    return -1;
  endfunction

  logic [N-1:0] req_q;
  logic         was_busy;
  initial begin
    req = 0; done = 0; hold = 0; last = N - 1;
    foreach (passed[i]) passed[i] = 0;
    foreach (grants[i]) grants[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // a port keeps requesting until granted
      for (int i = 0; i < N; i++)
        if (!req[i] && ($urandom % 4 == 0)) req[i] = 1;
      done = 0;
      if (busy) begin
        if (hold == 0) done[gnt_idx] = 1;
        else hold--;
      end
      req_q = req; was_busy = busy;
      @(posedge clk); #1;
      if (!was_busy && |req_q) begin
        int e;
        e = expect_pick(req_q, last);
        checks++;
        if (!busy || gnt != (N'(1) << e) || int'(gnt_idx) != e) begin
          failures++;
          $display("cycle %0d: expected grant to %0d, got %b", cyc, e, gnt);
        end
        for (int i = 0; i < N; i++)
          if (req_q[i] && i != e) begin
            passed[i]++;
            checks++;
            if (passed[i] > N - 1) begin
              failures++;
              $display("port %0d starved", i);
            end
          end
        passed[e] = 0;
        grants[e]++;
        last = e;
        req[e] = 0;
        hold = $urandom % 4;
      end
      checks++;
      if ($countones(gnt) > 1) begin
        failures++;
        $display("several grants %b", gnt);
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (grants[i] == 0) failures++;
    end
    $display("grants: %0d %0d %0d", grants[0], grants[1], grants[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
