// ddr2_port_arbiter: round-robin arbiter in front of the DDR2 controller.
//
// N port controllers raise req; when the controller is free the arbiter
// grants the first requester after the port granted last, so no port can be
// starved. The grant is registered (one cycle after req is seen) and held
// until the owning port pulses done at the end of its command; the controller
// is free again in the cycle after done. gnt_idx selects the owner's signals
// in the user-interface multiplexer. Round-robin order follows the
// architecture; command-granular holding is this design's choice.
module ddr2_port_arbiter #(
  parameter int N = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0]         done,
  output logic [N-1:0]         gnt,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic                 busy
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] last;
  logic [IW-1:0] pick;
  logic          found;

  // first requester after 'last', wrapping around
  always_comb begin
    pick  = last;
    found = 1'b0;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last) + k) % N;
      if (!found && req[idx]) begin
        pick  = IW'(idx);
        found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      gnt     <= '0;
      gnt_idx <= '0;
      last    <= IW'(N-1);
    end else if (busy) begin
      if (done[gnt_idx]) begin
        busy <= 1'b0;
        gnt  <= '0;
      end
    end else if (found) begin
      busy    <= 1'b1;
      gnt     <= N'(1) << pick;
      gnt_idx <= pick;
      last    <= pick;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
