// sync_fifo: single-clock first-word-fall-through FIFO with valid/ready
// handshakes on both sides. Used for every command, response and data queue
// of the node. A word is written when in_valid && in_ready and removed when
// out_valid && out_ready; out_data shows the oldest word combinationally.
// DEPTH must be a power of two. Synchronous active-low reset empties it.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int PW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wptr, rptr;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (count != DEPTH[PW:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk)
    if (push) mem[wptr] <= in_data;

  initial assert (DEPTH >= 2 && (DEPTH & (DEPTH-1)) == 0)
    else $error("sync_fifo: DEPTH must be a power of two");
endmodule
