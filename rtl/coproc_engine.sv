// coproc_engine: example computational engine of a co-processor.
//
// The architecture leaves the engine to the application; this one is a
// stand-in that exercises the wrapper at full rate. It reads LEN 128-bit words
// from the input buffer, treats each as eight 16-bit samples and writes
//   y = x * scale + offset   (per lane, modulo 2^16)
// to the same index of the output buffer. One word per cycle: the read is
// issued in one cycle, the buffer answers one cycle later and the result is
// written in that cycle. done pulses one cycle after the last write.
module coproc_engine
  import fcp_pkg::*;
#(
  parameter int AWB = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [AWB:0]   len,       // words, 1 .. 2**AWB
  input  logic [15:0]    scale,
  input  logic [15:0]    offset,
  output logic           busy,
  output logic           done,
  // input buffer read port
  output logic           in_en,
  output logic [AWB-1:0] in_addr,
  input  logic [DW-1:0]  in_data,
  // output buffer write port
  output logic           out_we,
  output logic [AWB-1:0] out_addr,
  output logic [DW-1:0]  out_data
);
  logic [AWB:0]   left;
  logic [AWB-1:0] rd_ptr;
  logic           vld;

  assign in_en   = busy && (left != '0);
  assign in_addr = rd_ptr;
  assign out_we  = vld;

  always_comb
    for (int l = 0; l < DW/16; l++)
      out_data[l*16 +: 16] = 16'(in_data[l*16 +: 16] * scale) + offset;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      left     <= '0;
      rd_ptr   <= '0;
      vld      <= 1'b0;
      out_addr <= '0;
    end else begin
      done <= 1'b0;
      vld  <= in_en;
      if (in_en) begin
        out_addr <= rd_ptr;
        rd_ptr   <= rd_ptr + 1'b1;
        left     <= left - 1'b1;
      end
      if (start && !busy) begin
        busy   <= 1'b1;
        left   <= len;
        rd_ptr <= '0;
      end else if (busy && left == '0 && !vld) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
