// coproc_wrapper: standard wrapper of an application co-processor.
//
// Following the proposed wrapper standard, a co-processor has a REQUIRED data
// port (one OCM SRAM interface) and a REQUIRED control port (to the node
// controller), and SUGGESTED insides: a BRAM module, an engine module, a
// state machine and config registers. The BRAM module here is the
// "input buffer + output buffer" variant: the OCM address MSB selects the
// output buffer (1) or the input buffer (0), each BUF_WORDS 128-bit words, so
// 128 KB in all by default. The OCM writes samples into the input buffer and
// reads results from the output buffer; the engine reads the input buffer and
// writes the output buffer through the second port of each RAM.
//
// SRAM interface (data_i, addr_i, cs_i, we_i, data_o): a write takes effect
// on the clock edge with cs_i && we_i; a read (cs_i && !we_i) returns data_o
// RD_LAT = 2 cycles later (RAM latency plus one pipeline register for read
// latency matching with the OCM controller).
// Control port: cfg_we writes config register cfg_addr (0: scale, 1: offset);
// start with len (words) runs the engine (ignored while busy); done pulses
// when the last result is written. Config register contents and the engine's
// arithmetic are this design's example; the structure is the architecture's.
module coproc_wrapper
  import fcp_pkg::*;
#(
  parameter int BUF_WORDS = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // data port: OCM SRAM interface
  input  logic [DW-1:0]     data_i,
  input  logic [OCM_AW-1:0] addr_i,
  input  logic              cs_i,
  input  logic              we_i,
  output logic [DW-1:0]     data_o,
  // control port
  input  logic              cfg_we,
  input  logic [3:0]        cfg_addr,
  input  logic [31:0]       cfg_data,
  input  logic              start,
  input  logic [OCM_AW-1:0] len,
  output logic              busy,
  output logic              done
);
  localparam int AWB = $clog2(BUF_WORDS);

  // config registers
  logic [15:0] scale, offset;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scale  <= 16'd1;
      offset <= 16'd0;
    end else if (cfg_we) begin
      case (cfg_addr)
        4'd0: scale  <= cfg_data[15:0];
        4'd1: offset <= cfg_data[15:0];
        default: ;
      endcase
    end
  end

  // BRAM module: OCM side decode
  wire          sel_out = addr_i[AWB];
  wire [AWB-1:0] a      = addr_i[AWB-1:0];
  logic [DW-1:0] in_a_rdata, out_a_rdata, in_b_rdata, eng_wdata;
  logic          sel_out_q, eng_in_en, eng_out_we;
  logic [AWB-1:0] eng_in_addr, eng_out_addr;

  dp_ram #(.W(DW), .DEPTH(BUF_WORDS)) u_in_buf (
    .clk,
    .a_en(cs_i && !sel_out), .a_we(we_i), .a_addr(a), .a_wdata(data_i), .a_rdata(in_a_rdata),
    .b_en(eng_in_en), .b_we(1'b0), .b_addr(eng_in_addr), .b_wdata('0), .b_rdata(in_b_rdata));

  dp_ram #(.W(DW), .DEPTH(BUF_WORDS)) u_out_buf (
    .clk,
    .a_en(cs_i && sel_out), .a_we(we_i), .a_addr(a), .a_wdata(data_i), .a_rdata(out_a_rdata),
    .b_en(eng_out_we), .b_we(eng_out_we), .b_addr(eng_out_addr), .b_wdata(eng_wdata), .b_rdata());

  // pipeline register for read latency matching
  always_ff @(posedge clk) begin
    sel_out_q <= sel_out;
    data_o    <= sel_out_q ? out_a_rdata : in_a_rdata;
  end

  coproc_engine #(.AWB(AWB)) u_engine (
    .clk, .rst_n, .start, .len((AWB+1)'(len)), .scale, .offset, .busy, .done,
    .in_en(eng_in_en), .in_addr(eng_in_addr), .in_data(in_b_rdata),
    .out_we(eng_out_we), .out_addr(eng_out_addr), .out_data(eng_wdata));
endmodule
