// ocm_sram_model: behavioural SRAM on an OCM SRAM interface for testbenches.
// Write on cs_i && we_i; read data appears on data_o RD_LAT = 2 cycles after
// cs_i && !we_i. WORDS 128-bit words; counts accesses.
module ocm_sram_model #(
  parameter int WORDS = 8192
) (
  input  logic         clk,
  input  logic [127:0] data_i,
  input  logic [12:0]  addr_i,
  input  logic         cs_i,
  input  logic         we_i,
  output logic [127:0] data_o
);
  logic [127:0] mem [WORDS];
  logic [127:0] q1;
  int           n_wr = 0, n_rd = 0;
  always @(posedge clk) begin
    if (cs_i && we_i) begin mem[addr_i] <= data_i; n_wr <= n_wr + 1; end
    if (cs_i && !we_i) n_rd <= n_rd + 1;
    q1     <= mem[addr_i];
    data_o <= q1;
  end
endmodule
