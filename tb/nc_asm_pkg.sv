// nc_asm_pkg: instruction encoders for node controller test programs. Each
// function packs the fields of one instruction in the layout documented in
// node_controller.sv (written out here independently of the RTL).
package nc_asm_pkg;
  import fcp_pkg::*;
  function automatic logic [63:0] i_ocm(bit w, bit to_ddr, int s, int sa, int l32, int d32);
    return {4'h2, w, to_ddr, 2'(s), 13'(sa), 13'(l32), 22'(d32), 8'h0};
  endfunction
  function automatic logic [63:0] i_srio0(bit w, ttype_e t, int dest, int l32);
    return {4'h3, w, t, 8'(dest), 20'(l32), 27'h0};
  endfunction
  function automatic logic [63:0] i_srio1(int raddr, int laddr);
    return {32'(raddr), 5'h0, 27'(laddr)};
  endfunction
  function automatic logic [63:0] i_run(bit w, int k, int n);
    return {4'h4, w, 2'(k), 44'h0, 13'(n)};
  endfunction
  function automatic logic [63:0] i_cfg(int k, int r, int v);
    return {4'h5, 1'b0, 2'(k), 4'(r), 21'h0, 32'(v)};
  endfunction
  function automatic logic [63:0] i_ts(int a);            return {4'h6, 47'h0, 13'(a)}; endfunction
  function automatic logic [63:0] i_setcnt(int c, int v); return {4'h7, 2'h0, 2'(c), 24'h0, 32'(v)}; endfunction
  function automatic logic [63:0] i_loop(int c, int t);   return {4'h8, 2'h0, 2'(c), 40'h0, 16'(t)}; endfunction
  function automatic logic [63:0] i_jump(int t);          return {4'h9, 44'h0, 16'(t)}; endfunction
  function automatic logic [63:0] i_sync();               return {4'hA, 60'h0}; endfunction
  function automatic logic [63:0] i_halt();               return {4'h1, 60'h0}; endfunction
endpackage
