// spu_tb_pkg: helpers shared by the SPU testbenches.
//
// Builds control words in the layout {CNTRx, OUT_SEG[191:0], NEXT_STATE0,
// NEXT_STATE1}, crossbar select vectors (output byte j takes SPU register
// byte sel[j]; byte b of MMi is SPU byte 8*i+b), and gives the
// memory-mapped addresses of the SPU control space.
package spu_tb_pkg;

  localparam int unsigned SEL_BITS = 192;
  localparam int unsigned CTRL_W   = 207;

  typedef logic [5:0] byte_sel_t [32];

  function automatic logic [CTRL_W-1:0] make_row(input logic cntr,
      input logic [SEL_BITS-1:0] sel, input int unsigned ns0, input int unsigned ns1);
    return {cntr, sel, 7'(ns0), 7'(ns1)};
  endfunction

  function automatic logic [SEL_BITS-1:0] pack_sel(input byte_sel_t s);
    logic [SEL_BITS-1:0] r;
    for (int j = 0; j < 32; j++) r[6*j +: 6] = s[j];
    return r;
  endfunction

  // select vector that passes registers ua, ub, va, vb through unchanged
  function automatic logic [SEL_BITS-1:0] straight_sel(input int ua, input int ub,
      input int va, input int vb);
    byte_sel_t s;
    int regs [4];
    regs = '{ua, ub, va, vb};
    for (int j = 0; j < 32; j++) s[j] = 6'(regs[j / 8] * 8 + j % 8);
    return pack_sel(s);
  endfunction

  // control-space addresses; ctx picks the context whose registers are written
  function automatic logic [11:0] cmem_addr(input int unsigned state, input int unsigned chunk,
                                            input int unsigned ctx = 0);
    return {ctx[1:0], 1'b0, state[6:0], chunk[1:0]};
  endfunction

  function automatic logic [11:0] ctx_addr(input logic [9:0] local_addr, input int unsigned ctx);
    return {ctx[1:0], local_addr};
  endfunction

  localparam logic [11:0] S1_ADDR   = 12'h200;
  localparam logic [11:0] S2_ADDR   = 12'h201;
  localparam logic [11:0] CONF_ADDR = 12'h204;
  localparam logic [11:0] CTX_ADDR  = 12'h205;

endpackage
