// spu_loop_counters: the two loop counters of the SPU controller with their
// store registers.
//
// S1 and S2 hold the programmed loop counts. They are written from the
// memory-mapped control space; st_sel (the counter select) goes through a
// 1-of-2 decoder to pick which one takes st_wdata. C1 and C2 are the
// working counters. On load (the GO write, or the controller reaching its
// idle state) both are copied from S1/S2. On step, only the counter named
// by cntr_sel (the CNTRx bit of the current state) is touched: the
// subtractor takes one off it, and if that brings it to zero, last is raised
// and the counter is restored from its store register instead, which is
// what lets a loop be re-entered without any reprogramming (zero-overhead
// nested loops). A programmed count of 0 behaves like 1.
//
// Timing: last is combinational from the counters, cntr_sel and step; the
// counters change at the rising edge. load has priority over step.
//
// The store/counter pairs, the decoder, the subtractor and the per-state
// counter choice follow the document. The document's block diagram steers
// the next-state choice with the counters' sign bits; this design tests the
// decremented count for zero, which makes a loop programmed with N exit after
// exactly N steps, as the document's worked example (a count of 30 for ten
// passes of a three-instruction loop) requires.
module spu_loop_counters #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             st_we,
  input  logic             st_sel,     // 0: S1, 1: S2
  input  logic [CNT_W-1:0] st_wdata,
  input  logic             load,
  input  logic             step,
  input  logic             cntr_sel,   // 0: C1, 1: C2
  output logic             last,
  output logic [CNT_W-1:0] c1,
  output logic [CNT_W-1:0] c2
);

  logic [CNT_W-1:0] s1_q, s2_q, c1_q, c2_q;
  logic [1:0]       st_dec;          // 1-of-2 decoder outputs
  logic [CNT_W-1:0] c1_dec, c2_dec;  // subtractor outputs
  logic             c1_zero, c2_zero;

  assign st_dec = {st_we & st_sel, st_we & ~st_sel};

  assign c1_dec  = c1_q - CNT_W'(1);
  assign c2_dec  = c2_q - CNT_W'(1);
  assign c1_zero = (c1_dec == '0) || (c1_q == '0);
  assign c2_zero = (c2_dec == '0) || (c2_q == '0);

  // counter MUX: the zero flag of the counter this state uses
  assign last = step & (cntr_sel ? c2_zero : c1_zero);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
    end else begin
      if (st_dec[0]) s1_q <= st_wdata;
      if (st_dec[1]) s2_q <= st_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_q <= '0;
      c2_q <= '0;
    end else if (load) begin
      c1_q <= s1_q;
      c2_q <= s2_q;
    end else if (step) begin
      if (!cntr_sel) c1_q <= c1_zero ? s1_q : c1_dec;
      else           c2_q <= c2_zero ? s2_q : c2_dec;
    end
  end

  assign c1 = c1_q;
  assign c2 = c2_q;

endmodule
