// tb_spu_contexts: SPU with two copies of the controller registers
// (CONTEXTS = 2), used for a context switch on an exception.
//
// Context 0 runs a two-state loop of 20 instructions (C1 = 20). After 7
// instructions an "exception" selects context 1, starts its own one-state
// loop of 3 instructions with different crossbar settings and lets it run
// out; context 0 is then selected again and must resume in the state it
// left, with its counter where it was, and finish its remaining 13
// instructions. Every operand is checked against routing worked out in the
// testbench from its copy of the registers.
module tb_spu_contexts;
  import spu_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mem_wr_en, u_wr_en, v_wr_en, cfg_we, issue;
  logic [2:0] mem_wr_reg, mem_rd_reg, u_wr_reg, v_wr_reg;
  logic [63:0] mem_wr_data, mem_rd_data, u_wr_data, v_wr_data, cfg_wdata;
  logic [11:0] cfg_addr;
  logic [3:0][2:0] src_reg;
  logic [63:0] u_op_a, u_op_b, v_op_a, v_op_b;
  logic op_valid, op_permuted, spu_active, spu_loop_exit;
  logic [6:0] spu_state;
  logic [15:0] spu_c1, spu_c2;
  logic spu_context;

  spu_top #(.CONTEXTS(2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] mm [8];
  byte_sel_t prog_sel [2][2];     // [context][state]

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic quiet();
    mem_wr_en = 0; u_wr_en = 0; v_wr_en = 0; cfg_we = 0; issue = 0;
  endtask

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic cfg_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); quiet();
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk); #1 quiet();
  endtask

  task automatic write_row(input int ctx, input int st, input logic [CTRL_W-1:0] row);
    logic [255:0] w;
    w = 256'(row);
    for (int c = 0; c < 4; c++) cfg_write(cmem_addr(st, c, ctx), w[64*c +: 64]);
  endtask

  // expected 256 operand bits for a select table
  function automatic logic [255:0] route(input byte_sel_t s);
    logic [255:0] r;
    for (int j = 0; j < 32; j++) r[8*j +: 8] = mm[s[j] / 8][8*(s[j] % 8) +: 8];
    return r;
  endfunction

  task automatic issue_check(input string what, input int ctx, input int st);
    logic [255:0] e;
    e = route(prog_sel[ctx][st]);
    chk({what, " state"}, spu_state, st);
    chk({what, " context"}, spu_context, ctx);
    @(negedge clk); quiet(); issue = 1;
    @(posedge clk); #1 quiet();
    checks++;
    if ({v_op_b, v_op_a, u_op_b, u_op_a} !== e || !op_permuted) begin
      failures++; $display("%s: operands differ", what);
    end
  endtask

  initial begin
    quiet();
    mem_wr_reg = '0; mem_rd_reg = '0; u_wr_reg = '0; v_wr_reg = '0;
    mem_wr_data = '0; u_wr_data = '0; v_wr_data = '0; cfg_addr = '0; cfg_wdata = '0;
    src_reg = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); mem_wr_en = 1; mem_wr_reg = 3'(r); mem_wr_data = {$urandom, $urandom};
      @(posedge clk); mm[r] = mem_wr_data; #1 quiet();
    end
    for (int x = 0; x < 2; x++)
      for (int s = 0; s < 2; s++)
        for (int j = 0; j < 32; j++) prog_sel[x][s][j] = 6'($urandom);
    // context 0: states 0 <-> 1 on C1 = 20; context 1: state 0 on C1 = 3
    write_row(0, 0, make_row(0, pack_sel(prog_sel[0][0]), 127, 1));
    write_row(0, 1, make_row(0, pack_sel(prog_sel[0][1]), 127, 0));
    write_row(1, 0, make_row(0, pack_sel(prog_sel[1][0]), 127, 0));
    cfg_write(ctx_addr(10'h200, 0), 64'd20);
    cfg_write(ctx_addr(10'h200, 1), 64'd3);
    cfg_write(ctx_addr(10'h204, 0), 64'd1);
    for (int i = 0; i < 7; i++) issue_check($sformatf("ctx0 #%0d", i), 0, i % 2);
    chk("ctx0 count before switch", spu_c1, 13);
    // exception: switch to the free context 1 and run its loop
    cfg_write(CTX_ADDR, 64'd1);
    chk("ctx1 idle until GO", spu_active, 0);
    cfg_write(ctx_addr(10'h204, 1), 64'd1);
    for (int i = 0; i < 3; i++) issue_check($sformatf("ctx1 #%0d", i), 1, 0);
    chk("ctx1 done", spu_active, 0);
    // return: context 0 resumes where it stopped
    cfg_write(CTX_ADDR, 64'd0);
    chk("ctx0 still active", spu_active, 1);
    chk("ctx0 counter kept", spu_c1, 13);
    for (int i = 7; i < 20; i++) issue_check($sformatf("ctx0 #%0d", i), 0, i % 2);
    chk("ctx0 done after 20", spu_active, 0);
    chk("ctx0 counter restored", spu_c1, 20);
    // a select of a context that does not exist is ignored
    cfg_write(CTX_ADDR, 64'd3);
    chk("bad context ignored", spu_context, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
