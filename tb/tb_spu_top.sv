// tb_spu_top: end-to-end test of the Sub-word Permutation Unit at its default
// sizes (8 x 64-bit registers, 64 x 32 byte crossbar, 128-state controller).
//
// The testbench plays the part of memory, MMX issue control and the U/V
// pipes. It keeps its own copy of the eight MMX registers and works out every
// expected operand from the sub-word layouts of the worked examples:
//   - straight operation while the SPU is idle (random source registers);
//   - the dot-product loop a*c, e*g, b*d, f*h: the SPU delivers the unpacked
//     layouts (a,e,b,f) and (c,g,d,h) to pmulhw/pmullw with no unpack
//     instructions, ten passes of three instructions under CNTR0 = 30, new
//     data streamed in from memory and products written back by U and V;
//   - a 4x4 16-bit matrix transpose in four instructions, one column each,
//     every column gathered from four registers;
//   - the 2x2 determinant ad - bc with the sub-words of one operand swapped;
//   - a nested loop stopped by writing GO = 0, as an exception handler would.
// Operands are checked one clock after issue (the SPU pipeline stage). Each
// mechanism is counted and a mechanism that never happened counts a failure.
module tb_spu_top;
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

  spu_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] mm [8];       // reference copy of MM0..MM7

  // mechanism counters
  int n_straight, n_permuted, n_loop_back, n_loop_exit, n_auto_idle, n_manual_stop;
  int n_mem_wr, n_u_wr, n_v_wr, n_mem_rd, n_inter_word, n_intra_swap, n_wr_during_issue;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] w16(input logic [63:0] r, input int i);  // word i, 3 = leftmost
    return r[16*i +: 16];
  endfunction

  task automatic chk64(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic quiet();
    mem_wr_en = 0; u_wr_en = 0; v_wr_en = 0; cfg_we = 0; issue = 0;
  endtask

  task automatic mem_load(input int r, input logic [63:0] d);
    @(negedge clk); quiet();
    mem_wr_en = 1; mem_wr_reg = 3'(r); mem_wr_data = d;
    @(posedge clk); mm[r] = d; n_mem_wr++;
    #1 quiet();
  endtask

  task automatic cfg_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); quiet();
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk);
    #1 quiet();
  endtask

  task automatic write_row(input int st, input logic [CTRL_W-1:0] row);
    logic [255:0] w;
    w = 256'(row);
    for (int c = 0; c < 4; c++) cfg_write(cmem_addr(st, c), w[64*c +: 64]);
  endtask

  // Issue one instruction and check the four operands one clock later.
  // Optional write-backs from U/V happen in the same cycle (their effect is
  // not visible to this instruction).
  task automatic issue_check(input string what, input logic [63:0] e_ua, e_ub, e_va, e_vb,
                             input logic expect_perm,
                             input logic do_u = 0, input int ur = 0, input logic [63:0] ud = '0,
                             input logic do_v = 0, input int vr = 0, input logic [63:0] vd = '0);
    logic was_active;
    @(negedge clk); quiet();
    issue = 1;
    was_active = spu_active;
    if (do_u) begin u_wr_en = 1; u_wr_reg = 3'(ur); u_wr_data = ud; end
    if (do_v) begin v_wr_en = 1; v_wr_reg = 3'(vr); v_wr_data = vd; end
    #1;
    if (was_active) begin
      if (spu_loop_exit) n_loop_exit++; else n_loop_back++;
    end
    @(posedge clk);
    if (do_u) begin mm[ur] = ud; n_u_wr++; n_wr_during_issue++; end
    if (do_v) begin mm[vr] = vd; n_v_wr++; end
    #1;
    quiet();
    chk({what, " op_valid"}, op_valid, 1);
    chk({what, " op_permuted"}, op_permuted, expect_perm);
    chk64({what, " U.a"}, u_op_a, e_ua);
    chk64({what, " U.b"}, u_op_b, e_ub);
    chk64({what, " V.a"}, v_op_a, e_va);
    chk64({what, " V.b"}, v_op_b, e_vb);
    if (expect_perm) n_permuted++; else n_straight++;
    if (was_active && !spu_active) n_auto_idle++;
  endtask

  // reference packed multiplies on four signed 16-bit lanes
  function automatic logic [63:0] pmulhw(input logic [63:0] x, y);
    logic [63:0] r;
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] p;
      p = $signed(x[16*i +: 16]) * $signed(y[16*i +: 16]);
      r[16*i +: 16] = p[31:16];
    end
    return r;
  endfunction

  function automatic logic [63:0] pmullw(input logic [63:0] x, y);
    logic [63:0] r;
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] p;
      p = $signed(x[16*i +: 16]) * $signed(y[16*i +: 16]);
      r[16*i +: 16] = p[15:0];
    end
    return r;
  endfunction

  // select vector from a list of (register, byte) per output byte
  byte_sel_t bs;

  // operand k (0..3) word position w (0..3, 3 = leftmost) takes word sw of register sr
  task automatic route_word(input int k, input int w, input int sr, input int sw);
    bs[8*k + 2*w]     = 6'(8*sr + 2*sw);
    bs[8*k + 2*w + 1] = 6'(8*sr + 2*sw + 1);
  endtask

  task automatic route_reg(input int k, input int sr);
    for (int b = 0; b < 8; b++) bs[8*k + b] = 6'(8*sr + b);
  endtask

  initial begin
    logic [63:0] ea, eb, hi, lo;
    logic [15:0] a, b, c, d, e, f, g, h;
    int base;

    quiet();
    mem_wr_reg = '0; mem_rd_reg = '0; u_wr_reg = '0; v_wr_reg = '0;
    mem_wr_data = '0; u_wr_data = '0; v_wr_data = '0; cfg_addr = '0; cfg_wdata = '0;
    src_reg = '0;
    for (int r = 0; r < 8; r++) mm[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- registers from memory, read back, straight operands ----------------
    for (int r = 0; r < 8; r++) mem_load(r, {$urandom, $urandom});
    for (int r = 0; r < 8; r++) begin
      @(negedge clk); mem_rd_reg = 3'(r); #1;
      chk64($sformatf("store MM%0d", r), mem_rd_data, mm[r]); n_mem_rd++;
    end
    for (int i = 0; i < 20; i++) begin
      for (int k = 0; k < 4; k++) src_reg[k] = 3'($urandom);
      issue_check("straight", mm[src_reg[0]], mm[src_reg[1]], mm[src_reg[2]], mm[src_reg[3]], 0);
    end

    // ---- dot product: a*c, e*g, b*d, f*h without unpack instructions ----------
    // MM0 = (a,b,c,d), MM1 = (e,f,g,h), leftmost word = bits [63:48].
    // pmulhw / pmullw both take U.a = (a,e,b,f), U.b = (c,g,d,h);
    // the third instruction (the jump) sees the registers straight.
    for (int k = 0; k < 32; k++) bs[k] = '0;
    route_word(0, 3, 0, 3); route_word(0, 2, 1, 3); route_word(0, 1, 0, 2); route_word(0, 0, 1, 2);
    route_word(1, 3, 0, 1); route_word(1, 2, 1, 1); route_word(1, 1, 0, 0); route_word(1, 0, 1, 0);
    route_reg(2, 0); route_reg(3, 1);
    write_row(0, make_row(0, pack_sel(bs), 127, 1));
    write_row(1, make_row(0, pack_sel(bs), 127, 2));
    write_row(2, make_row(0, straight_sel(0, 1, 2, 3), 127, 0));
    cfg_write(S1_ADDR, 64'd30);
    cfg_write(S2_ADDR, 64'd0);
    cfg_write(CONF_ADDR, 64'd1);
    chk("SPU on after GO", spu_active, 1);
    for (int it = 0; it < 10; it++) begin
      mem_load(0, {$urandom, $urandom});
      mem_load(1, {$urandom, $urandom});
      a = w16(mm[0], 3); b = w16(mm[0], 2); c = w16(mm[0], 1); d = w16(mm[0], 0);
      e = w16(mm[1], 3); f = w16(mm[1], 2); g = w16(mm[1], 1); h = w16(mm[1], 0);
      ea = {a, e, b, f};
      eb = {c, g, d, h};
      hi = pmulhw(ea, eb);
      lo = pmullw(ea, eb);
      chk($sformatf("dot state it%0d", it), spu_state, 0);
      issue_check("pmulhw", ea, eb, mm[0], mm[1], 1, 0, 0, '0, 0, 0, '0);
      // pmulhw result retires into MM2 while pmullw issues
      issue_check("pmullw", ea, eb, mm[0], mm[1], 1, 1, 2, hi, 0, 0, '0);
      issue_check("jump", mm[0], mm[1], mm[2], mm[3], 1, 0, 0, '0, 1, 3, lo);
      chk64("products high", mm[2], hi);
      if (it < 9) chk("SPU still on", spu_active, 1);
    end
    chk("SPU off after 30 instructions", spu_active, 0);
    chk("idle state", spu_state, 127);
    chk("CNTR0 restored", spu_c1, 30);
    // results reach memory
    @(negedge clk); mem_rd_reg = 3'd3; #1 chk64("pmullw result MM3", mem_rd_data, lo); n_mem_rd++;
    @(negedge clk); mem_rd_reg = 3'd2; #1 chk64("pmulhw result MM2", mem_rd_data, hi); n_mem_rd++;
    // straight again once idle
    src_reg = {3'd7, 3'd6, 3'd5, 3'd4};
    issue_check("straight after loop", mm[4], mm[5], mm[6], mm[7], 0);

    // ---- 4x4 matrix transpose, one instruction per column --------------------
    // Row r in MM(4+r), word c holds element rc. Column c of the source is
    // gathered from MM4..MM7 into U.a, with V.a carrying the same column
    // reversed to show that a byte may feed any position.
    for (int r = 0; r < 4; r++) mem_load(4 + r, {16'(r*16+3), 16'(r*16+2), 16'(r*16+1), 16'(r*16+0)});
    for (int col = 0; col < 4; col++) begin
      for (int k = 0; k < 32; k++) bs[k] = '0;
      for (int r = 0; r < 4; r++) begin
        route_word(0, r, 4 + r, col);
        route_word(2, 3 - r, 4 + r, col);
      end
      route_reg(1, 0); route_reg(3, 1);
      write_row(col, make_row(1, pack_sel(bs), 127, col + 1));
    end
    cfg_write(S2_ADDR, 64'd4);
    cfg_write(CONF_ADDR, 64'd1);
    for (int col = 0; col < 4; col++) begin
      for (int r = 0; r < 4; r++) begin
        ea[16*r +: 16] = w16(mm[4 + r], col);
        eb[16*(3-r) +: 16] = w16(mm[4 + r], col);
      end
      issue_check($sformatf("transpose col %0d", col), ea, mm[0], eb, mm[1], 1);
      chk64("transposed row holds elements 0c..3c", ea,
            {16'(48 + col), 16'(32 + col), 16'(16 + col), 16'(col)});
      n_inter_word++;
    end
    chk("SPU off after transpose", spu_active, 0);

    // ---- determinant ad - bc: swap the 32-bit halves of MM1 ----------------
    mem_load(0, {32'd7, 32'd5});      // a, b
    mem_load(1, {32'd3, 32'd11});     // c, d
    for (int k = 0; k < 32; k++) bs[k] = '0;
    route_reg(0, 0);
    for (int b2 = 0; b2 < 4; b2++) begin
      bs[8 + b2]     = 6'(8*1 + 4 + b2);
      bs[8 + 4 + b2] = 6'(8*1 + b2);
    end
    route_reg(2, 2); route_reg(3, 3);
    write_row(0, make_row(0, pack_sel(bs), 127, 127));
    cfg_write(S1_ADDR, 64'd1);
    cfg_write(CONF_ADDR, 64'd1);
    issue_check("determinant swap", mm[0], {mm[1][31:0], mm[1][63:32]}, mm[2], mm[3], 1);
    n_intra_swap++;
    chk("ad", longint'(u_op_a[63:32]) * longint'(u_op_b[63:32]), 7 * 11);
    chk("bc", longint'(u_op_a[31:0]) * longint'(u_op_b[31:0]), 5 * 3);
    chk("SPU off after one instruction", spu_active, 0);

    // ---- nested loop stopped by GO = 0 ---------------------------------------
    // inner states 0,1 on C2 (4), outer state 2 on C1 (5); stopped after 7 issues.
    write_row(0, make_row(1, straight_sel(1, 2, 3, 4), 2, 1));
    write_row(1, make_row(1, straight_sel(5, 6, 7, 0), 2, 0));
    write_row(2, make_row(0, straight_sel(7, 7, 7, 7), 127, 0));
    cfg_write(S1_ADDR, 64'd5);
    cfg_write(S2_ADDR, 64'd4);
    cfg_write(CONF_ADDR, 64'd1);
    base = 0;
    for (int i = 0; i < 7; i++) begin
      int st;
      st = spu_state;
      chk("nested state", st, (i % 5 == 4) ? 2 : (i % 5) % 2);
      case (st)
        0: issue_check("nested s0", mm[1], mm[2], mm[3], mm[4], 1);
        1: issue_check("nested s1", mm[5], mm[6], mm[7], mm[0], 1);
        default: issue_check("nested s2", mm[7], mm[7], mm[7], mm[7], 1);
      endcase
    end
    chk("outer counter after one pass", spu_c1, 4);
    cfg_write(CONF_ADDR, 64'd0);
    n_manual_stop++;
    chk("SPU off after GO=0", spu_active, 0);
    chk("counters restored", spu_c1 + spu_c2, 9);
    src_reg = {3'd0, 3'd1, 3'd2, 3'd3};
    issue_check("straight after stop", mm[3], mm[2], mm[1], mm[0], 0);

    // ---- every mechanism must have occurred ---------------------------------
    $display("straight=%0d permuted=%0d loop_back=%0d loop_exit=%0d auto_idle=%0d manual_stop=%0d",
             n_straight, n_permuted, n_loop_back, n_loop_exit, n_auto_idle, n_manual_stop);
    $display("mem_wr=%0d u_wr=%0d v_wr=%0d mem_rd=%0d inter_word=%0d intra_swap=%0d wr_during_issue=%0d",
             n_mem_wr, n_u_wr, n_v_wr, n_mem_rd, n_inter_word, n_intra_swap, n_wr_during_issue);
    chk("straight seen", n_straight > 0, 1);
    chk("permuted seen", n_permuted > 0, 1);
    chk("loop back seen", n_loop_back > 0, 1);
    chk("loop exit seen", n_loop_exit > 0, 1);
    chk("auto idle seen", n_auto_idle > 0, 1);
    chk("manual stop seen", n_manual_stop > 0, 1);
    chk("memory write seen", n_mem_wr > 0, 1);
    chk("U write seen", n_u_wr > 0, 1);
    chk("V write seen", n_v_wr > 0, 1);
    chk("memory read seen", n_mem_rd > 0, 1);
    chk("inter-word gather seen", n_inter_word > 0, 1);
    chk("intra-word swap seen", n_intra_swap > 0, 1);
    chk("write during issue seen", n_wr_during_issue > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
