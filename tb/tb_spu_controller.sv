// tb_spu_controller: self-checking test of the decoupled SPU controller.
//
// 1. The three-state dot-product program (CNTR0 = 30, every state leaving to
//    the idle state 127 on NEXT_STATE0): checks the state sequence
//    0,1,2,0,... and the crossbar selects of every step, that the SPU turns
//    itself off after exactly 30 issued instructions and that C1 is restored.
// 2. A two-level nested loop (inner loop on C2, outer on C1).
// 3. Random programs on random counts, with issue gaps, compared step by step
//    with a reference sequencer in the testbench; GO = 0 written mid-run must
//    stop the SPU at once.
module tb_spu_controller;
  import spu_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we, advance, active, loop_exit;
  logic [11:0] cfg_addr;
  logic [63:0] cfg_wdata;
  logic [6:0]  state;
  logic [191:0] out_seg;
  logic [15:0] c1, c2;
  logic context_sel;

  int checks = 0, failures = 0;
  logic [CTRL_W-1:0] prog [128];
  int unsigned s_m [2];

  spu_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d; advance = 0;
    @(posedge clk);
    #1 cfg_we = 0;
  endtask

  task automatic write_row(input int st, input logic [CTRL_W-1:0] row);
    logic [255:0] w;
    w = 256'(row);
    prog[st] = row;
    for (int c = 0; c < 4; c++) cfg_write(cmem_addr(st, c), w[64*c +: 64]);
  endtask

  task automatic set_counts(input int unsigned a, input int unsigned b);
    cfg_write(S1_ADDR, 64'(a)); cfg_write(S2_ADDR, 64'(b));
    s_m[0] = a; s_m[1] = b;
  endtask

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Runs the programmed controller from GO for up to max_steps issues and
  // compares each step with a reference sequencer. Returns steps done.
  task automatic run_and_compare(input int max_steps, input int stop_at, output int steps);
    int unsigned st, cnt [2];
    logic [CTRL_W-1:0] row;
    logic sel, lst;
    cfg_write(CONF_ADDR, 64'd1);
    st = 0; cnt[0] = s_m[0]; cnt[1] = s_m[1];
    steps = 0;
    chk("active after GO", active, 1);
    while (st != 127 && steps < max_steps) begin
      if (steps == stop_at) begin
        cfg_write(CONF_ADDR, 64'd0);
        chk("active after GO=0", active, 0);
        chk("state after GO=0", state, 127);
        chk("C1 restored after GO=0", c1, s_m[0]);
        chk("C2 restored after GO=0", c2, s_m[1]);
        return;
      end
      @(negedge clk);
      advance = ($urandom_range(3) != 0);
      #1;
      chk($sformatf("state @%0d", steps), state, st);
      checks++;
      if (out_seg !== prog[st][14 +: 192]) begin
        failures++; $display("out_seg mismatch in state %0d", st);
      end
      chk("active", active, 1);
      if (advance) begin
        row = prog[st];
        sel = row[206];
        lst = (cnt[sel] <= 1);
        chk("loop_exit", loop_exit, lst);
        cnt[sel] = lst ? s_m[sel] : cnt[sel] - 1;
        st = lst ? row[13:7] : row[6:0];
        if (st == 127) begin cnt[0] = s_m[0]; cnt[1] = s_m[1]; end
        steps++;
      end
      @(posedge clk);
      #1;
      chk("C1", c1, cnt[0]);
      chk("C2", c2, cnt[1]);
    end
    @(negedge clk); advance = 0;
    if (st == 127) begin
      chk("active at idle", active, 0);
      chk("state at idle", state, 127);
    end
  endtask

  int steps;

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; advance = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 chk("idle after reset", active, 0);
    chk("state after reset", state, 127);

    // 1. dot-product loop: ten passes of three instructions
    write_row(0, make_row(0, {96'h0, 96'hA5A5}, 127, 1));
    write_row(1, make_row(0, {96'h1, 96'h5A5A}, 127, 2));
    write_row(2, make_row(0, straight_sel(0, 1, 2, 3), 127, 0));
    set_counts(30, 0);
    run_and_compare(1000, -1, steps);
    chk("dot-product loop length", steps, 30);
    chk("C1 reloaded to 30", c1, 30);

    // advancing while idle must not move the controller
    @(negedge clk); advance = 1; @(posedge clk); #1 advance = 0;
    chk("idle ignores issue", state, 127);

    // 2. nested loop: inner {0,1} on C2 (count 4), outer state 2 on C1 (count 3)
    write_row(0, make_row(1, 192'd11, 2, 1));
    write_row(1, make_row(1, 192'd22, 2, 0));
    write_row(2, make_row(0, 192'd33, 127, 0));
    set_counts(3, 4);
    run_and_compare(1000, -1, steps);
    chk("nested loop length", steps, 3 * 5);

    // 3. random programs
    for (int p = 0; p < 40; p++) begin
      for (int s = 0; s < 8; s++)
        write_row(s, make_row(1'($urandom), {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
                              ($urandom_range(3) == 0) ? 127 : $urandom_range(7), $urandom_range(7)));
      set_counts($urandom_range(1, 5), $urandom_range(1, 5));
      run_and_compare(300, (p % 5 == 4) ? 17 : -1, steps);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
