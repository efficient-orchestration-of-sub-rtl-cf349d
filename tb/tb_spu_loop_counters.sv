// tb_spu_loop_counters: self-checking test of the two SPU loop counters.
//
// Directed part: S1 = 30 must raise last on exactly the 30th step that
// selects C1 and then restore C1 to 30 (the worked dot-product loop);
// S2 = 3 interleaved with C1 steps must not disturb C1. Random part: random
// store writes, loads and steps, checked every cycle against a reference
// count kept in the testbench.
module tb_spu_loop_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  logic st_we, st_sel, load, step, cntr_sel, last;
  logic [15:0] st_wdata, c1, c2;

  int checks = 0, failures = 0;
  int unsigned s_m [2], c_m [2];

  spu_loop_counters dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d (c1=%0d c2=%0d)", what, got, exp, c1, c2);
    end
  endtask

  task automatic check_cnt();
    checks++;
    if (c1 !== 16'(c_m[0]) || c2 !== 16'(c_m[1])) begin
      failures++;
      $display("counters: got %0d/%0d expected %0d/%0d", c1, c2, c_m[0], c_m[1]);
    end
  endtask

  task automatic idle();
    st_we = 0; load = 0; step = 0;
  endtask

  task automatic write_store(input logic which, input int unsigned v);
    @(negedge clk); idle(); st_we = 1; st_sel = which; st_wdata = 16'(v);
    @(posedge clk); s_m[which] = v;
    @(negedge clk); idle();
  endtask

  task automatic do_load();
    @(negedge clk); idle(); load = 1;
    @(posedge clk); c_m[0] = s_m[0]; c_m[1] = s_m[1];
    @(negedge clk); idle(); check_cnt();
  endtask

  // one step on counter sel; checks last against the reference count
  task automatic do_step(input logic sel);
    logic exp_last;
    @(negedge clk); idle(); step = 1; cntr_sel = sel;
    #1;
    exp_last = (c_m[sel] <= 1);
    check("last", last, exp_last);
    @(posedge clk);
    c_m[sel] = exp_last ? s_m[sel] : c_m[sel] - 1;
    @(negedge clk); idle(); check_cnt();
  endtask

  initial begin
    idle(); st_sel = 0; st_wdata = '0; cntr_sel = 0;
    s_m[0] = 0; s_m[1] = 0; c_m[0] = 0; c_m[1] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // directed: 30 steps on C1 leave the loop on the 30th
    write_store(0, 30);
    write_store(1, 3);
    do_load();
    for (int i = 1; i <= 30; i++) begin
      @(negedge clk); idle(); step = 1; cntr_sel = 0;
      #1 check($sformatf("C1 step %0d", i), last, i == 30);
      @(posedge clk);
    end
    @(negedge clk); idle();
    checks++;
    if (c1 !== 16'd30) begin failures++; $display("C1 not restored: %0d", c1); end
    c_m[0] = 30;
    // C2 inner loop of 3, interleaved with C1
    for (int i = 1; i <= 9; i++) begin
      do_step(1);
      if (i % 3 == 0) do_step(0);
    end

    // random
    for (int i = 0; i < 2000; i++) begin
      case ($urandom_range(9))
        0: write_store(1'($urandom), $urandom_range(6));
        1: do_load();
        default: do_step(1'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
