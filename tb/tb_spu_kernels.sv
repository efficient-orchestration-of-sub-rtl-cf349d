// tb_spu_kernels: media kernels run through the SPU at its default sizes.
//
// 1. 16x16 matrix transpose of 16-bit elements, done as sixteen 4x4 tiles.
//    Each tile's four rows are loaded into MM4..MM7; one 4-state SPU program
//    (loop counter C2 = 4) gathers one column per instruction into U.a, so a
//    tile takes four instructions and no unpack instructions. The program is
//    written once and restarted with GO for every tile.
// 2. Four-tap FIR over a 150-sample block. Samples stream into MM0/MM1 four
//    at a time; a 4-state program (C1 = 148) hands U.a the window
//    x[n..n+3], i.e. the delay line shifted by one sample per instruction,
//    next to the coefficients in U.b. The testbench forms the
//    multiply-accumulate (pmaddwd + paddd) from the delivered operands and
//    compares every output with a direct convolution of the sample array.
// Both checks use values worked out from the source arrays only.
module tb_spu_kernels;
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
  int n_tiles = 0, n_fir = 0;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic quiet();
    mem_wr_en = 0; u_wr_en = 0; v_wr_en = 0; cfg_we = 0; issue = 0;
  endtask

  task automatic mem_load(input int r, input logic [63:0] d);
    @(negedge clk); quiet();
    mem_wr_en = 1; mem_wr_reg = 3'(r); mem_wr_data = d;
    @(posedge clk); #1 quiet();
  endtask

  task automatic cfg_write(input logic [11:0] a, input logic [63:0] d);
    @(negedge clk); quiet();
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(posedge clk); #1 quiet();
  endtask

  task automatic write_row(input int st, input logic [CTRL_W-1:0] row);
    logic [255:0] w;
    w = 256'(row);
    for (int c = 0; c < 4; c++) cfg_write(cmem_addr(st, c), w[64*c +: 64]);
  endtask

  // issue one instruction, return the U operands one clock later
  task automatic issue_get(output logic [63:0] ua, output logic [63:0] ub);
    @(negedge clk); quiet(); issue = 1;
    @(posedge clk); #1 quiet();
    checks++;
    if (!(op_valid && op_permuted)) begin failures++; $display("operands not permuted"); end
    ua = u_op_a; ub = u_op_b;
  endtask

  byte_sel_t bs;
  task automatic route_word(input int k, input int w, input int sr, input int sw);
    bs[8*k + 2*w]     = 6'(8*sr + 2*sw);
    bs[8*k + 2*w + 1] = 6'(8*sr + 2*sw + 1);
  endtask
  task automatic route_reg(input int k, input int sr);
    for (int b = 0; b < 8; b++) bs[8*k + b] = 6'(8*sr + b);
  endtask

  logic [15:0] A [16][16];
  logic [15:0] T [16][16];
  logic signed [15:0] x [152];
  logic signed [15:0] coef [4];

  initial begin
    logic [63:0] ua, ub;
    quiet();
    mem_wr_reg = '0; mem_rd_reg = '0; u_wr_reg = '0; v_wr_reg = '0;
    mem_wr_data = '0; u_wr_data = '0; v_wr_data = '0; cfg_addr = '0; cfg_wdata = '0;
    src_reg = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- 1. 16x16 transpose in 4x4 tiles -------------------------------------
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) A[r][c] = 16'($urandom);
    for (int col = 0; col < 4; col++) begin
      for (int k = 0; k < 32; k++) bs[k] = '0;
      for (int r = 0; r < 4; r++) route_word(0, r, 4 + r, col);
      route_reg(1, 0); route_reg(2, 1); route_reg(3, 2);
      write_row(col, make_row(1, pack_sel(bs), 127, col + 1));
    end
    cfg_write(S2_ADDR, 64'd4);
    for (int tr = 0; tr < 4; tr++) begin
      for (int tc = 0; tc < 4; tc++) begin
        for (int r = 0; r < 4; r++)
          mem_load(4 + r, {A[4*tr+r][4*tc+3], A[4*tr+r][4*tc+2], A[4*tr+r][4*tc+1], A[4*tr+r][4*tc]});
        cfg_write(CONF_ADDR, 64'd1);
        for (int col = 0; col < 4; col++) begin
          issue_get(ua, ub);
          for (int r = 0; r < 4; r++) T[4*tc+col][4*tr+r] = ua[16*r +: 16];
        end
        checks++;
        if (spu_active) begin failures++; $display("SPU still active after tile"); end
        n_tiles++;
      end
    end
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        checks++;
        if (T[r][c] !== A[c][r]) begin
          failures++;
          $display("transpose [%0d][%0d]: got %h expected %h", r, c, T[r][c], A[c][r]);
        end
      end

    // ---- 2. four-tap FIR over 150 samples -------------------------------------
    for (int i = 0; i < 152; i++) x[i] = 16'($urandom_range(0, 2000)) - 16'sd1000;
    for (int w = 0; w < 4; w++) coef[w] = 16'($urandom_range(0, 200)) - 16'sd100;
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 32; j++) bs[j] = '0;
      for (int w = 0; w < 4; w++) route_word(0, w, (k + w) / 4, (k + w) % 4);
      route_reg(1, 2); route_reg(2, 3); route_reg(3, 3);
      write_row(k, make_row(0, pack_sel(bs), 127, (k + 1) % 4));
    end
    mem_load(2, {coef[3], coef[2], coef[1], coef[0]});
    cfg_write(S1_ADDR, 64'd148);
    cfg_write(CONF_ADDR, 64'd1);
    for (int base = 0; base < 148; base += 4) begin
      mem_load(0, {x[base+3], x[base+2], x[base+1], x[base]});
      mem_load(1, {x[base+7], x[base+6], x[base+5], x[base+4]});
      for (int k = 0; k < 4; k++) begin
        int signed acc, ref_y;
        issue_get(ua, ub);
        acc = 0;   // pmaddwd then paddd of the two 32-bit halves
        for (int w = 0; w < 4; w++) acc += $signed(ua[16*w +: 16]) * $signed(ub[16*w +: 16]);
        ref_y = 0;
        for (int w = 0; w < 4; w++) ref_y += coef[w] * x[base + k + w];
        checks++;
        if (acc != ref_y) begin
          failures++;
          $display("FIR y[%0d]: got %0d expected %0d", base + k, acc, ref_y);
        end
        n_fir++;
      end
    end
    checks++;
    if (spu_active) begin failures++; $display("SPU still active after FIR block"); end

    $display("tiles=%0d fir_outputs=%0d", n_tiles, n_fir);
    checks++;
    if (n_tiles != 16 || n_fir != 148) begin failures++; $display("kernel incomplete"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
