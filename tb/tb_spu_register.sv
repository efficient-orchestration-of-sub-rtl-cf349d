// tb_spu_register: self-checking test of the unified SPU register.
//
// Drives random writes on the memory, U and V ports (including memory and U
// naming the same register, to check that memory wins, and never U and V
// naming the same register, which the MMX forbids) and compares the full
// 512-bit read-out and the 64-bit read port with a reference array kept in
// the testbench, every cycle. A watchdog ends the run if it hangs.
module tb_spu_register;
  localparam int unsigned NUM_REGS = 8;
  localparam int unsigned REG_W    = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0]            wr_en;
  logic [2:0][2:0]       wr_reg;
  logic [2:0][REG_W-1:0] wr_data;
  logic [2:0]            rd_reg;
  logic [REG_W-1:0]      rd_data;
  logic [NUM_REGS*REG_W-1:0] all_q;

  int checks = 0, failures = 0;
  logic [REG_W-1:0] model [NUM_REGS];

  spu_register dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int r = 0; r < NUM_REGS; r++) begin
      checks++;
      if (all_q[REG_W*r +: REG_W] !== model[r]) begin
        failures++;
        $display("MM%0d: got %h expected %h", r, all_q[REG_W*r +: REG_W], model[r]);
      end
    end
    checks++;
    if (rd_data !== model[rd_reg]) begin
      failures++;
      $display("read port MM%0d: got %h expected %h", rd_reg, rd_data, model[rd_reg]);
    end
  endtask

  initial begin
    wr_en = '0; wr_reg = '0; wr_data = '0; rd_reg = '0;
    for (int r = 0; r < NUM_REGS; r++) model[r] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    compare();
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en = 3'($urandom);
      for (int p = 0; p < 3; p++) begin
        wr_reg[p]  = 3'($urandom);
        wr_data[p] = {$urandom, $urandom};
      end
      if (wr_reg[2] == wr_reg[1]) wr_reg[2] = wr_reg[1] + 3'd1;
      if (i % 7 == 0) wr_reg[0] = wr_reg[1];
      rd_reg = 3'($urandom);
      // reference: memory > U > V
      @(posedge clk);
      if (wr_en[2]) model[wr_reg[2]] = wr_data[2];
      if (wr_en[1]) model[wr_reg[1]] = wr_data[1];
      if (wr_en[0]) model[wr_reg[0]] = wr_data[0];
      #1 compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
