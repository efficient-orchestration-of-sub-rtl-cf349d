// tb_spu_control_memory: self-checking test of the SPU control store.
//
// Writes every row of the 128 x 207 store chunk by chunk with random data,
// rewrites single chunks of random rows, and checks through the asynchronous
// read port that each write changed exactly its own chunk (the last chunk
// holding only the upper 15 bits of the word) and nothing else.
module tb_spu_control_memory;
  localparam int unsigned DEPTH = 128, WIDTH = 207, CHUNK_W = 64;

  logic clk = 1'b0;
  logic we;
  logic [6:0] waddr, raddr;
  logic [1:0] wchunk;
  logic [CHUNK_W-1:0] wdata;
  logic [WIDTH-1:0] rdata;

  logic [255:0] model [DEPTH];
  int checks = 0, failures = 0;

  spu_control_memory dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_chunk(input int row, input int c, input logic [63:0] d);
    @(negedge clk);
    we = 1'b1; waddr = 7'(row); wchunk = 2'(c); wdata = d;
    @(posedge clk);
    model[row][64*c +: 64] = d;
    #1 we = 1'b0;
  endtask

  task automatic check_row(input int row);
    raddr = 7'(row);
    #1;
    checks++;
    if (rdata !== model[row][WIDTH-1:0]) begin
      failures++;
      $display("row %0d: got %h expected %h", row, rdata, model[row][WIDTH-1:0]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wchunk = '0; wdata = '0;
    for (int r = 0; r < DEPTH; r++)
      for (int c = 0; c < 4; c++) write_chunk(r, c, {$urandom, $urandom});
    for (int r = 0; r < DEPTH; r++) check_row(r);
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(DEPTH - 1);
      write_chunk(r, $urandom_range(3), {$urandom, $urandom});
      check_row(r);
      check_row($urandom_range(DEPTH - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
