// spu_control_memory: the control store that holds the SPU program.
//
// One row per controller state. A row is the control word
//   {CNTRx, OUT_SEG[SEL_BITS-1:0], NEXT_STATE0, NEXT_STATE1}
// i.e. the counter to use in that state, the crossbar selects for the
// instruction issued in that state, and the two successor states. The
// default 128 x 207 store follows the document's size formula
// states x (15 + K) with K = 192 select bits.
//
// Interface and timing: the store is written through the memory-mapped
// control space, CHUNK_W bits at a time: chunk c of row waddr receives
// wdata into bits [CHUNK_W*c +: CHUNK_W] (bits past WIDTH are dropped) at
// the rising edge. The read port is asynchronous: rdata is row raddr in the
// same cycle, so the state register addresses it directly. The store has no
// reset; a program must be written before GO. The chunked write port and the
// asynchronous read are this design's choices; the document gives only the
// contents and the size.
module spu_control_memory #(
  parameter int unsigned DEPTH   = 128,
  parameter int unsigned WIDTH   = 207,
  parameter int unsigned CHUNK_W = 64,
  localparam int unsigned AW     = $clog2(DEPTH),
  localparam int unsigned NCHUNK = (WIDTH + CHUNK_W - 1) / CHUNK_W,
  localparam int unsigned CW     = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [CW-1:0]      wchunk,
  input  logic [CHUNK_W-1:0] wdata,
  input  logic [AW-1:0]      raddr,
  output logic [WIDTH-1:0]   rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  // write data placed at its chunk, and the mask of that chunk
  logic [WIDTH-1:0] wmask, wval;

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      wmask[i] = (wchunk == CW'(i / CHUNK_W));
      wval[i]  = wdata[i % CHUNK_W];
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wval & wmask);
  end

  assign rdata = mem[raddr];

endmodule
