// spu_register: the unified SPU register, MM0..MM7 held as one 512-bit store.
//
// The register is a set of flip-flops grouped into bytes, byte b of MMi being
// bits [8*(8i+b)+7 : 8*(8i+b)]. The entire register is presented on all_q
// every cycle, so the crossbar behind it can reach any byte of any MMX
// register (this removes the limit of two source registers per instruction).
// Three 64-bit write ports serve loads from memory, the U pipe result and the
// V pipe result; a write changes only the 64 bits of the register it names.
// rd_reg/rd_data is the 64-bit path back to memory for MMX stores.
//
// Timing: writes take effect at the rising clock edge; reads are
// combinational from the flip-flops (a write is visible the next cycle).
//
// The byte grouping, the 512-bit size, the full read and the partial write
// follow the document. Reset to zero, the priority memory > U > V when two
// ports name the same register, and the read port toward memory are this
// design's choices; the MMX rule that U and V never write the same register
// in one cycle is checked by an assertion.
module spu_register
#(
  parameter int unsigned NUM_REGS = spu_pkg::NUM_REGS,
  parameter int unsigned REG_W    = spu_pkg::REG_W,
  localparam int unsigned RW      = $clog2(NUM_REGS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [2:0]                  wr_en,    // [WP_MEM], [WP_U], [WP_V]
  input  logic [2:0][RW-1:0]          wr_reg,
  input  logic [2:0][REG_W-1:0]       wr_data,
  input  logic [RW-1:0]               rd_reg,
  output logic [REG_W-1:0]            rd_data,
  output logic [NUM_REGS*REG_W-1:0]   all_q
);

  logic [NUM_REGS-1:0][REG_W-1:0] regs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs_q <= '0;
    end else begin
      // lowest priority first, so that a later assignment wins
      if (wr_en[spu_pkg::WP_V])   regs_q[wr_reg[spu_pkg::WP_V]]   <= wr_data[spu_pkg::WP_V];
      if (wr_en[spu_pkg::WP_U])   regs_q[wr_reg[spu_pkg::WP_U]]   <= wr_data[spu_pkg::WP_U];
      if (wr_en[spu_pkg::WP_MEM]) regs_q[wr_reg[spu_pkg::WP_MEM]] <= wr_data[spu_pkg::WP_MEM];
    end
  end

  assign all_q   = regs_q;
  assign rd_data = regs_q[rd_reg];

  // The U and V pipes must not name the same destination register.
  a_uv_distinct : assert property (@(posedge clk) disable iff (!rst_n)
      (wr_en[spu_pkg::WP_U] && wr_en[spu_pkg::WP_V]) |-> (wr_reg[spu_pkg::WP_U] != wr_reg[spu_pkg::WP_V]));

endmodule
