// spu_top: Sub-word Permutation Unit (SPU) between the MMX register file and
// the MMX U and V pipes.
//
// MMX instructions can only combine sub-words that sit at the same bit
// position of at most two registers, so code spends many instructions on
// pack/unpack shuffles. The SPU removes those shuffles from loops: all eight
// MMX registers live in one byte-addressable SPU register, a 64 x 32 byte
// crossbar builds each of the four pipe operands (U.a, U.b, V.a, V.b) from
// any register bytes, and a programmed controller chooses the crossbar
// setting for each issued instruction, stepping through its states with two
// zero-overhead loop counters.
//
// Operation: while the SPU is idle the crossbar is set "straight": operand k
// is register src_reg[k] unchanged, byte for byte, as in a plain MMX. After
// GO is written to the configuration register the controller supplies the
// selects from its current state instead, and src_reg is ignored; every
// issue steps the controller. Loads from memory and the U/V results write
// the SPU register; mem_rd_* reads a register back for stores; cfg_* is the
// memory-mapped control space (map in spu_pkg).
//
// Timing: the crossbar setting is taken in the issue cycle from the register
// contents of that cycle; with OUT_REG = 1 (default) the operands, op_valid
// and op_permuted appear on the outputs one clock later, i.e. data motion
// through the SPU costs one pipeline stage.
//
// CONTEXTS > 1 gives the controller several copies of its control
// registers for fast switching (see spu_controller); the default is one.
//
// The block structure, sizes, the straight path when idle and the extra
// pipeline stage follow the document; port naming, the operand order and the
// handshake (one issue pulse per instruction, no stall input) are this
// design's choices. The MMX pipes, their issue control and memory are outside
// this module and connect through its ports.
module spu_top
#(
  parameter int unsigned NUM_REGS = spu_pkg::NUM_REGS,
  parameter int unsigned REG_W    = spu_pkg::REG_W,
  parameter int unsigned STATES   = spu_pkg::STATES,
  parameter int unsigned CNT_W    = spu_pkg::CNT_W,
  parameter bit          OUT_REG  = 1'b1,
  parameter int unsigned CONTEXTS = 1,
  localparam int unsigned RW      = $clog2(NUM_REGS),
  localparam int unsigned RB      = REG_W / 8,             // bytes per register
  localparam int unsigned NB      = NUM_REGS * RB,         // bytes in SPU register
  localparam int unsigned XSEL_W  = $clog2(NB),
  localparam int unsigned NOUT    = spu_pkg::OPERANDS * RB,         // crossbar outputs
  localparam int unsigned XSEL_B  = NOUT * XSEL_W,
  localparam int unsigned SW      = $clog2(STATES),
  localparam int unsigned XW      = (CONTEXTS > 1) ? $clog2(CONTEXTS) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // memory side: MMX loads and stores
  input  logic                     mem_wr_en,
  input  logic [RW-1:0]            mem_wr_reg,
  input  logic [REG_W-1:0]         mem_wr_data,
  input  logic [RW-1:0]            mem_rd_reg,
  output logic [REG_W-1:0]         mem_rd_data,
  // pipe results
  input  logic                     u_wr_en,
  input  logic [RW-1:0]            u_wr_reg,
  input  logic [REG_W-1:0]         u_wr_data,
  input  logic                     v_wr_en,
  input  logic [RW-1:0]            v_wr_reg,
  input  logic [REG_W-1:0]         v_wr_data,
  // memory-mapped SPU control space
  input  logic                     cfg_we,
  input  logic [spu_pkg::CFG_AW-1:0]        cfg_addr,
  input  logic [spu_pkg::CFG_DW-1:0]        cfg_wdata,
  // MMX issue control
  input  logic                     issue,
  input  logic [spu_pkg::OPERANDS-1:0][RW-1:0] src_reg,   // [OP_UA] .. [OP_VB]
  // operands to the pipes
  output logic [REG_W-1:0]         u_op_a,
  output logic [REG_W-1:0]         u_op_b,
  output logic [REG_W-1:0]         v_op_a,
  output logic [REG_W-1:0]         v_op_b,
  output logic                     op_valid,
  output logic                     op_permuted,
  // status
  output logic                     spu_active,
  output logic [SW-1:0]            spu_state,
  output logic                     spu_loop_exit,
  output logic [CNT_W-1:0]         spu_c1,
  output logic [CNT_W-1:0]         spu_c2,
  output logic [XW-1:0]            spu_context
);

  // ---- SPU register ---------------------------------------------------------
  logic [NUM_REGS*REG_W-1:0] all_q;

  spu_register #(.NUM_REGS(NUM_REGS), .REG_W(REG_W)) u_reg (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   ({v_wr_en, u_wr_en, mem_wr_en}),
    .wr_reg  ({v_wr_reg, u_wr_reg, mem_wr_reg}),
    .wr_data ({v_wr_data, u_wr_data, mem_wr_data}),
    .rd_reg  (mem_rd_reg),
    .rd_data (mem_rd_data),
    .all_q   (all_q)
  );

  // ---- controller -----------------------------------------------------------
  logic              active;
  logic [XSEL_B-1:0] prog_sel;

  spu_controller #(
    .STATES   (STATES),
    .SEL_BITS (XSEL_B),
    .CNT_W    (CNT_W),
    .CONTEXTS (CONTEXTS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_wdata (cfg_wdata),
    .advance   (issue),
    .active    (active),
    .state     (spu_state),
    .out_seg   (prog_sel),
    .loop_exit (spu_loop_exit),
    .c1        (spu_c1),
    .c2        (spu_c2),
    .context_sel (spu_context)
  );

  // ---- crossbar selects: programmed, or straight from src_reg ---------------
  logic [NOUT-1:0][XSEL_W-1:0] straight_sel;
  logic [XSEL_B-1:0]           xsel;

  always_comb begin
    for (int unsigned j = 0; j < NOUT; j++) begin
      straight_sel[j] = XSEL_W'(src_reg[j / RB] * RB + (j % RB));
    end
  end

  assign xsel = active ? prog_sel : straight_sel;

  logic [NOUT*8-1:0] ops;

  spu_interconnect #(
    .IN_PORTS  (NB),
    .OUT_PORTS (NOUT),
    .PORT_W    (8),
    .OUT_REG   (OUT_REG)
  ) u_xbar (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_data  (all_q),
    .sel      (xsel),
    .out_data (ops)
  );

  assign u_op_a = ops[REG_W*spu_pkg::OP_UA +: REG_W];
  assign u_op_b = ops[REG_W*spu_pkg::OP_UB +: REG_W];
  assign v_op_a = ops[REG_W*spu_pkg::OP_VA +: REG_W];
  assign v_op_b = ops[REG_W*spu_pkg::OP_VB +: REG_W];

  // ---- operand qualifiers, delayed like the crossbar -----------------------
  if (OUT_REG) begin : g_vreg
    logic valid_q, perm_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        valid_q <= 1'b0;
        perm_q  <= 1'b0;
      end else begin
        valid_q <= issue;
        perm_q  <= issue && active;
      end
    end
    assign op_valid    = valid_q;
    assign op_permuted = perm_q;
  end else begin : g_vcomb
    assign op_valid    = issue;
    assign op_permuted = issue && active;
  end

  assign spu_active = active;

endmodule
