// spu_controller: the decoupled SPU controller, a programmable K-state
// sequencer that sets the crossbar for every instruction of a loop.
//
// The state register STR addresses the control memory; the row read out
// gives the crossbar selects (out_seg) for the instruction issued in this
// state, the counter the state uses (CNTRx) and two successor states. Each
// time an instruction issues while the SPU is active (advance), the chosen
// loop counter steps and the next-state MUX loads STR with NEXT_STATE0 if the
// counter has just reached zero (the loop is left) or NEXT_STATE1 otherwise.
// Reaching the last state (STATES-1, the idle state) disables the SPU and
// restores both counters to their programmed values. Writing the
// configuration register with GO = 1 loads the counters, sets STR to state 0
// and enables the SPU; writing GO = 0 stops it at once (for instance from an
// exception handler).
//
// Contexts: with CONTEXTS > 1 the control registers (control memory, store
// registers, counters, STR and enable) exist once per context. Only the
// selected context drives out_seg and steps on advance; the others hold
// their place, so an exception handler can switch to a free context and the
// interrupted loop resumes where it stopped once it is selected again.
// Configuration writes go to the context named by cfg_addr[11:10]; the
// context select register (local address 0x205) picks the running one.
// With one context, context_sel is constant 0.
//
// Interface: cfg_* is the memory-mapped control space (map in spu_pkg).
// advance comes from MMX instruction issue. out_seg, state and active are
// valid in the cycle the instruction issues and belong to that instruction.
//
// Timing: STR, active and the counters change at the rising edge after an
// advance or a configuration write; out_seg follows STR combinationally
// through the asynchronously read control memory. A context switch takes
// effect from the next cycle.
//
// The state machine, the two counters, the NEXT_STATE0/1 rule, the idle
// state, the GO bit, the memory-mapped programming and the option of several
// contexts follow the document. The address map, the start state 0, the
// one-step-per-issued-instruction rule, the zero test (see
// spu_loop_counters) and the way contexts are selected are this design's
// choices. The default is one context, the configuration that was evaluated.
module spu_controller #(
  parameter int unsigned STATES   = spu_pkg::STATES,
  parameter int unsigned SEL_BITS = spu_pkg::SEL_BITS,
  parameter int unsigned CNT_W    = spu_pkg::CNT_W,
  parameter int unsigned CONTEXTS = 1,
  localparam int unsigned SW      = $clog2(STATES),
  localparam int unsigned CW      = 1 + SEL_BITS + 2 * SW,
  localparam int unsigned XW      = (CONTEXTS > 1) ? $clog2(CONTEXTS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  logic [spu_pkg::CFG_AW-1:0]    cfg_addr,
  input  logic [spu_pkg::CFG_DW-1:0]    cfg_wdata,
  input  logic                          advance,
  output logic                          active,
  output logic [SW-1:0]                 state,
  output logic [SEL_BITS-1:0]           out_seg,
  output logic                          loop_exit,   // this step took NEXT_STATE0
  output logic [CNT_W-1:0]              c1,
  output logic [CNT_W-1:0]              c2,
  output logic [XW-1:0]                 context_sel
);

  localparam logic [SW-1:0] IDLE = SW'(STATES - 1);

  if (CW > 4 * spu_pkg::CFG_DW || SW > 7 || CONTEXTS > spu_pkg::MAX_CTX
      || CONTEXTS < 1) begin : g_map_check
    $error("controller size does not fit the control-space map");
  end

  // ---- memory-mapped decode -------------------------------------------
  logic [spu_pkg::CFG_LAW-1:0] laddr;
  logic [1:0]                  caddr;
  logic                        mem_we, st_we, conf_we, ctx_we;

  assign laddr   = cfg_addr[spu_pkg::CFG_LAW-1:0];
  assign caddr   = cfg_addr[spu_pkg::CFG_AW-1 -: 2];
  assign mem_we  = cfg_we && (laddr[9] == 1'b0);
  assign st_we   = cfg_we && (laddr == spu_pkg::CFG_S1_ADDR || laddr == spu_pkg::CFG_S2_ADDR);
  assign conf_we = cfg_we && (laddr == spu_pkg::CFG_CONF_ADDR);
  assign ctx_we  = cfg_we && (laddr == spu_pkg::CFG_CTX_ADDR);

  // ---- context select register ----------------------------------------------
  logic [XW-1:0] ctx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         ctx_q <= '0;
    else if (ctx_we && CONTEXTS > 1 && 32'(cfg_wdata[1:0]) < CONTEXTS)
                                        ctx_q <= XW'(cfg_wdata[1:0]);
  end

  // ---- one set of control registers per context -----------------------------
  logic [CONTEXTS-1:0]                act_c, exit_c;
  logic [CONTEXTS-1:0][SW-1:0]        str_c;
  logic [CONTEXTS-1:0][SEL_BITS-1:0]  seg_c;
  logic [CONTEXTS-1:0][CNT_W-1:0]     c1_c, c2_c;

  for (genvar x = 0; x < CONTEXTS; x++) begin : g_ctx
    logic          here;           // the write addresses this context
    logic          running;        // this context follows issue
    logic [SW-1:0] str_q;
    logic          active_q, step, last, cnt_load;
    logic [CW-1:0] row;
    logic          row_cntr;
    logic [SW-1:0] row_ns0, row_ns1, next_state;

    assign here    = (CONTEXTS == 1) || (caddr == 2'(x));
    assign running = (CONTEXTS == 1) || (ctx_q == XW'(x));

    spu_control_memory #(
      .DEPTH   (STATES),
      .WIDTH   (CW),
      .CHUNK_W (spu_pkg::CFG_DW)
    ) u_cmem (
      .clk    (clk),
      .we     (mem_we && here),
      .waddr  (laddr[2 +: SW]),
      .wchunk (laddr[1:0]),
      .wdata  (cfg_wdata),
      .raddr  (str_q),
      .rdata  (row)
    );

    assign row_ns1  = row[0 +: SW];
    assign row_ns0  = row[SW +: SW];
    assign row_cntr = row[CW-1];

    assign step       = active_q && advance && running;
    assign next_state = last ? row_ns0 : row_ns1;   // next-state MUX
    assign cnt_load   = (conf_we && here) || (step && next_state == IDLE);

    spu_loop_counters #(.CNT_W(CNT_W)) u_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .st_we    (st_we && here),
      .st_sel   (laddr[0]),
      .st_wdata (cfg_wdata[CNT_W-1:0]),
      .load     (cnt_load),
      .step     (step),
      .cntr_sel (row_cntr),
      .last     (last),
      .c1       (c1_c[x]),
      .c2       (c2_c[x])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        str_q    <= IDLE;
        active_q <= 1'b0;
      end else if (conf_we && here) begin
        str_q    <= cfg_wdata[0] ? '0 : IDLE;
        active_q <= cfg_wdata[0];
      end else if (step) begin
        str_q    <= next_state;
        active_q <= (next_state != IDLE);
      end
    end

    assign act_c[x]  = active_q;
    assign str_c[x]  = str_q;
    assign seg_c[x]  = row[2*SW +: SEL_BITS];
    assign exit_c[x] = step && last;

    // While active the state register never rests on the idle state.
    a_idle_inactive : assert property (@(posedge clk) disable iff (!rst_n)
        active_q |-> (str_q != IDLE));
  end

  // ---- outputs of the running context -------------------------------------
  assign active      = act_c[ctx_q];
  assign state       = str_c[ctx_q];
  assign out_seg     = seg_c[ctx_q];
  assign loop_exit   = exit_c[ctx_q];
  assign c1          = c1_c[ctx_q];
  assign c2          = c2_c[ctx_q];
  assign context_sel = ctx_q;

endmodule
