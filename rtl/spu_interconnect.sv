// spu_interconnect: byte-granular full crossbar between the SPU register and
// the operand buses of the MMX pipes.
//
// Every output port p independently selects input port sel[p], so any byte
// of the SPU register can be placed at any byte position of any of the four
// 64-bit operands (U.a, U.b, V.a, V.b), including several copies of one byte.
// Output port p drives out_data[PORT_W*p +: PORT_W]; its select is
// sel[SEL_W*p +: SEL_W].
//
// Timing: with OUT_REG = 1 the crossbar output is registered, so operands
// appear one clock after their selects (the extra pipeline stage given to
// data motion in the SPU); with OUT_REG = 0 the crossbar is combinational.
// The output register loads every cycle and resets to zero.
//
// The default sizes are the fully byte-addressable configuration (64 x 32
// crossbar with 8-bit ports); the smaller configurations of the same family
// (32 x 32 with 8-bit ports, 32 x 16 and 16 x 16 with 16-bit ports) are
// reached through the parameters. A plain multiplexer per output stands in
// for the folded crossbar layout that the area figures assume.
module spu_interconnect #(
  parameter int unsigned IN_PORTS  = 64,
  parameter int unsigned OUT_PORTS = 32,
  parameter int unsigned PORT_W    = 8,
  parameter bit          OUT_REG   = 1'b1,
  localparam int unsigned SEL_W    = $clog2(IN_PORTS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [IN_PORTS*PORT_W-1:0]    in_data,
  input  logic [OUT_PORTS*SEL_W-1:0]    sel,
  output logic [OUT_PORTS*PORT_W-1:0]   out_data
);

  logic [IN_PORTS-1:0][PORT_W-1:0]  in_ports;
  logic [OUT_PORTS-1:0][PORT_W-1:0] xbar;

  assign in_ports = in_data;

  always_comb begin
    for (int unsigned p = 0; p < OUT_PORTS; p++) begin
      xbar[p] = in_ports[sel[SEL_W*p +: SEL_W]];
    end
  end

  if (OUT_REG) begin : g_reg
    logic [OUT_PORTS*PORT_W-1:0] out_q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) out_q <= '0;
      else        out_q <= xbar;
    end
    assign out_data = out_q;
  end else begin : g_comb
    assign out_data = xbar;
  end

endmodule
