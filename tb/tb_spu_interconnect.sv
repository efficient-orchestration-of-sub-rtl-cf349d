// tb_spu_interconnect: self-checking test of the byte crossbar.
//
// Applies random register contents and random selects (plus all-identity,
// all-same-byte and reversed patterns) to the default 64 x 32 byte crossbar
// and checks every output byte one clock later (the registered output
// stage), against a byte-by-byte reference computed in the testbench.
// A second instance built as the smallest configuration of the family
// (16 x 16 crossbar with 16-bit ports, combinational) is checked the same way.
module tb_spu_interconnect;
  localparam int unsigned IN_PORTS = 64, OUT_PORTS = 32, PORT_W = 8, SEL_W = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [IN_PORTS*PORT_W-1:0]  in_data;
  logic [OUT_PORTS*SEL_W-1:0]  sel;
  logic [OUT_PORTS*PORT_W-1:0] out_data;
  logic [OUT_PORTS*PORT_W-1:0] expect_q;

  int checks = 0, failures = 0;

  spu_interconnect dut (.*);

  // 16 x 16 crossbar with 16-bit ports, no output register
  logic [16*16-1:0] d_in, d_out, d_exp;
  logic [16*4-1:0]  d_sel;
  spu_interconnect #(.IN_PORTS(16), .OUT_PORTS(16), .PORT_W(16), .OUT_REG(1'b0)) dut_d (
    .clk (clk), .rst_n (rst_n), .in_data (d_in), .sel (d_sel), .out_data (d_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int i = 0; i < 200; i++) begin
      for (int w = 0; w < 8; w++) d_in[32*w +: 32] = $urandom;
      for (int p = 0; p < 16; p++) d_sel[4*p +: 4] = 4'($urandom);
      #1;
      for (int p = 0; p < 16; p++) d_exp[16*p +: 16] = d_in[16*d_sel[4*p +: 4] +: 16];
      checks++;
      if (d_out !== d_exp) begin
        failures++;
        $display("16x16 pattern %0d: got %h expected %h", i, d_out, d_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [OUT_PORTS*PORT_W-1:0] reference(
      input logic [IN_PORTS*PORT_W-1:0] d, input logic [OUT_PORTS*SEL_W-1:0] s);
    logic [OUT_PORTS*PORT_W-1:0] r;
    for (int p = 0; p < OUT_PORTS; p++) begin
      int unsigned idx;
      idx = s[SEL_W*p +: SEL_W];
      r[PORT_W*p +: PORT_W] = d[PORT_W*idx +: PORT_W];
    end
    return r;
  endfunction

  initial begin
    in_data = '0; sel = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      for (int w = 0; w < IN_PORTS*PORT_W/32; w++) in_data[32*w +: 32] = $urandom;
      for (int p = 0; p < OUT_PORTS; p++) begin
        case (i % 4)
          0: sel[SEL_W*p +: SEL_W] = SEL_W'(p);                // identity
          1: sel[SEL_W*p +: SEL_W] = SEL_W'(i);                // one byte to all
          2: sel[SEL_W*p +: SEL_W] = SEL_W'(IN_PORTS - 1 - p); // reversed
          default: sel[SEL_W*p +: SEL_W] = SEL_W'($urandom);
        endcase
      end
      expect_q = reference(in_data, sel);
      @(posedge clk);
      #1;
      checks++;
      if (out_data !== expect_q) begin
        failures++;
        $display("pattern %0d: got %h expected %h", i, out_data, expect_q);
      end
    end
    for (int i = 0; i < 200; i++) begin
      for (int w = 0; w < 8; w++) d_in[32*w +: 32] = $urandom;
      for (int p = 0; p < 16; p++) d_sel[4*p +: 4] = 4'($urandom);
      #1;
      for (int p = 0; p < 16; p++) d_exp[16*p +: 16] = d_in[16*d_sel[4*p +: 4] +: 16];
      checks++;
      if (d_out !== d_exp) begin
        failures++;
        $display("16x16 pattern %0d: got %h expected %h", i, d_out, d_exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
