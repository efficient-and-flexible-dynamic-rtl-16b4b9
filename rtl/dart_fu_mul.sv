// DART multiplier functional unit with an 11-bit configuration.
//
// cfg[3:0]  input shift: operand a is shifted right arithmetically by 0..15
// cfg[5:4]  operation: multiply, multiply-accumulate, add, subtract
// cfg[6]    SIMD: two independent signed 8-bit lanes
// cfg[10:7] output shift: the 32-bit product (or 2 x 16-bit lane products)
//           is shifted right arithmetically by 0..15 before the low 16 bits
//           (8 bits per lane) are kept
// Multiply-accumulate adds the product to acc_in, the unit's own registered
// output fed back by the DPR. The result is combinational; the DPR
// registers it. The 11-bit size is published; the split of the 11 bits into
// input shift, command, SIMD and output shift follows the fields the
// published DUCK example names, and the widths and operations are this
// design's choice. Operands are signed (two's complement).
module dart_fu_mul
  import dart_pkg::*;
(
  input  logic [10:0]   cfg,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] acc_in,
  output logic [DW-1:0] y
);

  logic [3:0] sh_in, sh_out;
  mul_op_e    op;
  logic       simd;

  assign sh_in  = cfg[3:0];
  assign op     = mul_op_e'(cfg[5:4]);
  assign simd   = cfg[6];
  assign sh_out = cfg[10:7];

  function automatic logic [7:0] lane(input mul_op_e o, input logic [3:0] si, input logic [3:0] so,
                                      input logic [7:0] x, input logic [7:0] z, input logic [7:0] acc);
    logic signed [7:0]  xs;
    logic signed [15:0] p;
    xs = $signed(x) >>> si;
    unique case (o)
      MU_MUL:  p = xs * $signed(z);
      MU_MAC:  p = xs * $signed(z);
      MU_ADD:  p = 16'(xs) + 16'($signed(z));
      default: p = 16'(xs) - 16'($signed(z));
    endcase
    p = p >>> so;
    return (o == MU_MAC) ? acc + p[7:0] : p[7:0];
  endfunction

  function automatic logic [15:0] full(input mul_op_e o, input logic [3:0] si, input logic [3:0] so,
                                       input logic [15:0] x, input logic [15:0] z, input logic [15:0] acc);
    logic signed [15:0] xs;
    logic signed [31:0] p;
    xs = $signed(x) >>> si;
    unique case (o)
      MU_MUL:  p = xs * $signed(z);
      MU_MAC:  p = xs * $signed(z);
      MU_ADD:  p = 32'(xs) + 32'($signed(z));
      default: p = 32'(xs) - 32'($signed(z));
    endcase
    p = p >>> so;
    return (o == MU_MAC) ? acc + p[15:0] : p[15:0];
  endfunction

  always_comb begin
    if (simd) y = {lane(op, sh_in, sh_out, a[15:8], b[15:8], acc_in[15:8]),
                   lane(op, sh_in, sh_out, a[7:0],  b[7:0],  acc_in[7:0])};
    else      y = full(op, sh_in, sh_out, a, b, acc_in);
  end

endmodule
