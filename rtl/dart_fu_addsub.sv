// DART add/subtract functional unit with a 3-bit configuration.
//
// cfg[1:0] selects the operation on operands a and b: add, subtract (a-b),
// absolute difference |a-b| or bitwise AND; cfg[2] selects SIMD mode, in
// which the 16-bit operands are treated as two independent 8-bit lanes
// (no carry or borrow between the halves). The result is combinational;
// the DPR registers it. The 3-bit size and the SIMD option are published;
// the operation set is this design's reading of the unit's arithmetic and
// logic parts.
module dart_fu_addsub
  import dart_pkg::*;
(
  input  logic [2:0]    cfg,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] y
);

  function automatic logic [7:0] op8(input addsub_op_e op, input logic [7:0] x, input logic [7:0] z);
    unique case (op)
      AS_ADD: return x + z;
      AS_SUB: return x - z;
      AS_ABS: return ($signed(x) >= $signed(z)) ? x - z : z - x;
      default: return x & z;
    endcase
  endfunction

  function automatic logic [15:0] op16(input addsub_op_e op, input logic [15:0] x, input logic [15:0] z);
    unique case (op)
      AS_ADD: return x + z;
      AS_SUB: return x - z;
      AS_ABS: return ($signed(x) >= $signed(z)) ? x - z : z - x;
      default: return x & z;
    endcase
  endfunction

  addsub_op_e op;
  assign op = addsub_op_e'(cfg[1:0]);

  always_comb begin
    if (cfg[2]) y = {op8(op, a[15:8], b[15:8]), op8(op, a[7:0], b[7:0])};
    else        y = op16(op, a, b);
  end

endmodule
