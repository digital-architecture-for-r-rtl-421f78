// pwl_alu: the arithmetic logic unit.
//
// Combinational, ACC_W-bit operands a (Reg.A side) and b (Reg.B side):
//   ALU_CMP  gt = (a > b), y = 0
//   ALU_SUB  y = a - b                 (mu_i = x_s(i) - x_s(i-1))
//   ALU_SUB1 y = 2^FN_W - b            (mu_0 = 1 - x_s(n))
//   ALU_MUL  y = a[FN_W:0] * b[C_W-1:0] (mu_i * c_i, 21 x 8 bits)
//   ALU_ADD  y = a + b                 (addresses and accumulation)
// gt is 0 for every operation except ALU_CMP. The set of operations is the
// description's; the one-cycle array multiplier and the dedicated 1 - b
// operation, which keeps the integer bit so that mu_0 = 1.0 stays exact when
// all fractions are zero, are this design's choices.
module pwl_alu
  import pwl_pkg::*;
(
  input  alu_op_e              op,
  input  logic [ACC_W-1:0]     a,
  input  logic [ACC_W-1:0]     b,
  output logic [ACC_W-1:0]     y,
  output logic                 gt
);

  localparam logic [ACC_W-1:0] ONE = ACC_W'(1) << FN_W;

  always_comb begin
    gt = 1'b0;
    unique case (op)
      ALU_CMP: begin
        y  = '0;
        gt = (a > b);
      end
      ALU_SUB:  y = a - b;
      ALU_SUB1: y = ONE - b;
      ALU_MUL:  y = ACC_W'(a[FN_W:0]) * ACC_W'(b[C_W-1:0]);
      ALU_ADD:  y = a + b;
      default:  y = '0;
    endcase
  end

endmodule
