// 32-bit ALU.
//
// Add, add with carry, subtract, subtract with borrow, and, or, xor and move-B. The carry
// out of a subtraction is "no borrow" (set when a >= b unsigned), and the overflow output
// is the signed overflow of add and subtract; both are zero for logic operations.
// Combinational, used in EX.
//
// A 32-bit ALU is part of the source design; the operation list is this implementation's.
module ae32_alu
  import ae32_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        cin,
  output logic [31:0] y,
  output logic        cout,
  output logic        ovf
);
  logic [32:0] sum;
  logic [31:0] bb;
  logic        ci;
  logic        arith;

  always_comb begin
    arith = 1'b1;
    bb    = b;
    ci    = 1'b0;
    case (op)
      ALU_ADD: begin bb = b;  ci = 1'b0; end
      ALU_ADC: begin bb = b;  ci = cin;  end
      ALU_SUB: begin bb = ~b; ci = 1'b1; end
      ALU_SBC: begin bb = ~b; ci = cin;  end
      default: arith = 1'b0;
    endcase
    sum = {1'b0, a} + {1'b0, bb} + {32'd0, ci};
    case (op)
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_MOVB: y = b;
      default:  y = sum[31:0];
    endcase
    cout = arith && sum[32];
    ovf  = arith && (a[31] == bb[31]) && (sum[31] != a[31]);
  end
endmodule
