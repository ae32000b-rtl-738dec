// 32-bit barrel shifter.
//
// Logical shift left, logical shift right, arithmetic shift right and rotate right by
// 0..31 positions (the low five bits of the amount), in one cycle. Each operation is a
// shift of a double-width word, so the last bit shifted out is available as carry; a shift
// by zero gives carry 0. Synthesis maps the variable shifts onto logarithmic shifter
// stages. Combinational, used in EX.
//
// The barrel shifter is part of the source design; the operation set and carry rule are
// this implementation's.
module ae32_shifter
  import ae32_pkg::shf_op_e, ae32_pkg::SH_LSL, ae32_pkg::SH_LSR, ae32_pkg::SH_ASR;
#(
  parameter int unsigned XLEN = 32,
  localparam int unsigned SW  = $clog2(XLEN),
  localparam int unsigned DW  = 2 * XLEN
) (
  input  shf_op_e         op,
  input  logic [XLEN-1:0] a,
  input  logic [SW-1:0]   amt,
  output logic [XLEN-1:0] y,
  output logic            cout
);
  logic [DW-1:0] w;

  always_comb begin
    case (op)
      SH_LSL: begin
        w    = {{XLEN{1'b0}}, a} << amt;
        y    = w[XLEN-1:0];
        cout = w[XLEN];
      end
      SH_LSR: begin
        w    = {a, {XLEN{1'b0}}} >> amt;
        y    = w[2*XLEN-1:XLEN];
        cout = w[XLEN-1];
      end
      SH_ASR: begin
        w    = DW'($signed({a, {XLEN{1'b0}}}) >>> amt);
        y    = w[2*XLEN-1:XLEN];
        cout = w[XLEN-1];
      end
      default: begin  // SH_ROR
        w    = {a, a} >> amt;
        y    = w[XLEN-1:0];
        cout = w[XLEN-1];
      end
    endcase
    if (amt == '0) cout = 1'b0;
  end
endmodule
