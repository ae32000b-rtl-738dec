// Multiply and multiply-accumulate unit with the MH:ML register pair.
//
// In one cycle the unit forms the 64-bit product of two 32-bit operands, signed or
// unsigned, and either writes it to MH:ML (multiply, 32x32=64) or adds it to the current
// MH:ML (multiply-accumulate, 32x32+64=64, wrapping modulo 2^64). MH:ML updates on the
// clock edge when en is high, so back-to-back MAC operations accumulate without a stall.
// MH:ML is cleared by reset.
//
// Single-cycle 32x32+64 operation and the MH:ML pair follow the source design; signed and
// unsigned variants are this implementation's choice.
module ae32_mac
  import ae32_pkg::mac_op_e, ae32_pkg::MAC_MUL, ae32_pkg::MAC_MAC, ae32_pkg::MAC_MACU;
#(
  parameter int unsigned XLEN = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  mac_op_e           op,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  output logic [XLEN-1:0]   mh,
  output logic [XLEN-1:0]   ml
);
  logic [2*XLEN-1:0] acc_q, prod, sum, ea, eb;
  logic              sgn;

  always_comb begin
    sgn  = (op == MAC_MUL) || (op == MAC_MAC);
    ea   = {{XLEN{sgn && a[XLEN-1]}}, a};
    eb   = {{XLEN{sgn && b[XLEN-1]}}, b};
    prod = ea * eb;  // low 2*XLEN bits of the extended product
    sum  = ((op == MAC_MAC) || (op == MAC_MACU)) ? acc_q + prod : prod;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= sum;
  end

  assign mh = acc_q[2*XLEN-1:XLEN];
  assign ml = acc_q[XLEN-1:0];
endmodule
