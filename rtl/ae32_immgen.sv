// Immediate generator.
//
// Forms the 32-bit immediate of the instruction in ID. The instruction supplies imm_len
// (1..14) immediate bits. If LERI instructions preceded it, the extension register holds
// their accumulated value and becomes the upper part: imm = (er << imm_len) | field.
// Otherwise the field is sign- or zero-extended. Combinational.
//
// That LERI widens the immediate through the extension register follows the source
// architecture; the exact joining rule and imm_len encoding are this implementation's.
module ae32_immgen (
  input  logic [13:0] imm_field,
  input  logic [3:0]  imm_len,
  input  logic        imm_sext,
  input  logic [31:0] er,
  input  logic        er_valid,
  output logic [31:0] imm
);
  logic [31:0] mask, field, sign;

  always_comb begin
    mask  = ~(32'hFFFF_FFFF << imm_len);
    field = {18'd0, imm_field} & mask;
    sign  = (imm_len == 4'd0) ? 32'd0 : (32'd1 << (imm_len - 4'd1));
    if (er_valid)
      imm = (er << imm_len) | field;
    else if (imm_sext && (field & sign) != 32'd0)
      imm = field | ~mask;
    else
      imm = field;
  end
endmodule
