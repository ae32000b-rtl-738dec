// Flag generator.
//
// Computes the next N, Z, C, V flags for the instruction in EX. ALU operations set all
// four; shifts set N and Z from the result and C from the last bit shifted out, keeping V;
// the leading zero/one counter sets Z when the count is zero; GETCn loads Z from the
// coprocessor status bit and keeps the rest. Units without flag effects, or instructions
// whose set_flags bit is clear, keep the old flags. Combinational.
//
// A flag generator in EX and GETCn writing the zero flag follow the source design; which
// unit sets which flag is this implementation's choice.
module ae32_flaggen
  import ae32_pkg::*;
(
  input  logic        set_flags,
  input  unit_e       unit,
  input  logic        getc,        // GETCn in EX
  input  logic        cp_status,
  input  logic [31:0] result,
  input  logic        alu_c,
  input  logic        alu_v,
  input  logic        shf_c,
  input  flags_t      old_flags,
  output flags_t      new_flags
);
  always_comb begin
    new_flags = old_flags;
    if (getc) begin
      new_flags.z = cp_status;
    end else if (set_flags) begin
      case (unit)
        U_ALU: new_flags = '{n: result[31], z: (result == 32'd0), c: alu_c, v: alu_v};
        U_SHF: begin
          new_flags.n = result[31];
          new_flags.z = (result == 32'd0);
          new_flags.c = shf_c;
        end
        U_LZC: new_flags.z = (result == 32'd0);
        default: new_flags = old_flags;
      endcase
    end
  end
endmodule
