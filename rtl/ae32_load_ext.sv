// Load aligner and extender (MEM stage).
//
// Picks the addressed byte or halfword out of the 32-bit read data (little-endian) and
// sign- or zero-extends it to 32 bits; words pass unchanged. Combinational.
//
// The align & extension unit follows the source design; byte order is this
// implementation's choice.
module ae32_load_ext
  import ae32_pkg::*;
(
  input  logic [31:0] rdata,
  input  logic [1:0]  addr_lo,
  input  msize_e      size,
  input  logic        sext,
  output logic [31:0] data
);
  logic [7:0]  b;
  logic [15:0] h;

  always_comb begin
    b = rdata[8*addr_lo +: 8];
    h = addr_lo[1] ? rdata[31:16] : rdata[15:0];
    case (size)
      SZ_BYTE: data = {{24{sext && b[7]}}, b};
      SZ_HALF: data = {{16{sext && h[15]}}, h};
      default: data = rdata;
    endcase
  end
endmodule
