// Address generator and store aligner (EX stage).
//
// Adds the base register and the offset to form the data address that goes to the MAR, and
// prepares the store data for the MDR: the byte or halfword is replicated onto every lane
// and byte enables select the lanes at the addressed position (little-endian; byte
// address bits [1:0] pick the lane, bit [1] the halfword). Accesses are assumed naturally
// aligned; the low address bits below the access size are ignored for the enables.
// Combinational.
//
// The address generator and align unit in EX follow the source design; byte order and
// lane rules are this implementation's.
module ae32_store_align
  import ae32_pkg::*;
(
  input  logic [31:0] base,
  input  logic [31:0] offset,
  input  msize_e      size,
  input  logic [31:0] data,
  output logic [31:0] addr,
  output logic [31:0] wdata,
  output logic [3:0]  be
);
  always_comb begin
    addr = base + offset;
    case (size)
      SZ_BYTE: begin
        wdata = {4{data[7:0]}};
        be    = 4'b0001 << addr[1:0];
      end
      SZ_HALF: begin
        wdata = {2{data[15:0]}};
        be    = addr[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata = data;
        be    = 4'b1111;
      end
    endcase
  end
endmodule
