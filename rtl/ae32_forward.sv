// Forwarding unit for one EX operand.
//
// The register value read in ID may be stale if one of the two instructions ahead of the
// one in EX writes that register. The youngest writer wins: the EX/MEM result (ALUOUT) if
// the instruction in MEM writes the register and is not a load, else the MEM/WB value
// being written back, else the value read in ID. Loads in MEM are not forwarded: hazard
// detection holds the dependent instruction in ID instead. Combinational; instantiate
// once per operand.
//
// A forwarding unit in front of the EX units follows the source design; sources and
// priorities are this implementation's.
module ae32_forward #(
  parameter int unsigned XLEN = 32
) (
  input  logic [3:0]      rs,
  input  logic [XLEN-1:0] id_val,
  input  logic            mem_fwd,    // MEM instruction writes rd with ALUOUT
  input  logic [3:0]      mem_rd,
  input  logic [XLEN-1:0] mem_val,
  input  logic            wb_we,
  input  logic [3:0]      wb_rd,
  input  logic [XLEN-1:0] wb_val,
  output logic [XLEN-1:0] val,
  output logic            hit         // a forward was used
);
  always_comb begin
    hit = 1'b1;
    if (mem_fwd && mem_rd == rs)   val = mem_val;
    else if (wb_we && wb_rd == rs) val = wb_val;
    else begin
      val = id_val;
      hit = 1'b0;
    end
  end
endmodule
