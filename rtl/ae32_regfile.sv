// General register file: sixteen 32-bit registers.
//
// Two read ports feed the ID-stage operand fetcher and a third lets the on-silicon ICE
// debugger read any register. One write port is driven by write-back. Reads are
// combinational; a write in the same cycle as a read of that register is bypassed to the
// read port, so an instruction in ID sees the value being written back. Registers are not
// reset.
//
// Sixteen registers follow the source architecture; the port count is this
// implementation's choice.
module ae32_regfile #(
  parameter int unsigned NREG = 16,
  parameter int unsigned XLEN = 32,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic            clk,
  input  logic [AW-1:0]   ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [AW-1:0]   ra2,
  output logic [XLEN-1:0] rd2,
  input  logic [AW-1:0]   ra_dbg,
  output logic [XLEN-1:0] rd_dbg,
  input  logic            we,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (we) regs[wa] <= wd;
  end

  assign rd1    = (we && wa == ra1) ? wd : regs[ra1];
  assign rd2    = (we && wa == ra2) ? wd : regs[ra2];
  assign rd_dbg = regs[ra_dbg];
endmodule
