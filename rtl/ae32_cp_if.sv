// Coprocessor interface.
//
// The coprocessor is passive: the core fetches coprocessor instructions and hands them over.
// In ID, when the instruction there may proceed apart from the coprocessor (present), the
// interface drives cpctrl with the operation, cpno with the coprocessor number, cpidx with
// the coprocessor register and cpin with the data: the 32-bit command word of CPCMDn (the
// immediate, widened by LERI) or the core register sent by MTC. The operation is taken by
// the coprocessor in the first cycle where id_cpbusy is low; until then ID is stalled
// (cp_stall). MFC and GETCn read cpout in that cycle. EXECn raises a coprocessor exception
// if the coprocessor requests one on cpint. LDCn/STCn are announced in ID like any other
// operation; in MEM the core asserts mem_cpacc, drives the data bus, and holds MEM while
// the coprocessor answers mem_cpbusy. For STCn the store data is taken from cpout. When a
// higher-priority exception is taken while the coprocessor runs (cpactive), cpctrl carries
// CP_ABORT for one cycle.
//
// Signal names and widths, the ID-stage command hand-over, id_cpbusy, mem_cpacc/mem_cpbusy,
// GETCn/EXECn and cpactive follow the source design; the cpctrl codes, the use of cpin for
// MTC data, the STCn data path and the abort code are this implementation's choices.
module ae32_cp_if
  import ae32_pkg::*;
(
  // ID stage
  input  logic        present,     // ID valid and no non-coprocessor stall
  input  logic        kill,        // ID instruction is being cancelled by an exception
  input  cp_op_e      id_op,
  input  logic [1:0]  id_no,
  input  logic [3:0]  id_idx,
  input  logic [31:0] id_imm,
  input  logic [31:0] id_rs_val,
  output logic        cp_taken,    // the coprocessor accepts the ID operation this cycle
  output logic        exec_exc,
  output logic [31:0] cp_data,     // cpout captured for MFC / GETCn
  input  logic        abort,
  // MEM stage
  input  logic        mem_valid,
  input  cp_op_e      mem_op,
  output logic        mem_hold,
  output logic        mem_stc,
  // coprocessor pins
  output logic [3:0]  cpctrl,
  output logic [3:0]  cpidx,
  output logic [1:0]  cpno,
  output logic [31:0] cpin,
  input  logic        id_cpbusy,
  input  logic        cpint,
  input  logic        cpactive,
  input  logic [31:0] cpout,
  output logic        mem_cpacc,
  input  logic        mem_cpbusy
);
  logic drive;

  always_comb begin
    drive    = present && !kill && (id_op != CP_NONE);
    cpctrl   = drive ? id_op : (abort && cpactive ? CP_ABORT : CP_NONE);
    cpno     = id_no;
    cpidx    = id_idx;
    cpin     = (id_op == CP_CMD) ? id_imm : id_rs_val;
    cp_taken = drive && !id_cpbusy;
    exec_exc = present && (id_op == CP_EXEC) && !id_cpbusy && cpint;
    cp_data  = cpout;
    mem_cpacc = mem_valid && (mem_op == CP_LDC || mem_op == CP_STC);
    mem_hold  = mem_cpacc && mem_cpbusy;
    mem_stc   = mem_valid && (mem_op == CP_STC);
  end
endmodule
