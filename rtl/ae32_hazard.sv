// Hazard detection (ID stage).
//
// Decides whether the instruction in ID must wait. Causes:
//  - load-use: the instruction in EX is a load whose destination ID reads (the data
//    arrives only at the end of MEM and is forwarded from MEM/WB one cycle later);
//  - coprocessor source: an MTC instruction sends a register to the coprocessor straight
//    from the register file in ID, so it waits while an instruction in EX or MEM still
//    has to write that register;
//  - coprocessor structure: while an STCn in MEM uses cpout for its store data, no
//    coprocessor operation is presented in ID;
//  - id_cpbusy: the coprocessor holds a coprocessor instruction in ID;
//  - a held MEM stage (memory wait or mem_cpbusy) freezes the whole pipeline.
// hold_pre is every cause except id_cpbusy; the coprocessor interface uses it to decide
// when it may present an operation. Combinational.
//
// Stalling on id_cpbusy follows the source design; the other rules follow from this
// implementation's pipeline timing.
module ae32_hazard (
  input  logic       id_valid,
  input  logic       rs1_used,
  input  logic       rs2_used,
  input  logic [3:0] rs1,
  input  logic [3:0] rs2,
  input  logic       id_is_cp,
  input  logic       id_is_mtc,
  input  logic       ex_valid,
  input  logic       ex_load,
  input  logic       ex_rd_wr,
  input  logic [3:0] ex_rd,
  input  logic       mem_valid,
  input  logic       mem_rd_wr,
  input  logic       mem_stc,
  input  logic [3:0] mem_rd,
  input  logic       id_cpbusy,
  input  logic       mem_stall,
  output logic       load_use,
  output logic       cp_src,
  output logic       cp_struct,
  output logic       cp_busy,
  output logic       hold_pre,
  output logic       id_stall
);
  logic reads_ex;

  always_comb begin
    reads_ex = ex_valid && ex_rd_wr &&
               ((rs1_used && rs1 == ex_rd) || (rs2_used && rs2 == ex_rd));
    load_use = id_valid && ex_load && reads_ex;
    cp_src   = id_valid && id_is_mtc && rs1_used &&
               ((ex_valid && ex_rd_wr && ex_rd == rs1) ||
                (mem_valid && mem_rd_wr && mem_rd == rs1));
    cp_struct = id_valid && id_is_cp && mem_stc;
    hold_pre = mem_stall || load_use || cp_src || cp_struct;
    cp_busy  = id_valid && id_is_cp && id_cpbusy && !hold_pre;
    id_stall = hold_pre || cp_busy;
  end
endmodule
