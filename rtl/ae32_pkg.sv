// Shared types and constants of the AE32000B-style embedded core.
//
// The core runs a 16-bit fixed-length instruction set on a 32-bit datapath with sixteen
// general registers. Wide immediates are built by LERI (load extension register)
// instructions: a 2-bit opcode and a 14-bit immediate that is shifted into an extension
// register and consumed by the next non-LERI instruction.
//
// What follows the source architecture: 32-bit data, 16 registers, 16-bit instructions,
// the LERI format (2-bit opcode, 14-bit immediate), the 21-bit instruction-queue entry
// (valid, isLERI, int_info[2:0] = {ibrkpt, iberr, iint}, instruction[15:0]), the eight-entry
// queue, the 4-entry folding window, the eight breakpoint/watchpoint slots and the
// coprocessor signal set. Everything else here is this implementation's choice: the value of
// the LERI opcode, the condition-code set, the cpctrl encoding, the decoded control bundle
// handed over by the instruction decoder, and the exception causes and vectors.
package ae32_pkg;

  localparam int unsigned XLEN     = 32;
  localparam int unsigned NREG     = 16;
  localparam int unsigned ILEN     = 16;
  localparam int unsigned LERI_IMM = 14;
  // The 2-bit major opcode that marks a LERI instruction (bits [15:14]).
  localparam logic [1:0]  LERI_OPC = 2'b11;

  // int_info field of a queue entry: exceptions seen while the instruction was fetched.
  typedef struct packed {
    logic ibrkpt;  // instruction breakpoint hit on this address
    logic iberr;   // bus error on the instruction bus
    logic iint;    // CP0 exception during the instruction access
  } int_info_t;

  // One instruction-queue entry, bits [20:0].
  typedef struct packed {
    logic             valid;     // [20]
    logic             is_leri;   // [19]
    int_info_t        int_info;  // [18:16]
    logic [ILEN-1:0]  instr;     // [15:0]
  } iq_entry_t;

  typedef struct packed {
    logic n, z, c, v;
  } flags_t;

  typedef enum logic [3:0] {
    U_NONE, U_ALU, U_SHF, U_LZC, U_MAC, U_MFMH, U_MFML, U_MEM, U_CP
  } unit_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_ADC, ALU_SUB, ALU_SBC, ALU_AND, ALU_OR, ALU_XOR, ALU_MOVB
  } alu_op_e;

  typedef enum logic [1:0] { SH_LSL, SH_LSR, SH_ASR, SH_ROR } shf_op_e;

  typedef enum logic [1:0] { MAC_MUL, MAC_MULU, MAC_MAC, MAC_MACU } mac_op_e;

  typedef enum logic [1:0] { SZ_BYTE, SZ_HALF, SZ_WORD } msize_e;

  // Operation code on cpctrl[3:0].
  typedef enum logic [3:0] {
    CP_NONE  = 4'd0,
    CP_CMD   = 4'd1,  // CPCMDn: 32-bit command word on cpin
    CP_MTC   = 4'd2,  // core register -> coprocessor register cpidx (value on cpin)
    CP_MFC   = 4'd3,  // coprocessor register cpidx -> core register (value on cpout)
    CP_LDC   = 4'd4,  // LDCn: memory -> coprocessor register cpidx
    CP_STC   = 4'd5,  // STCn: coprocessor register cpidx -> memory
    CP_GETC  = 4'd6,  // GETCn: status bit -> zero flag
    CP_EXEC  = 4'd7,  // EXECn: raise a coprocessor exception if the coprocessor requests one
    CP_ABORT = 4'd15  // abort the running coprocessor operation
  } cp_op_e;

  typedef enum logic [3:0] {
    CC_AL, CC_EQ, CC_NE, CC_CS, CC_CC, CC_MI, CC_PL, CC_VS,
    CC_VC, CC_HI, CC_LS, CC_GE, CC_LT, CC_GT, CC_LE, CC_NV
  } cond_e;

  typedef enum logic [2:0] {
    EXC_NONE, EXC_DBRK, EXC_IBRK, EXC_IBERR, EXC_IINT, EXC_CP, EXC_IRQ
  } exc_e;

  // Decoded control of the instruction in ID, produced by the instruction decoder.
  typedef struct packed {
    logic              rs1_used;
    logic              rs2_used;
    logic              rd_wr;
    logic [3:0]        rs1;
    logic [3:0]        rs2;
    logic [3:0]        rd;
    unit_e             unit;
    alu_op_e           alu_op;
    shf_op_e           shf_op;
    logic              lz_ones;    // leading-one count instead of leading-zero count
    mac_op_e           mac_op;
    logic              use_imm;    // operand B is the generated immediate
    logic              set_flags;
    logic [13:0]       imm_field;  // immediate bits of the instruction itself
    logic [3:0]        imm_len;    // how many of them are used (1..14)
    logic              imm_sext;   // sign-extend a non-extended immediate
    logic              mem_rd;
    logic              mem_wr;
    msize_e            mem_size;
    logic              mem_sext;
    logic              branch;
    cond_e             cond;
    logic              eret;       // return from exception to EPC
    cp_op_e            cp_op;
    logic [1:0]        cp_no;
    logic [3:0]        cp_idx;
  } id_ctrl_t;

  function automatic logic cond_ok(cond_e c, flags_t f);
    case (c)
      CC_AL: return 1'b1;
      CC_EQ: return f.z;
      CC_NE: return !f.z;
      CC_CS: return f.c;
      CC_CC: return !f.c;
      CC_MI: return f.n;
      CC_PL: return !f.n;
      CC_VS: return f.v;
      CC_VC: return !f.v;
      CC_HI: return f.c && !f.z;
      CC_LS: return !f.c || f.z;
      CC_GE: return f.n == f.v;
      CC_LT: return f.n != f.v;
      CC_GT: return !f.z && (f.n == f.v);
      CC_LE: return f.z || (f.n != f.v);
      default: return 1'b0;
    endcase
  endfunction

endpackage
