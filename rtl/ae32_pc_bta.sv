// PC tracking, branch-target generation and branch resolution.
//
// The queue does not store addresses, so this block keeps the address of the queue head:
// it grows by two bytes per popped entry and is reloaded on every redirect. The PC of the
// instruction the folding unit issues is the head address plus two bytes per entry in front
// of it in the window. For the instruction in ID the block forms the branch target
// (PC + immediate) and evaluates the branch condition against the flags, which the caller
// forwards from EX. A taken branch, an exception or a return produce one redirect; the
// exception has priority, then return, then branch. Because LERIs are folded into the
// instruction that follows them, an instruction cancelled by an exception must be fetched
// again from its first LERI: issue_rpc gives that restart address.
//
// Combinational outputs; the head address is a register. Branch resolution in ID follows
// the placement in the source design; the condition set and target rule are this
// implementation's.
module ae32_pc_bta
  import ae32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  pop_cnt,
  input  logic [2:0]  issue_idx,
  output logic [31:0] issue_pc,
  output logic [31:0] issue_rpc,    // restart address: first LERI of its group
  input  logic        issue_valid,
  input  logic        er_pending,
  // branch in ID
  input  logic        id_go,        // ID instruction valid and not stalled
  input  logic        id_branch,
  input  cond_e       id_cond,
  input  logic [31:0] id_pc,
  input  logic [31:0] id_imm,
  input  flags_t      flags,
  input  logic        id_eret,
  input  logic [31:0] epc,
  // exception
  input  logic        exc_redirect,
  input  logic [31:0] exc_target,
  output logic        br_taken,
  output logic        redirect,
  output logic [31:0] redirect_pc
);
  logic [31:0] head_q;
  logic [31:0] grp_q;
  logic [31:0] bta;

  assign issue_pc = head_q + {28'd0, issue_idx, 1'b0};
  assign issue_rpc = er_pending ? grp_q : head_q;
  assign bta      = id_pc + id_imm;
  assign br_taken = id_go && id_branch && cond_ok(id_cond, flags);

  always_comb begin
    redirect    = 1'b1;
    if (exc_redirect)             redirect_pc = exc_target;
    else if (id_go && id_eret)    redirect_pc = epc;
    else if (br_taken)            redirect_pc = bta;
    else begin
      redirect    = 1'b0;
      redirect_pc = bta;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        head_q <= RESET_PC;
    else if (redirect) head_q <= redirect_pc;
    else               head_q <= head_q + {28'd0, pop_cnt, 1'b0};
  end

  // Address of the first LERI absorbed ahead of the next instruction.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) grp_q <= RESET_PC;
    else if (!redirect && pop_cnt != 3'd0 && !issue_valid && !er_pending) grp_q <= head_q;
  end
endmodule
