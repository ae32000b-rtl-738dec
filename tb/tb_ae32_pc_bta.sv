// Self-checking test of PC tracking and branch resolution: random pops, issue positions,
// branches with random conditions and flags, returns and exception redirects; checks the
// issue PC, the taken decision, the redirect target and its priority.
module tb_ae32_pc_bta;
  import ae32_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] pop_cnt = 0, issue_idx = 0;
  logic [31:0] issue_pc, issue_rpc, grp, id_pc, id_imm, epc, exc_target, redirect_pc, head;
  logic issue_valid = 0, er_pending = 0, id_go = 0, id_branch = 0, id_eret = 0, exc_redirect = 0, br_taken, redirect;
  cond_e id_cond; flags_t flags;
  int checks = 0, failures = 0, ntaken = 0;
  ae32_pc_bta #(.RESET_PC(32'h200)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic ref_cond(cond_e c, flags_t f);
    logic n, z, cc, v;
    {n, z, cc, v} = f;
    case (c)
      CC_AL: return 1; CC_EQ: return z; CC_NE: return !z; CC_CS: return cc; CC_CC: return !cc;
      CC_MI: return n; CC_PL: return !n; CC_VS: return v; CC_VC: return !v;
      CC_HI: return cc & !z; CC_LS: return !cc | z; CC_GE: return n == v; CC_LT: return n != v;
      CC_GT: return !z & (n == v); CC_LE: return z | (n != v); default: return 0;
    endcase
  endfunction

  initial begin
    head = 32'h200; grp = 32'h200;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      logic et; logic [31:0] ept; logic er;
      @(negedge clk);
      pop_cnt = 3'($urandom_range(0, 4)); issue_idx = 3'($urandom_range(0, 3));
      issue_valid = 1'($urandom); er_pending = 1'($urandom);
      id_go = 1'($urandom); id_branch = 1'($urandom); id_cond = cond_e'($urandom); flags = 4'($urandom);
      id_pc = $urandom; id_imm = $urandom; epc = $urandom; exc_target = $urandom;
      id_eret = ($urandom_range(0, 7) == 0); exc_redirect = ($urandom_range(0, 9) == 0);
      #1;
      et = id_go && id_branch && ref_cond(id_cond, flags);
      ntaken += int'(et);
      er = exc_redirect || (id_go && id_eret) || et;
      ept = exc_redirect ? exc_target : (id_go && id_eret) ? epc : id_pc + id_imm;
      checks += 4;
      if (issue_rpc !== (er_pending ? grp : head)) begin failures++; $display("FAIL rpc"); end
      if (issue_pc !== head + 2 * issue_idx) begin failures++; $display("FAIL issue_pc"); end
      if (br_taken !== et) begin failures++; $display("FAIL taken cond %0d", id_cond); end
      if (redirect !== er || (er && redirect_pc !== ept)) begin failures++; $display("FAIL redirect"); end
      if (!er && pop_cnt != 0 && !issue_valid && !er_pending) grp = head;
      head = er ? ept : head + 2 * pop_cnt;
    end
    checks++;
    if (ntaken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
