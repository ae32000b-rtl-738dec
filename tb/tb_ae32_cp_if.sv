// Self-checking test of the coprocessor interface: random ID operations, presence, kills,
// busy and interrupt pins and MEM operations; checks cpctrl/cpidx/cpno/cpin, the take
// condition, the EXECn exception, the abort code, mem_cpacc and the MEM hold on mem_cpbusy.
module tb_ae32_cp_if;
  import ae32_pkg::*;
  logic present, kill, abort, mem_valid, id_cpbusy, cpint, cpactive, mem_cpbusy;
  cp_op_e id_op, mem_op; logic [1:0] id_no, cpno; logic [3:0] id_idx, cpctrl, cpidx;
  logic [31:0] id_imm, id_rs_val, cp_data, cpin, cpout;
  logic cp_taken, exec_exc, mem_hold, mem_stc, mem_cpacc;
  int checks = 0, failures = 0;
  ae32_cp_if dut (.*);

  function automatic cp_op_e rnd_op();
    int r = $urandom_range(0, 8);
    return (r == 8) ? CP_NONE : cp_op_e'(r);
  endfunction

  initial begin
    repeat (6000) begin
      logic drive; logic [3:0] ectrl; logic acc;
      {present, kill, abort, mem_valid, id_cpbusy, cpint, cpactive, mem_cpbusy} = 8'($urandom);
      id_op = rnd_op(); mem_op = rnd_op(); id_no = 2'($urandom); id_idx = 4'($urandom);
      id_imm = $urandom; id_rs_val = $urandom; cpout = $urandom;
      #1;
      drive = present && !kill && id_op != CP_NONE;
      ectrl = drive ? 4'(id_op) : (abort && cpactive) ? 4'hF : 4'h0;
      acc = mem_valid && (mem_op == CP_LDC || mem_op == CP_STC);
      checks += 4;
      if (cpctrl !== ectrl || cpno !== id_no || cpidx !== id_idx) begin failures++; $display("FAIL ctrl %h exp %h", cpctrl, ectrl); end
      if (drive && cpin !== ((id_op == CP_CMD) ? id_imm : id_rs_val)) begin failures++; $display("FAIL cpin"); end
      if (cp_taken !== (drive && !id_cpbusy) || exec_exc !== (present && id_op == CP_EXEC && !id_cpbusy && cpint)) begin failures++; $display("FAIL take/exec"); end
      if (mem_cpacc !== acc || mem_hold !== (acc && mem_cpbusy) || mem_stc !== (mem_valid && mem_op == CP_STC) || cp_data !== cpout) begin failures++; $display("FAIL mem"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
