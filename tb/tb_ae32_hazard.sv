// Self-checking test of hazard detection: random pipeline situations with register
// numbers from a small set; checks each stall cause and the combined ID stall.
module tb_ae32_hazard;
  logic id_valid, rs1_used, rs2_used, id_is_cp, id_is_mtc, ex_valid, ex_load, ex_rd_wr;
  logic mem_stc, cp_struct;
  logic mem_valid, mem_rd_wr, id_cpbusy, mem_stall;
  logic [3:0] rs1, rs2, ex_rd, mem_rd;
  logic load_use, cp_src, cp_busy, hold_pre, id_stall;
  int checks = 0, failures = 0, n_lu = 0, n_cs = 0, n_cb = 0;
  ae32_hazard dut (.*);

  initial begin
    repeat (6000) begin
      logic elu, ecs, ecb, ehold;
      {id_valid, rs1_used, rs2_used, id_is_cp, ex_valid, ex_load, ex_rd_wr, mem_valid, mem_rd_wr, id_cpbusy} = 10'($urandom);
      id_is_mtc = id_is_cp & 1'($urandom);
      mem_stall = ($urandom_range(0, 7) == 0); mem_stc = ($urandom_range(0, 5) == 0);
      rs1 = 4'($urandom_range(0, 2)); rs2 = 4'($urandom_range(0, 2));
      ex_rd = 4'($urandom_range(0, 2)); mem_rd = 4'($urandom_range(0, 2));
      #1;
      elu = id_valid && ex_valid && ex_load && ex_rd_wr && ((rs1_used && rs1 == ex_rd) || (rs2_used && rs2 == ex_rd));
      ecs = id_valid && id_is_mtc && rs1_used && ((ex_valid && ex_rd_wr && ex_rd == rs1) || (mem_valid && mem_rd_wr && mem_rd == rs1));
      ehold = mem_stall || elu || ecs || (id_valid && id_is_cp && mem_stc);
      ecb = id_valid && id_is_cp && id_cpbusy && !ehold;
      n_lu += int'(elu); n_cs += int'(ecs); n_cb += int'(ecb);
      checks++;
      if (cp_struct !== (id_valid && id_is_cp && mem_stc) || load_use !== elu || cp_src !== ecs || cp_busy !== ecb || hold_pre !== ehold || id_stall !== (ehold || ecb)) begin
        failures++; $display("FAIL %b%b%b%b%b exp %b%b%b", load_use, cp_src, cp_busy, hold_pre, id_stall, elu, ecs, ecb);
      end
    end
    checks++;
    if (n_lu == 0 || n_cs == 0 || n_cb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
