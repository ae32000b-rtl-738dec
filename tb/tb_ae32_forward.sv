// Self-checking test of one forwarding unit: random register numbers chosen from a small
// set so that matches are frequent; checks the MEM-over-WB-over-ID priority.
module tb_ae32_forward;
  logic [3:0] rs, mem_rd, wb_rd; logic [31:0] id_val, mem_val, wb_val, val; logic mem_fwd, wb_we, hit;
  int checks = 0, failures = 0;
  ae32_forward dut (.*);

  initial begin
    repeat (5000) begin
      logic [31:0] e;
      rs = 4'($urandom_range(0, 2)); mem_rd = 4'($urandom_range(0, 2)); wb_rd = 4'($urandom_range(0, 2));
      id_val = $urandom; mem_val = $urandom; wb_val = $urandom; mem_fwd = 1'($urandom); wb_we = 1'($urandom);
      #1;
      e = (mem_fwd && mem_rd == rs) ? mem_val : (wb_we && wb_rd == rs) ? wb_val : id_val;
      checks++;
      if (val !== e || hit !== ((mem_fwd && mem_rd == rs) || (wb_we && wb_rd == rs))) begin
        failures++; $display("FAIL rs=%0d", rs);
      end
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
