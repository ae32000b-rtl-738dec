// Self-checking test of write-back control: random MEM-stage inputs; one clock later the
// MEM/WB register must hold the chosen value and a write enable that is dropped while
// MEM is held.
module tb_ae32_wb_ctrl;
  logic clk = 0, rst_n = 0, mem_stall, mem_valid, mem_rd_wr, mem_load, wb_we;
  logic [3:0] mem_rd, wb_rd; logic [31:0] aluout, load_data, wb_data;
  int checks = 0, failures = 0;
  ae32_wb_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    {mem_stall, mem_valid, mem_rd_wr, mem_load} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      logic ewe; logic [31:0] ed; logic [3:0] erd;
      @(negedge clk);
      {mem_stall, mem_valid, mem_rd_wr, mem_load} = 4'($urandom);
      mem_rd = 4'($urandom); aluout = $urandom; load_data = $urandom;
      ewe = mem_valid && mem_rd_wr && !mem_stall; ed = mem_load ? load_data : aluout; erd = mem_rd;
      @(posedge clk); #1;
      checks++;
      if (wb_we !== ewe || (ewe && (wb_data !== ed || wb_rd !== erd))) begin failures++; $display("FAIL wb"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
