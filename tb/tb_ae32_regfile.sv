// Self-checking test of the register file: random writes and reads on all ports against
// an array model, including the same-cycle write-to-read bypass.
module tb_ae32_regfile;
  logic clk = 0; logic [3:0] ra1, ra2, ra_dbg, wa; logic [31:0] rd1, rd2, rd_dbg, wd; logic we;
  logic [31:0] model [16];
  int checks = 0, failures = 0;
  ae32_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 1;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); wa = 4'(i); wd = $urandom; model[i] = wd;
    end
    repeat (3000) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = $urandom;
      ra1 = 4'($urandom); ra2 = ($urandom_range(0, 3) == 0) ? wa : 4'($urandom); ra_dbg = 4'($urandom);
      #1;
      checks += 3;
      if (rd1 !== ((we && wa == ra1) ? wd : model[ra1])) begin failures++; $display("FAIL rd1"); end
      if (rd2 !== ((we && wa == ra2) ? wd : model[ra2])) begin failures++; $display("FAIL rd2"); end
      if (rd_dbg !== model[ra_dbg]) begin failures++; $display("FAIL dbg"); end
      if (we) model[wa] = wd;
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
