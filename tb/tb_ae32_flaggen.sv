// Self-checking test of the flag generator: for random results, carries and old flags it
// checks which flags each unit may change, that GETCn writes only Z, and that
// set_flags = 0 keeps the flags.
module tb_ae32_flaggen;
  import ae32_pkg::*;
  logic set_flags, getc, cp_status, alu_c, alu_v, shf_c; unit_e unit;
  logic [31:0] result; flags_t old_flags, new_flags, e;
  int checks = 0, failures = 0;
  ae32_flaggen dut (.*);

  initial begin
    repeat (5000) begin
      set_flags = 1'($urandom); getc = ($urandom_range(0, 5) == 0); cp_status = 1'($urandom);
      alu_c = 1'($urandom); alu_v = 1'($urandom); shf_c = 1'($urandom);
      unit = unit_e'($urandom_range(0, 8));
      result = ($urandom_range(0, 3) == 0) ? 32'd0 : $urandom;
      old_flags = 4'($urandom);
      #1;
      e = old_flags;
      if (getc) e.z = cp_status;
      else if (set_flags && unit == U_ALU) e = {result[31], result == 0, alu_c, alu_v};
      else if (set_flags && unit == U_SHF) e = {result[31], result == 0, shf_c, old_flags.v};
      else if (set_flags && unit == U_LZC) e.z = (result == 0);
      checks++;
      if (new_flags !== e) begin
        failures++;
        $display("FAIL unit=%0d set=%b getc=%b: %b exp %b", unit, set_flags, getc, new_flags, e);
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
