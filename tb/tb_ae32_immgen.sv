// Self-checking test of the immediate generator: random fields and lengths, with and
// without a pending extension-register value, against shift/extend arithmetic.
module tb_ae32_immgen;
  logic [13:0] imm_field; logic [3:0] imm_len; logic imm_sext; logic [31:0] er, imm; logic er_valid;
  int checks = 0, failures = 0;
  ae32_immgen dut (.*);

  initial begin
    repeat (5000) begin
      longint f, e; int n;
      imm_field = 14'($urandom); imm_len = 4'($urandom_range(1, 14)); imm_sext = 1'($urandom);
      er = $urandom; er_valid = 1'($urandom);
      #1;
      n = imm_len;
      f = imm_field % (64'd1 << n);
      if (er_valid) e = ((longint'(er) << n) + f) % (64'd1 << 32);
      else if (imm_sext && f >= (64'd1 << (n - 1))) e = (f - (64'd1 << n)) % (64'd1 << 32) + (64'd1 << 32);
      else e = f;
      checks++;
      if (imm !== 32'(e)) begin failures++; $display("FAIL f=%h len=%0d s=%b er=%h/%b: %h exp %h", imm_field, n, imm_sext, er, er_valid, imm, 32'(e)); end
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
