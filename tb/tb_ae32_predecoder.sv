// Self-checking test of the predecoder: random words, skip flags and exception bits; checks
// the 21-bit entry of each halfword, the isLERI marking and the dropped lower halfword.
module tb_ae32_predecoder;
  import ae32_pkg::*;
  logic word_valid, skip_lo, iberr, iint; logic [31:0] word; logic [1:0] ibrk;
  iq_entry_t entry [2];
  int checks = 0, failures = 0;
  ae32_predecoder dut (.*);

  initial begin
    repeat (5000) begin
      word_valid = 1'($urandom); word = $urandom; skip_lo = 1'($urandom);
      ibrk = 2'($urandom); iberr = ($urandom_range(0, 7) == 0); iint = ($urandom_range(0, 7) == 0);
      #1;
      for (int i = 0; i < 2; i++) begin
        logic [20:0] e;
        e = {word_valid && !(i == 0 && skip_lo), word[16*i+14 +: 2] == 2'b11, ibrk[i], iberr, iint, word[16*i +: 16]};
        checks++;
        if (entry[i] !== e) begin failures++; $display("FAIL slot %0d: %h exp %h", i, entry[i], e); end
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
