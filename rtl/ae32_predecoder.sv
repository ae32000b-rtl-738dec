// Predecoder.
//
// Turns one returned 32-bit instruction word into two instruction-queue entries
// (lower address in bits [15:0]). Each entry gets its valid bit, an isLERI bit that marks
// LERI instructions by their 2-bit major opcode, and the int_info bits recorded during the
// access: ibrkpt from the OSI breaker (per halfword), iberr from the instruction bus and
// iint from CP0. Purely combinational, used in the cycle the word returns.
//
// The entry layout follows the source design; the LERI opcode value is in ae32_pkg.
module ae32_predecoder
  import ae32_pkg::*;
(
  input  logic        word_valid,
  input  logic [31:0] word,
  input  logic        skip_lo,   // drop the lower instruction (redirect to odd halfword)
  input  logic [1:0]  ibrk,      // breakpoint hit per halfword
  input  logic        iberr,
  input  logic        iint,
  output iq_entry_t   entry [2]
);
  always_comb begin
    for (int i = 0; i < 2; i++) begin
      entry[i].instr           = word[16*i +: 16];
      entry[i].is_leri         = (word[16*i+14 +: 2] == LERI_OPC);
      entry[i].int_info.ibrkpt = ibrk[i];
      entry[i].int_info.iberr  = iberr;
      entry[i].int_info.iint   = iint;
      entry[i].valid           = word_valid && !(i == 0 && skip_lo);
    end
  end
endmodule
