// Instruction decoder for a test encoding of the 16-bit instruction set, used only by the
// end-to-end testbench (the real encoding is not part of this RTL). Combinational.
//
//   [15:14]=11        LERI imm14
//   0 rd rs2 op sf    ALU register: rd = rd <op> rs2 (alu_op_e), sf = set flags
//   1 rd imm8         ADDI: rd = rd + sext(imm), sets flags
//   2 rd imm8         MOVI: rd = sext(imm)
//   3 rs imm8         CMPI: flags of rs - sext(imm)
//   4 rd sh amt5 sf   shift rd by amt (shf_op_e)
//   5 rd rs sub       0 LZC rd=lz(rs), 1 LOC, 2 MUL rd*rs, 3 MULU, 4 MAC, 5 MACU,
//                     6 MFMH rd, 7 MFML rd, 8 MOV rd=rs
//   6 rd rb sz off2   load rd from rb+imm; sz 0 byte signed, 1 half signed, 2 word, 3 byte
//   7 rs rb sz off2   store rs to rb+imm
//   8 cond imm8       branch to pc + sext(imm) if cond
//   9 op3 reg idx n   coprocessor: op3 = cp_op_e 1..7, reg = core register, idx = cpidx,
//                     cpno = n; CMD takes imm = bits [8:1]
//   10 0x000 / 0x001  NOP / ERET
module tb_ae32_decoder
  import ae32_pkg::*;
(
  input  logic [15:0] instr,
  output id_ctrl_t    ctrl
);
  logic [3:0] op, f1, f2, f3;

  always_comb begin
    {op, f1, f2, f3} = instr;
    ctrl = '0;
    ctrl.unit = U_NONE;
    ctrl.mem_size = SZ_WORD;
    case (op)
      4'd0: begin
        ctrl.unit = U_ALU; ctrl.rs1 = f1; ctrl.rs2 = f2; ctrl.rd = f1;
        ctrl.rs1_used = 1; ctrl.rs2_used = 1; ctrl.rd_wr = 1;
        ctrl.alu_op = alu_op_e'(f3[3:1]); ctrl.set_flags = f3[0];
      end
      4'd1, 4'd2, 4'd3: begin
        ctrl.unit = U_ALU; ctrl.rs1 = f1; ctrl.rd = f1; ctrl.use_imm = 1;
        ctrl.imm_field = {6'd0, instr[7:0]}; ctrl.imm_len = 4'd8; ctrl.imm_sext = 1;
        ctrl.rs1_used = (op != 4'd2);
        ctrl.rd_wr = (op != 4'd3);
        ctrl.alu_op = (op == 4'd1) ? ALU_ADD : (op == 4'd2) ? ALU_MOVB : ALU_SUB;
        ctrl.set_flags = (op != 4'd2);
      end
      4'd4: begin
        ctrl.unit = U_SHF; ctrl.rs1 = f1; ctrl.rd = f1; ctrl.rs1_used = 1; ctrl.rd_wr = 1;
        ctrl.shf_op = shf_op_e'(instr[7:6]); ctrl.use_imm = 1;
        ctrl.imm_field = {9'd0, instr[5:1]}; ctrl.imm_len = 4'd5; ctrl.set_flags = instr[0];
      end
      4'd5: begin
        ctrl.rd = f1;
        case (f3)
          4'd0, 4'd1: begin ctrl.unit = U_LZC; ctrl.rs1 = f2; ctrl.rs1_used = 1; ctrl.rd_wr = 1; ctrl.lz_ones = f3[0]; end
          4'd2, 4'd3, 4'd4, 4'd5: begin
            ctrl.unit = U_MAC; ctrl.rs1 = f1; ctrl.rs2 = f2; ctrl.rs1_used = 1; ctrl.rs2_used = 1;
            ctrl.mac_op = mac_op_e'(f3 - 4'd2);
          end
          4'd6: begin ctrl.unit = U_MFMH; ctrl.rd_wr = 1; end
          4'd7: begin ctrl.unit = U_MFML; ctrl.rd_wr = 1; end
          4'd8: begin ctrl.unit = U_ALU; ctrl.alu_op = ALU_MOVB; ctrl.rs2 = f2; ctrl.rs2_used = 1; ctrl.rd_wr = 1; end
          default: ;
        endcase
      end
      4'd6, 4'd7: begin
        ctrl.unit = U_MEM; ctrl.rs1 = f2; ctrl.rs1_used = 1;
        ctrl.use_imm = 1; ctrl.imm_field = {12'd0, f3[1:0]}; ctrl.imm_len = 4'd2;
        ctrl.mem_size = (f3[3:2] == 2'd1) ? SZ_HALF : (f3[3:2] == 2'd2) ? SZ_WORD : SZ_BYTE;
        ctrl.mem_sext = (f3[3:2] < 2'd2);
        if (op == 4'd6) begin ctrl.mem_rd = 1; ctrl.rd = f1; ctrl.rd_wr = 1; end
        else begin ctrl.mem_wr = 1; ctrl.rs2 = f1; ctrl.rs2_used = 1; end
      end
      4'd8: begin
        ctrl.branch = 1; ctrl.cond = cond_e'(f1);
        ctrl.imm_field = {6'd0, instr[7:0]}; ctrl.imm_len = 4'd8; ctrl.imm_sext = 1;
      end
      4'd9: begin
        ctrl.cp_op = cp_op_e'({1'b0, instr[11:9]});
        ctrl.cp_idx = instr[4:1]; ctrl.cp_no = {1'b0, instr[0]};
        ctrl.imm_field = {6'd0, instr[8:1]}; ctrl.imm_len = 4'd8;
        case (ctrl.cp_op)
          CP_MTC: begin ctrl.rs1 = instr[8:5]; ctrl.rs1_used = 1; end
          CP_MFC: begin ctrl.rd = instr[8:5]; ctrl.rd_wr = 1; ctrl.unit = U_CP; end
          CP_LDC, CP_STC: begin
            ctrl.rs1 = instr[8:5]; ctrl.rs1_used = 1; ctrl.use_imm = 1;
            ctrl.imm_field = '0; ctrl.imm_len = 4'd1;
          end
          default: ;
        endcase
      end
      4'd10: ctrl.eret = (instr[11:0] == 12'd1);
      default: ;
    endcase
  end
endmodule
