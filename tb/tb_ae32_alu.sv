// Self-checking test of the ALU: random operands and carry-in for every operation,
// compared with a 33-bit reference computation, plus directed carry/overflow corners.
module tb_ae32_alu;
  import ae32_pkg::*;
  alu_op_e op; logic [31:0] a, b, y; logic cin, cout, ovf;
  int checks = 0, failures = 0;
  ae32_alu dut (.op, .a, .b, .cin, .y, .cout, .ovf);

  task automatic check(input logic [31:0] ey, input logic ec, input logic ev);
    checks++;
    if (y !== ey || cout !== ec || ovf !== ev) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h cin=%b: y=%h c=%b v=%b exp %h %b %b", op, a, b, cin, y, cout, ovf, ey, ec, ev);
    end
  endtask

  task automatic run(input alu_op_e o, input logic [31:0] x, input logic [31:0] z, input logic ci);
    logic [32:0] s; logic [31:0] ey; logic ec, ev; longint sa, sb, sr;
    op = o; a = x; b = z; cin = ci; #1;
    sa = longint'($signed(x)); sb = longint'($signed(z));
    ec = 0; ev = 0;
    case (o)
      ALU_ADD: begin s = {1'b0,x} + {1'b0,z};        sr = sa + sb; end
      ALU_ADC: begin s = {1'b0,x} + {1'b0,z} + ci;   sr = sa + sb + ci; end
      ALU_SUB: begin s = {1'b0,x} + {1'b0,~z} + 1;   sr = sa - sb; end
      ALU_SBC: begin s = {1'b0,x} + {1'b0,~z} + ci;  sr = sa - sb - 1 + ci; end
      default: begin s = '0; sr = 0; end
    endcase
    case (o)
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      ALU_XOR: ey = x ^ z;
      ALU_MOVB: ey = z;
      default: begin ey = s[31:0]; ec = s[32]; ev = (sr > 64'sd2147483647) || (sr < -64'sd2147483648); end
    endcase
    check(ey, ec, ev);
  endtask

  initial begin
    repeat (4000) run(alu_op_e'($urandom_range(0, 7)), $urandom, $urandom, 1'($urandom));
    run(ALU_ADD, 32'h7fffffff, 32'h1, 0);
    run(ALU_SUB, 32'h80000000, 32'h1, 0);
    run(ALU_SUB, 32'h5, 32'h5, 0);
    run(ALU_ADD, 32'hffffffff, 32'h1, 0);
    run(ALU_SBC, 32'h0, 32'h0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
