// Self-checking test of the barrel shifter: random operands and amounts for all four
// operations against a bit-by-bit reference that shifts one position at a time.
module tb_ae32_shifter;
  import ae32_pkg::*;
  shf_op_e op; logic [31:0] a, y; logic [4:0] amt; logic cout;
  int checks = 0, failures = 0;
  ae32_shifter dut (.op, .a, .amt, .y, .cout);

  task automatic run(input shf_op_e o, input logic [31:0] x, input logic [4:0] n);
    logic [31:0] r; logic c;
    op = o; a = x; amt = n; #1;
    r = x; c = 0;
    for (int i = 0; i < n; i++) begin
      case (o)
        SH_LSL: begin c = r[31]; r = {r[30:0], 1'b0}; end
        SH_LSR: begin c = r[0];  r = {1'b0, r[31:1]}; end
        SH_ASR: begin c = r[0];  r = {r[31], r[31:1]}; end
        default: begin c = r[0]; r = {r[0], r[31:1]}; end
      endcase
    end
    checks++;
    if (y !== r || cout !== c) begin
      failures++;
      $display("FAIL op=%0d a=%h n=%0d: y=%h c=%b exp %h %b", o, x, n, y, cout, r, c);
    end
  endtask

  initial begin
    repeat (4000) run(shf_op_e'($urandom_range(0, 3)), $urandom, 5'($urandom));
    for (int n = 0; n < 32; n++) run(SH_ASR, 32'h8000_0001, 5'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
