// Self-checking test of the leading zero/one counter over random operands with a random
// number of leading equal bits, including all-zero and all-one operands.
module tb_ae32_lzoc;
  logic [31:0] a; logic ones; logic [5:0] count;
  int checks = 0, failures = 0;
  ae32_lzoc dut (.a, .ones, .count);

  task automatic run(input logic [31:0] x, input logic o);
    int e;
    a = x; ones = o; #1;
    e = 0;
    while (e < 32 && x[31 - e] == o) e++;
    checks++;
    if (count !== 6'(e)) begin
      failures++;
      $display("FAIL a=%h ones=%b: %0d exp %0d", x, o, count, e);
    end
  endtask

  initial begin
    repeat (3000) run($urandom >> $urandom_range(0, 31), 1'b0);
    repeat (3000) run(~($urandom >> $urandom_range(0, 31)), 1'b1);
    run(32'h0, 1'b0); run(32'hffffffff, 1'b1); run(32'h0, 1'b1); run(32'hffffffff, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
