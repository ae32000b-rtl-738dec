// Self-checking test of the MAC unit: random sequences of signed/unsigned multiply and
// multiply-accumulate, each checked one clock after issue (single-cycle latency), with
// back-to-back accumulation and idle cycles in which MH:ML must hold.
module tb_ae32_mac;
  import ae32_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  mac_op_e op; logic [31:0] a, b, mh, ml;
  logic [63:0] model;
  int checks = 0, failures = 0;
  ae32_mac dut (.clk, .rst_n, .en, .op, .a, .b, .mh, .ml);
  always #5 clk = ~clk;

  function automatic logic [63:0] prod(mac_op_e o, logic [31:0] x, logic [31:0] y);
    logic [63:0] xs, ys;
    if (o == MAC_MUL || o == MAC_MAC) begin
      xs = {{32{x[31]}}, x}; ys = {{32{y[31]}}, y};
    end else begin
      xs = {32'd0, x}; ys = {32'd0, y};
    end
    return xs * ys;
  endfunction

  initial begin
    model = 0; op = MAC_MUL; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      op = mac_op_e'($urandom_range(0, 3));
      a = $urandom; b = $urandom;
      if ($urandom_range(0, 5) == 0) a = 32'h8000_0000;
      if (en) model = (op == MAC_MAC || op == MAC_MACU) ? model + prod(op, a, b) : prod(op, a, b);
      @(posedge clk); #1;
      checks++;
      if ({mh, ml} !== model) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h: %h exp %h", op, a, b, {mh, ml}, model);
      end
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
