// Self-checking test of the prefetch PC generator: random grants, redirects (to even and
// odd halfwords) and responses with up to two outstanding; checks the fetch address each
// cycle and that every response is tagged with the address and skip flag of its request.
module tb_ae32_prefetch_pc;
  logic clk = 0, rst_n = 0, advance = 0, redirect = 0, resp_valid = 0, resp_skip;
  logic [31:0] redirect_pc, fetch_addr, resp_addr, pc;
  logic skip;
  logic [32:0] q[$];
  int checks = 0, failures = 0;
  ae32_prefetch_pc #(.RESET_PC(32'h40)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    pc = 32'h40; skip = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      checks++;
      if (fetch_addr !== {pc[31:2], 2'b00}) begin failures++; $display("FAIL addr %h exp %h", fetch_addr, pc); end
      resp_valid = (q.size() > 0) && 1'($urandom);
      advance = (q.size() - int'(resp_valid) < 2) && 1'($urandom);
      redirect = ($urandom_range(0, 9) == 0);
      redirect_pc = {$urandom_range(0, 1000), 1'b0};
      #1;
      if (resp_valid) begin
        logic [32:0] t;
        t = q.pop_front();
        checks++;
        if (resp_addr !== {t[32:3], 2'b00} || resp_skip !== t[0]) begin failures++; $display("FAIL tag"); end
      end
      if (advance) q.push_back({pc[31:2], 2'b00, skip});
      if (redirect) begin pc = redirect_pc; skip = redirect_pc[1]; end
      else if (advance) begin pc = {pc[31:2] + 30'd1, 2'b00}; skip = 0; end
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
