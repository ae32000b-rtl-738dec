// Self-checking test of the OSI breaker: programs all eight slots with random kinds and
// addresses from a small range, then checks fetch and data matches against a model of the
// slots for random fetch words and accesses, reprogramming slots along the way.
module tb_ae32_osi_brk;
  logic clk = 0, rst_n = 0, cfg_we = 0, mem_acc, mem_we, dbrk;
  logic [2:0] cfg_idx, cfg_kind; logic [31:0] cfg_addr, if_addr, mem_addr; logic [1:0] ibrk;
  logic [31:0] ma [8]; logic [2:0] mk [8];
  int checks = 0, failures = 0, hits = 0;
  ae32_osi_brk dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 8; i++) begin ma[i] = 0; mk[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      logic [1:0] ei; logic ed;
      @(negedge clk);
      cfg_we = ($urandom_range(0, 3) == 0); cfg_idx = 3'($urandom); cfg_kind = 3'($urandom_range(0, 4));
      cfg_addr = 32'($urandom_range(0, 31)) * 2;
      if_addr = 32'($urandom_range(0, 15)) * 4;
      mem_acc = 1'($urandom); mem_we = 1'($urandom); mem_addr = 32'($urandom_range(0, 63));
      #1;
      ei = 0; ed = 0;
      for (int i = 0; i < 8; i++) begin
        if (mk[i] == 1 && ma[i] == if_addr) ei[0] = 1;
        if (mk[i] == 1 && ma[i] == if_addr + 2) ei[1] = 1;
        if (mem_acc && ma[i] == mem_addr && (mk[i] == 4 || (mk[i] == 2 && !mem_we) || (mk[i] == 3 && mem_we))) ed = 1;
      end
      hits += int'(ed) + int'(|ei);
      checks++;
      if (ibrk !== ei || dbrk !== ed) begin failures++; $display("FAIL ibrk %b dbrk %b exp %b %b", ibrk, dbrk, ei, ed); end
      if (cfg_we) begin ma[cfg_idx] = cfg_addr; mk[cfg_idx] = cfg_kind; end
    end
    checks++;
    if (hits < 50) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
