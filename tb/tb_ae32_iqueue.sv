// Self-checking test of the instruction queue: a memory model answers granted requests
// after a random delay; random pops and flushes. The queue contents are compared with a
// reference list (in order, nothing lost, nothing duplicated, words in flight at a flush
// dropped), and the fill level never exceeds eight.
module tb_ae32_iqueue;
  import ae32_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, fetch_req, fetch_gnt = 0, resp_valid = 0;
  iq_entry_t resp_entry [2], head [4];
  logic [2:0] pop_cnt = 0;
  logic [3:0] count;
  iq_entry_t model[$];
  int inflight = 0, drop = 0, seq = 0, maxcnt = 0;
  int checks = 0, failures = 0;
  ae32_iqueue dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) begin
      @(negedge clk);
      // compare head with model
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (i < model.size()) begin
          if (!head[i].valid || head[i].instr !== model[i].instr) begin failures++; $display("FAIL head %0d", i); end
        end else if (head[i].valid) begin failures++; $display("FAIL head %0d valid", i); end
      end
      checks++;
      if (int'(count) != model.size()) begin failures++; $display("FAIL count %0d exp %0d", count, model.size()); end
      if (count > maxcnt) maxcnt = count;
      flush = ($urandom_range(0, 30) == 0);
      fetch_gnt = 1'($urandom);
      resp_valid = (inflight > 0) && ($urandom_range(0, 2) != 0);
      for (int i = 0; i < 2; i++) begin
        resp_entry[i] = '0;
        resp_entry[i].valid = ($urandom_range(0, 5) != 0);
        resp_entry[i].instr = 16'(seq + i);
      end
      pop_cnt = 3'($urandom_range(0, (model.size() < 4) ? model.size() : 4));
      #1;
      if (flush) begin
        model.delete();
        if (resp_valid) inflight--;
        drop = inflight;
      end else begin
        if (resp_valid) begin
          inflight--;
          if (drop > 0) drop--;
          else for (int i = 0; i < 2; i++) if (resp_entry[i].valid) model.push_back(resp_entry[i]);
        end
        repeat (pop_cnt) void'(model.pop_front());
      end
      if (fetch_req && fetch_gnt) inflight++;
      seq += 2;
    end
    checks++;
    if (maxcnt < 6) begin failures++; $display("FAIL queue never filled (%0d)", maxcnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
