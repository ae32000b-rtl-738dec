// Self-checking test of the LERI folding unit. A reference stream of instructions (about
// a third LERIs, some with fetch-exception bits) is shown through a four-entry window with
// a random number of valid entries; ID accepts at random. A reference model rebuilds each
// extension-register value from the LERIs that preceded each issued instruction and checks
// instruction, int_info, extension value, issue position, pop count and folded count.
module tb_ae32_leri_fold;
  import ae32_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, id_ready = 0;
  iq_entry_t head [4];
  logic [2:0] pop_cnt, issue_idx, folded;
  logic issue_valid, issue_er_valid, er_pending;
  logic [15:0] issue_instr; int_info_t issue_int_info; logic [31:0] issue_er;
  iq_entry_t stream [$];
  logic [31:0] m_er; logic m_erv;
  int checks = 0, failures = 0, issued = 0, nfold = 0, nleri = 0;
  ae32_leri_fold dut (.*);
  always #5 clk = ~clk;

  function automatic iq_entry_t rnd_entry();
    iq_entry_t e;
    e = '0; e.valid = 1;
    e.instr = 16'($urandom);
    e.is_leri = ($urandom_range(0, 2) == 0);
    if (e.is_leri) e.instr[15:14] = 2'b11; else e.instr[15:14] = 2'($urandom_range(0, 2));
    if ($urandom_range(0, 40) == 0) e.int_info = 3'($urandom_range(1, 7));
    return e;
  endfunction

  initial begin
    m_er = 0; m_erv = 0;
    repeat (400) stream.push_back(rnd_entry());
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (stream.size() > 0) begin
      int nv, k; logic [31:0] er; logic erv; logic fnd;
      @(negedge clk);
      nv = $urandom_range(0, 4);
      if (nv > stream.size()) nv = stream.size();
      for (int i = 0; i < 4; i++) begin
        head[i] = (i < nv) ? stream[i] : rnd_entry();
        head[i].valid = (i < nv);
      end
      id_ready = ($urandom_range(0, 3) != 0);
      #1;
      // reference
      er = m_er; erv = m_erv; k = 0; fnd = 0;
      for (int i = 0; i < nv; i++) begin
        if (stream[i].is_leri && stream[i].int_info == 0) begin
          er = erv ? {er[17:0], stream[i].instr[13:0]} : 32'($signed(stream[i].instr[13:0]));
          erv = 1; k++;
        end else begin fnd = 1; break; end
      end
      checks++;
      if (er_pending !== m_erv) begin failures++; $display("FAIL er_pending"); end
      checks++;
      if (issue_valid !== (fnd && id_ready)) begin failures++; $display("FAIL issue_valid"); end
      checks++;
      if (int'(pop_cnt) != ((fnd && id_ready) ? k + 1 : k)) begin failures++; $display("FAIL pop %0d k %0d", pop_cnt, k); end
      if (fnd && id_ready) begin
        checks++;
        if (issue_instr !== stream[k].instr || issue_int_info !== stream[k].int_info ||
            issue_er_valid !== erv || (erv && issue_er !== er) || int'(issue_idx) != k || int'(folded) != k) begin
          failures++; $display("FAIL issue %h er %h/%b exp %h %h/%b", issue_instr, issue_er, issue_er_valid, stream[k].instr, er, erv);
        end
        issued++; nfold += k;
        m_er = 0; m_erv = 0;
      end else begin
        m_er = er; m_erv = erv;
      end
      nleri += k;
      repeat ((fnd && id_ready) ? k + 1 : k) void'(stream.pop_front());
    end
    checks++;
    if (issued < 100 || nfold == 0) begin failures++; $display("FAIL coverage issued=%0d folded=%0d", issued, nfold); end
    $display("folded %0d of %0d LERIs", nfold, nleri);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
