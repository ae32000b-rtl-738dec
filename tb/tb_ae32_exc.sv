// Self-checking test of exception control: random exception sources, stalls, cpactive,
// returns and OSI exits; a reference model of the priority order, the EPC rules, the
// in-handler flag and OSI mode checks every output each cycle. Also checks that an
// interrupt is never taken while cpactive is high.
module tb_ae32_exc;
  import ae32_pkg::*;
  logic clk = 0, rst_n = 0;
  logic mem_stall = 0, dbrk = 0, id_valid = 0, exec_exc = 0, irq = 0, cpactive = 0, eret_go = 0, osi_exit = 0;
  int_info_t id_int_info = '0; logic [31:0] mem_pc = 0, id_pc = 0, id_rpc = 0;
  logic take, kill_ex, kill_id_pre, redirect, osi_mode, in_handler, abort;
  logic [31:0] target, epc; exc_e cause;
  logic m_osi, m_inh; logic [31:0] m_epc;
  int checks = 0, failures = 0, n_irq = 0, n_blocked = 0, n_osi = 0;
  ae32_exc #(.VEC_BASE(32'h100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    m_osi = 0; m_inh = 0; m_epc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (6000) begin
      exc_e ec; logic [31:0] ee; logic d, ib, fe, iq;
      @(negedge clk);
      mem_stall = ($urandom_range(0, 7) == 0); dbrk = ($urandom_range(0, 15) == 0);
      id_valid = 1'($urandom); id_int_info = ($urandom_range(0, 7) == 0) ? 3'($urandom) : 3'b0;
      exec_exc = ($urandom_range(0, 15) == 0); irq = ($urandom_range(0, 3) == 0); cpactive = 1'($urandom);
      eret_go = ($urandom_range(0, 5) == 0); osi_exit = ($urandom_range(0, 7) == 0);
      mem_pc = $urandom & 32'hfffe; id_pc = $urandom & 32'hfffe; id_rpc = id_pc - 2 * $urandom_range(0, 2);
      #1;
      d = dbrk && !m_osi; ib = id_valid && id_int_info[2] && !m_osi; fe = id_valid && (id_int_info[1] || id_int_info[0]);
      iq = irq && id_valid && !m_inh && !m_osi && !cpactive;
      ec = EXC_NONE; ee = id_rpc;
      if (d) begin ec = EXC_DBRK; ee = mem_pc + 2; end
      else if (ib) ec = EXC_IBRK;
      else if (fe && id_int_info[1]) ec = EXC_IBERR;
      else if (fe) ec = EXC_IINT;
      else if (exec_exc) begin ec = EXC_CP; ee = id_pc + 2; end
      else if (iq) ec = EXC_IRQ;
      if (mem_stall) ec = EXC_NONE;
      checks++;
      if (take !== (ec != EXC_NONE) || (take && (cause !== ec || target !== 32'h100 + 8 * ec))) begin
        failures++; $display("FAIL take %b cause %0d exp %0d", take, cause, ec);
      end
      checks++;
      if (osi_mode !== m_osi || in_handler !== m_inh || epc !== m_epc) begin failures++; $display("FAIL state"); end
      if (ec == EXC_IRQ) n_irq++;
      if (irq && cpactive && id_valid && !m_inh && !m_osi && !mem_stall) n_blocked++;
      checks++;
      if (take && cause == EXC_IRQ && cpactive) begin failures++; $display("FAIL irq under cpactive"); end
      checks++;
      if (!take && redirect !== (!mem_stall && osi_exit && m_osi)) begin failures++; $display("FAIL osi exit"); end
      if (ec != EXC_NONE) begin
        m_epc = ee; m_inh = 1;
        if (ec == EXC_DBRK || ec == EXC_IBRK) begin m_osi = 1; n_osi++; end
      end else if (!mem_stall && osi_exit && m_osi) begin m_osi = 0; m_inh = 0; end
      else if (eret_go) m_inh = 0;
    end
    checks++;
    if (n_irq == 0 || n_blocked == 0 || n_osi == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
