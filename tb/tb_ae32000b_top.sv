// End-to-end test of the core, with all parameters at their defaults.
//
// A constrained-random program generator writes a program for a test encoding (see
// tb_ae32_decoder): random ALU, shift, count, multiply/MAC, load/store and coprocessor
// instructions, wide immediates built with one or two LERIs, forward branches over random
// code and counted backward loops, ending in a branch-to-self. An instruction-level
// reference model runs the same program first; the core then runs it against an
// instruction memory with random grant and response delays, a data memory with random wait
// states and a behavioural coprocessor with random id_cpbusy/mem_cpbusy and cpactive
// periods. Interrupts arrive at random, stay raised until their handler runs, and are
// counted by that handler in r15. One instruction-bus error, one CP0 fetch exception, an
// instruction breakpoint and a data watchpoint are injected; the last two enter OSI mode,
// where the test reads registers through the debugger port, writes one and restores it,
// and then leaves OSI mode. At the end every register, MH:ML, the flags, data memory and
// the coprocessor registers must equal the reference model.
// Each pipeline mechanism is counted and must have happened at least once. Several
// programs are run, each after a reset.
module tb_ae32000b_top;
  import ae32_pkg::*;

  localparam int NPROG = 6;
  localparam logic [31:0] PROG = 32'h200;

  logic clk = 0, rst_n = 1;   // driven low at 1 ns so the asynchronous reset sees an edge
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- DUT
  logic        imem_req, imem_gnt, imem_rvalid, imem_err, cp0_iint;
  logic [31:0] imem_addr, imem_rdata;
  logic        id_valid, id_er_valid;
  logic [15:0] id_instr;
  logic [31:0] id_er;
  id_ctrl_t    id_ctrl;
  logic        dmem_req, dmem_we, dmem_ready;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic [3:0]  cpctrl, cpidx;
  logic [1:0]  cpno;
  logic [31:0] cpin, cpout;
  logic        id_cpbusy, cpint, cpactive, mem_cpacc, mem_cpbusy;
  logic        irq;
  logic        brk_cfg_we;
  logic [2:0]  brk_cfg_idx, brk_cfg_kind;
  logic [31:0] brk_cfg_addr, dbg_rdata;
  logic [4:0]  dbg_sel;
  logic        dbg_we;
  logic [31:0] dbg_wdata;
  logic        dbg_wack;
  logic        osi_mode, osi_exit, exc_taken;
  exc_e        exc_cause;
  logic [2:0]  leri_folded;

  ae32000b_top dut (.*);
  tb_ae32_decoder u_dec (.instr (id_instr), .ctrl (id_ctrl));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- memories
  logic [15:0] imem [2048];     // 4 KiB instruction memory (halfwords)
  logic [31:0] dmem [1024];     // 4 KiB data memory
  logic [31:0] iss_dmem [1024];
  logic [31:0] ifq [$];
  logic [31:0] err_word, iint_word;
  bit          err_pending, iint_pending;

  assign imem_gnt = rst_n && ($urandom_range(0, 4) != 0);
  always_ff @(posedge clk) begin
    imem_rvalid <= 1'b0;
    imem_err    <= 1'b0;
    cp0_iint    <= 1'b0;
    if (rst_n && ifq.size() > 0 && $urandom_range(0, 3) != 0) begin
      logic [31:0] a;
      a = ifq.pop_front();
      imem_rvalid <= 1'b1;
      imem_rdata  <= {imem[a[11:1] + 1], imem[a[11:1]]};
      imem_err    <= err_pending && a == err_word;
      cp0_iint    <= iint_pending && a == iint_word;
    end
    if (imem_req && imem_gnt) ifq.push_back(imem_addr);
    if (!rst_n) ifq.delete();
  end

  assign dmem_rdata = dmem[dmem_addr[11:2]];
  always_ff @(posedge clk) begin
    dmem_ready <= ($urandom_range(0, 3) != 0);
    if (rst_n && dmem_req && dmem_we && dmem_ready)
      for (int l = 0; l < 4; l++) if (dmem_be[l]) dmem[dmem_addr[11:2]][8*l +: 8] <= dmem_wdata[8*l +: 8];
  end

  // ---------------------------------------------------------------- coprocessor model
  logic [31:0] cpreg [16];
  logic [31:0] iss_cpreg [16];
  logic        cp_err;
  int          cp_act;
  logic [4:0]  cpq [$];           // {is_stc, idx} of announced LDC/STC
  logic        busy_rnd, mbusy_rnd;

  always_ff @(posedge clk) begin
    busy_rnd  <= ($urandom_range(0, 2) == 0);
    mbusy_rnd <= ($urandom_range(0, 2) == 0);
  end
  // the coprocessor holds an operation on a register that a queued LDC/STC still uses
  logic [15:0] cp_pend;        // registers named by queued LDC/STC, updated with cpq
  assign id_cpbusy  = (cpctrl != 4'd0) && (cpctrl != 4'd15) && (busy_rnd || cp_pend[cpidx]);
  assign mem_cpbusy = mem_cpacc && mbusy_rnd;
  assign cpint      = cp_err;
  assign cpactive   = cp_act > 0;
  always_comb begin
    if (mem_cpacc && cpq.size() > 0 && cpq[0][4]) cpout = cpreg[cpq[0][3:0]];
    else if (cpctrl == 4'(CP_GETC))               cpout = {31'd0, cpreg[cpidx][0]};
    else                                          cpout = cpreg[cpidx];
  end

  int n_cp [8];
  int n_abort;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cp_act <= 0; cp_err <= 0; cpq.delete(); cp_pend <= '0;
    end else begin
      if (cp_act > 0) cp_act <= cp_act - 1;
      if (cpctrl == 4'd15) n_abort++;
      if (cpctrl != 4'd0 && cpctrl != 4'd15 && !id_cpbusy) begin
        n_cp[cpctrl[2:0]]++;
        case (cp_op_e'(cpctrl))
          CP_CMD: begin cpreg[cpidx] <= cpin; cp_err <= cpin[31]; cp_act <= int'(cpin[3:0]) + 3; end
          CP_MTC: begin cpreg[cpidx] <= cpin; if (cpidx == 4'd15) cp_err <= 1'b0; end
          CP_LDC: cpq.push_back({1'b0, cpidx});
          CP_STC: cpq.push_back({1'b1, cpidx});
          default: ;
        endcase
      end
      if (mem_cpacc && !mem_cpbusy && dmem_ready) begin
        logic [4:0] t;
        t = cpq.pop_front();
        if (!t[4]) cpreg[t[3:0]] <= dmem_rdata;
      end
      begin
        logic [15:0] m;
        m = '0;
        foreach (cpq[i]) m[cpq[i][3:0]] = 1'b1;
        cp_pend <= m;
      end
    end
  end

  // ---------------------------------------------------------------- program generator
  int          pc_w;          // next halfword index to write
  int          nlen;
  logic [31:0] halt_pc;
  logic [31:0] st_addrs [$];

  function automatic void emit(input logic [15:0] h);
    imem[pc_w] = h; pc_w++;
  endfunction
  function automatic void leri(input logic [13:0] v);
    emit({2'b11, v});
  endfunction
  // value -> up to two LERIs + MOVI
  function automatic void movi32(input logic [3:0] rd, input logic [31:0] v);
    leri(14'(v[31:22])); leri(v[21:8]);
    emit({4'd2, rd, v[7:0]});
  endfunction

  // A "plain" instruction: no branch, no LERI, never writes r12..r15. cp_ok allows
  // coprocessor instructions.
  function automatic void plain(input bit cp_ok, input bit allow_leri, inout int after_mem);
    int k;
    logic [3:0] rd, rs;
    rd = 4'($urandom_range(0, 11)); rs = 4'($urandom_range(0, 13));
    k = $urandom_range(0, cp_ok ? 11 : 8);
    if (after_mem > 0) after_mem--;
    case (k)
      0, 1: emit({4'd0, rd, rs, 3'($urandom), 1'($urandom)});
      2: begin
        if (allow_leri && $urandom_range(0, 1) != 0) leri(14'($urandom));
        emit({4'd1, rd, 8'($urandom)});
      end
      3: begin
        if (allow_leri && $urandom_range(0, 1) != 0) begin leri(14'($urandom)); if ($urandom_range(0, 1) != 0) leri(14'($urandom)); end
        emit({4'd2, rd, 8'($urandom)});
      end
      4: emit({4'd4, rd, 2'($urandom), 5'($urandom), 1'($urandom)});
      5: emit({4'd5, rd, rs, 4'($urandom_range(0, 8))});
      6: emit({4'd3, rs, 8'($urandom)});
      7, 8: begin
        logic [1:0] sz; logic [1:0] off; logic [13:0] k4;
        sz = 2'($urandom);
        off = (sz == 2'd2) ? 2'd0 : (sz == 2'd1) ? {1'($urandom), 1'b0} : 2'($urandom);
        k4 = 14'($urandom_range(0, 63));
        if (allow_leri) leri(k4);
        if ($urandom_range(0, 1) != 0) emit({4'd6, rd, 4'd13, sz, off});
        else begin
          emit({4'd7, rs, 4'd13, sz, off});
          st_addrs.push_back(32'h400 + (allow_leri ? 32'(k4) * 4 : 0) + 32'(off));
        end
        after_mem = 2;
      end
      default: begin
        logic [2:0] o;
        o = 3'($urandom_range(1, 7));
        // a watchpoint cancels the instructions behind the access; LDC/STC must not be
        // among them, or the coprocessor would see them announced twice
        if (after_mem > 0 && (o == 3'd4 || o == 3'd5)) o = 3'd3;
        case (o)
          3'd1: begin  // CMD, sometimes with bit 31 set through LERIs
            if ($urandom_range(0, 1) != 0) begin leri({$urandom_range(0, 3) == 0, 13'($urandom)}); leri(14'($urandom)); end
            emit({4'd9, o, 4'($urandom), 4'($urandom_range(0, 14)), 1'($urandom)});
          end
          3'd2: emit({4'd9, o, rs, 4'($urandom), 1'($urandom)});
          3'd3: emit({4'd9, o, rd, 4'($urandom), 1'($urandom)});
          3'd4, 3'd5: begin
            leri(14'(2 * $urandom_range(0, 63)));
            emit({4'd9, o, 4'd13, 4'($urandom_range(0, 14)), 1'($urandom)});
            after_mem = 2;
          end
          default: emit({4'd9, o, 4'd0, 4'($urandom), 1'($urandom)});
        endcase
      end
    endcase
  endfunction

  task automatic gen_program(input int n);
    int after_mem;
    after_mem = 0;
    for (int i = 0; i < 2048; i++) imem[i] = 16'hA000;  // NOP
    // reset entry at 0: LERI 1; B AL +0x1FE (to 0x200)
    pc_w = 0; leri(14'd1); emit(16'h80FE);
    // handlers: VEC_BASE 0x100 + 8*cause
    pc_w = (32'h108 >> 1); emit(16'h8000);                    // DBRK: stay (OSI)
    pc_w = (32'h110 >> 1); emit(16'h8000);                    // IBRK: stay (OSI)
    pc_w = (32'h118 >> 1); emit(16'hA001);                    // IBERR: return
    pc_w = (32'h120 >> 1); emit(16'hA001);                    // IINT: return
    pc_w = (32'h128 >> 1); emit({4'd9, 3'd2, 4'd0, 4'd15, 1'b0}); emit(16'hA001);  // CP: clear, return
    pc_w = (32'h130 >> 1); emit({4'd0, 4'd15, 4'd14, 3'd0, 1'b0}); emit(16'hA001); // IRQ: r15 += r14
    pc_w = PROG >> 1;
    leri(14'd4); emit({4'd2, 4'd13, 8'd0});                   // r13 = 0x400
    emit({4'd2, 4'd14, 8'd1});                                // r14 = 1
    emit({4'd2, 4'd15, 8'd0});                                // r15 = 0
    for (int r = 0; r < 13; r++) movi32(4'(r), $urandom);  // registers are not reset
    st_addrs.delete();
    while (pc_w < (PROG >> 1) + n) begin
      int k;
      k = $urandom_range(0, 19);
      if (k == 0) begin
        // forward branch over 1..5 plain single-halfword instructions
        int skip;
        skip = $urandom_range(1, 5);
        emit({4'd8, 4'($urandom_range(0, 14)), 8'(2 * skip + 2)});
        repeat (skip) plain(0, 0, after_mem);
      end else if (k == 1) begin
        // counted loop
        int top, body;
        emit({4'd2, 4'd12, 8'($urandom_range(2, 5))});
        top = pc_w;
        body = $urandom_range(2, 8);
        repeat (body) plain(1, 1, after_mem);
        emit({4'd1, 4'd12, 8'hFF});                                     // r12 -= 1
        emit({4'd8, 4'(CC_NE), 8'(2 * (top - pc_w))});                  // bne top
        after_mem = 0;
      end else begin
        plain(1, 1, after_mem);
      end
    end
    halt_pc = 32'(pc_w) * 2;
    emit(16'h8000);
  endtask

  // ---------------------------------------------------------------- reference model
  logic [31:0] r [16];
  logic [63:0] macc;
  flags_t      fl;
  int          iss_instrs;

  function automatic logic [31:0] iss_imm(input logic [31:0] er, input bit erv, input int len, input logic [13:0] f, input bit sx);
    logic [31:0] fv;
    fv = 32'(f) & ((32'd1 << len) - 1);
    if (erv) return (er << len) | fv;
    if (sx && fv[len - 1]) return fv | ~((32'd1 << len) - 1);
    return fv;
  endfunction

  task automatic iss_run();
    logic [31:0] pc, er, a, b, y, ad;
    bit erv;
    pc = PROG; er = 0; erv = 0; macc = 0; fl = '0; iss_instrs = 0;
    for (int i = 0; i < 16; i++) r[i] = 0;
    forever begin
      logic [15:0] ins; logic [3:0] op, f1, f2, f3; logic [32:0] s;
      ins = imem[pc[11:1]];
      {op, f1, f2, f3} = ins;
      iss_instrs++;
      if (ins == 16'h8000 && pc == halt_pc) break;
      if (ins[15:14] == 2'b11) begin
        er = erv ? {er[17:0], ins[13:0]} : 32'($signed(ins[13:0]));
        erv = 1; pc += 2;
        continue;
      end
      case (op)
        4'd0, 4'd1, 4'd3: begin
          logic [2:0] ao; bit sf;
          a = r[f1];
          if (op == 4'd0) begin b = r[f2]; ao = f3[3:1]; sf = f3[0]; end
          else begin b = iss_imm(er, erv, 8, 14'(ins[7:0]), 1); ao = (op == 4'd1) ? 3'd0 : 3'd2; sf = 1; end
          case (ao)
            3'd0: s = {1'b0, a} + {1'b0, b};
            3'd1: s = {1'b0, a} + {1'b0, b} + 33'(fl.c);
            3'd2: s = {1'b0, a} + {1'b0, ~b} + 33'd1;
            3'd3: s = {1'b0, a} + {1'b0, ~b} + 33'(fl.c);
            3'd4: s = {1'b0, a & b};
            3'd5: s = {1'b0, a | b};
            3'd6: s = {1'b0, a ^ b};
            default: s = {1'b0, b};
          endcase
          y = s[31:0];
          if (sf) begin
            logic [31:0] bb;
            bb = (ao == 3'd2 || ao == 3'd3) ? ~b : b;
            fl.n = y[31]; fl.z = (y == 0);
            fl.c = (ao < 3'd4) ? s[32] : 1'b0;
            fl.v = (ao < 3'd4) ? (a[31] == bb[31] && y[31] != a[31]) : 1'b0;
          end
          if (op != 4'd3) r[f1] = y;
        end
        4'd2: r[f1] = iss_imm(er, erv, 8, 14'(ins[7:0]), 1);
        4'd4: begin
          int n; logic c;
          n = int'(iss_imm(er, erv, 5, 14'(ins[5:1]), 0) & 31);
          a = r[f1]; c = 0;
          for (int i = 0; i < n; i++) begin
            case (ins[7:6])
              2'd0: begin c = a[31]; a = a << 1; end
              2'd1: begin c = a[0]; a = a >> 1; end
              2'd2: begin c = a[0]; a = {a[31], a[31:1]}; end
              default: begin c = a[0]; a = {a[0], a[31:1]}; end
            endcase
          end
          r[f1] = a;
          if (ins[0]) begin fl.n = a[31]; fl.z = (a == 0); fl.c = c; end
        end
        4'd5: begin
          case (f3)
            4'd0, 4'd1: begin
              int n; n = 0;
              while (n < 32 && r[f2][31 - n] == f3[0]) n++;
              r[f1] = 32'(n);
            end
            4'd2, 4'd3, 4'd4, 4'd5: begin
              logic [63:0] p, xa, xb; bit sg;
              sg = (f3 == 4'd2 || f3 == 4'd4);
              xa = sg ? 64'($signed(r[f1])) : 64'(r[f1]);
              xb = sg ? 64'($signed(r[f2])) : 64'(r[f2]);
              p = xa * xb;
              macc = (f3 >= 4'd4) ? macc + p : p;
            end
            4'd6: r[f1] = macc[63:32];
            4'd7: r[f1] = macc[31:0];
            4'd8: r[f1] = r[f2];
            default: ;
          endcase
        end
        4'd6, 4'd7: begin
          logic [31:0] w;
          ad = r[f2] + iss_imm(er, erv, 2, 14'(f3[1:0]), 0);
          w = iss_dmem[ad[11:2]];
          if (op == 4'd6) begin
            case (f3[3:2])
              2'd0: r[f1] = 32'($signed(w[8*ad[1:0] +: 8]));
              2'd1: r[f1] = 32'($signed(w[16*ad[1] +: 16]));
              2'd2: r[f1] = w;
              default: r[f1] = 32'(w[8*ad[1:0] +: 8]);
            endcase
          end else begin
            case (f3[3:2])
              2'd1: w[16*ad[1] +: 16] = r[f1][15:0];
              2'd2: w = r[f1];
              default: w[8*ad[1:0] +: 8] = r[f1][7:0];
            endcase
            iss_dmem[ad[11:2]] = w;
          end
        end
        4'd8: begin
          if (cond_ok(cond_e'(f1), fl)) begin
            pc = pc + iss_imm(er, erv, 8, 14'(ins[7:0]), 1);
            er = 0; erv = 0;
            continue;
          end
        end
        4'd9: begin
          logic [3:0] idx, rg;
          rg = ins[8:5]; idx = ins[4:1];
          case (ins[11:9])
            3'd1: iss_cpreg[idx] = iss_imm(er, erv, 8, 14'(ins[8:1]), 0);
            3'd2: iss_cpreg[idx] = r[rg];
            3'd3: r[rg] = iss_cpreg[idx];
            3'd4: begin ad = r[rg] + iss_imm(er, erv, 1, 0, 0); iss_cpreg[idx] = iss_dmem[ad[11:2]]; end
            3'd5: begin ad = r[rg] + iss_imm(er, erv, 1, 0, 0); iss_dmem[ad[11:2]] = iss_cpreg[idx]; end
            3'd6: fl.z = iss_cpreg[idx][0];
            3'd7: ;
            default: ;
          endcase
        end
        default: ;
      endcase
      // coprocessor error flag: set by CMD bit 31, cleared by MTC to idx 15; EXEC with
      // the flag set runs the handler (MTC idx 15 from r0) and continues
      if (op == 4'd9 && ins[11:9] == 3'd1) iss_cp_err = iss_cpreg[ins[4:1]][31];
      if (op == 4'd9 && ins[11:9] == 3'd2 && ins[4:1] == 4'd15) iss_cp_err = 0;
      if (op == 4'd9 && ins[11:9] == 3'd7 && iss_cp_err) begin
        iss_cpreg[15] = r[0]; iss_cp_err = 0; iss_n_cpexc++;
      end
      er = 0; erv = 0;
      pc += 2;
    end
  endtask
  bit iss_cp_err;
  int iss_n_cpexc;

  // ---------------------------------------------------------------- monitors
  int cyc, n_fold, n_leri_all, n_full, n_lu, n_cpsrc, n_cpstruct, n_cpbusy, n_memwait, n_cpmem;
  int n_fwd_mem, n_fwd_wb, n_br, n_mac, n_mac_b2b, n_lzc, n_shf, n_exc [8], n_osi, n_irq_blocked;
  int n_retired, n_cycles_run, n_flush_drop, n_getc_z;
  int irq_taken, irq_base;   // irq_taken counts in the clocked block, irq_base marks a program's start
  logic prev_mac;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      n_fold     += int'(leri_folded);
      if (dut.iq_count == 8) n_full++;
      if (dut.hz_load_use) n_lu++;
      if (dut.hz_cp_src) n_cpsrc++;
      if (dut.hz_cp_struct) n_cpstruct++;
      if (dut.hz_cp_busy) n_cpbusy++;
      if (dmem_req && !dmem_ready) n_memwait++;
      if (mem_cpacc && mem_cpbusy) n_cpmem++;
      if (dut.ex_valid && !dut.mem_stall && dut.fwd_a && dut.mem_fwd && dut.mem_rd == dut.ex_c.rs1) n_fwd_mem++;
      if (dut.ex_valid && !dut.mem_stall && dut.fwd_a && !(dut.mem_fwd && dut.mem_rd == dut.ex_c.rs1)) n_fwd_wb++;
      if (dut.br_taken) n_br++;
      if (dut.ex_commit && dut.ex_c.unit == U_MAC) begin n_mac++; if (prev_mac) n_mac_b2b++; end
      if (!dut.mem_stall) prev_mac <= dut.ex_commit && dut.ex_c.unit == U_MAC;
      if (dut.ex_commit && dut.ex_c.unit == U_LZC) n_lzc++;
      if (dut.ex_commit && dut.ex_c.unit == U_SHF) n_shf++;
      if (exc_taken) begin n_exc[exc_cause]++; last_cause <= exc_cause; end
      if (irq && cpactive && id_valid && !dut.in_handler && !osi_mode && !dut.mem_stall) n_irq_blocked++;
      if (dut.redirect && dut.u_iq.infl_q != 0) n_flush_drop++;
      if (dut.id_go) n_retired++;
    end
  end

  // optional pipeline trace, one line per cycle: +trace
  bit trace = $test$plusargs("trace");
  always_ff @(posedge clk) begin
    if (trace && rst_n)
      $display("%0d req=%b a=%h gnt=%b rv=%b cnt=%0d | id v=%b pc=%h i=%h er=%h/%b st=%b | ex v=%b pc=%h | redir=%b %h exc=%b/%0d",
               cyc, imem_req, imem_addr, imem_gnt, imem_rvalid, dut.iq_count, id_valid, dut.id_pc, id_instr, id_er, id_er_valid,
               dut.id_stall, dut.ex_valid, dut.ex_pc, dut.redirect, dut.redirect_pc, exc_taken, exc_cause);
  end

  // interrupt source: raise at random, hold until taken
  always_ff @(posedge clk) begin
    if (!rst_n) irq <= 1'b0;
    else if (dut.ex_commit && dut.ex_pc == 32'h130) begin irq <= 1'b0; irq_taken++; end
    else if (!irq && irq_enable && dut.id_pc > PROG + 32'h60 && $urandom_range(0, 60) == 0) irq <= 1'b1;  // after the prologue
  end
  bit irq_enable;

  // ---------------------------------------------------------------- debugger (OSI)
  bit ibrk_armed, dbrk_armed;
  task automatic brk_cfg(input int idx, input logic [31:0] addr, input logic [2:0] kind);
    @(negedge clk);
    brk_cfg_we = 1; brk_cfg_idx = 3'(idx); brk_cfg_addr = addr; brk_cfg_kind = kind;
    @(negedge clk);
    brk_cfg_we = 0;
  endtask

  // serve OSI-mode entries: read r13/r14 through the debugger port, write r13 and restore
  // it (waiting for dbg_wack when write-back uses the port), disarm the slot that fired (0 breakpoint, 1 watchpoint), leave
  exc_e last_cause;
  int   n_dbg_wait;
  // hold dbg_we until the core accepts the write at a clock edge
  task automatic dbg_write_wait();
    do begin
      #1;
      if (!dbg_wack) n_dbg_wait++;
      @(negedge clk);
    end while (!dbg_wack_seen);
    dbg_we = 0; #1;
  endtask
  bit dbg_wack_seen;
  always_ff @(posedge clk) dbg_wack_seen <= dbg_wack;
  always @(posedge clk) begin
    if (rst_n && osi_mode && !osi_exit && !brk_cfg_we) begin
      n_osi++;
      @(negedge clk);
      dbg_sel = 5'd13; #1; check(dbg_rdata == 32'h400, "debugger read of r13");
      dbg_sel = 5'd14; #1; check(dbg_rdata == 32'd1, "debugger read of r14");
      // write r13, read it back, then restore it
      dbg_sel = 5'd13; dbg_wdata = 32'hDEB0_0000 | 32'(n_osi); dbg_we = 1;
      dbg_write_wait();
      check(dbg_rdata == (32'hDEB0_0000 | 32'(n_osi)), "debugger write of r13");
      dbg_wdata = 32'h400; dbg_we = 1;
      dbg_write_wait();
      check(dbg_rdata == 32'h400, "debugger restore of r13");
      brk_cfg(last_cause == EXC_IBRK ? 0 : 1, 0, 3'd0);
      @(negedge clk); osi_exit = 1;
      @(negedge clk); osi_exit = 0;
    end
  end

  // ---------------------------------------------------------------- main
  initial begin
    brk_cfg_we = 0; brk_cfg_idx = 0; brk_cfg_addr = 0; brk_cfg_kind = 0; dbg_sel = 0; dbg_we = 0; dbg_wdata = 0; osi_exit = 0;
    for (int i = 0; i < 8; i++) n_cp[i] = 0;
    for (int i = 0; i < 8; i++) n_exc[i] = 0;
    #1 rst_n = 0;
    for (int p = 0; p < NPROG; p++) begin
      int t, limit, len;
      len = 300 + 100 * p;
      gen_program(len);
      for (int i = 0; i < 1024; i++) begin dmem[i] = $urandom; iss_dmem[i] = dmem[i]; end
      for (int i = 0; i < 16; i++) begin cpreg[i] = $urandom; iss_cpreg[i] = cpreg[i]; end
      iss_cp_err = 0; iss_n_cpexc = 0;
      iss_run();
      n_leri_all = 0;
      // fetch exceptions on two program words, once each
      err_word  = (PROG + 32'(4 * $urandom_range(20, 60))) & ~32'd3;
      iint_word = err_word + 32'(4 * $urandom_range(5, 20));
      err_pending = 1; iint_pending = 1;
      irq_base = irq_taken; irq_enable = 1;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      // a breakpoint on a program instruction and a watchpoint on a stored address
      brk_cfg(0, PROG + 32'(2 * $urandom_range(40, len / 2)), 3'd1);
      if (st_addrs.size() > 0) brk_cfg(1, st_addrs[$urandom_range(0, st_addrs.size() - 1)], 3'd4);
      t = 0; limit = 40 * len + 2000;
      while (!(id_valid && dut.id_pc == halt_pc) && t < limit) begin
        @(posedge clk); t++;
        if (exc_taken && exc_cause == EXC_IBERR) err_pending = 0;
        if (exc_taken && exc_cause == EXC_IINT) iint_pending = 0;
      end
      irq_enable = 0;
      check(t < limit, $sformatf("program %0d reached its end", p));
      n_cycles_run += t;
      repeat (20) @(posedge clk);
      @(negedge clk);
      for (int i = 0; i < 15; i++) begin
        dbg_sel = 5'(i); #1;
        check(dbg_rdata == r[i], $sformatf("p%0d r%0d = %h, reference %h", p, i, dbg_rdata, r[i]));
      end
      dbg_sel = 5'd15; #1; check(dbg_rdata == 32'(irq_taken - irq_base), $sformatf("p%0d r15 = %0d interrupts, counted %0d", p, dbg_rdata, irq_taken - irq_base));
      dbg_sel = 5'd16; #1; check(dbg_rdata == macc[63:32], "MH");
      dbg_sel = 5'd17; #1; check(dbg_rdata == macc[31:0], "ML");
      dbg_sel = 5'd18; #1; check(dbg_rdata[3:0] == fl, $sformatf("flags %b ref %b", dbg_rdata[3:0], fl));
      begin
        int bad; bad = 0;
        for (int i = 0; i < 1024; i++) if (dmem[i] != iss_dmem[i]) bad++;
        check(bad == 0, $sformatf("p%0d data memory: %0d words differ", p, bad));
        bad = 0;
        for (int i = 0; i < 16; i++) if (cpreg[i] != iss_cpreg[i]) bad++;
        check(bad == 0, $sformatf("p%0d coprocessor registers: %0d differ", p, bad));
      end
      $display("program %0d: %0d instructions (with LERIs) in %0d cycles, %0d interrupts", p, iss_instrs, t, irq_taken - irq_base);
    end
    // every mechanism must have happened
    check(n_fold > 0,      $sformatf("LERI folding (%0d)", n_fold));
    check(n_full > 0,      $sformatf("queue full (%0d)", n_full));
    check(n_flush_drop > 0, $sformatf("in-flight fetch dropped on flush (%0d)", n_flush_drop));
    check(n_lu > 0,        $sformatf("load-use stall (%0d)", n_lu));
    check(n_cpsrc > 0,     $sformatf("coprocessor source stall (%0d)", n_cpsrc));
    check(n_cpstruct > 0,  $sformatf("coprocessor cpout structural stall (%0d)", n_cpstruct));
    check(n_cpbusy > 0,    $sformatf("id_cpbusy stall (%0d)", n_cpbusy));
    check(n_memwait > 0,   $sformatf("data memory wait (%0d)", n_memwait));
    check(n_cpmem > 0,     $sformatf("mem_cpbusy hold (%0d)", n_cpmem));
    check(n_fwd_mem > 0,   $sformatf("forward from MEM (%0d)", n_fwd_mem));
    check(n_fwd_wb > 0,    $sformatf("forward from WB (%0d)", n_fwd_wb));
    check(n_br > 0,        $sformatf("taken branch (%0d)", n_br));
    check(n_mac_b2b > 0,   $sformatf("back-to-back MAC/MUL (%0d of %0d)", n_mac_b2b, n_mac));
    check(n_lzc > 0 && n_shf > 0, "counter and shifter used");
    for (int i = 1; i < 8; i++) check(n_cp[i] > 0, $sformatf("coprocessor op %0d (%0d)", i, n_cp[i]));
    for (int i = 1; i < 7; i++) check(n_exc[i] > 0, $sformatf("exception cause %0d (%0d)", i, n_exc[i]));
    check(n_osi > 0,       $sformatf("OSI mode entered (%0d)", n_osi));
    check(n_irq_blocked > 0, $sformatf("interrupt held off by cpactive (%0d cycles)", n_irq_blocked));
    $display("mechanisms: fold=%0d full=%0d lu=%0d cpsrc=%0d cpstruct=%0d cpbusy=%0d memwait=%0d cpmem=%0d fwdmem=%0d fwdwb=%0d br=%0d mac=%0d/%0d abort=%0d osi=%0d irqblk=%0d",
             n_fold, n_full, n_lu, n_cpsrc, n_cpstruct, n_cpbusy, n_memwait, n_cpmem, n_fwd_mem, n_fwd_wb, n_br, n_mac_b2b, n_mac, n_abort, n_osi, n_irq_blocked);
    $display("exceptions: dbrk=%0d ibrk=%0d iberr=%0d iint=%0d cp=%0d irq=%0d", n_exc[1], n_exc[2], n_exc[3], n_exc[4], n_exc[5], n_exc[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
