// LERI-folding workload: IPC and folding rate of the core on a loop with zero-wait memories.
//
// The source design measured how often LERI prefixes occur in compiled benchmark code
// (about 11.2 %), how many of them the folding unit hides (about 92 %) and the IPC on a
// zero-wait memory system (about 0.82 with folding for its LERI experiment, 0.86 for the
// full benchmark). The compiled benchmarks themselves cannot be run here because the real
// instruction encoding and compiler are not available, so this test runs a loop written in
// the test encoding of tb_ae32_decoder whose LERI frequency is one in nine (11.1 %):
//
//   L: LERI 0x0123 ; ADDI r1,0x45  (r1 += 0x12345, wide immediate)
//      ADD  r2,r3  ; ADDI r3,1     ; ST r2,[r13] ; LD r6,[r13]
//      ADD  r7,r6  (load-use)      ; ADDI r4,-1  ; BNE L
//
// The loop is run twice: first with L one halfword after a fetch-word boundary, then on
// the boundary. A taken branch to L refetches from L; when L is the upper half of a fetch
// word the LERI arrives alone, is absorbed into the extension register in a cycle that
// issues nothing, and does not count as folded; on a word boundary the LERI and the
// instruction after it arrive together and every LERI is folded. The instruction memory grants every request and answers in the next cycle,
// the data memory is always ready, and there is no coprocessor traffic or interrupt.
// The test checks the loop's results (closed forms below), the folding count of each
// alignment, and reports the IPC (LERIs included) and the cycles per
// iteration, which must stay within a fixed bound so that a performance loss is caught.
module tb_ae32_perf;
  import ae32_pkg::*;

  localparam int          ITER = 200;
  localparam logic [31:0] PROG = 32'h200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  // zero-wait memories
  logic [15:0] imem [2048];
  logic [31:0] dmem [1024];
  assign imem_gnt = rst_n;
  assign imem_err = 1'b0;
  assign cp0_iint = 1'b0;
  always_ff @(posedge clk) begin
    imem_rvalid <= imem_req && imem_gnt;
    imem_rdata  <= {imem[imem_addr[11:1] + 1], imem[imem_addr[11:1]]};
  end
  assign dmem_ready = 1'b1;
  assign dmem_rdata = dmem[dmem_addr[11:2]];
  always_ff @(posedge clk)
    if (dmem_req && dmem_we)
      for (int l = 0; l < 4; l++) if (dmem_be[l]) dmem[dmem_addr[11:2]][8*l +: 8] <= dmem_wdata[8*l +: 8];

  assign id_cpbusy = 1'b0; assign cpint = 1'b0; assign cpactive = 1'b0;
  assign mem_cpbusy = 1'b0; assign cpout = '0; assign irq = 1'b0;
  assign brk_cfg_we = 1'b0; assign brk_cfg_idx = '0; assign brk_cfg_kind = '0;
  assign brk_cfg_addr = '0; assign osi_exit = 1'b0;
  assign dbg_we = 1'b0; assign dbg_wdata = '0;

  // ---------------------------------------------------------------- program
  int pc_w;
  function automatic void emit(input logic [15:0] h);
    imem[pc_w] = h; pc_w++;
  endfunction

  logic [31:0] done_pc;
  task automatic build(input int pad);
    int loop_w;
    for (int i = 0; i < 2048; i++) imem[i] = 16'hA000;
    pc_w = 0;
    emit(16'hC001); emit({4'd8, 4'd0, 8'hFE});          // LERI 1 ; B AL +0x1FE -> 0x200
    pc_w = int'(PROG) / 2;
    emit({4'd2, 4'd1, 8'd0}); emit({4'd2, 4'd2, 8'd0}); // r1 = r2 = 0
    emit({4'd2, 4'd3, 8'd0}); emit({4'd2, 4'd7, 8'd0}); // r3 = r7 = 0
    emit({4'd2, 4'd13, 8'h40});                         // r13 = 0x40
    emit(16'hC000 | 14'(ITER >> 8)); emit({4'd2, 4'd4, 8'(ITER & 255)});  // r4 = ITER
    repeat (pad) emit(16'hA000);
    loop_w = pc_w;
    emit(16'hC123); emit({4'd1, 4'd1, 8'h45});
    emit({4'd0, 4'd2, 4'd3, 4'b0000});
    emit({4'd1, 4'd3, 8'd1});
    emit({4'd7, 4'd2, 4'd13, 4'b1000});
    emit({4'd6, 4'd6, 4'd13, 4'b1000});
    emit({4'd0, 4'd7, 4'd6, 4'b0000});
    emit({4'd1, 4'd4, 8'hFF});
    emit({4'd8, 4'd2, 8'(2 * (loop_w - pc_w))});        // BNE L
    done_pc = 32'(2 * pc_w);
    emit({4'd8, 4'd0, 8'h00});                          // branch to self
  endtask

  // ---------------------------------------------------------------- measurement
  bit          counting;
  int          cycles, instrs, lerisN, foldedN;
  logic [31:0] rd_reg;
  always_ff @(posedge clk) if (rst_n && counting) begin
    cycles++;
    if (dut.id_go) instrs++;
    foldedN += int'(leri_folded);
  end

  task automatic read_reg(input int r);
    dbg_sel = 5'(r);
    #1 rd_reg = dbg_rdata;
  endtask

  initial begin
    dbg_sel = '0;
    for (int i = 0; i < 1024; i++) dmem[i] = '0;
    for (int v = 0; v < 2; v++) begin
      longint e2, e7;
      real ipc;
      build(v);
      rst_n = 0; counting = 0; cycles = 0; instrs = 0; foldedN = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      do @(posedge clk); while (!(dut.id_pc == PROG + 32'(2 * 8 + 2 * v) && dut.id_go));
      counting = 1;
      do @(posedge clk); while (!(dut.id_pc == done_pc && dut.id_go));
      counting = 0;
      @(posedge clk); #1;
      lerisN = ITER - 1;   // the first iteration's LERI precedes the measured window
      e2 = longint'(ITER) * (ITER - 1) / 2;
      e7 = 0;
      for (int j = 1; j <= ITER; j++) e7 += longint'(j) * (j - 1) / 2;
      repeat (6) @(posedge clk);
      read_reg(1); check(rd_reg == 32'(ITER * 32'h12345), $sformatf("r1 %h", rd_reg));
      read_reg(2); check(rd_reg == 32'(e2), $sformatf("r2 %h", rd_reg));
      read_reg(3); check(rd_reg == 32'(ITER), $sformatf("r3 %h", rd_reg));
      read_reg(7); check(rd_reg == 32'(e7), $sformatf("r7 %h", rd_reg));
      read_reg(4); check(rd_reg == 0, $sformatf("r4 %h", rd_reg));
      // instrs counts issued non-LERI instructions; add the LERIs for the IPC.
      ipc = real'(instrs + lerisN) / real'(cycles);
      $display("loop %s: %0d iterations, %0d cycles (%0d.%02d per iteration), %0d instructions + %0d LERIs, IPC %0.3f, folded %0d of %0d LERIs",
               v == 1 ? "on a word boundary" : "off a word boundary", ITER, cycles, cycles / ITER, (100 * (cycles % ITER)) / ITER, instrs, lerisN, ipc, foldedN, lerisN);
      check(instrs == 8 * ITER, $sformatf("issued %0d", instrs));
      check(foldedN == (v == 1 ? lerisN : 0), $sformatf("folded %0d of %0d", foldedN, lerisN));
      check(cycles <= (v == 1 ? 12 : 13) * ITER, $sformatf("cycles %0d", cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
