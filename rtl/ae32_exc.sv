// Exception control.
//
// Chooses at most one exception per cycle, in priority order:
//  1. data watchpoint hit by the access in MEM (the access completes; EPC = next PC);
//  2. fetch exceptions carried by the instruction in ID: instruction breakpoint, bus error
//     on the instruction bus, CP0 exception during the instruction access (EPC = its
//     restart address, the first of the LERIs folded into it);
//  3. coprocessor exception requested by EXECn in ID (EPC = next PC);
//  4. external interrupt, accepted only when an instruction is in ID, the core is not in a
//     handler or in OSI mode, and the coprocessor does not assert cpactive (EPC = its
//     restart address).
// Taking one redirects fetch to VEC_BASE + 8*cause, records EPC and the cause, sets the
// in-handler flag, and cancels the instruction in ID (and in EX for a watchpoint). Break
// exceptions (breakpoint, watchpoint) switch the core into OSI mode, in which further
// breaks are ignored; osi_exit returns to EPC and leaves OSI mode. ERET clears the
// in-handler flag. Nothing is taken while MEM is held. Taking a fetch or break exception
// while cpactive asks the coprocessor interface to abort.
//
// Blocking interrupts with cpactive, the break-to-OSI-mode switch and the three int_info
// causes follow the source design; priorities, vectors and the EPC rules are this
// implementation's.
module ae32_exc
  import ae32_pkg::*;
#(
  parameter logic [31:0] VEC_BASE = 32'h0000_0100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_stall,
  input  logic        dbrk,
  input  logic [31:0] mem_pc,
  input  logic        id_valid,
  input  int_info_t   id_int_info,
  input  logic [31:0] id_pc,
  input  logic [31:0] id_rpc,       // restart address of the ID instruction (first LERI)
  input  logic        exec_exc,
  input  logic        irq,
  input  logic        cpactive,
  input  logic        eret_go,
  input  logic        osi_exit,
  output logic        take,
  output logic        kill_ex,
  output logic        kill_id_pre,  // ID is cancelled by a non-coprocessor cause
  output logic        redirect,
  output logic [31:0] target,
  output exc_e        cause,
  output logic [31:0] epc,
  output logic        osi_mode,
  output logic        in_handler,
  output logic        abort
);
  logic [31:0] epc_q;
  logic        osi_q, inh_q;
  logic        d_ok, ib_ok, fe_ok, irq_ok;
  logic [31:0] epc_n;

  always_comb begin
    d_ok   = dbrk && !osi_q;
    ib_ok  = id_valid && id_int_info.ibrkpt && !osi_q;
    fe_ok  = id_valid && (id_int_info.iberr || id_int_info.iint);
    irq_ok = irq && id_valid && !inh_q && !osi_q && !cpactive;
    cause  = EXC_NONE;
    epc_n  = id_rpc;
    if (d_ok)                                begin cause = EXC_DBRK;  epc_n = mem_pc + 32'd2; end
    else if (ib_ok)                          cause = EXC_IBRK;
    else if (fe_ok && id_int_info.iberr)     cause = EXC_IBERR;
    else if (fe_ok)                          cause = EXC_IINT;
    else if (exec_exc)                       begin cause = EXC_CP;    epc_n = id_pc + 32'd2; end
    else if (irq_ok)                         cause = EXC_IRQ;
    take        = !mem_stall && (cause != EXC_NONE);
    kill_ex     = take && (cause == EXC_DBRK);
    kill_id_pre = !mem_stall && (d_ok || ib_ok || fe_ok || irq_ok);
    redirect    = take || (!mem_stall && osi_exit && osi_q);
    target      = take ? VEC_BASE + {26'd0, cause, 3'd0} : epc_q;
    abort       = take && (cause inside {EXC_DBRK, EXC_IBRK, EXC_IBERR, EXC_IINT});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epc_q <= '0;
      osi_q <= 1'b0;
      inh_q <= 1'b0;
    end else if (take) begin
      epc_q <= epc_n;
      inh_q <= 1'b1;
      if (cause == EXC_DBRK || cause == EXC_IBRK) osi_q <= 1'b1;
    end else if (!mem_stall && osi_exit && osi_q) begin
      osi_q <= 1'b0;
      inh_q <= 1'b0;
    end else if (eret_go) begin
      inh_q <= 1'b0;
    end
  end

  assign epc        = epc_q;
  assign osi_mode   = osi_q;
  assign in_handler = inh_q;
endmodule
