// AE32000B-style 32-bit embedded core: five-stage pipeline with LERI folding.
//
// Pipeline: IF fetches 32-bit words (two 16-bit instructions) into an eight-entry
// instruction queue through the predecoder, which marks LERI instructions. Between IF and
// ID the LERI folding unit takes up to four queue entries per cycle, absorbs leading LERIs
// into the extension register and issues the next non-LERI instruction to ID, so most
// LERIs cost no cycle. ID reads two registers, forms the immediate (extended by LERI),
// detects hazards, hands coprocessor operations over, resolves branches against flags
// forwarded from EX and takes exceptions. EX forwards operands from MEM and WB and runs the
// ALU, barrel shifter, leading zero/one counter and the single-cycle 32x32+64 MAC (into
// MH:ML); the flag generator updates N,Z,C,V; the address generator and aligner fill MAR
// and MDR. MEM accesses data memory (zero wait unless dmem_ready is low) and runs
// LDCn/STCn with the coprocessor; WB writes one register.
//
// The instruction decoder is not part of this module: the instruction in ID
// (id_instr, id_er, id_er_valid, id_valid) goes out, and its decoded control comes back on
// id_ctrl in the same cycle (combinational decoder outside). Breakpoint configuration,
// debugger register reads (dbg_sel: 0..15 registers, 16 MH, 17 ML, 18 flags, 19 EPC,
// 20 ID PC), debugger register writes (dbg_we with dbg_wdata to register dbg_sel[3:0],
// accepted only in OSI mode and only in a cycle where write-back leaves the register-file
// write port free, which dbg_wack signals; the new value is visible from the next cycle) and osi_exit form the OSI debugger port.
//
// Buses: imem_req/imem_addr with imem_gnt; the word returns later on imem_rvalid with
// imem_rdata/imem_err, in order, at most two outstanding. dmem_* is combinational: the
// read data must be valid in the cycle dmem_ready is high.
//
// Follows the source design: the five stages and the placement of every unit, the
// eight-entry queue and its entry format, LERI folding over four entries, 16 registers,
// single-cycle MAC into MH:ML, the coprocessor signal set, the eight-slot breaker and OSI
// mode. This implementation's choices: the decoded-control bundle, bus protocols, branch
// resolution in ID without delay slot, exception vectors and priorities, cpctrl codes.
//
// Notes on lint and netlist reports: the EX-stage copy of the decoded control (ex_c) is the
// whole id_ctrl_t bundle, and some of its fields (register numbers of sources, branch and
// coprocessor fields, immediate fields) are used only in ID, so parts of it are reported
// unused and removed by synthesis. imem_addr[1:0] are constant zero because fetches are
// word-aligned, and cpidx/cpno are the decoder's fields passed on unchanged, so a netlist
// check sees those eight output bits as constant or wired to inputs. The reset net is also
// used by the queue's assertions ('disable iff'); see ae32_iqueue.
module ae32000b_top
  import ae32_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter logic [31:0] VEC_BASE = 32'h0000_0100,
  parameter int unsigned IQ_DEPTH = 8,
  parameter int unsigned NBRK     = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory interface
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic        imem_gnt,
  input  logic        imem_rvalid,
  input  logic [31:0] imem_rdata,
  input  logic        imem_err,
  input  logic        cp0_iint,
  // decoder port
  output logic        id_valid,
  output logic [15:0] id_instr,
  output logic [31:0] id_er,
  output logic        id_er_valid,
  input  id_ctrl_t    id_ctrl,
  // data memory interface
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_ready,
  // coprocessor interface
  output logic [3:0]  cpctrl,
  output logic [3:0]  cpidx,
  output logic [1:0]  cpno,
  output logic [31:0] cpin,
  input  logic        id_cpbusy,
  input  logic        cpint,
  input  logic        cpactive,
  input  logic [31:0] cpout,
  output logic        mem_cpacc,
  input  logic        mem_cpbusy,
  // interrupt
  input  logic        irq,
  // OSI debugger port
  input  logic                    brk_cfg_we,
  input  logic [$clog2(NBRK)-1:0] brk_cfg_idx,
  input  logic [31:0]             brk_cfg_addr,
  input  logic [2:0]              brk_cfg_kind,
  input  logic [4:0]              dbg_sel,
  output logic [31:0]             dbg_rdata,
  input  logic                    dbg_we,
  input  logic [31:0]             dbg_wdata,
  output logic                    dbg_wack,
  output logic                    osi_mode,
  input  logic                    osi_exit,
  // status
  output logic        exc_taken,
  output exc_e        exc_cause,
  output logic [2:0]  leri_folded   // LERIs hidden behind an issued instruction this cycle
);

  // ------------------------------------------------------------------ IF
  logic        redirect;
  logic [31:0] redirect_pc;
  logic [31:0] resp_addr;
  logic        resp_skip;
  logic [1:0]  ibrk;
  iq_entry_t   resp_entry [2];
  iq_entry_t   head [4];
  logic [2:0]  pop_cnt;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;

  ae32_prefetch_pc #(.RESET_PC(RESET_PC), .OUTSTANDING(2)) u_ppc (
    .clk, .rst_n,
    .advance    (imem_req && imem_gnt),
    .redirect, .redirect_pc,
    .fetch_addr (imem_addr),
    .resp_valid (imem_rvalid),
    .resp_addr, .resp_skip
  );

  ae32_predecoder u_pdec (
    .word_valid (imem_rvalid),
    .word       (imem_rdata),
    .skip_lo    (resp_skip),
    .ibrk,
    .iberr      (imem_err),
    .iint       (cp0_iint),
    .entry      (resp_entry)
  );

  ae32_iqueue #(.DEPTH(IQ_DEPTH), .PEEK(4), .MAX_OUT(2)) u_iq (
    .clk, .rst_n,
    .flush      (redirect),
    .fetch_req  (imem_req),
    .fetch_gnt  (imem_gnt),
    .resp_valid (imem_rvalid),
    .resp_entry,
    .head,
    .pop_cnt,
    .count      (iq_count)
  );

  // ------------------------------------------------------------------ folding -> ID
  logic        id_stall, id_ready;
  logic        iss_valid, iss_erv;
  logic [15:0] iss_instr;
  int_info_t   iss_ii;
  logic [31:0] iss_er, iss_pc;
  logic [2:0]  iss_idx;
  logic [31:0] iss_rpc;
  logic        er_pending;

  assign id_ready = !id_valid || !id_stall;

  ae32_leri_fold #(.PEEK(4)) u_fold (
    .clk, .rst_n,
    .flush          (redirect),
    .head,
    .id_ready,
    .pop_cnt,
    .issue_valid    (iss_valid),
    .issue_instr    (iss_instr),
    .issue_int_info (iss_ii),
    .issue_er       (iss_er),
    .issue_er_valid (iss_erv),
    .issue_idx      (iss_idx),
    .folded         (leri_folded),
    .er_pending     (er_pending)
  );

  int_info_t   id_ii;
  logic [31:0] id_pc, id_rpc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid    <= 1'b0;
      id_instr    <= '0;
      id_ii       <= '0;
      id_er       <= '0;
      id_er_valid <= 1'b0;
      id_pc       <= '0;
      id_rpc      <= '0;
    end else if (redirect) begin
      id_valid    <= 1'b0;
    end else if (id_ready) begin
      id_valid    <= iss_valid;
      id_instr    <= iss_instr;
      id_ii       <= iss_ii;
      id_er       <= iss_er;
      id_er_valid <= iss_erv;
      id_pc       <= iss_pc;
      id_rpc      <= iss_rpc;
    end
  end

  // ------------------------------------------------------------------ ID
  id_ctrl_t    c;
  logic [31:0] rf_rd1, rf_rd2, rf_dbg, id_imm;
  logic [31:0] opa, opb_reg;
  logic        wb_we;
  logic [3:0]  wb_rd;
  logic [31:0] wb_data;
  flags_t      flags_q, flags_new, flags_fwd;
  logic        hz_load_use, hz_cp_src, hz_cp_struct, hz_cp_busy, hold_pre;
  logic        cp_taken, exec_exc, exc_abort;
  logic [31:0] cp_data;
  logic        exc_take, kill_ex, kill_id_pre, exc_redirect;
  logic [31:0] exc_target, epc;
  logic        in_handler;
  logic        id_go, br_taken, kill_id;
  logic        mem_stall;
  logic        cp_mem_hold, cp_mem_stc;
  logic        dbrk;

  assign c = id_ctrl;

  // the debugger writes a register only in OSI mode, when write-back does not
  logic        dbg_wr, rf_we;
  logic [3:0]  rf_wa;
  logic [31:0] rf_wd;
  assign dbg_wr   = dbg_we && osi_mode && !dbg_sel[4] && !wb_we;
  assign dbg_wack = dbg_wr;
  assign rf_we  = wb_we || dbg_wr;
  assign rf_wa  = dbg_wr ? dbg_sel[3:0] : wb_rd;
  assign rf_wd  = dbg_wr ? dbg_wdata : wb_data;

  ae32_regfile #(.NREG(NREG), .XLEN(XLEN)) u_rf (
    .clk,
    .ra1 (c.rs1), .rd1 (rf_rd1),
    .ra2 (c.rs2), .rd2 (rf_rd2),
    .ra_dbg (dbg_sel[3:0]), .rd_dbg (rf_dbg),
    .we (rf_we), .wa (rf_wa), .wd (rf_wd)
  );

  ae32_immgen u_imm (
    .imm_field (c.imm_field), .imm_len (c.imm_len), .imm_sext (c.imm_sext),
    .er (id_er), .er_valid (id_er_valid), .imm (id_imm)
  );

  // EX-stage state needed by ID
  logic        ex_valid;
  id_ctrl_t    ex_c;
  logic [31:0] ex_pc, ex_rv1, ex_rv2, ex_imm, ex_cp;
  // MEM-stage state
  logic        mem_valid, mem_rd_wr, mem_load, mem_store, mem_sext;
  logic [3:0]  mem_rd;
  msize_e      mem_size;
  cp_op_e      mem_cp_op;
  logic [31:0] mem_aluout, mem_mar, mem_mdr, mem_pc;
  logic [3:0]  mem_be;

  ae32_hazard u_hz (
    .id_valid,
    .rs1_used (c.rs1_used), .rs2_used (c.rs2_used), .rs1 (c.rs1), .rs2 (c.rs2),
    .id_is_cp  (c.cp_op != CP_NONE),
    .id_is_mtc (c.cp_op == CP_MTC),
    .ex_valid, .ex_load (ex_c.mem_rd), .ex_rd_wr (ex_c.rd_wr), .ex_rd (ex_c.rd),
    .mem_valid, .mem_rd_wr, .mem_rd, .mem_stc (cp_mem_stc),
    .id_cpbusy, .mem_stall,
    .load_use (hz_load_use), .cp_src (hz_cp_src), .cp_struct (hz_cp_struct), .cp_busy (hz_cp_busy),
    .hold_pre, .id_stall
  );

  ae32_cp_if u_cp (
    .present   (id_valid && !hold_pre),
    .kill      (kill_id_pre),
    .id_op     (c.cp_op), .id_no (c.cp_no), .id_idx (c.cp_idx),
    .id_imm, .id_rs_val (rf_rd1),
    .cp_taken, .exec_exc, .cp_data,
    .abort     (exc_abort),
    .mem_valid, .mem_op (mem_cp_op),
    .mem_hold  (cp_mem_hold), .mem_stc (cp_mem_stc),
    .cpctrl, .cpidx, .cpno, .cpin,
    .id_cpbusy, .cpint, .cpactive, .cpout,
    .mem_cpacc, .mem_cpbusy
  );

  ae32_exc #(.VEC_BASE(VEC_BASE)) u_exc (
    .clk, .rst_n, .mem_stall,
    .dbrk (dbrk && mem_valid), .mem_pc,
    .id_valid, .id_int_info (id_ii), .id_pc, .id_rpc,
    .exec_exc, .irq, .cpactive,
    .eret_go (id_go && c.eret),
    .osi_exit,
    .take (exc_take), .kill_ex, .kill_id_pre,
    .redirect (exc_redirect), .target (exc_target),
    .cause (exc_cause), .epc, .osi_mode, .in_handler,
    .abort (exc_abort)
  );

  assign exc_taken = exc_take;
  assign kill_id   = exc_redirect;
  assign id_go     = id_valid && !id_stall && !kill_id;
  assign flags_fwd = ex_valid ? flags_new : flags_q;

  ae32_pc_bta #(.RESET_PC(RESET_PC)) u_pc (
    .clk, .rst_n,
    .pop_cnt, .issue_idx (iss_idx), .issue_pc (iss_pc), .issue_rpc (iss_rpc),
    .issue_valid (iss_valid), .er_pending,
    .id_go, .id_branch (c.branch), .id_cond (c.cond), .id_pc, .id_imm,
    .flags (flags_fwd), .id_eret (c.eret), .epc,
    .exc_redirect, .exc_target,
    .br_taken, .redirect, .redirect_pc
  );

  // ------------------------------------------------------------------ ID -> EX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0;
      ex_c     <= '0;
      ex_pc    <= '0;
      ex_rv1   <= '0;
      ex_rv2   <= '0;
      ex_imm   <= '0;
      ex_cp    <= '0;
    end else if (!mem_stall) begin
      ex_valid <= id_go && !kill_ex;
      ex_c     <= c;
      ex_pc    <= id_pc;
      ex_rv1   <= rf_rd1;
      ex_rv2   <= rf_rd2;
      ex_imm   <= id_imm;
      ex_cp    <= cp_data;
    end else begin
      // EX is held: keep the forwarded operands, because their MEM/WB sources move on
      ex_rv1   <= opa;
      ex_rv2   <= opb_reg;
    end
  end

  // ------------------------------------------------------------------ EX
  logic [31:0] opb, alu_y, shf_y, mh, ml, ex_result;
  logic [31:0] ex_addr, ex_wdata;
  logic [3:0]  ex_be;
  logic [5:0]  lz_cnt;
  logic        alu_c, alu_v, shf_c, fwd_a, fwd_b;
  logic        mem_fwd;
  logic        ex_commit;

  assign mem_fwd   = mem_valid && mem_rd_wr && !mem_load;
  assign ex_commit = ex_valid && !mem_stall && !kill_ex;

  ae32_forward u_fwd_a (
    .rs (ex_c.rs1), .id_val (ex_rv1),
    .mem_fwd, .mem_rd, .mem_val (mem_aluout),
    .wb_we, .wb_rd, .wb_val (wb_data),
    .val (opa), .hit (fwd_a)
  );
  ae32_forward u_fwd_b (
    .rs (ex_c.rs2), .id_val (ex_rv2),
    .mem_fwd, .mem_rd, .mem_val (mem_aluout),
    .wb_we, .wb_rd, .wb_val (wb_data),
    .val (opb_reg), .hit (fwd_b)
  );

  assign opb = ex_c.use_imm ? ex_imm : opb_reg;

  ae32_alu u_alu (
    .op (ex_c.alu_op), .a (opa), .b (opb), .cin (flags_q.c),
    .y (alu_y), .cout (alu_c), .ovf (alu_v)
  );

  ae32_shifter #(.XLEN(32)) u_shf (
    .op (ex_c.shf_op), .a (opa), .amt (opb[4:0]), .y (shf_y), .cout (shf_c)
  );

  ae32_lzoc #(.XLEN(32)) u_lzc (.a (opa), .ones (ex_c.lz_ones), .count (lz_cnt));

  ae32_mac #(.XLEN(32)) u_mac (
    .clk, .rst_n,
    .en (ex_commit && ex_c.unit == U_MAC),
    .op (ex_c.mac_op), .a (opa), .b (opb), .mh, .ml
  );

  always_comb begin
    case (ex_c.unit)
      U_SHF:   ex_result = shf_y;
      U_LZC:   ex_result = {26'd0, lz_cnt};
      U_MFMH:  ex_result = mh;
      U_MFML:  ex_result = ml;
      U_CP:    ex_result = ex_cp;
      default: ex_result = alu_y;
    endcase
  end

  ae32_flaggen u_flg (
    .set_flags (ex_c.set_flags),
    .unit      (ex_c.unit),
    .getc      (ex_c.cp_op == CP_GETC),
    .cp_status (ex_cp[0]),
    .result    (ex_result),
    .alu_c, .alu_v, .shf_c,
    .old_flags (flags_q),
    .new_flags (flags_new)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         flags_q <= '0;
    else if (ex_commit) flags_q <= flags_new;
  end

  ae32_store_align u_sal (
    .base (opa), .offset (ex_imm), .size (ex_c.mem_size), .data (opb_reg),
    .addr (ex_addr), .wdata (ex_wdata), .be (ex_be)
  );

  // ------------------------------------------------------------------ EX -> MEM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid  <= 1'b0;
      mem_rd_wr  <= 1'b0;
      mem_load   <= 1'b0;
      mem_store  <= 1'b0;
      mem_sext   <= 1'b0;
      mem_rd     <= '0;
      mem_size   <= SZ_WORD;
      mem_cp_op  <= CP_NONE;
      mem_aluout <= '0;
      mem_mar    <= '0;
      mem_mdr    <= '0;
      mem_be     <= '0;
      mem_pc     <= '0;
    end else if (!mem_stall) begin
      mem_valid  <= ex_valid && !kill_ex;
      mem_rd_wr  <= ex_c.rd_wr;
      mem_load   <= ex_c.mem_rd;
      mem_store  <= ex_c.mem_wr;
      mem_sext   <= ex_c.mem_sext;
      mem_rd     <= ex_c.rd;
      mem_size   <= ex_c.mem_size;
      mem_cp_op  <= ex_c.cp_op;
      mem_aluout <= ex_result;
      mem_mar    <= ex_addr;
      mem_mdr    <= ex_wdata;
      mem_be     <= ex_be;
      mem_pc     <= ex_pc;
    end
  end

  // ------------------------------------------------------------------ MEM
  logic        mem_cpx;
  logic [31:0] load_data;

  assign mem_cpx    = mem_cp_op == CP_LDC || mem_cp_op == CP_STC;
  assign dmem_req   = mem_valid && (mem_load || mem_store || mem_cpx);
  assign dmem_we    = mem_store || cp_mem_stc;
  assign dmem_addr  = mem_mar;
  assign dmem_be    = mem_cpx ? 4'hF : mem_be;
  assign dmem_wdata = cp_mem_stc ? cpout : mem_mdr;
  assign mem_stall  = (dmem_req && !dmem_ready) || cp_mem_hold;

  ae32_load_ext u_lext (
    .rdata (dmem_rdata), .addr_lo (mem_mar[1:0]), .size (mem_size), .sext (mem_sext),
    .data (load_data)
  );

  ae32_osi_brk #(.NBRK(NBRK)) u_brk (
    .clk, .rst_n,
    .cfg_we (brk_cfg_we), .cfg_idx (brk_cfg_idx), .cfg_addr (brk_cfg_addr),
    .cfg_kind (brk_cfg_kind),
    .if_addr (resp_addr), .ibrk,
    .mem_acc (dmem_req), .mem_we (dmem_we), .mem_addr (dmem_addr),
    .dbrk
  );

  ae32_wb_ctrl u_wb (
    .clk, .rst_n, .mem_stall,
    .mem_valid, .mem_rd_wr, .mem_load, .mem_rd,
    .aluout (mem_aluout), .load_data,
    .wb_we, .wb_rd, .wb_data
  );

  // ------------------------------------------------------------------ debugger reads
  always_comb begin
    case (dbg_sel)
      5'd16:   dbg_rdata = mh;
      5'd17:   dbg_rdata = ml;
      5'd18:   dbg_rdata = {28'd0, flags_q};
      5'd19:   dbg_rdata = epc;
      5'd20:   dbg_rdata = id_pc;
      default: dbg_rdata = rf_dbg;
    endcase
  end

  // Unused status kept visible for waveform debugging
  logic unused;
  assign unused = ^{iq_count, cp_taken, in_handler, fwd_a, fwd_b, br_taken,
                    hz_load_use, hz_cp_src, hz_cp_struct, hz_cp_busy, head[0].valid};
endmodule
