// LERI instruction folding unit and extension register.
//
// Each cycle the unit looks at the first PEEK valid queue entries. Leading LERI entries
// (isLERI set, no int_info bit) are absorbed into the extension register: the first LERI
// of a group loads its sign-extended 14-bit immediate, each further one shifts the register
// left by 14 and appends its immediate. If a non-LERI entry, or an entry that carries a
// fetch exception, follows those LERIs inside the window, it is issued to ID in the same
// cycle together with the extension value, and all consumed entries are popped. The LERIs
// then cost no cycle of their own ("folded"). If the window holds only LERIs, they are
// absorbed and nothing is issued. When ID is stalled, LERIs are still absorbed but the
// instruction waits.
//
// Outputs are combinational from the queue head and the extension register; the register
// updates on the clock. issue_idx is the window position of the issued instruction, used to
// compute its PC; er_pending tells that LERIs were absorbed in an earlier cycle, so the
// restart address of the next instruction is that of its first LERI. folded counts the LERIs absorbed in a cycle that also issued an
// instruction.
//
// The window of four, the isLERI/int_info checks and sending the non-LERI instruction to
// the instruction register while extending the LERIs follow the source design; the
// accumulation rule and the stall behaviour are this implementation's.
module ae32_leri_fold
  import ae32_pkg::*;
#(
  parameter int unsigned PEEK = 4,
  localparam int unsigned NW = $clog2(PEEK + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  iq_entry_t    head [PEEK],
  input  logic         id_ready,     // ID accepts an instruction this cycle
  output logic [NW-1:0] pop_cnt,
  output logic         issue_valid,
  output logic [15:0]  issue_instr,
  output int_info_t    issue_int_info,
  output logic [31:0]  issue_er,
  output logic         issue_er_valid,
  output logic [NW-1:0] issue_idx,
  output logic [NW-1:0] folded,
  output logic         er_pending    // extension register holds LERIs of the next instruction
);
  logic [31:0] er_q;
  logic        erv_q;
  logic [31:0] er_n;
  logic        erv_n;
  logic [NW-1:0] nl;
  logic        found, stop;

  always_comb begin
    er_n  = er_q;
    erv_n = erv_q;
    nl    = '0;
    found = 1'b0;
    stop  = 1'b0;
    for (int i = 0; i < PEEK; i++) begin
      if (!stop) begin
        if (!head[i].valid) begin
          stop = 1'b1;
        end else if (head[i].is_leri && head[i].int_info == 3'b000) begin
          er_n  = erv_n ? {er_n[31-LERI_IMM:0], head[i].instr[LERI_IMM-1:0]}
                        : {{(32-LERI_IMM){head[i].instr[LERI_IMM-1]}}, head[i].instr[LERI_IMM-1:0]};
          erv_n = 1'b1;
          nl    = nl + NW'(1);
        end else begin
          found = 1'b1;
          stop  = 1'b1;
        end
      end
    end
  end

  always_comb begin
    issue_valid    = found && id_ready && !flush;
    issue_idx      = nl;
    issue_instr    = '0;
    issue_int_info = '0;
    for (int i = 0; i < PEEK; i++) begin
      if (NW'(i) == nl) begin
        issue_instr    = head[i].instr;
        issue_int_info = head[i].int_info;
      end
    end
    issue_er       = er_n;
    issue_er_valid = erv_n;
    pop_cnt        = flush ? '0 : (issue_valid ? nl + NW'(1) : nl);
    folded         = issue_valid ? nl : '0;
    er_pending     = erv_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      er_q  <= '0;
      erv_q <= 1'b0;
    end else if (flush || issue_valid) begin
      er_q  <= '0;
      erv_q <= 1'b0;
    end else begin
      er_q  <= er_n;
      erv_q <= erv_n;
    end
  end
endmodule
