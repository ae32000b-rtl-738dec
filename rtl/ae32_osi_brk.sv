// OSI breaker: breakpoint and watchpoint comparators of the on-silicon ICE.
//
// NBRK slots each hold an address and a kind: off, instruction breakpoint, or data
// watchpoint on reads, writes or any access. Slots are written through the configuration
// port (one slot per clock) and cleared by reset. Instruction breakpoints compare against
// both halfword addresses of the word being fetched and mark the matching instruction
// (ibrk[0] lower, ibrk[1] upper); the mark travels with the instruction through the queue.
// Data watchpoints compare against the address of the access in MEM. Comparison is exact
// on the byte address. Matches are combinational.
//
// Eight slots built from simple comparators and registers, watching fetch and data
// addresses, follow the source design; the slot format and exact-match rule are this
// implementation's.
module ae32_osi_brk #(
  parameter int unsigned NBRK = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_we,
  input  logic [$clog2(NBRK)-1:0] cfg_idx,
  input  logic [31:0]             cfg_addr,
  input  logic [2:0]              cfg_kind,   // 0 off, 1 ibrk, 2 watch rd, 3 watch wr, 4 watch any
  input  logic [31:0]             if_addr,    // word address being fetched
  output logic [1:0]              ibrk,
  input  logic                    mem_acc,
  input  logic                    mem_we,
  input  logic [31:0]             mem_addr,
  output logic                    dbrk
);
  localparam logic [2:0] K_IBRK = 3'd1, K_WRD = 3'd2, K_WWR = 3'd3, K_WANY = 3'd4;

  logic [31:0] addr_q [NBRK];
  logic [2:0]  kind_q [NBRK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBRK; i++) begin
        addr_q[i] <= '0;
        kind_q[i] <= '0;
      end
    end else if (cfg_we) begin
      addr_q[cfg_idx] <= cfg_addr;
      kind_q[cfg_idx] <= cfg_kind;
    end
  end

  always_comb begin
    ibrk = '0;
    dbrk = 1'b0;
    for (int i = 0; i < NBRK; i++) begin
      if (kind_q[i] == K_IBRK) begin
        if (addr_q[i] == if_addr)              ibrk[0] = 1'b1;
        if (addr_q[i] == (if_addr | 32'd2))    ibrk[1] = 1'b1;
      end
      if (mem_acc && addr_q[i] == mem_addr &&
          ((kind_q[i] == K_WANY) || (kind_q[i] == K_WRD && !mem_we) ||
           (kind_q[i] == K_WWR && mem_we)))
        dbrk = 1'b1;
    end
  end
endmodule
