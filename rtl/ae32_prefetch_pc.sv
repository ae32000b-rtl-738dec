// Prefetch PC generator.
//
// Holds the address of the next instruction word to fetch. The instruction bus carries one
// aligned 32-bit word (two 16-bit instructions) per request, so the register advances by 4
// each time a request is granted. A redirect (taken branch, exception, return) loads the
// target and wins over an advance in the same cycle. Because responses return one or more
// cycles after the request, the address of each granted request and whether its lower
// halfword is to be skipped (a redirect to the upper halfword) are kept in a small FIFO of
// OUTSTANDING entries and handed out with the matching response (resp_addr, resp_skip),
// in order. A response always pops the FIFO, also after a flush.
//
// The prefetch PC is part of the source design; the 32-bit fetch word, the request-tag
// FIFO and the halfword-skip mechanism are this implementation's choices.
//
// The register keeps a full byte address, but the two low bits are always cleared when it
// loads or advances, so lint reports pc_q[1:0] as unused; they are kept so the register
// reads as an ordinary address.
module ae32_prefetch_pc #(
  parameter logic [31:0] RESET_PC    = 32'h0,
  parameter int unsigned OUTSTANDING = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        advance,      // fetch request granted this cycle
  input  logic        redirect,
  input  logic [31:0] redirect_pc,
  output logic [31:0] fetch_addr,   // word address presented to the instruction bus
  input  logic        resp_valid,
  output logic [31:0] resp_addr,
  output logic        resp_skip
);
  localparam int unsigned TW = (OUTSTANDING > 1) ? $clog2(OUTSTANDING) : 1;

  logic [31:0] pc_q;
  logic        skip_q;
  logic [30:0] tag_q [OUTSTANDING];   // {word address [31:2], skip}
  logic [TW-1:0] wp_q, rp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q   <= RESET_PC;
      skip_q <= RESET_PC[1];
    end else if (redirect) begin
      pc_q   <= redirect_pc;
      skip_q <= redirect_pc[1];
    end else if (advance) begin
      pc_q   <= {pc_q[31:2] + 30'd1, 2'b00};
      skip_q <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
      for (int i = 0; i < OUTSTANDING; i++) tag_q[i] <= '0;
    end else begin
      if (advance) begin
        tag_q[wp_q] <= {pc_q[31:2], skip_q};
        wp_q        <= (32'(wp_q) == OUTSTANDING - 1) ? '0 : wp_q + TW'(1);
      end
      if (resp_valid)
        rp_q <= (32'(rp_q) == OUTSTANDING - 1) ? '0 : rp_q + TW'(1);
    end
  end

  assign fetch_addr = {pc_q[31:2], 2'b00};  // pc_q[1] only seeds skip_q, pc_q[0] is unused
  assign resp_addr  = {tag_q[rp_q][30:1], 2'b00};
  assign resp_skip  = tag_q[rp_q][0];
endmodule
