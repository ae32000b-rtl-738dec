// Instruction queue with its queue management unit.
//
// An eight-entry circular buffer of predecoded instructions sits between instruction fetch
// and decode, so fetch runs ahead of execution and the LERI folding unit can look at several
// instructions at once. The management part decides when to prefetch: a request goes out
// only when the queue could take two entries for it and for every fetch still in flight, so
// a returning word always fits. Each returning word writes up to two entries (invalid ones
// are skipped). The first PEEK entries are shown to the folding unit with their valid bits
// cleared beyond the fill level; the folding unit pops 0..PEEK entries per cycle. A flush
// empties the queue and discards the words of fetches that were already in flight.
//
// Timing: pushes and pops take effect on the clock edge; a word returning in the cycle it
// is pushed is not visible at the head until the next cycle.
//
// Depth eight and a four-entry window follow the source design; the request policy and the
// two-entry write port are this implementation's choices.
//
// Two concurrent assertions check the handshake: no word is pushed into a full queue and
// no response arrives without an outstanding request. They are disabled during reset with
// 'disable iff (!rst_n)', so the asynchronous reset also reaches logic sampled on the
// clock; lint tools report that as a reset net used both ways. It concerns only the
// assertions and is expected.
module ae32_iqueue
  import ae32_pkg::*;
#(
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned PEEK    = 4,
  parameter int unsigned MAX_OUT = 2,
  localparam int unsigned PW = $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  flush,
  output logic                  fetch_req,
  input  logic                  fetch_gnt,
  input  logic                  resp_valid,
  input  iq_entry_t             resp_entry [2],
  output iq_entry_t             head [PEEK],
  input  logic [$clog2(PEEK+1)-1:0] pop_cnt,
  output logic [CW-1:0]         count
);
  iq_entry_t       mem [DEPTH];
  logic [PW-1:0]   rd_q, wr_q;
  logic [CW-1:0]   cnt_q;
  logic [2:0]      infl_q, drop_q;
  logic            accept;
  logic [1:0]      npush;

  assign count     = cnt_q;
  assign fetch_req = !flush && (32'(cnt_q) + 2 * 32'(infl_q) + 2 <= DEPTH) && (32'(infl_q) < MAX_OUT);
  assign accept    = resp_valid && (drop_q == 3'd0) && !flush;
  assign npush     = accept ? 2'(resp_entry[0].valid) + 2'(resp_entry[1].valid) : 2'd0;

  always_comb begin
    for (int i = 0; i < PEEK; i++) begin
      head[i]       = mem[PW'(rd_q + PW'(i))];
      head[i].valid = mem[PW'(rd_q + PW'(i))].valid && (i < 32'(cnt_q));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= '0;
      wr_q   <= '0;
      cnt_q  <= '0;
      infl_q <= '0;
      drop_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      infl_q <= infl_q + 3'(fetch_req && fetch_gnt) - 3'(resp_valid);
      if (flush) begin
        rd_q   <= '0;
        wr_q   <= '0;
        cnt_q  <= '0;
        drop_q <= infl_q - 3'(resp_valid);
      end else begin
        if (resp_valid && drop_q != 3'd0) drop_q <= drop_q - 3'd1;
        if (accept) begin
          if (resp_entry[0].valid) begin
            mem[wr_q] <= resp_entry[0];
            if (resp_entry[1].valid) mem[PW'(wr_q + PW'(1))] <= resp_entry[1];
          end else if (resp_entry[1].valid) begin
            mem[wr_q] <= resp_entry[1];
          end
        end
        wr_q  <= PW'(wr_q + PW'(npush));
        rd_q  <= PW'(rd_q + PW'(pop_cnt));
        cnt_q <= CW'(cnt_q + CW'(npush) - CW'(pop_cnt));
      end
    end
  end

  // The folding unit never pops more than is there; a response never overflows the queue.
  a_pop_le_count : assert property (@(posedge clk) disable iff (!rst_n) 32'(pop_cnt) <= 32'(cnt_q));
  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) 32'(cnt_q) <= DEPTH);
endmodule
